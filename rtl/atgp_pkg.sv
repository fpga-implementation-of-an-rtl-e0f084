// atgp_pkg: number format, shared types and the control-unit phase encoding
// of the ATGP-OSP target-detection accelerator.
//
// Every datum in the accelerator (pixel components, matrix elements, the
// orthogonal projector P_U) is a signed two's-complement fixed-point word of
// DATA_W bits with FRAC_W fraction bits (Q15.16 by default). The number
// format is this design's own choice; the accelerator described for the
// Virtex-7 does not state it. A product of two words is formed at full width
// and brought back to the word format by an arithmetic right shift of FRAC_W
// (rounding toward minus infinity) and saturation. Quotients are formed by a
// truncating signed division of the pre-shifted dividend.
package atgp_pkg;

  localparam int unsigned DATA_W = 32;   // width of one fixed-point word
  localparam int unsigned FRAC_W = 16;   // fraction bits of a word
  localparam int unsigned IDX_W  = 32;   // width of a pixel index in the read FIFO

  typedef logic signed [DATA_W-1:0]   fx_t;    // one fixed-point word
  typedef logic signed [2*DATA_W-1:0] fxw_t;   // full-width product

  localparam fx_t FX_ONE = fx_t'(1) <<< FRAC_W;
  localparam fx_t FX_MAX = {1'b0, {(DATA_W-1){1'b1}}};
  localparam fx_t FX_MIN = {1'b1, {(DATA_W-1){1'b0}}};

  // Saturate a wide signed value (already in word scale) to one word.
  function automatic fx_t fx_sat(input logic signed [2*DATA_W+15:0] v);
    if (v > $signed({{(DATA_W+16){1'b0}}, FX_MAX})) return FX_MAX;
    if (v < $signed({{(DATA_W+16){1'b1}}, FX_MIN})) return FX_MIN;
    return fx_t'(v);
  endfunction

  // Fixed-point product a*b.
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [2*DATA_W+15:0] p;
    p = (2*DATA_W+16)'(a) * (2*DATA_W+16)'(b);
    return fx_sat(p >>> FRAC_W);
  endfunction

  // Fixed-point quotient a/b; a zero divisor gives zero.
  function automatic fx_t fx_div(input fx_t a, input fx_t b);
    logic signed [2*DATA_W+15:0] n, q;
    if (b == '0) return '0;
    n = (2*DATA_W+16)'(a) <<< FRAC_W;
    q = n / (2*DATA_W+16)'(b);
    return fx_sat(q);
  endfunction

  // Phases of the control unit, one per step of the detection procedure.
  typedef enum logic [3:0] {
    PH_IDLE,   // waiting for start
    PH_SCAN,   // step 1: lengths of the raw pixels straight from the write FIFO
    PH_INDEX,  // step 2: write the index of the longest pixel to the read FIFO
    PH_LOADU,  // step 3: store the selected target pixel into U and U^T
    PH_GRAM,   // step 4: U^T U into the inverse module's A memory
    PH_INV,    // step 5: Gauss-Jordan inversion
    PH_MMUL,   // step 6: (U^T U)^-1 U^T
    PH_PMUL,   // step 7: P_U = I - U (U^T U)^-1 U^T
    PH_PROJ,   // step 8: lengths of P_U f for every pixel
    PH_DONE,   // all targets reported
    PH_ERROR   // U^T U was singular
  } phase_e;

endpackage
