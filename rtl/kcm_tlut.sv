// kcm_tlut: multiplier by a run-time coefficient, built from tunable LUTs.
//
// In the adaptive FIR filter the coefficient is a parameter input, so the
// multiplier needs no coefficient register and no generic multiplier array.
// The XW-bit sample is cut into K-bit digits. Each digit addresses PPW = CW+K
// TLUTs; TLUT b of digit d holds bit b of the partial product (digit value *
// coefficient) for all 2^K digit values, so the TLUTs together are a 2^K-entry
// table of coefficient multiples. The lower digits are unsigned, the top digit
// is signed (two's complement sample). The partial products are sign-extended,
// shifted by K*d and added by a static adder tree. For 8-bit samples and
// coefficients this is 2 x 12 = 24 TLUTs per multiplier, the count the paper
// reports (768 TLUTs for 32 taps); the split into digits is this design's reading
// of that count, the paper does not show the multiplier's insides.
//
// Interface: TLUT j = d*PPW + b is written when `cfg_we` is high with
// `cfg_lut` = j; `cfg_word` is in stored (inverted) form. `p` is combinational
// in `x` (the filter registers it). Which truth tables produce which coefficient
// is decided by the PPC (fir_ppc), not here.
module kcm_tlut
  import ddf_pkg::*;
#(
  parameter int unsigned XW = FIR_XW,
  parameter int unsigned CW = FIR_CW
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cfg_we,
  input  logic [LUT_W-1:0]       cfg_lut,
  input  logic [TT_BITS-1:0]     cfg_word,
  input  logic signed [XW-1:0]   x,
  output logic signed [XW+CW-1:0] p
);

  localparam int unsigned ND  = XW / LUT_K;     // digits per sample
  localparam int unsigned PPW = CW + LUT_K;     // partial-product width

  logic [ND-1:0][PPW-1:0] pp;

  for (genvar d = 0; d < ND; d++) begin : g_digit
    for (genvar b = 0; b < PPW; b++) begin : g_bit
      tlut #(.K(LUT_K)) u_tlut (
        .clk      (clk),
        .rst_n    (rst_n),
        .cfg_we   (cfg_we && (cfg_lut == LUT_W'(d*PPW + b))),
        .cfg_word (cfg_word),
        .a        (x[d*LUT_K +: LUT_K]),
        .y        (pp[d][b])
      );
    end
  end

  always_comb begin
    p = '0;
    for (int d = 0; d < ND; d++) begin
      p = p + ((XW+CW)'(signed'(pp[d])) <<< (LUT_K*d));
    end
  end

endmodule
