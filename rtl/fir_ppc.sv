// fir_ppc: tuning functions of one adaptive-filter coefficient multiplier.
//
// Given a tap's coefficient and the index j of one of its TLUTs (j = d*PPW + b,
// digit d, partial-product bit b, as laid out in kcm_tlut), returns that TLUT's
// truth table: entry n is bit b of (v * coeff), where v is n read as an
// unsigned digit, or as a signed digit for the top digit of the sample. This
// is a pure combinational Boolean function of the parameter (the paper's
// Partial Parameterizable Configuration), evaluated one TLUT at a time.
module fir_ppc
  import ddf_pkg::*;
#(
  parameter int unsigned XW = FIR_XW,
  parameter int unsigned CW = FIR_CW
) (
  input  logic signed [CW-1:0] coeff,
  input  logic [LUT_W-1:0]     lut,
  output logic [TT_BITS-1:0]   tt
);

  localparam int unsigned ND  = XW / LUT_K;
  localparam int unsigned PPW = CW + LUT_K;

  always_comb begin
    logic signed [PPW-1:0] v;
    logic signed [PPW-1:0] pp;
    logic [LUT_W-1:0]         d;
    logic [$clog2(PPW)-1:0]   b;
    d  = lut / LUT_W'(PPW);
    b  = ($clog2(PPW))'(lut % LUT_W'(PPW));
    tt = '0;
    for (int n = 0; n < TT_BITS; n++) begin
      if (d == LUT_W'(ND - 1)) v = PPW'(signed'(LUT_K'(n)));   // top digit: signed
      else             v = PPW'(n);                     // lower digits: unsigned
      pp    = v * PPW'(coeff);
      tt[n] = pp[b];
    end
  end

endmodule
