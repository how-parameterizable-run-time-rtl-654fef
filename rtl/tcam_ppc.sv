// tcam_ppc: tuning functions of a TCAM entry.
//
// Given an entry (data, mask with 1 = don't care, valid) and the index g of one
// of its TLUTs, returns the truth table of that TLUT: entry n is 1 when the entry
// is valid and every one of the K key bits n[k] is masked or equal to
// data[g*K+k]. Combinational.
module tcam_ppc
  import ddf_pkg::*;
#(
  parameter int unsigned W = TCAM_W
) (
  input  logic [W-1:0]       data,
  input  logic [W-1:0]       mask,
  input  logic               valid,
  input  logic [LUT_W-1:0]   lut,
  output logic [TT_BITS-1:0] tt
);

  always_comb begin
    logic [LUT_K-1:0] dg, mg;
    dg = data[lut*LUT_K +: LUT_K];
    mg = mask[lut*LUT_K +: LUT_K];
    for (int n = 0; n < TT_BITS; n++)
      tt[n] = valid && ((LUT_K'(n) ^ dg) & ~mg) == '0;
  end

endmodule
