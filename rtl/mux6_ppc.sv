// mux6_ppc: tuning functions of the two TLUTs of the 6:1 multiplexer example.
//
// L1 (lut = 1): entry n is bit (3 - s[1:0]) of n, so L1 passes i0, i1, i2 or i3
// for s[1:0] = 0..3. These are the sixteen functions of the paper's
// reconfiguration procedure for L1 (0, S0&S1, ~S0&S1, S1, ..., 1) and do not
// depend on s[2].
// L0 (lut = 0), address {0, L1, i5, i4}: passes i5 or i4 (by s[0]) when s[2] is
// set and L1 otherwise; this LUT is this design's own completion of the example.
module mux6_ppc
  import ddf_pkg::*;
(
  input  logic [2:0]         sel,
  input  logic [LUT_W-1:0]   lut,
  output logic [TT_BITS-1:0] tt
);

  always_comb begin
    logic [3:0] n;
    for (int k = 0; k < TT_BITS; k++) begin
      n = 4'(k);
      if (lut == LUT_W'(1)) tt[k] = n[3 - sel[1:0]];
      else                  tt[k] = sel[2] ? (sel[0] ? n[1] : n[0]) : n[2];
    end
  end

endmodule
