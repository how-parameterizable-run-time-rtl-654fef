// mux4_ppc: tuning functions of the two 3-input TLUTs of the 4:1 multiplexer
// example (mux4_ddf). Output is an 8-entry truth table in tt[7:0]; tt[15:8] is 0.
//   L0 (lut = 0), address {I3, I2, 0}:  ~(sel[0] ? I3 : I2) when sel[1], else 1.
//   L1 (lut = 1), address {L0, I1, I0}: ~L0 | (~sel[1] & (sel[0] ? I1 : I0)).
module mux4_ppc
  import ddf_pkg::*;
(
  input  logic [1:0]         sel,
  input  logic [LUT_W-1:0]   lut,
  output logic [TT_BITS-1:0] tt
);

  always_comb begin
    logic [2:0] n;
    tt = '0;
    for (int k = 0; k < 8; k++) begin
      n = 3'(k);
      if (lut == LUT_W'(0)) tt[k] = sel[1] ? ~(sel[0] ? n[2] : n[1]) : 1'b1;
      else                  tt[k] = ~n[2] | (~sel[1] & (sel[0] ? n[1] : n[0]));
    end
  end

endmodule
