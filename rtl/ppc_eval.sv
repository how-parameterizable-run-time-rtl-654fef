// ppc_eval: the Partial Parameterizable Configuration of the whole reconfigurable
// IP, evaluated one TLUT at a time.
//
// In dynamic data folding only the TLUT truth tables depend on the parameters;
// all other configuration bits are static. The PPC is the Boolean function from
// parameter values to those truth tables. This block selects, by target, the
// tuning functions of the filter (fir_ppc), the TCAM (tcam_ppc) and the two
// multiplexer examples (mux6_ppc, mux4_ppc). `param` is packed as described in
// ddf_pkg; `lut` indexes a TLUT inside one unit (one filter tap, one TCAM
// entry, one multiplexer). The result `tt` is the true truth table, entry n
// for LUT address n; conversion to the stored form is left to the writer.
// Purely combinational. In the paper this evaluation is compiled C code on the
// embedded processor; computing it in logic is this design's choice.
module ppc_eval
  import ddf_pkg::*;
(
  input  target_e             target,
  input  logic [PARAM_W-1:0]  param,
  input  logic [LUT_W-1:0]    lut,
  output logic [TT_BITS-1:0]  tt
);

  logic [TT_BITS-1:0] tt_fir, tt_tcam, tt_mux6, tt_mux4;

  fir_ppc u_fir (
    .coeff (param[FIR_CW-1:0]),
    .lut   (lut),
    .tt    (tt_fir)
  );

  tcam_ppc u_tcam (
    .data  (param[TCAM_W-1:0]),
    .mask  (param[2*TCAM_W-1:TCAM_W]),
    .valid (param[2*TCAM_W]),
    .lut   (lut),
    .tt    (tt_tcam)
  );

  mux6_ppc u_mux6 (
    .sel (param[2:0]),
    .lut (lut),
    .tt  (tt_mux6)
  );

  mux4_ppc u_mux4 (
    .sel (param[1:0]),
    .lut (lut),
    .tt  (tt_mux4)
  );

  always_comb begin
    unique case (target)
      TGT_FIR:  tt = tt_fir;
      TGT_TCAM: tt = tt_tcam;
      TGT_MUX6: tt = tt_mux6;
      default:  tt = tt_mux4;
    endcase
  end

endmodule
