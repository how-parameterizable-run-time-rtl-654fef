// tb_ppc_eval: self-checking test of the PPC. Compares every truth table the
// block produces with the testbench's own references: all 256 coefficients x 24
// filter TLUTs, random TCAM entries x 8 TLUTs, and all selects of both
// multiplexer examples (6:1 L1 against the sixteen listed functions).
module tb_ppc_eval;
  import ddf_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [1:0]         tgt;
  logic [PARAM_W-1:0] param;
  logic [4:0]         lut;
  logic [15:0]        tt;

  ppc_eval dut (.target(target_e'(tgt)), .param, .lut, .tt);

  // Drives the inputs, waits, compares.
  task automatic cmp(logic [1:0] t, logic [PARAM_W-1:0] p, logic [4:0] l,
                     logic [15:0] exp, string what);
    tgt = t; param = p; lut = l;
    #1;
    checks++;
    if (tt !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, tt, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] dd, mm;
  logic        vv;

  initial begin
    for (int c = -128; c < 128; c++)
      for (int j = 0; j < 24; j++) begin
        cmp(TGT_FIR, PARAM_W'(8'(c)), 5'(j), fir_tt(c, j), $sformatf("fir c=%0d j=%0d", c, j));
      end
    for (int r = 0; r < 200; r++) begin
      dd = $urandom; mm = $urandom & $urandom; vv = (r % 5 != 0);
      for (int g = 0; g < 8; g++)
        cmp(TGT_TCAM, PARAM_W'({vv, mm, dd}), 5'(g), tcam_tt(dd, mm, vv, g), "tcam");
    end
    for (int s = 0; s < 8; s++)
      for (int l = 0; l < 2; l++) begin
        cmp(TGT_MUX6, PARAM_W'(s), 5'(l), mux6_tt(3'(s), l), $sformatf("mux6 s=%0d l=%0d", s, l));
      end
    for (int s = 0; s < 4; s++)
      for (int l = 0; l < 2; l++) begin
        cmp(TGT_MUX4, PARAM_W'(s), 5'(l), mux4_tt(2'(s), l), "mux4");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
