// tb_config_manager: self-checking test of the specialisation sequencer. A driver
// offers 40 commands back to back, cycling through all targets; each is offered
// as soon as the previous one is accepted, so it waits (stalls) while the manager
// is busy. A monitor records the clock of every acceptance and every
// configuration write. Checks, per command: N writes (24 / 8 / 2 / 2) on the N
// clocks right after acceptance, TLUT indices 0..N-1 in order, the right target
// and unit, the stored word equal to the inverse of the reference truth table,
// `busy` during the writes, and acceptance of the next command exactly N+1
// clocks after the previous one.
module tb_config_manager;
  import ddf_pkg::*;
  import tb_ref_pkg::*;
  localparam int NCMD = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               cmd_valid, cmd_ready, busy;
  target_e            cmd_target;
  logic [7:0]         cmd_unit;
  logic [PARAM_W-1:0] cmd_param;
  cfg_wr_t            cfg;

  config_manager dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_target, .cmd_unit,
                      .cmd_param, .cfg, .busy);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_tt(target_e t, logic [PARAM_W-1:0] p, int j);
    case (t)
      TGT_FIR:  return fir_tt(int'(signed'(p[7:0])), j);
      TGT_TCAM: return tcam_tt(p[31:0], p[63:32], p[64], j);
      TGT_MUX6: return mux6_tt(p[2:0], j);
      default:  return mux4_tt(p[1:0], j);
    endcase
  endfunction

  target_e            ct[NCMD];
  logic [7:0]         cu[NCMD];
  logic [PARAM_W-1:0] cp[NCMD];
  int                 acc_cyc[NCMD];
  int                 n_acc = 0, stalls = 0, cyc = 0;
  cfg_wr_t            wr[$];
  int                 wr_cyc[$];

  // monitor
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (cmd_valid && cmd_ready) begin acc_cyc[n_acc] = cyc; n_acc++; end
    if (cmd_valid && !cmd_ready) stalls++;
    if (cfg.we) begin
      wr.push_back(cfg); wr_cyc.push_back(cyc);
      checks++;
      if (!busy || cmd_ready) begin failures++; $display("FAIL busy/ready during write"); end
    end
  end

  initial begin
    for (int r = 0; r < NCMD; r++) begin
      ct[r] = target_e'(r % 4);
      cu[r] = 8'($urandom);
      cp[r] = {$urandom, $urandom, $urandom};
    end
    cmd_valid = 0; cmd_target = TGT_FIR; cmd_unit = 0; cmd_param = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < NCMD; r++) begin
      cmd_valid = 1; cmd_target = ct[r]; cmd_unit = cu[r]; cmd_param = cp[r];
      do @(posedge clk); while (!cmd_ready);
      @(negedge clk);
    end
    cmd_valid = 0;
    repeat (30) @(negedge clk);
    // check the recorded trace
    begin
      int k = 0;
      check(n_acc == NCMD, "all commands accepted");
      check(stalls > 0, "commands had to wait while busy");
      for (int r = 0; r < NCMD; r++) begin
        int n;
        n = (ct[r] == TGT_FIR) ? 24 : (ct[r] == TGT_TCAM) ? 8 : 2;
        if (r + 1 < NCMD)
          check(acc_cyc[r+1] - acc_cyc[r] == n + 1, $sformatf("cmd %0d takes %0d clocks", r, n + 1));
        for (int j = 0; j < n; j++) begin
          if (k >= wr.size()) begin check(0, "missing write"); break; end
          check(wr_cyc[k] == acc_cyc[r] + 1 + j, "write clock");
          check(wr[k].target == ct[r] && wr[k].unit == cu[r] && wr[k].lut == 5'(j), "write address");
          check(wr[k].word == ~ref_tt(ct[r], cp[r], j), $sformatf("stored word cmd %0d j=%0d", r, j));
          k++;
        end
      end
      check(k == wr.size(), "no extra writes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
