// tb_ddf_platform: end-to-end test of the whole platform at its default sizes
// (32-tap filter, 256 x 32 TCAM, both multiplexer examples), driving only the
// top-level ports. Every parameter change goes through the command port and the
// configuration manager; results are compared with models in this file.
//   - multiplexers: several select changes, all input vectors checked each time
//   - filter: all 32 coefficients specialised back to back (the commands stall
//     while the manager is busy), a 300-sample stream checked against a
//     direct-form model, one coefficient changed, stream checked again
//   - TCAM: all 256 entries written, then a single entry rewritten; hits and
//     misses checked (match vector, hit, lowest address)
//   - specialisation time: 25 clocks per filter tap (24 TLUTs + 1), 9 per TCAM
//     entry, 3 per multiplexer, measured from the first command to idle
// Each mechanism (command stall, each target's specialisation, coefficient
// change, entry rewrite, TCAM hit, TCAM miss) is counted; one that never
// happens counts as a failure.
module tb_ddf_platform;
  import ddf_pkg::*;
  import tb_ref_pkg::*;
  localparam int TAPS = FIR_TAPS;
  localparam int N    = TCAM_ENTRIES;
  localparam int AW   = FIR_XW + FIR_CW + $clog2(FIR_TAPS);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               cmd_valid, cmd_ready, busy;
  logic [1:0]         cmd_target;
  logic [7:0]         cmd_unit;
  logic [PARAM_W-1:0] cmd_param;
  logic signed [7:0]  fir_x;
  logic signed [AW-1:0] fir_y;
  logic [31:0]        tcam_key;
  logic [N-1:0]       tcam_match;
  logic               tcam_hit;
  logic [7:0]         tcam_addr;
  logic [5:0]         mux6_i;
  logic               mux6_o;
  logic [3:0]         mux4_i;
  logic               mux4_o;

  ddf_platform dut (.*);

  // mechanism counters
  int n_stall = 0, n_spec_fir = 0, n_spec_tcam = 0, n_spec_mux6 = 0, n_spec_mux4 = 0;
  int n_coef_change = 0, n_entry_rewrite = 0, n_tcam_hit = 0, n_tcam_miss = 0;

  // clocks spent specialising: the accepting clock plus the write clocks
  int spec_clocks = 0;

  always @(posedge clk) if (rst_n) begin
    if (busy || (cmd_valid && cmd_ready)) spec_clocks++;
    if (cmd_valid && !cmd_ready) n_stall++;
    if (cmd_valid && cmd_ready)
      case (cmd_target)
        2'd0: n_spec_fir++;
        2'd1: n_spec_tcam++;
        2'd2: n_spec_mux6++;
        default: n_spec_mux4++;
      endcase
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Offer one command; return after it has been accepted (at a negedge).
  task automatic send(int t, int u, logic [PARAM_W-1:0] p);
    @(negedge clk);
    cmd_valid = 1; cmd_target = 2'(t); cmd_unit = 8'(u); cmd_param = p;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic wait_idle();
    while (busy || !cmd_ready) @(negedge clk);
  endtask

  // ---------------- filter model ----------------
  int coef[TAPS];
  int hist[$];

  function automatic longint fir_model();
    longint s = 0;
    for (int i = 0; i < TAPS && i < hist.size(); i++)
      s += longint'(coef[TAPS-1-i]) * hist[i];
    return s;
  endfunction

  task automatic fir_stream(int n);
    hist.delete();
    for (int k = 0; k < n; k++) begin
      int v;
      v = int'($urandom_range(0, 255)) - 128;
      @(negedge clk); fir_x = 8'(v);
      @(posedge clk); hist.push_front(v); #1;
      if (hist.size() >= TAPS)
        check(longint'(fir_y) == fir_model(), $sformatf("fir k=%0d y=%0d exp=%0d", k, fir_y, fir_model()));
    end
  endtask

  // ---------------- TCAM model ----------------
  logic [31:0] td[N], tm[N];
  logic        tv[N];

  task automatic tcam_search(logic [31:0] k);
    logic [N-1:0] exp;
    int first = -1;
    for (int e = 0; e < N; e++) begin
      exp[e] = tcam_ref_hit(k, td[e], tm[e], tv[e]);
      if (exp[e] && first < 0) first = e;
    end
    @(negedge clk); tcam_key = k;
    @(posedge clk); #1;
    check(tcam_match == exp && tcam_hit == (first >= 0) && (first < 0 || tcam_addr == 8'(first)),
          $sformatf("tcam key=%h", k));
    if (first >= 0) n_tcam_hit++; else n_tcam_miss++;
  endtask

  initial begin
    int t0, cyc;
    cmd_valid = 0; cmd_target = 0; cmd_unit = 0; cmd_param = 0;
    fir_x = 0; tcam_key = 0; mux6_i = 0; mux4_i = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // ---- multiplexer examples ----
    for (int r = 0; r < 8; r++) begin
      int s6, s4;
      s6 = r % 6; s4 = (r * 3) % 4;
      send(2, 0, PARAM_W'(s6));
      send(3, 0, PARAM_W'(s4));
      wait_idle();
      for (int v = 0; v < 64; v++) begin
        mux6_i = 6'(v); mux4_i = 4'(v);
        #1;
        check(mux6_o == mux6_i[s6], $sformatf("mux6 s=%0d", s6));
        check(mux4_o == mux4_i[s4], $sformatf("mux4 s=%0d", s4));
      end
    end

    // ---- filter: all taps, back to back, timed ----
    for (int t = 0; t < TAPS; t++) coef[t] = int'($urandom_range(0, 255)) - 128;
    coef[0] = -128; coef[TAPS-1] = 127;
    spec_clocks = 0;
    for (int t = 0; t < TAPS; t++) send(0, t, PARAM_W'(8'(coef[t])));
    wait_idle();
    cyc = spec_clocks;
    check(cyc == TAPS * 25, $sformatf("filter specialisation took %0d clocks, expected %0d", cyc, TAPS * 25));
    $display("filter specialisation: %0d clocks for %0d taps", cyc, TAPS);
    fir_stream(300);
    coef[7] = 99;
    send(0, 7, PARAM_W'(8'(99)));
    wait_idle();
    n_coef_change++;
    fir_stream(100);

    // ---- TCAM: all entries, timed ----
    for (int e = 0; e < N; e++) begin
      td[e] = $urandom; tm[e] = $urandom & $urandom & $urandom; tv[e] = ($urandom_range(0, 5) != 0);
    end
    spec_clocks = 0;
    for (int e = 0; e < N; e++) send(1, e, {tv[e], tm[e], td[e]});
    wait_idle();
    cyc = spec_clocks;
    check(cyc == N * 9, $sformatf("TCAM full write took %0d clocks, expected %0d", cyc, N * 9));
    $display("TCAM full write: %0d clocks for %0d entries", cyc, N);
    for (int r = 0; r < 200; r++) begin
      if (r % 2 == 0) begin
        int e;
        e = $urandom_range(0, N-1);
        tcam_search((td[e] & ~tm[e]) | ($urandom & tm[e]));
      end else
        tcam_search($urandom);
    end
    // rewrite one entry (single-entry specialisation), then search for it
    td[200] = 32'hCAFE_0001; tm[200] = 32'h0000_00FF; tv[200] = 1;
    send(1, 200, {tv[200], tm[200], td[200]});
    wait_idle();
    n_entry_rewrite++;
    tcam_search(32'hCAFE_0042);
    tcam_search(32'hCAFE_0142);
    // the filter was not disturbed by the TCAM writes
    fir_stream(60);

    check(n_stall > 0,         "no command stall happened");
    check(n_spec_fir > 0,      "no filter specialisation");
    check(n_spec_tcam > 0,     "no TCAM specialisation");
    check(n_spec_mux6 > 0,     "no 6:1 multiplexer specialisation");
    check(n_spec_mux4 > 0,     "no 4:1 multiplexer specialisation");
    check(n_coef_change > 0,   "no coefficient change");
    check(n_entry_rewrite > 0, "no single-entry rewrite");
    check(n_tcam_hit > 0,      "no TCAM hit");
    check(n_tcam_miss > 0,     "no TCAM miss");
    $display("stalls=%0d spec fir=%0d tcam=%0d mux6=%0d mux4=%0d coef_changes=%0d rewrites=%0d hits=%0d misses=%0d",
             n_stall, n_spec_fir, n_spec_tcam, n_spec_mux6, n_spec_mux4, n_coef_change,
             n_entry_rewrite, n_tcam_hit, n_tcam_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
