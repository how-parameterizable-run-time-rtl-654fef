// tb_tcam_ddf: self-checking test of the TLUT TCAM at its default size (256
// entries of 32 bits). Entries are written from the testbench's own truth-table
// reference: random patterns with random don't-care masks, some invalid entries,
// a catch-all entry (so that several entries match at once) and one rewritten
// entry. Keys are either copies of stored
// patterns with masked bits randomised (hits) or random (mostly misses). match,
// hit and addr (lowest matching entry) are compared one clock after the key.
module tb_tcam_ddf;
  import ddf_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = TCAM_ENTRIES;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          we;
  logic [7:0]    unit;
  logic [4:0]    lut;
  logic [15:0]   word;
  logic [31:0]   key;
  logic [N-1:0]  match;
  logic          hit;
  logic [7:0]    addr;

  tcam_ddf dut (.clk, .rst_n, .cfg_we(we), .cfg_unit(unit), .cfg_lut(lut),
                .cfg_word(word), .key, .match, .hit, .addr);

  logic [31:0] d[N], m[N];
  logic        v[N];
  int hits = 0, misses = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_entry(int e, logic [31:0] dd, logic [31:0] mm, logic vv);
    for (int g = 0; g < 8; g++) begin
      @(negedge clk); we = 1; unit = 8'(e); lut = 5'(g); word = ~tcam_tt(dd, mm, vv, g);
    end
    @(negedge clk); we = 0;
    d[e] = dd; m[e] = mm; v[e] = vv;
  endtask

  task automatic search(logic [31:0] k);
    logic [N-1:0] exp;
    int first;
    first = -1;
    for (int e = 0; e < N; e++) begin
      exp[e] = tcam_ref_hit(k, d[e], m[e], v[e]);
      if (exp[e] && first < 0) first = e;
    end
    @(negedge clk); key = k;
    @(posedge clk); #1;
    checks++;
    if (match != exp || hit != (first >= 0) || (first >= 0 && addr != 8'(first))) begin
      failures++;
      $display("FAIL key=%h hit=%0d addr=%0d exp_first=%0d", k, hit, addr, first);
    end
    if (first >= 0) hits++; else misses++;
  endtask

  initial begin
    we = 0; unit = 0; lut = 0; word = 0; key = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // after reset no entry matches
    for (int e = 0; e < N; e++) begin d[e] = 0; m[e] = 0; v[e] = 0; end
    search(32'h0);
    for (int e = 0; e < N; e++) begin
      logic [31:0] mm;
      mm = $urandom & $urandom & $urandom;   // sparse don't-cares
      write_entry(e, $urandom, mm, ($urandom_range(0, 7) != 0));
    end
    for (int r = 0; r < 300; r++) begin
      if (r % 3 != 0) begin
        int e;
        e = $urandom_range(0, N-1);
        search((d[e] & ~m[e]) | ($urandom & m[e]));
      end else
        search($urandom);
    end
    // catch-all entry near the end, then a rewritten entry
    write_entry(N-1, 32'h0, 32'hFFFF_FFFF, 1'b1);
    for (int r = 0; r < 20; r++) search($urandom);
    // several matches at once: a stored pattern and the catch-all
    for (int r = 0; r < 40; r++) begin
      int e;
      e = $urandom_range(0, N-2);
      search((d[e] & ~m[e]) | ($urandom & m[e]));
    end
    write_entry(3, 32'hDEAD_BEEF, 32'h0, 1'b1);
    search(32'hDEAD_BEEF);
    search(32'hDEAD_BEEE);
    write_entry(3, 32'hDEAD_BEEF, 32'h0, 1'b0);
    search(32'hDEAD_BEEF);
    checks++;
    if (hits == 0 || misses == 0) begin failures++; $display("FAIL coverage"); end
    $display("hits=%0d misses=%0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
