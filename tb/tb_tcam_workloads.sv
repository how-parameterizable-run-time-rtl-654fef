// tb_tcam_workloads: runs the four evaluated TCAM sizes side by side: 16 and 32
// bits wide, 128 and 256 entries. Every instance is filled with random ternary
// entries written from the reference truth tables (W/4 TLUTs per entry), then
// searched with keys built from stored entries (hits) and random keys (mostly
// misses); match, hit and lowest address are compared one clock later.
module tb_tcam_workloads;
  import tb_ref_pkg::*;
  localparam int NS = 4;
  localparam int W_OF[NS] = '{16, 16, 32, 32};
  localparam int E_OF[NS] = '{128, 256, 128, 256};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NS-1:0] we;
  logic [7:0]    unit;
  logic [4:0]    lut;
  logic [15:0]   word;
  logic [31:0]   key;
  logic [255:0]  match[NS];
  logic          hit[NS];
  logic [7:0]    addr[NS];

  for (genvar s = 0; s < NS; s++) begin : g_size
    localparam int W = W_OF[s];
    localparam int E = E_OF[s];
    logic [E-1:0]         m;
    logic [$clog2(E)-1:0] a;
    tcam_ddf #(.W(W), .ENTRIES(E)) dut (.clk, .rst_n, .cfg_we(we[s]), .cfg_unit(unit),
      .cfg_lut(lut), .cfg_word(word), .key(key[W-1:0]), .match(m), .hit(hit[s]), .addr(a));
    assign match[s] = 256'(m);
    assign addr[s]  = 8'(a);
  end

  logic [31:0] d[NS][256], mk[NS][256];
  logic        v[NS][256];
  int hits = 0, misses = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; unit = 0; lut = 0; word = 0; key = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NS; s++)
      for (int e = 0; e < E_OF[s]; e++) begin
        // entries of a W-bit TCAM: bits above W unused (zero data, masked)
        logic [31:0] wmask;
        wmask = (W_OF[s] == 32) ? 32'hFFFF_FFFF : 32'h0000_FFFF;
        d[s][e]  = $urandom & wmask;
        mk[s][e] = ($urandom & $urandom & $urandom & wmask) | ~wmask;
        v[s][e]  = ($urandom_range(0, 5) != 0);
        for (int g = 0; g < W_OF[s] / 4; g++) begin
          @(negedge clk);
          we = '0; we[s] = 1'b1; unit = 8'(e); lut = 5'(g);
          word = ~tcam_tt(d[s][e], mk[s][e], v[s][e], g);
        end
      end
    @(negedge clk); we = '0;
    for (int r = 0; r < 300; r++) begin
      logic [31:0] k;
      if (r % 2 == 0) begin
        int s, e;
        s = $urandom_range(0, NS-1); e = $urandom_range(0, E_OF[s]-1);
        k = (d[s][e] & ~mk[s][e]) | ($urandom & mk[s][e]);
      end else k = $urandom;
      @(negedge clk); key = k;
      @(posedge clk); #1;
      for (int s = 0; s < NS; s++) begin
        logic [255:0] exp;
        int first;
        exp = '0; first = -1;
        for (int e = 0; e < E_OF[s]; e++) begin
          exp[e] = tcam_ref_hit(k & ((W_OF[s] == 32) ? 32'hFFFF_FFFF : 32'h0000_FFFF),
                                d[s][e], mk[s][e], v[s][e]);
          if (exp[e] && first < 0) first = e;
        end
        checks++;
        if (match[s] != exp || hit[s] != (first >= 0) || (first >= 0 && addr[s] != 8'(first))) begin
          failures++;
          $display("FAIL W=%0d E=%0d key=%h", W_OF[s], E_OF[s], k);
        end
        if (first >= 0) hits++; else misses++;
      end
    end
    checks++;
    if (hits == 0 || misses == 0) failures++;
    $display("hits=%0d misses=%0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
