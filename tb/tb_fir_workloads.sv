// tb_fir_workloads: runs the four evaluated filter sizes side by side: 8-bit
// samples and coefficients with 32, 64, 96 and 128 taps (768, 1536, 2304 and
// 3072 TLUTs). All four filters share one sample stream; each gets its own
// random coefficient set, written tap by tap from the reference truth tables,
// and its output is compared with a direct-form model every clock. The number of
// truth-table writes needed for a full coefficient load is checked too.
module tb_fir_workloads;
  import tb_ref_pkg::*;
  localparam int NS = 4;
  localparam int TAPS_OF[NS] = '{32, 64, 96, 128};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NS-1:0]     we;
  logic [7:0]        unit;
  logic [4:0]        lut;
  logic [15:0]       word;
  logic signed [7:0] x;
  longint            y[NS];
  int                writes[NS];

  for (genvar s = 0; s < NS; s++) begin : g_size
    localparam int T = TAPS_OF[s];
    logic signed [16+$clog2(T)-1:0] ys;
    fir_ddf #(.TAPS(T)) dut (.clk, .rst_n, .cfg_we(we[s]), .cfg_unit(unit), .cfg_lut(lut),
                             .cfg_word(word), .x, .y(ys));
    assign y[s] = longint'(ys);
  end

  int coef[NS][128];
  int hist[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model(int s);
    longint acc = 0;
    for (int i = 0; i < TAPS_OF[s] && i < hist.size(); i++)
      acc += longint'(coef[s][TAPS_OF[s]-1-i]) * hist[i];
    return acc;
  endfunction

  initial begin
    we = '0; unit = 0; lut = 0; word = 0; x = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NS; s++) begin
      writes[s] = 0;
      for (int t = 0; t < TAPS_OF[s]; t++) begin
        coef[s][t] = int'($urandom_range(0, 255)) - 128;
        for (int j = 0; j < 24; j++) begin
          @(negedge clk);
          we = '0; we[s] = 1'b1; unit = 8'(t); lut = 5'(j); word = ~fir_tt(coef[s][t], j);
          writes[s]++;
        end
      end
      @(negedge clk); we = '0;
      checks++;
      if (writes[s] != 24 * TAPS_OF[s]) failures++;
      $display("%0d taps: %0d TLUT writes", TAPS_OF[s], writes[s]);
    end
    for (int k = 0; k < 400; k++) begin
      int v;
      v = int'($urandom_range(0, 255)) - 128;
      @(negedge clk); x = 8'(v);
      @(posedge clk); hist.push_front(v); #1;
      for (int s = 0; s < NS; s++)
        if (hist.size() >= TAPS_OF[s]) begin
          checks++;
          if (y[s] != model(s)) begin
            failures++;
            $display("FAIL taps=%0d k=%0d y=%0d exp=%0d", TAPS_OF[s], k, y[s], model(s));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
