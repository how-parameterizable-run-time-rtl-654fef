// tb_fir_ddf: self-checking test of the adaptive FIR filter at its default size
// (32 taps, 8-bit samples and coefficients). The testbench writes every tap's
// 24 truth tables from its own reference, streams random samples (with extreme
// values mixed in) and compares y against a direct-form model of
//   y[n+1] = sum_i c_i * x[n-(TAPS-1)+i],
// which also pins the one-clock latency. It then changes one coefficient
// (rewriting one tap) and checks the filter again.
module tb_fir_ddf;
  import ddf_pkg::*;
  import tb_ref_pkg::*;
  localparam int TAPS = FIR_TAPS;
  localparam int AW   = 16 + $clog2(TAPS);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               we;
  logic [7:0]         unit;
  logic [4:0]         lut;
  logic [15:0]        word;
  logic signed [7:0]  x;
  logic signed [AW-1:0] y;

  fir_ddf dut (.clk, .rst_n, .cfg_we(we), .cfg_unit(unit), .cfg_lut(lut),
               .cfg_word(word), .x, .y);

  int coef[TAPS];
  int hist[$];   // most recent sample first

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_tap(int t, int c);
    for (int j = 0; j < 24; j++) begin
      @(negedge clk); we = 1; unit = 8'(t); lut = 5'(j); word = ~fir_tt(c, j);
    end
    @(negedge clk); we = 0;
    coef[t] = c;
  endtask

  function automatic longint model();
    longint s = 0;
    // newest sample meets c_{TAPS-1}
    for (int i = 0; i < TAPS; i++)
      if (i < hist.size()) s += longint'(coef[TAPS-1-i]) * hist[i];
    return s;
  endfunction

  task automatic run(int n);
    for (int k = 0; k < n; k++) begin
      int v;
      case ($urandom_range(0, 9))
        0: v = -128;
        1: v = 127;
        default: v = int'($urandom_range(0, 255)) - 128;
      endcase
      @(negedge clk);
      x = 8'(v);
      @(posedge clk);
      hist.push_front(v);
      #1;
      if (hist.size() >= TAPS) begin
        checks++;
        if (longint'(y) != model()) begin
          failures++;
          $display("FAIL k=%0d y=%0d exp=%0d", k, y, model());
        end
      end
    end
  endtask

  initial begin
    we = 0; unit = 0; lut = 0; word = 0; x = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < TAPS; t++)
      write_tap(t, (t == 0) ? -128 : (t == 1) ? 127 : int'($urandom_range(0, 255)) - 128);
    hist.delete();
    run(200);
    write_tap(5, 77);
    hist.delete();
    run(100);
    // all coefficients at the negative extreme: largest sums
    for (int t = 0; t < TAPS; t++) write_tap(t, -128);
    hist.delete();
    for (int k = 0; k < TAPS + 5; k++) begin
      @(negedge clk); x = -128;
      @(posedge clk); hist.push_front(-128); #1;
      if (hist.size() >= TAPS) begin
        checks++;
        if (longint'(y) != model()) begin failures++; $display("FAIL extreme y=%0d", y); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
