// tb_tlut: self-checking test of the tunable LUT. Checks the reset table
// (constant 0), that every address reads the inverse of the stored word, that a
// write takes effect at the clock edge that samples it and not before, and the
// 3-input size.
module tb_tlut;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we4, we3, y4, y3;
  logic [15:0] w4;
  logic [7:0]  w3;
  logic [3:0]  a4;
  logic [2:0]  a3;

  tlut #(.K(4)) dut4 (.clk, .rst_n, .cfg_we(we4), .cfg_word(w4), .a(a4), .y(y4));
  tlut #(.K(3)) dut3 (.clk, .rst_n, .cfg_we(we3), .cfg_word(w3), .a(a3), .y(y3));

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

  initial begin
    logic [15:0] tt;
    logic [7:0]  tt3;
    we4 = 0; we3 = 0; w4 = 0; w3 = 0; a4 = 0; a3 = 0;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 16; n++) begin a4 = 4'(n); #1 check(y4 == 0, "reset table"); end
    rst_n = 1;
    for (int r = 0; r < 50; r++) begin
      tt = 16'($urandom);
      @(negedge clk); we4 = 1; w4 = ~tt;
      a4 = 4'($urandom);
      @(negedge clk); we4 = 0; w4 = 16'($urandom);
      for (int n = 0; n < 16; n++) begin
        a4 = 4'(n); #1 check(y4 == tt[n], $sformatf("k4 tt=%h n=%0d", tt, n));
      end
    end
    // write not yet visible before the edge
    @(negedge clk); we4 = 1; w4 = 16'h0000; a4 = 0;         // table all ones
    @(negedge clk); we4 = 1; w4 = 16'hFFFF;                   // table all zeros, pending
    #1 check(y4 == 1'b1, "old table until the edge");
    @(negedge clk); we4 = 0;
    #1 check(y4 == 1'b0, "new table after the edge");
    for (int r = 0; r < 30; r++) begin
      tt3 = 8'($urandom);
      @(negedge clk); we3 = 1; w3 = ~tt3;
      @(negedge clk); we3 = 0;
      for (int n = 0; n < 8; n++) begin
        a3 = 3'(n); #1 check(y3 == tt3[n], "k3 read");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
