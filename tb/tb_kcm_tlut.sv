// tb_kcm_tlut: self-checking test of the TLUT coefficient multiplier. For a set
// of coefficients (extremes and random ones) the testbench writes the 24 truth
// tables from its own reference, then checks p == x * c for all 256 samples.
module tb_kcm_tlut;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              we;
  logic [4:0]        lut;
  logic [15:0]       word;
  logic signed [7:0] x;
  logic signed [15:0] p;

  kcm_tlut dut (.clk, .rst_n, .cfg_we(we), .cfg_lut(lut), .cfg_word(word), .x, .p);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cs[$];
    we = 0; lut = 0; word = 0; x = 0;
    cs = '{0, 1, -1, 127, -128, 3, -77};
    for (int r = 0; r < 8; r++) cs.push_back(int'($urandom_range(0, 255)) - 128);
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (cs[k]) begin
      for (int j = 0; j < 24; j++) begin
        @(negedge clk); we = 1; lut = 5'(j); word = ~fir_tt(cs[k], j);
      end
      @(negedge clk); we = 0;
      for (int v = -128; v < 128; v++) begin
        x = 8'(v);
        #1;
        checks++;
        if (p != 16'(v * cs[k])) begin
          failures++;
          $display("FAIL c=%0d x=%0d p=%0d", cs[k], v, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
