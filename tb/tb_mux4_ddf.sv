// tb_mux4_ddf: self-checking test of the 4:1 multiplexer example on 3-input
// TLUTs. For each select value the testbench writes both truth tables from its
// own reference and checks o == i[s] for all 16 input vectors.
module tb_mux4_ddf;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we, o;
  logic [4:0]  lut;
  logic [15:0] word;
  logic [3:0]  i;

  mux4_ddf dut (.clk, .rst_n, .cfg_we(we), .cfg_lut(lut), .cfg_word(word), .i, .o);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; lut = 0; word = 0; i = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      for (int l = 0; l < 2; l++) begin
        @(negedge clk); we = 1; lut = 5'(l); word = ~mux4_tt(2'(s), l);
      end
      @(negedge clk); we = 0;
      for (int v = 0; v < 16; v++) begin
        i = 4'(v);
        #1;
        checks++;
        if (o != i[s]) begin failures++; $display("FAIL s=%0d i=%b o=%b", s, i, o); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
