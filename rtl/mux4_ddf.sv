// mux4_ddf: the 4:1 multiplexer example with its select as a parameter input,
// mapped to two 3-input TLUTs.
//
// Wiring as in the paper's example: I3 and I2 enter L0; L0's output, I1 and I0
// enter L1, whose output is the multiplexer output. A generic 4:1 multiplexer
// built from 3-input LUTs needs 6 LUTs; folding the select into the truth tables
// leaves these 2. The tuning functions (in mux4_ppc) make L0 an active-low
// selector of I3/I2 that idles high when the select points at I1/I0, and make L1
// pass the inverse of L0 or the selected one of I1/I0. With this choice L1's
// entries 0..3 are the constant 1 and entry 4 the constant 0, the constant
// entries printed in the paper's example. L0's third pin is tied low here.
//
// Interface: `o` is combinational in `i`. `cfg_we` with `cfg_lut` = 0 (L0) or 1
// (L1) writes `cfg_word[7:0]` as the 8-entry stored (inverted) truth table;
// `cfg_word[15:8]` is part of the shared 16-bit bus and unused by 3-input LUTs.
module mux4_ddf
  import ddf_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_we,
  input  logic [LUT_W-1:0]   cfg_lut,
  input  logic [TT_BITS-1:0] cfg_word,
  input  logic [3:0]         i,
  output logic               o
);

  logic l0_y;

  tlut #(.K(3)) u_l0 (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_we   (cfg_we && (cfg_lut == LUT_W'(0))),
    .cfg_word (cfg_word[7:0]),
    .a        ({i[3], i[2], 1'b0}),
    .y        (l0_y)
  );

  tlut #(.K(3)) u_l1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_we   (cfg_we && (cfg_lut == LUT_W'(1))),
    .cfg_word (cfg_word[7:0]),
    .a        ({l0_y, i[1], i[0]}),
    .y        (o)
  );

endmodule
