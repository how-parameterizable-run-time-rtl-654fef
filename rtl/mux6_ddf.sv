// mux6_ddf: the 6:1 multiplexer example with its select as a parameter input.
//
// A generic 6:1 multiplexer needs its select bits in the datapath. With the
// select folded into the configuration only the six data inputs remain, and the
// circuit is two 4-input TLUTs:
//   L1 reads i0..i3 and, tuned by s[1:0], passes the selected one of them;
//   L0 reads L1, i4 and i5 and, tuned by s[2] and s[0], passes i4, i5 or L1.
// L1's pin order (i0 on the most significant truth-table address bit) and its
// tuning functions follow the paper's reconfiguration procedure for L1. The
// structure of L0 and which LUT feeds which is this design's own: the paper
// gives only L1's truth table. Select values 6 and 7 lie outside the 6 inputs;
// here they pass i4 and i5.
//
// Interface: `o` is combinational in `i`. `cfg_we` with `cfg_lut` = 0 (L0) or
// 1 (L1) writes a truth table in stored (inverted) form; the 4-bit table index is
// the LUT's address.
module mux6_ddf
  import ddf_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_we,
  input  logic [LUT_W-1:0]   cfg_lut,
  input  logic [TT_BITS-1:0] cfg_word,
  input  logic [5:0]         i,
  output logic               o
);

  logic l1_y;

  tlut #(.K(4)) u_l1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_we   (cfg_we && (cfg_lut == LUT_W'(1))),
    .cfg_word (cfg_word),
    .a        ({i[0], i[1], i[2], i[3]}),
    .y        (l1_y)
  );

  tlut #(.K(4)) u_l0 (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_we   (cfg_we && (cfg_lut == LUT_W'(0))),
    .cfg_word (cfg_word),
    .a        ({1'b0, l1_y, i[5], i[4]}),
    .y        (o)
  );

endmodule
