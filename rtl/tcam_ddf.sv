// tcam_ddf: ternary content-addressable memory whose entries live in TLUT
// truth tables instead of flip-flops.
//
// An entry is a W-digit ternary pattern: a data vector, a mask vector (mask bit 1
// = don't care) and a valid bit. A key matches an entry when the entry is valid
// and every key bit whose mask bit is 0 equals the data bit. Here the entries are
// the parameter inputs: the key is cut into W/K groups of K bits, and for every
// entry one TLUT per group answers "do these K key bits match these K digits".
// The pattern is therefore held only in configuration memory; the valid bit is
// folded into every TLUT of the entry. A static AND of an entry's TLUT outputs
// gives its match line. The only flip-flops are the registered match lines,
// as in the paper ("only a few FFs are left for some output registers").
// Writing an entry means rewriting its W/K TLUTs (8 for 32 bits).
//
// Interface: `key` is compared every clock; `match` (one bit per entry), `hit`
// and `addr` (lowest-numbered matching entry) follow one clock later. The
// priority order, the output register and the hit/addr outputs are this
// design's choices; the paper describes only the matching rule.
module tcam_ddf
  import ddf_pkg::*;
#(
  parameter int unsigned W       = TCAM_W,
  parameter int unsigned ENTRIES = TCAM_ENTRIES
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cfg_we,
  input  logic [UNIT_W-1:0]          cfg_unit,
  input  logic [LUT_W-1:0]           cfg_lut,
  input  logic [TT_BITS-1:0]         cfg_word,
  input  logic [W-1:0]               key,
  output logic [ENTRIES-1:0]         match,
  output logic                       hit,
  output logic [$clog2(ENTRIES)-1:0] addr
);

  localparam int unsigned NG = W / LUT_K;   // TLUTs per entry

  logic [ENTRIES-1:0][NG-1:0] grp_match;
  logic [ENTRIES-1:0]         line;

  for (genvar e = 0; e < ENTRIES; e++) begin : g_entry
    for (genvar g = 0; g < NG; g++) begin : g_grp
      tlut #(.K(LUT_K)) u_tlut (
        .clk      (clk),
        .rst_n    (rst_n),
        .cfg_we   (cfg_we && (cfg_unit == UNIT_W'(e)) && (cfg_lut == LUT_W'(g))),
        .cfg_word (cfg_word),
        .a        (key[g*LUT_K +: LUT_K]),
        .y        (grp_match[e][g])
      );
    end
    assign line[e] = &grp_match[e];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) match <= '0;
    else        match <= line;
  end

  // Priority encoder: lowest index wins.
  always_comb begin
    hit  = 1'b0;
    addr = '0;
    for (int e = ENTRIES-1; e >= 0; e--) begin
      if (match[e]) begin
        hit  = 1'b1;
        addr = ($clog2(ENTRIES))'(e);
      end
    end
  end

endmodule
