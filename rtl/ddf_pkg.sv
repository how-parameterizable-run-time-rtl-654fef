// ddf_pkg: types and constants shared by the dynamic-data-folding (DDF) platform.
//
// In a DDF design the slowly changing "parameter" inputs of a circuit are not
// wired into the datapath. Instead they select the truth tables of tunable LUTs
// (TLUTs), and a configuration manager rewrites those truth tables whenever the
// parameters change. This package holds the default sizes of the reconfigurable
// modules, the encoding of the configuration write bus that carries truth tables
// from the configuration manager to the TLUTs, and the command that asks the
// configuration manager for a specialisation.
//
// Sizes that follow the paper: 4-input LUTs (Virtex-II Pro), a 32-tap filter with
// 8-bit data and coefficients, a TCAM of 256 entries of 32 bits, and the 6:1 and
// 4:1 multiplexer examples. Bus encodings and widths are this design's own choice.
package ddf_pkg;

  // LUT size of the target fabric (Virtex-II Pro: 4-input LUTs, 16-bit truth tables).
  localparam int unsigned LUT_K    = 4;
  localparam int unsigned TT_BITS  = 1 << LUT_K;

  // Adaptive FIR filter.
  localparam int unsigned FIR_TAPS  = 32;
  localparam int unsigned FIR_XW    = 8;   // input sample width
  localparam int unsigned FIR_CW    = 8;   // coefficient width
  // A coefficient multiplier splits the 8-bit sample into two 4-bit nibbles; each
  // nibble addresses 12 TLUTs that hold one 12-bit partial product.
  localparam int unsigned FIR_PPW   = FIR_CW + LUT_K;          // 12
  localparam int unsigned FIR_TLUTS = (FIR_XW / LUT_K) * FIR_PPW; // 24 per tap

  // Ternary CAM.
  localparam int unsigned TCAM_W       = 32;
  localparam int unsigned TCAM_ENTRIES = 256;
  localparam int unsigned TCAM_TLUTS   = TCAM_W / LUT_K;       // 8 per entry

  // Multiplexer examples: two TLUTs each.
  localparam int unsigned MUX_TLUTS = 2;

  // Address fields of the configuration write bus.
  localparam int unsigned UNIT_W = 8;   // tap / entry index
  localparam int unsigned LUT_W  = 5;   // TLUT index inside a unit

  // Parameter value carried by a specialisation command. Packing by target:
  //   FIR  : [7:0]  coefficient (two's complement)
  //   TCAM : [31:0] data, [63:32] mask (1 = don't care), [64] valid
  //   MUX6 : [2:0]  select
  //   MUX4 : [1:0]  select
  localparam int unsigned PARAM_W = 2 * TCAM_W + 1;

  typedef enum logic [1:0] {
    TGT_FIR  = 2'd0,
    TGT_TCAM = 2'd1,
    TGT_MUX6 = 2'd2,
    TGT_MUX4 = 2'd3
  } target_e;

  // One truth-table write. `word` is in the device's stored form, which is the
  // bitwise inverse of the truth table (Virtex-II Pro stores LUT contents inverted).
  typedef struct packed {
    logic                we;
    target_e             target;
    logic [UNIT_W-1:0]   unit;
    logic [LUT_W-1:0]    lut;
    logic [TT_BITS-1:0]  word;
  } cfg_wr_t;

  // Number of TLUTs the configuration manager rewrites for one unit of a target.
  function automatic int unsigned tluts_per_unit(target_e t);
    case (t)
      TGT_FIR:  return FIR_TLUTS;
      TGT_TCAM: return TCAM_TLUTS;
      default:  return MUX_TLUTS;
    endcase
  endfunction

endpackage
