// fir_ddf: fully pipelined adaptive FIR filter whose coefficients are folded
// into the configuration.
//
// Structure (transposed direct form, one register per tap): the input sample is
// broadcast to TAPS coefficient multipliers c_0 .. c_{TAPS-1}. Tap 0's product is
// registered; every later tap adds its product to the registered sum of the tap
// before it and registers the result; the last register is the output. So
//   y[n] = sum_{i=0}^{TAPS-1} c_i * x[n-TAPS+i]   (one clock from x to y for c_{TAPS-1}).
// This follows the paper's pipelined filter figure. The coefficients are the
// filter's parameter inputs: there are no coefficient registers, each multiplier
// is a kcm_tlut whose truth tables the configuration manager writes. Changing
// a coefficient means rewriting that tap's 24 TLUTs.
//
// Interface: one sample per clock on `x`, result on `y` (ACC_W bits, wide enough
// that no sum overflows). Configuration writes: `cfg_we` with `cfg_unit` = tap and
// `cfg_lut` = TLUT inside the tap. Outputs are meaningless while the
// coefficients are being rewritten; the data in flight keeps flowing.
// Signed arithmetic, widths and reset are this design's choices.
module fir_ddf
  import ddf_pkg::*;
#(
  parameter int unsigned TAPS  = FIR_TAPS,
  parameter int unsigned XW    = FIR_XW,
  parameter int unsigned CW    = FIR_CW,
  parameter int unsigned ACC_W = XW + CW + $clog2(TAPS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_we,
  input  logic [UNIT_W-1:0]       cfg_unit,
  input  logic [LUT_W-1:0]        cfg_lut,
  input  logic [TT_BITS-1:0]      cfg_word,
  input  logic signed [XW-1:0]    x,
  output logic signed [ACC_W-1:0] y
);

  logic signed [TAPS-1:0][XW+CW-1:0] prod;
  logic signed [TAPS-1:0][ACC_W-1:0] sum_q;

  for (genvar t = 0; t < TAPS; t++) begin : g_tap
    kcm_tlut #(.XW(XW), .CW(CW)) u_mul (
      .clk      (clk),
      .rst_n    (rst_n),
      .cfg_we   (cfg_we && (cfg_unit == UNIT_W'(t))),
      .cfg_lut  (cfg_lut),
      .cfg_word (cfg_word),
      .x        (x),
      .p        (prod[t])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q <= '0;
    end else begin
      sum_q[0] <= ACC_W'(signed'(prod[0]));
      for (int t = 1; t < TAPS; t++)
        sum_q[t] <= sum_q[t-1] + ACC_W'(signed'(prod[t]));
    end
  end

  assign y = sum_q[TAPS-1];

endmodule
