// ddf_platform: a self-reconfiguring dynamic-data-folding platform.
//
// The platform separates the inputs of its applications into fast-changing data
// and slowly changing parameters. The data drive the reconfigurable IP, whose
// logic is made of tunable LUTs; the parameters go only to the configuration
// manager, which specialises the IP by rewriting TLUT truth tables whenever a
// parameter changes. The reconfigurable IP here holds the paper's applications
// side by side on one configuration bus:
//   - fir_ddf : 32-tap pipelined FIR filter, coefficients as parameters
//   - tcam_ddf: 256 x 32-bit ternary CAM, entries as parameters
//   - mux6_ddf: 6:1 multiplexer example, select as parameter
//   - mux4_ddf: 4:1 multiplexer example (3-input LUTs), select as parameter
// In the paper the manager is an embedded processor that reaches the
// configuration memory over its buses and the HWICAP/ICAP; here the manager is
// logic (config_manager) and the configuration bus writes one TLUT per clock.
// The processor, its memory and buses are not part of this design: their role
// is taken by the command port.
//
// Interface: command port (valid/ready) carries target, unit and parameter value
// as packed in ddf_pkg; `busy` is high while truth tables are being written, and
// the datapaths' outputs are only meaningful for a unit once its rewrite is
// over. Datapaths run every clock: FIR y one clock after x, TCAM match/hit/addr
// one clock after key, multiplexers combinational.
module ddf_platform
  import ddf_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  // specialisation commands (parameter changes)
  input  logic                              cmd_valid,
  output logic                              cmd_ready,
  input  logic [1:0]                        cmd_target,
  input  logic [UNIT_W-1:0]                 cmd_unit,
  input  logic [PARAM_W-1:0]                cmd_param,
  output logic                              busy,
  // adaptive FIR filter
  input  logic signed [FIR_XW-1:0]          fir_x,
  output logic signed [FIR_XW+FIR_CW+$clog2(FIR_TAPS)-1:0] fir_y,
  // ternary CAM
  input  logic [TCAM_W-1:0]                 tcam_key,
  output logic [TCAM_ENTRIES-1:0]           tcam_match,
  output logic                              tcam_hit,
  output logic [$clog2(TCAM_ENTRIES)-1:0]   tcam_addr,
  // multiplexer examples
  input  logic [5:0]                        mux6_i,
  output logic                              mux6_o,
  input  logic [3:0]                        mux4_i,
  output logic                              mux4_o
);

  cfg_wr_t cfg;

  config_manager u_cm (
    .clk        (clk),
    .rst_n      (rst_n),
    .cmd_valid  (cmd_valid),
    .cmd_ready  (cmd_ready),
    .cmd_target (target_e'(cmd_target)),
    .cmd_unit   (cmd_unit),
    .cmd_param  (cmd_param),
    .cfg        (cfg),
    .busy       (busy)
  );

  fir_ddf u_fir (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_we   (cfg.we && cfg.target == TGT_FIR),
    .cfg_unit (cfg.unit),
    .cfg_lut  (cfg.lut),
    .cfg_word (cfg.word),
    .x        (fir_x),
    .y        (fir_y)
  );

  tcam_ddf u_tcam (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_we   (cfg.we && cfg.target == TGT_TCAM),
    .cfg_unit (cfg.unit),
    .cfg_lut  (cfg.lut),
    .cfg_word (cfg.word),
    .key      (tcam_key),
    .match    (tcam_match),
    .hit      (tcam_hit),
    .addr     (tcam_addr)
  );

  mux6_ddf u_mux6 (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_we   (cfg.we && cfg.target == TGT_MUX6),
    .cfg_lut  (cfg.lut),
    .cfg_word (cfg.word),
    .i        (mux6_i),
    .o        (mux6_o)
  );

  mux4_ddf u_mux4 (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_we   (cfg.we && cfg.target == TGT_MUX4),
    .cfg_lut  (cfg.lut),
    .cfg_word (cfg.word),
    .i        (mux4_i),
    .o        (mux4_o)
  );

endmodule
