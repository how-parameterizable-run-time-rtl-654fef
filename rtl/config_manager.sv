// config_manager: carries out the specialisation procedure of a DDF system.
//
// A command names a target (filter, TCAM, 6:1 or 4:1 multiplexer), a unit of it
// (filter tap or TCAM entry; 0 for the multiplexers) and the unit's new
// parameter value (coefficient, ternary entry or select). The manager then walks
// over the unit's TLUTs, one per clock: it evaluates the PPC for that TLUT,
// inverts the truth table into the device's stored form and issues a write on
// the configuration bus. This is the paper's reconfiguration procedure (one
// tuning-function evaluation and one LUT write per TLUT, one call per TLUT of
// the module). In the paper the procedure is software on the embedded processor
// and the writes go through the ICAP as configuration frames; here both are
// replaced by this sequencer and a write bus that addresses single TLUTs.
//
// Interface and timing: valid/ready command handshake; `cmd_ready` is high only
// when idle. A command accepted on clock edge t produces writes on the N clocks
// after it (N = 24 for a filter tap, 8 for a TCAM entry, 2 for a multiplexer),
// `busy` is high during those clocks, and `cmd_ready` rises again afterwards.
// So a command occupies N+1 clocks back to back.
module config_manager
  import ddf_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  target_e            cmd_target,
  input  logic [UNIT_W-1:0]  cmd_unit,
  input  logic [PARAM_W-1:0] cmd_param,
  output cfg_wr_t            cfg,
  output logic               busy
);

  typedef enum logic {S_IDLE, S_WRITE} state_e;

  state_e             state;
  target_e            tgt_q;
  logic [UNIT_W-1:0]  unit_q;
  logic [PARAM_W-1:0] param_q;
  logic [LUT_W-1:0]   lut_q;
  logic [TT_BITS-1:0] tt;

  ppc_eval u_ppc (
    .target (tgt_q),
    .param  (param_q),
    .lut    (lut_q),
    .tt     (tt)
  );

  assign cmd_ready = (state == S_IDLE);
  assign busy      = (state == S_WRITE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      tgt_q   <= TGT_FIR;
      unit_q  <= '0;
      param_q <= '0;
      lut_q   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          state   <= S_WRITE;
          tgt_q   <= cmd_target;
          unit_q  <= cmd_unit;
          param_q <= cmd_param;
          lut_q   <= '0;
        end
        S_WRITE: begin
          if (32'(lut_q) == tluts_per_unit(tgt_q) - 1) state <= S_IDLE;
          lut_q <= lut_q + 1'b1;
        end
      endcase
    end
  end

  always_comb begin
    cfg.we     = busy;
    cfg.target = tgt_q;
    cfg.unit   = unit_q;
    cfg.lut    = lut_q;
    cfg.word   = ~tt;
  end

  // A command that is offered must stay offered, unchanged, until accepted.
  a_cmd_stable: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && !cmd_ready |=> cmd_valid && $stable(cmd_target) && $stable(cmd_unit)
                                 && $stable(cmd_param));

endmodule
