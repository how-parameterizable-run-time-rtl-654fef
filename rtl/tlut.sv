// tlut: tunable K-input look-up table.
//
// A TLUT is an ordinary LUT of the FPGA fabric whose truth table is a function of
// the design's parameter inputs. The datapath only sees the K regular inputs;
// the truth table sits in configuration cells that the configuration manager
// rewrites whenever the parameters change. The cells hold the table in the
// device's stored form: with INV_STORE = 1 (Virtex-II Pro, as in the paper) a
// stored 1 means a truth-table 0, so the read path inverts.
//
// Interface: `cfg_we` for one clock writes `cfg_word` (stored form, bit n belongs
// to input value n) into the cells. `y` is a combinational function of `a`, the
// same as a LUT read; a write takes effect on the clock edge that samples it.
// Reset loads the table of the constant-0 function (a choice of this design:
// the paper's template configuration is not described at bit level).
module tlut #(
  parameter int unsigned K         = 4,
  parameter bit          INV_STORE = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cfg_we,
  input  logic [(1<<K)-1:0]   cfg_word,
  input  logic [K-1:0]        a,
  output logic                y
);

  logic [(1<<K)-1:0] cells;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cells <= INV_STORE ? '1 : '0;
    else if (cfg_we) cells <= cfg_word;
  end

  assign y = cells[a] ^ INV_STORE;

endmodule
