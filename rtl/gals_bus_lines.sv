// gals_bus_lines: resolution of the shared bus lines.
//
// The bus has one 8-bit data line, shared by the arbiter and all transmit
// blocks, plus bus_arbiter_ctrl, bus_last_byte and bus_ready. Instead of
// tristate drivers every agent presents an enable-gated value:
//   data      = arbiter byte while bus_arbiter_ctrl is high, otherwise the
//               OR of the transmit blocks' bytes (each is 0 unless driving)
//   last_byte = OR of the transmit blocks' flags
//   ready     = AND of the receivers' outputs: one receiver pulling low
//               means "accepted"; busy, asleep or absent receivers read 1,
//               like the released line of the original bus.
// Purely combinational. An assertion, sampled on bus_clk, checks that no two transmit blocks
// drive at once; the arbiter may overlap a sender only when it takes the
// bus back, and its byte then wins. The OR/AND resolution is this
// implementation's replacement for a physical shared line.
module gals_bus_lines
  import gals_bus_pkg::*;
#(
  parameter int unsigned NTX = 8,
  parameter int unsigned NRX = 8
) (
  input  logic                 bus_clk,     // bus_clk and rst_n only serve the assertion
  input  logic                 rst_n,
  input  logic                 arb_ctrl_i,
  input  logic [7:0]           arb_data_i,
  input  logic [NTX-1:0][7:0]  tx_data_i,
  input  logic [NTX-1:0]       tx_drive_i,
  input  logic [NTX-1:0]       tx_last_i,
  input  logic [NRX-1:0]       rx_ready_i,
  output bus_t                 bus_o
);

  logic [7:0] tx_or;

  always_comb begin
    tx_or = '0;
    for (int i = 0; i < NTX; i++) tx_or |= tx_data_i[i];
  end

  assign bus_o.arbiter_ctrl = arb_ctrl_i;
  assign bus_o.data         = arb_ctrl_i ? arb_data_i : tx_or;
  assign bus_o.last_byte    = |tx_last_i;
  assign bus_o.ready        = &rx_ready_i;

  a_one_sender: assert property (@(posedge bus_clk) disable iff (!rst_n)
                                 $countones(tx_drive_i) <= 1);

endmodule
