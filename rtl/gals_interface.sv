// gals_interface: the bus interface of one processing unit (PU).
//
// It pairs a transmit block (gals_tx) and a receive block (gals_rx) that
// work independently but answer to the same PU identifier MY_ID. Towards
// the bus it offers the request line and enable-gated contributions to the
// shared lines; towards the PU it offers the two pointer/data/handshake
// ports of the blocks, which the PU may drive from any clock. See gals_tx
// and gals_rx for the timing. The split into the two blocks and the shared
// ID follow the bus description; the port names of the PU side keep the
// signal names of the two blocks with tx_/rx_ prefixes.
module gals_interface
  import gals_bus_pkg::*;
#(
  parameter logic [7:0]  MY_ID = 8'h31,
  parameter int unsigned Q     = 5,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned P     = $clog2(DEPTH + 1)
) (
  input  logic         bus_clk,
  input  logic         rst_n,
  input  bus_t         bus_i,
  output logic         bus_request,
  output logic [7:0]   tx_data_o,
  output logic         tx_drive_o,
  output logic         tx_last_o,
  output logic         rx_ready_o,
  // PU side, transmit
  input  logic [Q-1:0] tx_write_pointer,
  output logic [Q-1:0] tx_read_pointer,
  input  logic [7:0]   tx_data,
  output logic         message_being_sent,
  input  logic         send_request,
  // PU side, receive
  input  logic         asleep,
  output logic [P-1:0] rx_write_pointer,
  input  logic [P-1:0] rx_read_pointer,
  output logic [7:0]   rx_data,
  output logic         waiting_read,
  input  logic         clear_indication
);

  gals_tx #(.MY_ID(MY_ID), .Q(Q)) u_tx (
    .bus_clk, .rst_n, .bus_i, .bus_request, .tx_data_o, .tx_drive_o, .tx_last_o,
    .write_pointer      (tx_write_pointer),
    .read_pointer       (tx_read_pointer),
    .data               (tx_data),
    .message_being_sent (message_being_sent),
    .send_request       (send_request)
  );

  gals_rx #(.MY_ID(MY_ID), .DEPTH(DEPTH), .P(P)) u_rx (
    .bus_clk, .rst_n, .bus_i, .rx_ready_o, .asleep,
    .write_pointer    (rx_write_pointer),
    .read_pointer     (rx_read_pointer),
    .data             (rx_data),
    .waiting_read     (waiting_read),
    .clear_indication (clear_indication)
  );

endmodule
