// gals_soc_bus: complete GALS SoC interconnect bus.
//
// One shared 8-bit bus connects NUM_PU processing units (PUs) and a
// scheduler. Each PU reaches the bus through a gals_interface (transmit and
// receive block sharing the PU's ID); the scheduler keeps frames that no
// receiver accepted and resends them later; the arbiter grants the bus,
// generates the bus clock only while there is traffic and closes a burst
// with the idle ID 00h. The PUs keep their own clocks: every PU-side port
// below is asynchronous to sys_clk and to the bus clock, and uses the
// pointer/handshake protocols described in gals_tx and gals_rx.
//
// Numbering: request line 0 and ID ID_BASE belong to the scheduler; PU k
// (array index k = 0 .. NUM_PU-1) has request line k+1 and ID
// ID_BASE + k + 1. With the defaults the PUs are 31h .. 37h, as in the
// seven-PU test system, and request line 3 (mask 008h) is PU 33h.
//
// The bus lines and the bus clock are brought out for observation. The
// scheduler's wake request goes to the power controller, which lies
// outside the bus. The arrangement follows the bus description; the
// numbering of the scheduler, the table contents and the sizes are this
// implementation's choices.
module gals_soc_bus
  import gals_bus_pkg::*;
#(
  parameter int unsigned              NUM_PU       = 7,
  parameter logic [7:0]               ID_BASE      = 8'h30,
  parameter int unsigned              Q            = 5,
  parameter int unsigned              DEPTH        = 16,
  parameter int unsigned              P            = $clog2(DEPTH + 1),
  parameter int unsigned              SLOTS        = 4,
  parameter int unsigned              RETRY_CYCLES = 64,
  parameter int unsigned              MAX_LEN      = 2**Q - 1,
  parameter logic [NUM_PU:0][3:0]     PRIO_RANK    = '0,
  parameter logic [NUM_PU:0][7:0]     CLK_DIV      = {(NUM_PU+1){8'd1}}
) (
  input  logic                      sys_clk,
  input  logic                      rst_n,
  // PU side, transmit
  input  logic [NUM_PU-1:0]         pu_send_request,
  input  logic [NUM_PU-1:0][Q-1:0]  pu_tx_write_pointer,
  output logic [NUM_PU-1:0][Q-1:0]  pu_tx_read_pointer,
  input  logic [NUM_PU-1:0][7:0]    pu_tx_data,
  output logic [NUM_PU-1:0]         pu_message_being_sent,
  // PU side, receive
  input  logic [NUM_PU-1:0]         pu_asleep,
  output logic [NUM_PU-1:0][P-1:0]  pu_rx_write_pointer,
  input  logic [NUM_PU-1:0][P-1:0]  pu_rx_read_pointer,
  output logic [NUM_PU-1:0][7:0]    pu_rx_data,
  output logic [NUM_PU-1:0]         pu_waiting_read,
  input  logic [NUM_PU-1:0]         pu_clear_indication,
  // scheduler towards the power controller
  output logic                      wake_req,
  output logic [7:0]                wake_id,
  output logic [$clog2(SLOTS+1)-1:0] sched_stored,
  output logic [7:0]                sched_drops,
  // observation
  output logic                      bus_clk_o,
  output bus_t                      bus_o,
  output logic                      grant_o,
  output logic                      regain_o,
  output logic                      idle_o
);

  localparam int unsigned N = NUM_PU + 1;   // agents on the bus

  logic                bus_clk;
  bus_t                bus;
  logic [N-1:0]        bus_request;
  logic [N-1:0][7:0]   tx_data;
  logic [N-1:0]        tx_drive, tx_last;
  logic [N-1:0]        rx_ready;
  logic                arb_ctrl;
  logic [7:0]          arb_data;

  gals_arbiter #(
    .NREQ(N), .ID_BASE(ID_BASE), .PRIO_RANK(PRIO_RANK), .CLK_DIV(CLK_DIV), .MAX_LEN(MAX_LEN)
  ) u_arbiter (
    .sys_clk, .rst_n, .bus_request, .bus_i(bus), .bus_clk,
    .arb_ctrl_o(arb_ctrl), .arb_data_o(arb_data),
    .grant_o, .regain_o, .idle_o
  );

  gals_scheduler #(
    .MY_ID(ID_BASE), .SLOTS(SLOTS), .DEPTH(DEPTH), .RETRY_CYCLES(RETRY_CYCLES)
  ) u_scheduler (
    .sys_clk, .bus_clk, .rst_n, .bus_i(bus),
    .bus_request (bus_request[0]),
    .tx_data_o   (tx_data[0]),
    .tx_drive_o  (tx_drive[0]),
    .tx_last_o   (tx_last[0]),
    .wake_req, .wake_id,
    .stored_count(sched_stored),
    .drop_count  (sched_drops)
  );
  assign rx_ready[0] = 1'b1;   // the scheduler never acknowledges

  for (genvar k = 0; k < NUM_PU; k++) begin : g_pu
    gals_interface #(
      .MY_ID(ID_BASE + 8'(k + 1)), .Q(Q), .DEPTH(DEPTH), .P(P)
    ) u_if (
      .bus_clk, .rst_n, .bus_i(bus),
      .bus_request        (bus_request[k+1]),
      .tx_data_o          (tx_data[k+1]),
      .tx_drive_o         (tx_drive[k+1]),
      .tx_last_o          (tx_last[k+1]),
      .rx_ready_o         (rx_ready[k+1]),
      .tx_write_pointer   (pu_tx_write_pointer[k]),
      .tx_read_pointer    (pu_tx_read_pointer[k]),
      .tx_data            (pu_tx_data[k]),
      .message_being_sent (pu_message_being_sent[k]),
      .send_request       (pu_send_request[k]),
      .asleep             (pu_asleep[k]),
      .rx_write_pointer   (pu_rx_write_pointer[k]),
      .rx_read_pointer    (pu_rx_read_pointer[k]),
      .rx_data            (pu_rx_data[k]),
      .waiting_read       (pu_waiting_read[k]),
      .clear_indication   (pu_clear_indication[k])
    );
  end

  gals_bus_lines #(.NTX(N), .NRX(N)) u_lines (
    .bus_clk, .rst_n,
    .arb_ctrl_i (arb_ctrl),
    .arb_data_i (arb_data),
    .tx_data_i  (tx_data),
    .tx_drive_i (tx_drive),
    .tx_last_i  (tx_last),
    .rx_ready_i (rx_ready),
    .bus_o      (bus)
  );

  assign bus_clk_o = bus_clk;
  assign bus_o     = bus;

endmodule
