// gals_test_system: the seven-PU demonstrator built around the bus.
//
// gals_soc_bus (arbiter, scheduler 30h, seven interfaces) with the
// processing units of the FPGA test system attached by ID:
//   31h timer   - sends "toggle LED 0" to 32h every 0.5 s   (gals_timer_pu)
//   32h LEDs    - three LEDs changed and reported by message (gals_leds_pu)
//   33h UART    - PC bridge, not included: its PU-side ports are brought out
//   34h LFSR    - answers a query with a random number      (gals_lfsr_pu)
//   35h CRC     - answers with the CRC-16/CCITT of a message (gals_crc_pu)
//   36h, 37h    - ADC controllers, not included: ports brought out
// Every PU has its own clock input (GALS): nothing here relates them to
// sys_clk, the arbiter's always-on clock. pu_asleep lets a power
// controller put any interface to sleep; the scheduler's wake request is
// brought out for it. The ID assignment follows the test-system figure;
// the PU cores and their message formats are this implementation's own.
// The ext_* arrays are indexed 0 = 33h, 1 = 36h, 2 = 37h.
module gals_test_system
  import gals_bus_pkg::*;
#(
  parameter int unsigned TIMER_PERIOD = 500_000,   // 0.5 s at a 1 MHz timer clock
  parameter int unsigned Q            = 5,
  parameter int unsigned DEPTH        = 16,
  parameter int unsigned P            = $clog2(DEPTH + 1)
) (
  input  logic                 sys_clk,
  input  logic                 rst_n,
  input  logic                 timer_clk,
  input  logic                 leds_clk,
  input  logic                 lfsr_clk,
  input  logic                 crc_clk,
  output logic [2:0]           leds,
  input  logic [6:0]           pu_asleep,
  // PUs outside this module: 33h (UART), 36h and 37h (ADC control)
  input  logic [2:0]           ext_send_request,
  input  logic [2:0][Q-1:0]    ext_tx_write_pointer,
  output logic [2:0][Q-1:0]    ext_tx_read_pointer,
  input  logic [2:0][7:0]      ext_tx_data,
  output logic [2:0]           ext_message_being_sent,
  output logic [2:0][P-1:0]    ext_rx_write_pointer,
  input  logic [2:0][P-1:0]    ext_rx_read_pointer,
  output logic [2:0][7:0]      ext_rx_data,
  output logic [2:0]           ext_waiting_read,
  input  logic [2:0]           ext_clear_indication,
  // power controller and observation
  output logic                 wake_req,
  output logic [7:0]           wake_id,
  output logic [2:0]           sched_stored,
  output logic [7:0]           sched_drops,
  output logic                 grant_o,
  output logic                 regain_o,
  output logic                 timer_tick,
  output logic [15:0]          lfsr_value,
  output logic                 bus_clk_o,
  output bus_t                 bus_o,
  output logic                 idle_o
);

  localparam int unsigned NPU = 7;
  localparam int EXT [3] = '{2, 5, 6};             // array index of 33h, 36h, 37h

  logic [NPU-1:0]        send_request, mbs, waiting, clear;
  logic [NPU-1:0][Q-1:0] tx_wp, tx_rp;
  logic [NPU-1:0][7:0]   tx_data, rx_data;
  logic [NPU-1:0][P-1:0] rx_wp, rx_rp;

  gals_soc_bus #(.NUM_PU(NPU), .ID_BASE(8'h30), .Q(Q), .DEPTH(DEPTH), .P(P)) u_bus (
    .sys_clk, .rst_n,
    .pu_send_request(send_request), .pu_tx_write_pointer(tx_wp), .pu_tx_read_pointer(tx_rp),
    .pu_tx_data(tx_data), .pu_message_being_sent(mbs),
    .pu_asleep, .pu_rx_write_pointer(rx_wp), .pu_rx_read_pointer(rx_rp),
    .pu_rx_data(rx_data), .pu_waiting_read(waiting), .pu_clear_indication(clear),
    .wake_req, .wake_id, .sched_stored, .sched_drops,
    .bus_clk_o, .bus_o, .grant_o, .regain_o, .idle_o
  );

  gals_timer_pu #(.MY_ID(8'h31), .DEST(8'h32), .PERIOD(TIMER_PERIOD), .Q(Q), .P(P)) u_timer (
    .pu_clk(timer_clk), .rst_n, .tick_o(timer_tick),
    .tx_write_pointer(tx_wp[0]), .tx_read_pointer(tx_rp[0]), .tx_data(tx_data[0]),
    .message_being_sent(mbs[0]), .send_request(send_request[0]),
    .rx_write_pointer(rx_wp[0]), .rx_read_pointer(rx_rp[0]), .rx_data(rx_data[0]),
    .waiting_read(waiting[0]), .clear_indication(clear[0])
  );

  gals_leds_pu #(.MY_ID(8'h32), .Q(Q), .P(P)) u_leds (
    .pu_clk(leds_clk), .rst_n, .leds,
    .tx_write_pointer(tx_wp[1]), .tx_read_pointer(tx_rp[1]), .tx_data(tx_data[1]),
    .message_being_sent(mbs[1]), .send_request(send_request[1]),
    .rx_write_pointer(rx_wp[1]), .rx_read_pointer(rx_rp[1]), .rx_data(rx_data[1]),
    .waiting_read(waiting[1]), .clear_indication(clear[1])
  );

  gals_lfsr_pu #(.MY_ID(8'h34), .Q(Q), .P(P)) u_lfsr (
    .pu_clk(lfsr_clk), .rst_n, .lfsr_o(lfsr_value),
    .tx_write_pointer(tx_wp[3]), .tx_read_pointer(tx_rp[3]), .tx_data(tx_data[3]),
    .message_being_sent(mbs[3]), .send_request(send_request[3]),
    .rx_write_pointer(rx_wp[3]), .rx_read_pointer(rx_rp[3]), .rx_data(rx_data[3]),
    .waiting_read(waiting[3]), .clear_indication(clear[3])
  );

  gals_crc_pu #(.MY_ID(8'h35), .FB(DEPTH), .Q(Q), .P(P)) u_crc (
    .pu_clk(crc_clk), .rst_n,
    .tx_write_pointer(tx_wp[4]), .tx_read_pointer(tx_rp[4]), .tx_data(tx_data[4]),
    .message_being_sent(mbs[4]), .send_request(send_request[4]),
    .rx_write_pointer(rx_wp[4]), .rx_read_pointer(rx_rp[4]), .rx_data(rx_data[4]),
    .waiting_read(waiting[4]), .clear_indication(clear[4])
  );

  for (genvar e = 0; e < 3; e++) begin : g_ext
    assign send_request[EXT[e]]  = ext_send_request[e];
    assign tx_wp[EXT[e]]         = ext_tx_write_pointer[e];
    assign tx_data[EXT[e]]       = ext_tx_data[e];
    assign rx_rp[EXT[e]]         = ext_rx_read_pointer[e];
    assign clear[EXT[e]]         = ext_clear_indication[e];
    assign ext_tx_read_pointer[e]    = tx_rp[EXT[e]];
    assign ext_message_being_sent[e] = mbs[EXT[e]];
    assign ext_rx_write_pointer[e]   = rx_wp[EXT[e]];
    assign ext_rx_data[e]            = rx_data[EXT[e]];
    assign ext_waiting_read[e]       = waiting[EXT[e]];
  end

endmodule
