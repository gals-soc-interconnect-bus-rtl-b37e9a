// gals_timer_pu: timer processing unit of the test system (ID 31h).
//
// Every PERIOD pu_clk cycles it sends the frame {DEST, MY_ID, 01h, 01h} -
// "toggle LED 0" for the LED unit - so the LEDs blink without any other
// traffic. A tick that falls while the previous frame is still being sent
// is skipped. The 0.5 s interval and the destination follow the
// test-system description; PERIOD assumes a 1 MHz PU clock (the clock
// frequency is not given) and the frame content is this implementation's
// choice. Received frames are read and discarded.
module gals_timer_pu #(
  parameter logic [7:0]  MY_ID  = 8'h31,
  parameter logic [7:0]  DEST   = 8'h32,
  parameter int unsigned PERIOD = 500_000,        // 0.5 s at 1 MHz
  parameter int unsigned Q      = 5,
  parameter int unsigned P      = 5
) (
  input  logic         pu_clk,
  input  logic         rst_n,
  output logic         tick_o,                    // one pulse per period
  output logic [Q-1:0] tx_write_pointer,
  input  logic [Q-1:0] tx_read_pointer,
  output logic [7:0]   tx_data,
  input  logic         message_being_sent,
  output logic         send_request,
  input  logic [P-1:0] rx_write_pointer,
  output logic [P-1:0] rx_read_pointer,
  input  logic [7:0]   rx_data,
  input  logic         waiting_read,
  output logic         clear_indication
);

  localparam int unsigned FB = 4;
  logic [FB-1:0][7:0] rxf;
  logic [P-1:0]       rx_len;
  logic               rx_valid, tx_idle;
  logic [31:0]        cnt;

  gals_pu_shell #(.FB(FB), .Q(Q), .P(P)) u_shell (
    .pu_clk, .rst_n, .rx_frame(rxf), .rx_len, .rx_valid,
    .tx_frame({8'h01, 8'h01, MY_ID, DEST}), .tx_len(Q'(4)), .tx_go(tick_o && tx_idle), .tx_idle,
    .tx_write_pointer, .tx_read_pointer, .tx_data, .message_being_sent, .send_request,
    .rx_write_pointer, .rx_read_pointer, .rx_data, .waiting_read, .clear_indication
  );

  always_ff @(posedge pu_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      tick_o <= 1'b0;
    end else begin
      tick_o <= (cnt == PERIOD - 1);
      cnt    <= (cnt == PERIOD - 1) ? '0 : cnt + 1;
    end
  end

endmodule
