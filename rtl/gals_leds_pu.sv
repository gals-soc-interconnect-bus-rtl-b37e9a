// gals_leds_pu: LED processing unit of the test system (ID 32h by default).
//
// Holds a 3-bit variable that drives three LEDs; every message that
// changes it changes the LEDs. Commands (byte 2 of a frame
// {32h, source, command, argument}):
//   01h  toggle the LEDs selected by argument[2:0]
//   02h  load argument[2:0]
//   03h  query: reply {source, 32h, 83h, leds} to the sender
// Unknown commands are ignored. The PU runs on its own clock pu_clk and
// talks to its bus interface through gals_pu_shell. That the block toggles
// LEDs on messages and reports them on a query follows the test-system
// description; the command codes and frame layout are this
// implementation's choices.
module gals_leds_pu #(
  parameter logic [7:0]  MY_ID = 8'h32,
  parameter int unsigned Q     = 5,
  parameter int unsigned P     = 5
) (
  input  logic         pu_clk,
  input  logic         rst_n,
  output logic [2:0]   leds,
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
  logic [FB-1:0][7:0] rxf, txf;
  logic [P-1:0]       rx_len;
  logic               rx_valid, tx_go, tx_idle;
  logic               reply_pending;

  gals_pu_shell #(.FB(FB), .Q(Q), .P(P)) u_shell (
    .pu_clk, .rst_n, .rx_frame(rxf), .rx_len, .rx_valid,
    .tx_frame(txf), .tx_len(Q'(4)), .tx_go, .tx_idle,
    .tx_write_pointer, .tx_read_pointer, .tx_data, .message_being_sent, .send_request,
    .rx_write_pointer, .rx_read_pointer, .rx_data, .waiting_read, .clear_indication
  );

  always_ff @(posedge pu_clk or negedge rst_n) begin
    if (!rst_n) begin
      leds          <= '0;
      txf           <= '0;
      reply_pending <= 1'b0;
    end else begin
      if (rx_valid && rx_len >= P'(3)) begin
        unique case (rxf[2])
          8'h01: leds <= leds ^ rxf[3][2:0];
          8'h02: leds <= rxf[3][2:0];
          8'h03: begin
            txf           <= {5'b0, leds, 8'h83, MY_ID, rxf[1]};
            reply_pending <= 1'b1;
          end
          default: ;
        endcase
      end
      if (tx_go) reply_pending <= 1'b0;
    end
  end

  assign tx_go = reply_pending && tx_idle;

endmodule
