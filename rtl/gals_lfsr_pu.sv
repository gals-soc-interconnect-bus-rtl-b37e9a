// gals_lfsr_pu: random-number processing unit of the test system (ID 34h).
//
// A 16-bit Fibonacci LFSR (x^16 + x^14 + x^13 + x^11 + 1, maximal length,
// seed ACE1h) advances on every pu_clk cycle. A query frame
// {34h, source, 01h, ...} is answered with {source, 34h, 81h, value[15:8],
// value[7:0]}, the register value at the moment the query was read.
// Generating and sending a random number follows the test-system
// description; the polynomial, seed and frame layout are this
// implementation's choices.
module gals_lfsr_pu #(
  parameter logic [7:0]  MY_ID = 8'h34,
  parameter int unsigned Q     = 5,
  parameter int unsigned P     = 5
) (
  input  logic         pu_clk,
  input  logic         rst_n,
  output logic [15:0]  lfsr_o,
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

  localparam int unsigned FB = 5;
  logic [FB-1:0][7:0] rxf, txf;
  logic [P-1:0]       rx_len;
  logic               rx_valid, tx_go, tx_idle, reply_pending;

  gals_pu_shell #(.FB(FB), .Q(Q), .P(P)) u_shell (
    .pu_clk, .rst_n, .rx_frame(rxf), .rx_len, .rx_valid,
    .tx_frame(txf), .tx_len(Q'(5)), .tx_go, .tx_idle,
    .tx_write_pointer, .tx_read_pointer, .tx_data, .message_being_sent, .send_request,
    .rx_write_pointer, .rx_read_pointer, .rx_data, .waiting_read, .clear_indication
  );

  always_ff @(posedge pu_clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr_o        <= 16'hACE1;
      txf           <= '0;
      reply_pending <= 1'b0;
    end else begin
      lfsr_o <= {lfsr_o[14:0], lfsr_o[15] ^ lfsr_o[13] ^ lfsr_o[12] ^ lfsr_o[10]};
      if (rx_valid && rx_len >= P'(3) && rxf[2] == 8'h01) begin
        txf           <= {lfsr_o[7:0], lfsr_o[15:8], 8'h81, MY_ID, rxf[1]};
        reply_pending <= 1'b1;
      end
      if (tx_go) reply_pending <= 1'b0;
    end
  end

  assign tx_go = reply_pending && tx_idle;

endmodule
