// gals_crc_pu: CRC processing unit of the test system (ID 35h).
//
// A frame {35h, source, 01h, d0, d1, ...} is answered with
// {source, 35h, 81h, crc[15:8], crc[7:0]}, the CRC-16/CCITT of the data
// bytes d0..dn (polynomial 1021h, initial value FFFFh, no reflection, no
// final XOR; "123456789" gives 29B1h). The CRC is computed one bit per
// pu_clk cycle after the frame has been read. Up to FB-3 data bytes are
// used. Computing a CCITT CRC-16 over a received message follows the
// test-system description; the CCITT variant (initial value), the frame
// layout and the bit-serial datapath are this implementation's choices.
module gals_crc_pu #(
  parameter logic [7:0]  MY_ID = 8'h35,
  parameter int unsigned FB    = 16,
  parameter int unsigned Q     = 5,
  parameter int unsigned P     = 5
) (
  input  logic         pu_clk,
  input  logic         rst_n,
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

  logic [FB-1:0][7:0] rxf, txf;
  logic [P-1:0]       rx_len;
  logic               rx_valid, tx_go, tx_idle, reply_pending, busy;
  logic [15:0]        crc;
  logic [7:0]         src;
  int unsigned        idx, nbytes;
  logic [2:0]         bitn;
  logic               fb;

  gals_pu_shell #(.FB(FB), .Q(Q), .P(P)) u_shell (
    .pu_clk, .rst_n, .rx_frame(rxf), .rx_len, .rx_valid,
    .tx_frame(txf), .tx_len(Q'(5)), .tx_go, .tx_idle,
    .tx_write_pointer, .tx_read_pointer, .tx_data, .message_being_sent, .send_request,
    .rx_write_pointer, .rx_read_pointer, .rx_data, .waiting_read, .clear_indication
  );

  assign fb = crc[15] ^ rxf[idx[$clog2(FB)-1:0]][3'd7 - bitn];

  always_ff @(posedge pu_clk or negedge rst_n) begin
    if (!rst_n) begin
      crc           <= 16'hFFFF;
      src           <= '0;
      idx           <= 0;
      nbytes        <= 0;
      bitn          <= '0;
      busy          <= 1'b0;
      txf           <= '0;
      reply_pending <= 1'b0;
    end else begin
      if (rx_valid && !busy && rx_len >= P'(3) && rxf[2] == 8'h01) begin
        crc    <= 16'hFFFF;
        src    <= rxf[1];
        idx    <= 3;
        bitn   <= '0;
        nbytes <= (32'(rx_len) > FB) ? FB : 32'(rx_len);
        busy   <= 1'b1;
      end else if (busy) begin
        if (idx >= nbytes) begin
          busy          <= 1'b0;
          txf           <= '0;
          txf[4:0]      <= {crc[7:0], crc[15:8], 8'h81, MY_ID, src};
          reply_pending <= 1'b1;
        end else begin
          crc  <= {crc[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0000);
          bitn <= bitn + 3'd1;
          if (bitn == 3'd7) idx <= idx + 1;
        end
      end
      if (tx_go) reply_pending <= 1'b0;
    end
  end

  assign tx_go = reply_pending && tx_idle;

endmodule
