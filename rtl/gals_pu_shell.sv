// gals_pu_shell: PU-side adapter between a simple processing core and the
// asynchronous pointer/handshake ports of a gals_interface.
//
// Receive: when waiting_read (synchronised into pu_clk) rises, the shell
// walks rx_read_pointer over the stored frame, one byte per pu_clk cycle,
// copies up to FB bytes into rx_frame, raises clear_indication until
// waiting_read has fallen, and then pulses rx_valid for the core with
// rx_len = number of bytes the interface stored.
// Transmit: tx_go (when tx_idle) copies tx_frame/tx_len into the frame
// memory the transmit block reads asynchronously (tx_data = memory at
// tx_read_pointer), raises send_request until message_being_sent is seen,
// then waits for message_being_sent to fall before tx_idle returns.
// Both directions follow the four-phase handshakes of the interface; the
// shell itself, FB and the synchronisers are this implementation's choices.
module gals_pu_shell #(
  parameter int unsigned FB = 8,                    // frame bytes kept per direction
  parameter int unsigned Q  = 5,
  parameter int unsigned P  = 5
) (
  input  logic               pu_clk,
  input  logic               rst_n,
  // core side
  output logic [FB-1:0][7:0] rx_frame,
  output logic [P-1:0]       rx_len,
  output logic               rx_valid,
  input  logic [FB-1:0][7:0] tx_frame,
  input  logic [Q-1:0]       tx_len,
  input  logic               tx_go,
  output logic               tx_idle,
  // interface side
  output logic [Q-1:0]       tx_write_pointer,
  input  logic [Q-1:0]       tx_read_pointer,
  output logic [7:0]         tx_data,
  input  logic               message_being_sent,
  output logic               send_request,
  input  logic [P-1:0]       rx_write_pointer,
  output logic [P-1:0]       rx_read_pointer,
  input  logic [7:0]         rx_data,
  input  logic               waiting_read,
  output logic               clear_indication
);

  logic [1:0] wr_sync, mbs_sync;
  always_ff @(posedge pu_clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_sync  <= '0;
      mbs_sync <= '0;
    end else begin
      wr_sync  <= {wr_sync[0], waiting_read};
      mbs_sync <= {mbs_sync[0], message_being_sent};
    end
  end

  // ---------------------------------------------------------------- receive
  typedef enum logic [1:0] {RX_IDLE, RX_READ, RX_CLEAR} rx_state_e;
  rx_state_e rxs;

  always_ff @(posedge pu_clk or negedge rst_n) begin
    if (!rst_n) begin
      rxs              <= RX_IDLE;
      rx_read_pointer  <= '0;
      rx_frame         <= '0;
      rx_len           <= '0;
      rx_valid         <= 1'b0;
      clear_indication <= 1'b0;
    end else begin
      rx_valid <= 1'b0;
      unique case (rxs)
        RX_IDLE: if (wr_sync[1]) begin
          rx_read_pointer <= '0;
          rx_len          <= rx_write_pointer;
          rxs             <= RX_READ;
        end
        RX_READ: begin
          if (32'(rx_read_pointer) < FB) rx_frame[rx_read_pointer] <= rx_data;
          if (32'(rx_read_pointer) + 1 >= FB || rx_read_pointer + 1'b1 >= rx_len) begin
            clear_indication <= 1'b1;
            rxs              <= RX_CLEAR;
          end else begin
            rx_read_pointer <= rx_read_pointer + 1'b1;
          end
        end
        RX_CLEAR: if (!wr_sync[1]) begin
          clear_indication <= 1'b0;
          rx_valid         <= 1'b1;
          rxs              <= RX_IDLE;
        end
        default: rxs <= RX_IDLE;
      endcase
    end
  end

  // --------------------------------------------------------------- transmit
  typedef enum logic [1:0] {TX_IDLE, TX_REQ, TX_BUSY} tx_state_e;
  tx_state_e         txs;
  logic [FB-1:0][7:0] txm;

  always_ff @(posedge pu_clk or negedge rst_n) begin
    if (!rst_n) begin
      txs              <= TX_IDLE;
      txm              <= '0;
      tx_write_pointer <= '0;
      send_request     <= 1'b0;
    end else begin
      unique case (txs)
        TX_IDLE: if (tx_go) begin
          txm              <= tx_frame;
          tx_write_pointer <= tx_len;
          send_request     <= 1'b1;
          txs              <= TX_REQ;
        end
        TX_REQ: if (mbs_sync[1]) begin
          send_request <= 1'b0;
          txs          <= TX_BUSY;
        end
        TX_BUSY: if (!mbs_sync[1]) txs <= TX_IDLE;
        default: txs <= TX_IDLE;
      endcase
    end
  end

  assign tx_idle = (txs == TX_IDLE);
  assign tx_data = (32'(tx_read_pointer) < FB) ? txm[tx_read_pointer] : 8'h00;

endmodule
