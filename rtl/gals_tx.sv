// gals_tx: transmit half of a PU's bus interface.
//
// The PU assembles a frame in its own memory (byte 0 = destination ID,
// byte 1 = source ID, then payload), sets write_pointer to the number of
// bytes and raises send_request. This block then raises bus_request. Since
// the bus clock is stopped while the bus is idle, bus_request is a
// combinational function of send_request; the arbiter synchronises it.
//
// Timing, in rising bus_clk edges (all state changes on bus_clk):
//   edge 1   bus_arbiter_ctrl high and bus_data == MY_ID: this block is
//            granted; message_being_sent rises, bus_request falls.
//   edge 2   the block takes the bus and drives byte 0 (destination).
//   edge k   the byte at read_pointer is driven; read_pointer advances.
//            With the last byte tx_last_o (bus_last_byte) is high; at the
//            edge that samples it the block releases the bus and clears
//            message_being_sent.
// The PU memory is read asynchronously: read_pointer is an output and data
// must be the memory byte at that address, so the PU may run on any clock.
// The PU is expected to lower send_request while message_being_sent is high
// (four-phase handshake). If bus_arbiter_ctrl is seen high while sending,
// the arbiter has taken the bus back; the block stops at once.
//
// Grant and take-over edges and the handshake follow the bus description;
// the frame layout, the combinational request and the abort behaviour are
// this implementation's choices. Outputs toward the shared lines are
// enable-gated (tx_data_o is 0 when not driving) for OR resolution.
module gals_tx
  import gals_bus_pkg::*;
#(
  parameter logic [7:0]  MY_ID = 8'h31,
  parameter int unsigned Q     = 5       // pointer width, frames up to 2**Q-1 bytes
) (
  input  logic         bus_clk,
  input  logic         rst_n,
  input  bus_t         bus_i,
  output logic         bus_request,
  output logic [7:0]   tx_data_o,
  output logic         tx_drive_o,
  output logic         tx_last_o,
  // PU side (Table of TX interface signals)
  input  logic [Q-1:0] write_pointer,
  output logic [Q-1:0] read_pointer,
  input  logic [7:0]   data,
  output logic         message_being_sent,
  input  logic         send_request
);

  typedef enum logic [1:0] {T_IDLE, T_WAIT, T_SEND} tx_state_e;
  tx_state_e    state;
  logic [Q-1:0] last_idx;
  logic         granted;

  assign last_idx = (write_pointer == '0) ? '0 : write_pointer - 1'b1;
  assign granted  = bus_i.arbiter_ctrl && (bus_i.data == MY_ID) && send_request;

  always_ff @(posedge bus_clk or negedge rst_n) begin
    if (!rst_n) begin
      state              <= T_IDLE;
      read_pointer       <= '0;
      message_being_sent <= 1'b0;
    end else begin
      unique case (state)
        T_IDLE: if (granted && !message_being_sent) begin
          state              <= T_WAIT;
          read_pointer       <= '0;
          message_being_sent <= 1'b1;
        end
        T_WAIT: if (bus_i.arbiter_ctrl) begin
          state              <= T_IDLE;
          message_being_sent <= 1'b0;
        end else begin
          state <= T_SEND;
        end
        T_SEND: if (bus_i.arbiter_ctrl || read_pointer == last_idx) begin
          state              <= T_IDLE;
          message_being_sent <= 1'b0;
        end else begin
          read_pointer <= read_pointer + 1'b1;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  assign bus_request = send_request && !message_being_sent;
  assign tx_drive_o  = (state == T_SEND);
  assign tx_data_o   = tx_drive_o ? data : 8'h00;
  assign tx_last_o   = tx_drive_o && (read_pointer == last_idx);

endmodule
