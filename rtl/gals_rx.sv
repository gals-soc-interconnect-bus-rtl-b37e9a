// gals_rx: receive half of a PU's bus interface.
//
// Every awake receive block follows each frame on the bus. After the grant
// byte (bus_arbiter_ctrl high, non-zero ID) it skips one edge, while the
// granted sender takes the bus, and then samples the destination byte. If
// the destination is MY_ID and the block is free, it pulls its bus_ready
// contribution low for one bus_clk cycle (acceptance seen by the scheduler),
// and copies the whole frame, destination byte included, into its RAM at
// addresses 0, 1, 2 ... . When the byte flagged by bus_last_byte has been
// stored, waiting_read rises and the block stays busy: further frames for
// it are not accepted and bus_ready stays high, so the scheduler keeps them.
//
// PU side: write_pointer is the number of bytes stored, the PU reads the RAM
// asynchronously with read_pointer (data = RAM[read_pointer]), then raises
// clear_indication. Because the bus clock is stopped when the bus is idle,
// clear_indication clears waiting_read asynchronously; the block counts as
// busy until clear_indication is low again (four-phase handshake).
// asleep models a powered-down interface: the bus is ignored.
//
// A frame longer than DEPTH keeps its first DEPTH bytes. A frame cut short by
// the arbiter (bus_arbiter_ctrl high before the last byte) is discarded.
// Destination matching, copying, the busy state and the handshake follow the
// bus description; the RAM size, the overflow and abort handling, the asleep
// input and the asynchronous clear are this implementation's choices.
module gals_rx
  import gals_bus_pkg::*;
#(
  parameter logic [7:0]  MY_ID = 8'h31,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned P     = $clog2(DEPTH + 1)
) (
  input  logic         bus_clk,
  input  logic         rst_n,
  input  bus_t         bus_i,
  output logic         rx_ready_o,
  input  logic         asleep,
  // PU side (Table of RX interface signals)
  output logic [P-1:0] write_pointer,
  input  logic [P-1:0] read_pointer,
  output logic [7:0]   data,
  output logic         waiting_read,
  input  logic         clear_indication
);

  logic [7:0]  mem [DEPTH];
  frame_pos_e  pos;
  logic        acc;          // accepting the current frame
  logic        busy;
  logic        take_dest;    // this edge samples a destination byte for us
  logic        take_body;    // this edge samples a further byte of our frame
  logic        frame_done;
  logic        wr_clr_n;

  assign busy       = waiting_read || clear_indication;
  assign take_dest  = !asleep && !bus_i.arbiter_ctrl && pos == F_DEST &&
                      bus_i.data == MY_ID && !busy;
  assign take_body  = !asleep && !bus_i.arbiter_ctrl && pos == F_BODY && acc;
  assign frame_done = (take_dest || take_body) && bus_i.last_byte;

  always_ff @(posedge bus_clk or negedge rst_n) begin
    if (!rst_n) begin
      pos           <= F_IDLE;
      acc           <= 1'b0;
      rx_ready_o    <= 1'b1;
      write_pointer <= '0;
    end else begin
      rx_ready_o <= 1'b1;
      if (asleep) begin
        pos <= F_IDLE;
        acc <= 1'b0;
      end else if (bus_i.arbiter_ctrl) begin
        acc <= 1'b0;
        pos <= (bus_i.data != IDLE_ID) ? F_GAP : F_IDLE;
      end else begin
        unique case (pos)
          F_IDLE: ;
          F_GAP:  pos <= F_DEST;
          F_DEST: begin
            if (take_dest) begin
              rx_ready_o    <= 1'b0;
              write_pointer <= P'(1);
              acc           <= !bus_i.last_byte;
              pos           <= bus_i.last_byte ? F_IDLE : F_BODY;
            end else begin
              pos <= F_IDLE;
            end
          end
          F_BODY: begin
            if (take_body && write_pointer < P'(DEPTH))
              write_pointer <= write_pointer + 1'b1;
            if (bus_i.last_byte || !acc) begin
              acc <= 1'b0;
              pos <= F_IDLE;
            end
          end
          default: pos <= F_IDLE;
        endcase
      end
    end
  end

  // RAM write port (no reset: written before it is read)
  always_ff @(posedge bus_clk) begin
    if (take_dest)
      mem[0] <= bus_i.data;
    else if (take_body && write_pointer < P'(DEPTH))
      mem[write_pointer[$clog2(DEPTH)-1:0]] <= bus_i.data;
  end

  // waiting_read: set by the bus clock, cleared by reset or by the PU
  assign wr_clr_n = rst_n && !clear_indication;
  always_ff @(posedge bus_clk or negedge wr_clr_n) begin
    if (!wr_clr_n)       waiting_read <= 1'b0;
    else if (frame_done) waiting_read <= 1'b1;
  end

  // asynchronous read port for the PU
  assign data = (read_pointer < P'(DEPTH)) ? mem[read_pointer[$clog2(DEPTH)-1:0]] : 8'h00;

  // an acceptance pulse lasts one bus clock cycle
  a_ready_pulse: assert property (@(posedge bus_clk) disable iff (!rst_n)
                                  !rx_ready_o |=> rx_ready_o);

endmodule
