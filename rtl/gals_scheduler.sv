// gals_scheduler: delay-tolerance unit of the bus.
//
// A receiver that is busy (still holding an unread message) or asleep does
// not pull bus_ready low after the destination byte. The scheduler follows
// every frame on the bus and copies it, speculatively, into the free slot
// at the tail of a queue of SLOTS frame buffers of DEPTH bytes. At the edge
// after the destination byte it samples bus_ready: if a receiver accepted
// (low), the copy is dropped; otherwise the copy is kept once its last byte
// has arrived. While the queue is not empty, wake_req is high and wake_id
// names the destination of the oldest frame, for the power controller that
// wakes PUs.
//
// Re-transmission: a small controller on the always-running sys_clk acts
// like a PU towards the scheduler's own gals_tx. RETRY_CYCLES sys_clk cycles
// after a frame is stored, or after the previous attempt ended, it raises
// send_request; the transmit block resends the oldest frame byte for byte
// (destination, original source, payload). The scheduler watches bus_ready
// during its own frames too: once a receiver accepts, the frame leaves the
// queue at the end of the frame; otherwise it stays and is tried again later. The scheduler's own
// frames are never copied, nor are frames addressed to it. A frame refused
// while all slots are full is lost and counted in drop_count.
//
// Timing: the bus side runs on bus_clk with the frame positions of gals_rx;
// send_request and message_being_sent cross between the clocks through
// two-flop synchronisers; queue state read by sys_clk logic is static
// while the bus clock is stopped.
// Storing refused frames, resending them when possible and initiating wake
// up follow the bus description. The queue, the periodic retry and the wake
// request ports are this implementation's choices.
module gals_scheduler
  import gals_bus_pkg::*;
#(
  parameter logic [7:0]  MY_ID        = 8'h30,
  parameter int unsigned SLOTS        = 4,
  parameter int unsigned DEPTH        = 16,
  parameter int unsigned RETRY_CYCLES = 64
) (
  input  logic       sys_clk,
  input  logic       bus_clk,
  input  logic       rst_n,
  input  bus_t       bus_i,
  output logic       bus_request,
  output logic [7:0] tx_data_o,
  output logic       tx_drive_o,
  output logic       tx_last_o,
  output logic       wake_req,
  output logic [7:0] wake_id,
  output logic [$clog2(SLOTS+1)-1:0] stored_count,
  output logic [7:0] drop_count
);

  localparam int unsigned LW = $clog2(DEPTH + 1);   // frame length width
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned SW = (SLOTS > 1) ? $clog2(SLOTS) : 1;
  localparam int unsigned CW = $clog2(SLOTS + 1);

  logic [7:0]    mem [SLOTS*DEPTH];
  logic [LW-1:0] len [SLOTS];
  logic [SW-1:0] head, tail;
  logic [CW-1:0] count;

  // ---------------------------------------------------------------- bus side
  frame_pos_e    pos;
  logic          own, own_acked, cap, lost, chk_pending, checked, done;
  logic [LW-1:0] clen;
  logic          byte_now, last_now, accepted_now, refused_now, push, pop;

  assign byte_now     = !bus_i.arbiter_ctrl && (pos == F_DEST || pos == F_BODY);
  assign last_now     = byte_now && bus_i.last_byte;
  assign accepted_now = chk_pending && !bus_i.ready;
  assign refused_now  = chk_pending && bus_i.ready;
  assign push         = cap && !accepted_now && (checked || refused_now) && (done || last_now);
  // an accepted frame of our own leaves the queue only once it is over
  // (at the next arbiter byte), since the transmit block reads it until then
  assign pop          = own && (own_acked || accepted_now) && bus_i.arbiter_ctrl;

  always_ff @(posedge bus_clk) begin
    if (cap && byte_now && clen < LW'(DEPTH))
      mem[32'(tail) * DEPTH + 32'(clen)] <= bus_i.data;
    if (push)
      len[tail] <= clen + LW'(byte_now && clen < LW'(DEPTH));
  end

  always_ff @(posedge bus_clk or negedge rst_n) begin
    if (!rst_n) begin
      pos         <= F_IDLE;
      own         <= 1'b0;
      own_acked   <= 1'b0;
      cap         <= 1'b0;
      lost        <= 1'b0;
      chk_pending <= 1'b0;
      checked     <= 1'b0;
      done        <= 1'b0;
      clen        <= '0;
      head        <= '0;
      tail        <= '0;
      count       <= '0;
      drop_count  <= '0;
    end else begin
      if (push) tail <= (32'(tail) == SLOTS - 1) ? '0 : tail + 1'b1;
      if (pop)  head <= (32'(head) == SLOTS - 1) ? '0 : head + 1'b1;
      count <= count + CW'(push) - CW'(pop);
      if (lost && refused_now) drop_count <= drop_count + 8'd1;
      if (chk_pending) chk_pending <= 1'b0;
      if (refused_now) checked <= 1'b1;
      if (accepted_now || push) cap <= 1'b0;
      if (own && accepted_now) own_acked <= 1'b1;

      if (bus_i.arbiter_ctrl) begin
        // grant or idle byte: a new frame starts, an unfinished one is void
        pos         <= (bus_i.data != IDLE_ID) ? F_GAP : F_IDLE;
        own         <= (bus_i.data == MY_ID);
        own_acked   <= 1'b0;
        cap         <= (bus_i.data != IDLE_ID) && (bus_i.data != MY_ID) &&
                       (count + CW'(push) - CW'(pop) < CW'(SLOTS));
        lost        <= (bus_i.data != IDLE_ID) && (bus_i.data != MY_ID) &&
                       (count + CW'(push) - CW'(pop) >= CW'(SLOTS));
        chk_pending <= 1'b0;
        checked     <= 1'b0;
        done        <= 1'b0;
        clen        <= '0;
      end else begin
        unique case (pos)
          F_IDLE: ;
          F_GAP:  pos <= F_DEST;
          F_DEST: begin
            pos         <= F_BODY;
            chk_pending <= 1'b1;
            done        <= bus_i.last_byte;
            clen        <= LW'(1);
            if (bus_i.data == MY_ID) begin
              cap  <= 1'b0;
              lost <= 1'b0;
            end
          end
          F_BODY: begin
            if (bus_i.last_byte) done <= 1'b1;
            if (cap && clen < LW'(DEPTH)) clen <= clen + 1'b1;
          end
          default: pos <= F_IDLE;
        endcase
      end
    end
  end

  assign stored_count = count;
  assign wake_req     = (count != '0);
  assign wake_id      = mem[32'(head) * DEPTH];

  // ------------------------------------------------- own transmit block
  logic [LW-1:0] tx_rp;
  logic          mbs, send_req;

  gals_tx #(.MY_ID(MY_ID), .Q(LW)) u_tx (
    .bus_clk            (bus_clk),
    .rst_n              (rst_n),
    .bus_i              (bus_i),
    .bus_request        (bus_request),
    .tx_data_o          (tx_data_o),
    .tx_drive_o         (tx_drive_o),
    .tx_last_o          (tx_last_o),
    .write_pointer      (len[head]),
    .read_pointer       (tx_rp),
    .data               (mem[32'(head) * DEPTH + 32'(tx_rp[AW-1:0])]),
    .message_being_sent (mbs),
    .send_request       (send_req)
  );

  // ------------------------------------ retry controller (sys_clk domain)
  typedef enum logic [1:0] {R_WAIT, R_REQ, R_SENT} retry_e;
  retry_e      rstate;
  logic [1:0]  pend_sync, mbs_sync;
  logic [31:0] timer;

  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_sync <= '0;
      mbs_sync  <= '0;
      rstate    <= R_WAIT;
      timer     <= '0;
      send_req  <= 1'b0;
    end else begin
      pend_sync <= {pend_sync[0], wake_req};
      mbs_sync  <= {mbs_sync[0], mbs};
      unique case (rstate)
        R_WAIT: begin
          if (!pend_sync[1]) begin
            timer <= '0;
          end else if (timer >= RETRY_CYCLES - 1) begin
            timer    <= '0;
            send_req <= 1'b1;
            rstate   <= R_REQ;
          end else begin
            timer <= timer + 1;
          end
        end
        R_REQ: if (mbs_sync[1]) begin
          send_req <= 1'b0;
          rstate   <= R_SENT;
        end
        R_SENT: if (!mbs_sync[1]) rstate <= R_WAIT;
        default: rstate <= R_WAIT;
      endcase
    end
  end

  a_no_overfill: assert property (@(posedge bus_clk) disable iff (!rst_n)
                                  count <= CW'(SLOTS));

endmodule
