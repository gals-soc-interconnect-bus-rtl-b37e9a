// tb_gals_rx: unit test of the receive block.
// The testbench plays arbiter, sender and PU. It sends frames edge by edge
// (grant, take-over gap, destination, bytes with the last flag) and checks:
// acceptance pulse on bus_ready one edge wide, the stored bytes and
// write_pointer, waiting_read, refusal while busy, the asynchronous clear,
// frames for other IDs, the asleep input, an aborted frame and truncation
// of a frame longer than the RAM.
`timescale 1ns/1ps
module tb_gals_rx;
  import gals_bus_pkg::*;

  localparam int DEPTH = 16, P = 5;
  logic         bus_clk = 1'b0, rst_n = 1'b1;
  bus_t         bus;
  logic         rdy, asleep, waiting, clr;
  logic [P-1:0] wp, rp;
  logic [7:0]   data;

  gals_rx #(.MY_ID(8'h34), .DEPTH(DEPTH)) dut (
    .bus_clk, .rst_n, .bus_i(bus), .rx_ready_o(rdy), .asleep,
    .write_pointer(wp), .read_pointer(rp), .data, .waiting_read(waiting), .clear_indication(clr)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic tick;
    #5 bus_clk = 1'b1;
    #5 bus_clk = 1'b0;
  endtask

  logic [7:0] frame [24];
  int         acks;
  // sends frame[0..len-1] after granting sender 33h; abort_at >= 0 cuts it
  task automatic send_frame(input int len, input int abort_at = -1);
    acks = 0;
    bus.arbiter_ctrl = 1'b1; bus.data = 8'h33; tick();
    bus.arbiter_ctrl = 1'b0; bus.data = 8'h00; tick();
    for (int i = 0; i < len; i++) begin
      if (i == abort_at) break;
      bus.data = frame[i]; bus.last_byte = (i == len - 1); tick();
      if (!rdy) acks++;
      check(rdy || i == 0, "acknowledge only right after the destination");
    end
    bus.last_byte = 1'b0;
    bus.arbiter_ctrl = 1'b1; bus.data = 8'h00; tick();
    if (!rdy) acks++;
    bus.arbiter_ctrl = 1'b0;
  endtask

  task automatic read_check(input int len);
    check(waiting, "waiting_read set");
    check(int'(wp) == len, $sformatf("write_pointer %0d exp %0d", wp, len));
    for (int i = 0; i < len; i++) begin
      rp = P'(i); #1;
      check(data == frame[i], $sformatf("byte %0d = %h exp %h", i, data, frame[i]));
    end
  endtask

  initial begin
    repeat (1000) #10;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus = '0; bus.ready = 1'b1; asleep = 1'b0; clr = 1'b0; rp = '0;
    #1 rst_n = 1'b0; #4 rst_n = 1'b1; #5;

    // a frame for us
    frame[0] = 8'h34; frame[1] = 8'h33; frame[2] = 8'h31; frame[3] = 8'h84;
    send_frame(4);
    check(acks == 1, $sformatf("one acknowledge cycle, got %0d", acks));
    read_check(4);

    // busy: a second frame is refused and the first one stays
    frame[2] = 8'h99;
    send_frame(3);
    check(acks == 0, "busy receiver does not acknowledge");
    frame[2] = 8'h31;
    read_check(4);

    // clear handshake without any bus clock
    clr = 1'b1; #1;
    check(!waiting, "clear_indication clears waiting_read at once");
    frame[2] = 8'h55;
    send_frame(3);
    check(acks == 0 && !waiting, "still busy while clear_indication is high");
    clr = 1'b0; #1;

    // frame for someone else
    frame[0] = 8'h35; frame[1] = 8'h33; frame[2] = 8'h77;
    send_frame(3);
    check(acks == 0 && !waiting, "frame for 35h ignored");

    // asleep
    asleep = 1'b1; frame[0] = 8'h34;
    send_frame(3);
    check(acks == 0 && !waiting, "asleep receiver ignores the bus");
    asleep = 1'b0;

    // aborted frame is discarded
    for (int i = 1; i < 8; i++) frame[i] = 8'(8'h40 + i);
    send_frame(8, 5);
    check(acks == 1 && !waiting, "aborted frame acknowledged but not reported");

    // one-byte frame
    send_frame(1);
    check(acks == 1, "one-byte frame acknowledged");
    read_check(1);
    clr = 1'b1; #1; clr = 1'b0;

    // longer than the RAM: first DEPTH bytes kept
    for (int i = 1; i < 20; i++) frame[i] = 8'(8'h60 + i);
    send_frame(20);
    read_check(DEPTH);
    clr = 1'b1; #1; clr = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
