// tb_gals_tx: unit test of the transmit block.
// The testbench plays arbiter, bus clock and PU memory. It checks the
// request line, that a grant for another ID is ignored, the grant and
// take-over edges, the bytes read through read_pointer, the last-byte flag,
// the message_being_sent handshake, a one-byte frame and an aborted frame.
`timescale 1ns/1ps
module tb_gals_tx;
  import gals_bus_pkg::*;

  logic       bus_clk = 1'b0, rst_n = 1'b1;
  bus_t       bus;
  logic       req, drive, last, mbs, send_req;
  logic [7:0] txd;
  logic [4:0] wp, rp;
  logic [7:0] mem [32];

  gals_tx #(.MY_ID(8'h33), .Q(5)) dut (
    .bus_clk, .rst_n, .bus_i(bus), .bus_request(req), .tx_data_o(txd), .tx_drive_o(drive),
    .tx_last_o(last), .write_pointer(wp), .read_pointer(rp), .data(mem[rp]),
    .message_being_sent(mbs), .send_request(send_req)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // one bus clock period: rising edge, then the testbench may change inputs
  task automatic tick;
    #5 bus_clk = 1'b1;
    #5 bus_clk = 1'b0;
  endtask

  task automatic arb(input logic [7:0] id);
    bus.arbiter_ctrl = 1'b1; bus.data = id;
  endtask
  task automatic release_bus;
    bus.arbiter_ctrl = 1'b0; bus.data = 8'h00;
  endtask

  initial begin
    repeat (400) #10;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus = '0; bus.ready = 1'b1; send_req = 1'b0; wp = '0;
    for (int i = 0; i < 32; i++) mem[i] = 8'(8'hA0 + i);
    #1 rst_n = 1'b0; #4 rst_n = 1'b1; #5;
    check(!req && !drive && !mbs, "quiet after reset");

    // frame of 4 bytes
    wp = 5'd4; send_req = 1'b1; #1;
    check(req, "request raised while the bus clock is stopped");
    arb(8'h34); tick();                           // grant for someone else
    check(!mbs && req, "grant for 34h ignored");
    arb(8'h33); tick();                           // edge 1: our grant
    check(mbs && !req && !drive, "edge 1: granted, request dropped");
    release_bus(); send_req = 1'b0; tick();       // edge 2: take-over
    for (int i = 0; i < 4; i++) begin
      check(drive && txd == mem[i] && rp == 5'(i), $sformatf("byte %0d driven", i));
      check(last == (i == 3), $sformatf("last flag on byte %0d", i));
      tick();
    end
    check(!drive && !mbs && !last && txd == 8'h00, "released after the last byte");

    // one-byte frame (write_pointer 0 is treated like 1)
    wp = 5'd0; send_req = 1'b1; arb(8'h33); tick();
    release_bus(); send_req = 1'b0; tick();
    check(drive && last && txd == mem[0], "single byte carries the last flag");
    tick();
    check(!drive && !mbs, "single byte frame done");

    // aborted frame: the arbiter takes the bus back
    wp = 5'd10; send_req = 1'b1; arb(8'h33); tick();
    release_bus(); send_req = 1'b0; tick(); tick(); tick();
    check(drive && rp == 5'd2, "sending before the abort");
    arb(8'h00); tick();
    check(!drive && !mbs, "stopped when the arbiter regains the bus");
    check(!req, "no new request after an abort");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
