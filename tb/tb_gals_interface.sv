// tb_gals_interface: two PU interfaces (33h and 34h) on resolved bus lines,
// with the testbench acting as arbiter. 33h sends a frame to 34h, then 34h
// answers; each side checks what its receive block stored, the
// acknowledge seen on bus_ready and that a PU does not receive its own frame.
`timescale 1ns/1ps
module tb_gals_interface;
  import gals_bus_pkg::*;

  logic bus_clk = 1'b0, rst_n = 1'b1;
  logic arb_ctrl = 1'b0;
  logic [7:0] arb_data = '0;
  bus_t bus;
  logic [1:0]       req, drive, last, rdy, mbs, sreq, waiting, clr;
  logic [1:0][7:0]  txd, txdata, rxdata;
  logic [1:0][4:0]  twp, trp, rwp, rrp;
  logic [7:0]       mem [2][8];

  for (genvar k = 0; k < 2; k++) begin : g
    assign txdata[k] = mem[k][trp[k][2:0]];
    gals_interface #(.MY_ID(8'h33 + 8'(k))) u_if (
      .bus_clk, .rst_n, .bus_i(bus), .bus_request(req[k]), .tx_data_o(txd[k]),
      .tx_drive_o(drive[k]), .tx_last_o(last[k]), .rx_ready_o(rdy[k]),
      .tx_write_pointer(twp[k]), .tx_read_pointer(trp[k]), .tx_data(txdata[k]),
      .message_being_sent(mbs[k]), .send_request(sreq[k]),
      .asleep(1'b0), .rx_write_pointer(rwp[k]), .rx_read_pointer(rrp[k]), .rx_data(rxdata[k]),
      .waiting_read(waiting[k]), .clear_indication(clr[k])
    );
  end

  gals_bus_lines #(.NTX(2), .NRX(2)) u_lines (
    .bus_clk, .rst_n, .arb_ctrl_i(arb_ctrl), .arb_data_i(arb_data), .tx_data_i(txd),
    .tx_drive_i(drive), .tx_last_i(last), .rx_ready_i(rdy), .bus_o(bus)
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

  // arbiter model: grant line k, wait for the last byte, close with 00h
  int acks;
  task automatic transfer(input int k, input int len);
    acks = 0;
    twp[k] = 5'(len); sreq[k] = 1'b1; #1;
    check(req[k], "request line raised");
    arb_ctrl = 1'b1; arb_data = 8'h33 + 8'(k); tick();
    arb_ctrl = 1'b0; arb_data = 8'h00; sreq[k] = 1'b0;
    for (int n = 0; n < 20 && !(bus.last_byte); n++) begin
      tick();
      if (!bus.ready) acks++;
    end
    tick();
    if (!bus.ready) acks++;
    arb_ctrl = 1'b1; arb_data = 8'h00; tick();
    arb_ctrl = 1'b0;
    check(!mbs[k], "message_being_sent cleared");
    check(acks == 1, "one acknowledge");
  endtask

  task automatic read_check(input int k, input int src, input int len);
    check(waiting[k] && int'(rwp[k]) == len, "frame stored");
    for (int i = 0; i < len; i++) begin
      rrp[k] = 5'(i); #1;
      check(rxdata[k] == mem[src][i], $sformatf("PU%0d byte %0d", k, i));
    end
    clr[k] = 1'b1; #1;
    check(!waiting[k], "cleared");
    clr[k] = 1'b0;
  endtask

  initial begin
    repeat (500) #10;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sreq = '0; clr = '0; twp = '0; rrp = '0;
    mem[0] = '{8'h34, 8'h33, 8'h31, 0, 0, 0, 0, 0};
    mem[1] = '{8'h33, 8'h34, 8'h31, 8'h84, 8'h86, 0, 0, 0};
    #1 rst_n = 1'b0; #4 rst_n = 1'b1; #5;
    transfer(0, 3);
    check(!waiting[0], "33h does not receive its own frame");
    read_check(1, 0, 3);
    transfer(1, 5);
    check(!waiting[1], "34h does not receive its own frame");
    read_check(0, 1, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
