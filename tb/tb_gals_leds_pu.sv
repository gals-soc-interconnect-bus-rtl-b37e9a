// tb_gals_leds_pu: LED unit alone. Load, toggle, an unknown command and a
// query are delivered as frames; the LED outputs and the query reply are
// compared with values worked out here.
`timescale 1ns/1ps
module tb_gals_leds_pu;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = !clk;
  logic [2:0] leds;
  logic [4:0] twp, trp, rwp, rrp;
  logic [7:0] td, rd;
  logic mbs, sreq, wr, clr;

  gals_leds_pu dut (
    .pu_clk(clk), .rst_n, .leds, .tx_write_pointer(twp), .tx_read_pointer(trp), .tx_data(td),
    .message_being_sent(mbs), .send_request(sreq), .rx_write_pointer(rwp),
    .rx_read_pointer(rrp), .rx_data(rd), .waiting_read(wr), .clear_indication(clr)
  );
  tb_pu_link link (
    .clk, .tx_write_pointer(twp), .tx_read_pointer(trp), .tx_data(td), .message_being_sent(mbs),
    .send_request(sreq), .rx_write_pointer(rwp), .rx_read_pointer(rrp), .rx_data(rd),
    .waiting_read(wr), .clear_indication(clr)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic [7:0] f [16];
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1 rst_n = 1'b0; #10 rst_n = 1'b1;
    for (int i = 0; i < 16; i++) f[i] = 8'h00;
    check(leds == 3'b000, "LEDs off after reset");
    f[0:3] = '{8'h32, 8'h31, 8'h02, 8'h05}; link.deliver(f, 4);
    repeat (5) @(posedge clk);
    check(leds == 3'b101, "load 5");
    f[0:3] = '{8'h32, 8'h31, 8'h01, 8'h01}; link.deliver(f, 4);
    repeat (5) @(posedge clk);
    check(leds == 3'b100, "toggle LED 0");
    f[0:3] = '{8'h32, 8'h31, 8'h01, 8'h06}; link.deliver(f, 4);
    repeat (5) @(posedge clk);
    check(leds == 3'b010, "toggle LEDs 1 and 2");
    f[0:3] = '{8'h32, 8'h31, 8'h7f, 8'h07}; link.deliver(f, 4);
    repeat (5) @(posedge clk);
    check(leds == 3'b010 && !sreq, "unknown command ignored");
    f[0:2] = '{8'h32, 8'h33, 8'h03};
    fork link.deliver(f, 3); link.collect(); join
    check(link.ngot == 4, "reply length 4");
    check(link.got[0] == 8'h33 && link.got[1] == 8'h32 && link.got[2] == 8'h83 && link.got[3] == 8'h02,
          "reply {33,32,83,02}");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
