// tb_gals_timer_pu: timer unit alone with a 100-cycle period. Checks the
// tick spacing, the frame {32h, 31h, 01h, 01h} sent on each tick, and that a
// frame delivered to the timer is read and cleared without a reply.
`timescale 1ns/1ps
module tb_gals_timer_pu;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = !clk;
  logic [4:0] twp, trp, rwp, rrp;
  logic [7:0] td, rd;
  logic mbs, sreq, wr, clr;
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
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic tick;
  gals_timer_pu #(.PERIOD(100)) dut (.pu_clk(clk), .rst_n, .tick_o(tick), .tx_write_pointer(twp), .tx_read_pointer(trp), .tx_data(td), .message_being_sent(mbs), .send_request(sreq), .rx_write_pointer(rwp), .rx_read_pointer(rrp), .rx_data(rd), .waiting_read(wr), .clear_indication(clr));
  int t0, t1, cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    #1 rst_n = 1'b0; #10 rst_n = 1'b1;
    for (int i = 0; i < 16; i++) f[i] = 8'h00;
    for (int n = 0; n < 3; n++) begin
      link.collect();
      check(link.ngot == 4 && link.got[0] == 8'h32 && link.got[1] == 8'h31 &&
            link.got[2] == 8'h01 && link.got[3] == 8'h01, $sformatf("tick %0d frame", n));
    end
    wait (tick); @(posedge clk); t0 = cyc;
    @(posedge clk); wait (tick); @(posedge clk); t1 = cyc;
    check(t1 - t0 == 100, $sformatf("tick every 100 cycles, got %0d", t1 - t0));
    f[0:2] = '{8'h31, 8'h33, 8'h05};
    link.deliver(f, 3);
    check(!wr, "frame to the timer read and cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
