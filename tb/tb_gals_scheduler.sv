// tb_gals_scheduler: unit test of the scheduler (two slots, retry after 16
// system clocks). The testbench plays arbiter, senders and receivers.
// Checked: an accepted frame is not kept; a refused frame is kept, with
// wake_req/wake_id naming its destination; the scheduler asks for the bus
// and resends the frame byte for byte; a refused resend keeps the frame, an
// accepted one removes it; a full queue drops and counts; frames addressed
// to the scheduler itself are not kept.
`timescale 1ns/1ps
module tb_gals_scheduler;
  import gals_bus_pkg::*;

  logic sys_clk = 1'b0, bus_clk = 1'b0, rst_n = 1'b1;
  always #5 sys_clk = !sys_clk;

  logic       arb_ctrl = 1'b0, tb_last = 1'b0, tb_ready = 1'b1;
  logic [7:0] arb_data = '0, tb_data = '0;
  bus_t       bus;
  logic       req, drive, last, wake;
  logic [7:0] txd, wid, drops;
  logic [1:0] stored;

  assign bus.arbiter_ctrl = arb_ctrl;
  assign bus.data         = arb_ctrl ? arb_data : (txd | tb_data);
  assign bus.last_byte    = last | tb_last;
  assign bus.ready        = tb_ready;

  gals_scheduler #(.MY_ID(8'h30), .SLOTS(2), .DEPTH(16), .RETRY_CYCLES(16)) dut (
    .sys_clk, .bus_clk, .rst_n, .bus_i(bus), .bus_request(req), .tx_data_o(txd),
    .tx_drive_o(drive), .tx_last_o(last), .wake_req(wake), .wake_id(wid),
    .stored_count(stored), .drop_count(drops)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  task automatic tick;
    #10 bus_clk = 1'b1;
    #10 bus_clk = 1'b0;
  endtask

  logic [7:0] frame [8];
  // another PU sends frame[0..len-1]; the receiver acknowledges if accept
  task automatic pu_frame(input logic [7:0] src, input int len, input bit accept);
    arb_ctrl = 1'b1; arb_data = src; tick();
    arb_ctrl = 1'b0; tick();
    for (int i = 0; i < len; i++) begin
      tb_data = frame[i]; tb_last = (i == len - 1);
      tick();
      tb_ready = !(accept && i == 0);
    end
    tb_data = '0; tb_last = 1'b0;
    arb_ctrl = 1'b1; arb_data = 8'h00; tick();
    tb_ready = 1'b1; arb_ctrl = 1'b0;
  endtask

  // grant the scheduler and collect what it sends
  logic [7:0] got [16];
  int         ngot;
  task automatic grant_sched(input bit accept);
    ngot = 0;
    arb_ctrl = 1'b1; arb_data = 8'h30; tick();
    arb_ctrl = 1'b0; arb_data = 8'h00; tick();
    for (int n = 0; n < 20; n++) begin
      if (drive) begin got[ngot] = txd; ngot++; end
      if (last) begin tick(); break; end
      tick();
      tb_ready = !(accept && ngot == 1);
    end
    tb_ready = !(accept && ngot == 1);
    arb_ctrl = 1'b1; tick();
    tb_ready = 1'b1; arb_ctrl = 1'b0;
  endtask

  initial begin
    repeat (5000) @(posedge sys_clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0; #12 rst_n = 1'b1; #7;

    frame = '{8'h34, 8'h33, 8'h31, 0, 0, 0, 0, 0};
    pu_frame(8'h33, 3, 1'b1);
    check(stored == 0 && !wake, "accepted frame not kept");

    frame = '{8'h33, 8'h34, 8'h31, 8'h8d, 8'h52, 0, 0, 0};
    pu_frame(8'h34, 5, 1'b0);
    check(stored == 1, "refused frame kept");
    check(wake && wid == 8'h33, "wake request for 33h");

    repeat (8) @(posedge sys_clk);
    check(!req, "no request before the retry time");
    wait (req);
    grant_sched(1'b0);
    check(ngot == 5, $sformatf("resent 5 bytes, got %0d", ngot));
    for (int i = 0; i < 5; i++) check(got[i] == frame[i], $sformatf("resent byte %0d", i));
    check(stored == 1, "refused resend keeps the frame");

    wait (req);
    grant_sched(1'b1);
    check(ngot == 5 && got[4] == 8'h52, "second resend complete");
    check(stored == 0 && !wake, "accepted resend removes the frame");

    // frame addressed to the scheduler itself
    frame = '{8'h30, 8'h35, 8'h01, 0, 0, 0, 0, 0};
    pu_frame(8'h35, 3, 1'b0);
    check(stored == 0, "frame for 30h not kept");

    // overflow: two slots
    for (int k = 0; k < 3; k++) begin
      frame = '{8'h36, 8'h31, 8'(k), 0, 0, 0, 0, 0};
      pu_frame(8'h31, 3, 1'b0);
    end
    check(stored == 2, "two frames queued");
    check(drops == 1, "third frame dropped and counted");
    check(wid == 8'h36, "wake for 36h");
    wait (req);
    grant_sched(1'b1);
    check(ngot == 3 && got[2] == 8'h00, "oldest frame resent first");
    check(stored == 1, "one frame left");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
