// tb_gals_test_system: the seven-PU demonstrator at its default size
// (timer period 500000 timer clocks). The testbench plays the UART PU at
// 33h and the two ADC-control PUs at 36h/37h; the timer, LED, LFSR and CRC
// units are the RTL ones, each on its own clock.
// Checked: LED load/toggle/query, two LFSR queries (values non-zero, from
// the LFSR sequence, and different), the CRC-16/CCITT of "123456789"
// (29B1h) computed independently here, a frame between the two ADC
// positions, a frame to a sleeping 37h delivered after wake-up, and the
// timer toggling LED 0 on each of its first two ticks.
`timescale 1ns/1ps
module tb_gals_test_system;
  import gals_bus_pkg::*;

  logic sys_clk = 1'b0, timer_clk = 1'b0, leds_clk = 1'b0, lfsr_clk = 1'b0, crc_clk = 1'b0;
  logic rst_n = 1'b1;
  always #5    sys_clk   = !sys_clk;
  always #5    timer_clk = !timer_clk;
  always #6.5  leds_clk  = !leds_clk;
  always #4.5  lfsr_clk  = !lfsr_clk;
  always #5.5  crc_clk   = !crc_clk;
  logic pc_clk = 1'b0;
  always #3.5  pc_clk    = !pc_clk;

  logic [2:0]        leds;
  logic [6:0]        asleep = '0;
  logic [2:0]        sreq = '0, mbs, waiting, clr;
  logic [2:0][4:0]   twp, trp, rwp, rrp;
  logic [2:0][7:0]   tdat, rdat;
  logic              wake_req, timer_tick, bus_clk, idle, grant, regain;
  logic [7:0]        wake_id, drops;
  logic [2:0]        stored;
  logic [15:0]       lfsr_value;
  bus_t              bus;

  gals_test_system dut (
    .sys_clk, .rst_n, .timer_clk, .leds_clk, .lfsr_clk, .crc_clk, .leds, .pu_asleep(asleep),
    .ext_send_request(sreq), .ext_tx_write_pointer(twp), .ext_tx_read_pointer(trp),
    .ext_tx_data(tdat), .ext_message_being_sent(mbs), .ext_rx_write_pointer(rwp),
    .ext_rx_read_pointer(rrp), .ext_rx_data(rdat), .ext_waiting_read(waiting),
    .ext_clear_indication(clr), .wake_req, .wake_id, .sched_stored(stored), .sched_drops(drops),
    .grant_o(grant), .regain_o(regain), .timer_tick, .lfsr_value, .bus_clk_o(bus_clk),
    .bus_o(bus), .idle_o(idle)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // external PU models (index 0 = 33h, 1 = 36h, 2 = 37h)
  logic [7:0] tmem [3][16];
  always_comb for (int e = 0; e < 3; e++) tdat[e] = tmem[e][trp[e][3:0]];

  task automatic send(input int e, input int len);
    twp[e] = 5'(len);
    @(posedge pc_clk) sreq[e] = 1'b1;
    wait (mbs[e]);
    @(posedge pc_clk) sreq[e] = 1'b0;
    wait (!mbs[e]);
  endtask

  logic [7:0] got [16];
  int         ngot;
  task automatic receive(input int e);
    wait (waiting[e]);
    @(posedge pc_clk);
    ngot = int'(rwp[e]);
    for (int i = 0; i < ngot; i++) begin
      rrp[e] = 5'(i);
      @(posedge pc_clk);
      got[i] = rdat[e];
    end
    clr[e] = 1'b1;
    wait (!waiting[e]);
    @(posedge pc_clk) clr[e] = 1'b0;
  endtask

  function automatic logic [15:0] crc_ccitt(input logic [7:0] b [16], input int from, input int to);
    logic [15:0] c = 16'hFFFF;
    for (int i = from; i < to; i++) begin
      c ^= {b[i], 8'h00};
      for (int k = 0; k < 8; k++) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return c;
  endfunction

  function automatic bit in_lfsr_sequence(input logic [15:0] v, input int steps);
    logic [15:0] r = 16'hACE1;
    for (int i = 0; i < steps; i++) begin
      if (r == v) return 1'b1;
      r = {r[14:0], r[15] ^ r[13] ^ r[12] ^ r[10]};
    end
    return 1'b0;
  endfunction

  // power-controller model
  always @(posedge sys_clk)
    if (wake_req && wake_id == 8'h37 && asleep[6]) begin
      repeat (100) @(posedge sys_clk);
      asleep[6] <= 1'b0;
    end

  int ticks = 0;
  always @(posedge timer_clk) if (timer_tick) ticks++;

  initial begin
    repeat (2_500_000) @(posedge sys_clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] r1, r2, crc_exp;
  logic [2:0]  leds0;
  initial begin
    clr = '0; rrp = '0; twp = '0;
    for (int e = 0; e < 3; e++) for (int i = 0; i < 16; i++) tmem[e][i] = 8'h00;
    #1 rst_n = 1'b0; #20 rst_n = 1'b1;
    repeat (10) @(posedge sys_clk);

    // LEDs: load 5, toggle mask 3, query
    tmem[0][0:3] = '{8'h32, 8'h33, 8'h02, 8'h05}; send(0, 4);
    repeat (60) @(posedge sys_clk);
    check(leds == 3'd5, $sformatf("LED load: %b", leds));
    tmem[0][0:3] = '{8'h32, 8'h33, 8'h01, 8'h03}; send(0, 4);
    repeat (60) @(posedge sys_clk);
    check(leds == 3'd6, $sformatf("LED toggle: %b", leds));
    tmem[0][0:2] = '{8'h32, 8'h33, 8'h03}; send(0, 3);
    receive(0);
    check(ngot == 4 && got[0] == 8'h33 && got[1] == 8'h32 && got[2] == 8'h83 && got[3] == 8'h06,
          "LED query reply {33,32,83,06}");

    // LFSR: two queries
    tmem[0][0:2] = '{8'h34, 8'h33, 8'h01}; send(0, 3);
    receive(0);
    check(ngot == 5 && got[0] == 8'h33 && got[1] == 8'h34 && got[2] == 8'h81, "LFSR reply header");
    r1 = {got[3], got[4]};
    send(0, 3);
    receive(0);
    r2 = {got[3], got[4]};
    check(r1 != 16'h0 && r2 != 16'h0 && r1 != r2, "LFSR values non-zero and different");
    check(in_lfsr_sequence(r1, 70000) && in_lfsr_sequence(r2, 70000), "LFSR values from its sequence");

    // CRC of "123456789"
    tmem[0][0:2] = '{8'h35, 8'h33, 8'h01};
    for (int i = 0; i < 9; i++) tmem[0][3 + i] = 8'h31 + 8'(i);
    crc_exp = crc_ccitt(tmem[0], 3, 12);
    check(crc_exp == 16'h29B1, "reference CRC-16/CCITT check value");
    send(0, 12);
    receive(0);
    check(ngot == 5 && got[0] == 8'h33 && got[1] == 8'h35 && got[2] == 8'h81 &&
          {got[3], got[4]} == crc_exp, $sformatf("CRC reply %h%h exp %h", got[3], got[4], crc_exp));

    // ADC positions: 36h -> 37h, then 37h asleep
    tmem[1][0:3] = '{8'h37, 8'h36, 8'h02, 8'h9a}; send(1, 4);
    receive(2);
    check(ngot == 4 && got[3] == 8'h9a, "36h -> 37h frame");
    asleep[6] = 1'b1;
    tmem[1][3] = 8'h9b; send(1, 4);
    repeat (20) @(posedge sys_clk);
    check(stored == 3'd1 && wake_req && wake_id == 8'h37, "frame for sleeping 37h held, wake requested");
    receive(2);
    check(ngot == 4 && got[3] == 8'h9b && !asleep[6], "held frame delivered after wake-up");

    // timer: LED 0 toggles on every tick
    leds0 = leds;
    check(ticks == 0, "no timer tick yet");
    wait (ticks == 1);
    repeat (200) @(posedge sys_clk);
    check(leds == (leds0 ^ 3'b001), "first timer tick toggled LED 0");
    wait (ticks == 2);
    repeat (200) @(posedge sys_clk);
    check(leds == leds0, "second timer tick toggled LED 0 back");
    check(drops == 8'd0, "nothing dropped");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
