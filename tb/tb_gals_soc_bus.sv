// tb_gals_soc_bus: end-to-end test of the complete bus at its default size
// (seven PUs 31h..37h, scheduler 30h), with bus-functional PU models that
// run on their own clock, asynchronous to the system clock.
//
// Scenarios:
//   1  two single transfers with the bus going idle (00h) in between; the
//      first frame is checked byte by byte and edge by edge on the bus
//   2  four transfers requested while the previous one is running: the
//      arbiter must chain them without idle bytes
//   3  two PUs request together right after one of them used the bus: the
//      other one must be granted first
//   4  the receiver is busy: the scheduler stores the frame, a retry is
//      refused, the frame is delivered once the receiver is free
//   5  the receiver is asleep: wake request, wake-up by the power-controller
//      model below, delivery
//   6  a PU withdraws its request after the grant: the arbiter regains the bus
//   7  five frames to a sleeping PU: four are queued, one is dropped
// Each received frame is compared with the bytes that were sent. The
// mechanisms are counted and each must have happened at least once.
`timescale 1ns/1ps
module tb_gals_soc_bus;
  import gals_bus_pkg::*;

  localparam int NPU = 7, Q = 5, DEPTH = 16, P = 5;

  logic sys_clk = 1'b0, pu_clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5   sys_clk = !sys_clk;
  always #3.5 pu_clk  = !pu_clk;

  logic [NPU-1:0]        send_req = '0;
  logic [NPU-1:0][Q-1:0] tx_wp, tx_rp;
  logic [NPU-1:0][7:0]   tx_data;
  logic [NPU-1:0]        mbs;
  logic [NPU-1:0]        asleep = '0;
  logic [NPU-1:0][P-1:0] rx_wp, rx_rp;
  logic [NPU-1:0][7:0]   rx_data;
  logic [NPU-1:0]        waiting;
  logic [NPU-1:0]        clr;
  logic                  wake_req;
  logic [7:0]            wake_id;
  logic [2:0]            stored;
  logic [7:0]            drops;
  logic                  bus_clk;
  bus_t                  bus;
  logic                  grant, regain, idle;

  gals_soc_bus dut (
    .sys_clk, .rst_n,
    .pu_send_request(send_req), .pu_tx_write_pointer(tx_wp), .pu_tx_read_pointer(tx_rp),
    .pu_tx_data(tx_data), .pu_message_being_sent(mbs),
    .pu_asleep(asleep), .pu_rx_write_pointer(rx_wp), .pu_rx_read_pointer(rx_rp),
    .pu_rx_data(rx_data), .pu_waiting_read(waiting), .pu_clear_indication(clr),
    .wake_req, .wake_id, .sched_stored(stored), .sched_drops(drops),
    .bus_clk_o(bus_clk), .bus_o(bus), .grant_o(grant), .regain_o(regain), .idle_o(idle)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ------------------------------------------------ PU transmit models
  logic [7:0] tx_mem [NPU][32];
  int         wp_reg [NPU];
  always_comb
    for (int k = 0; k < NPU; k++) begin
      tx_wp[k]   = Q'(wp_reg[k]);
      tx_data[k] = tx_mem[k][tx_rp[k]];
    end

  task automatic load(input int k, input int len, input logic [7:0] b0, b1, b2,
                      input logic [7:0] b3 = 0, input logic [7:0] b4 = 0);
    tx_mem[k][0] = b0; tx_mem[k][1] = b1; tx_mem[k][2] = b2;
    tx_mem[k][3] = b3; tx_mem[k][4] = b4;
    wp_reg[k] = len;
  endtask

  task automatic send(input int k);
    @(posedge pu_clk) send_req[k] = 1'b1;
    wait (mbs[k]);
    @(posedge pu_clk) send_req[k] = 1'b0;
    wait (!mbs[k]);
  endtask

  // ------------------------------------------------ PU receive models
  logic [7:0] exp_b [NPU][32];
  int         exp_len [NPU];
  bit         exp_valid [NPU];
  bit         hold [NPU];
  int         rx_count [NPU];
  logic [P-1:0] rd_ptr [NPU];
  logic         clr_r [NPU];
  always_comb
    for (int k = 0; k < NPU; k++) begin
      rx_rp[k] = rd_ptr[k];
      clr[k]   = clr_r[k];
    end

  task automatic expect_frame(input int k, input int len, input logic [7:0] b0, b1, b2,
                              input logic [7:0] b3 = 0, input logic [7:0] b4 = 0);
    exp_b[k][0] = b0; exp_b[k][1] = b1; exp_b[k][2] = b2; exp_b[k][3] = b3; exp_b[k][4] = b4;
    exp_len[k] = len;
    exp_valid[k] = 1'b1;
  endtask

  for (genvar k = 0; k < NPU; k++) begin : g_rd
    initial begin
      int n;
      rd_ptr[k] = '0; clr_r[k] = 1'b0; rx_count[k] = 0; hold[k] = 1'b0; exp_valid[k] = 1'b0;
      forever begin
        @(posedge pu_clk);
        if (waiting[k] && !hold[k]) begin
          n = int'(rx_wp[k]);
          rd_ptr[k] = '0;
          @(posedge pu_clk);
          check(rx_data[k] == 8'h31 + 8'(k), $sformatf("PU%0h frame addressed to it", 8'h31 + k));
          if (exp_valid[k]) begin
            check(n == exp_len[k], $sformatf("PU%0h frame length %0d exp %0d", 8'h31 + k, n, exp_len[k]));
            for (int i = 0; i < n && i < 32; i++) begin
              rd_ptr[k] = P'(i);
              @(posedge pu_clk);
              check(rx_data[k] == exp_b[k][i],
                    $sformatf("PU%0h byte %0d = %h exp %h", 8'h31 + k, i, rx_data[k], exp_b[k][i]));
            end
            exp_valid[k] = 1'b0;
          end
          clr_r[k] = 1'b1;
          wait (!waiting[k]);
          @(posedge pu_clk) clr_r[k] = 1'b0;
          rx_count[k]++;
        end
      end
    end
  end

  // ------------------------------------------------ power-controller model
  int wakes = 0;
  initial begin
    forever begin
      @(posedge sys_clk);
      if (wake_req && wake_id >= 8'h31 && wake_id <= 8'h37 && asleep[wake_id - 8'h31]
          && !hold[wake_id - 8'h31]) begin
        int id;
        id = int'(wake_id - 8'h31);
        wakes++;
        repeat (150) @(posedge sys_clk);
        asleep[id] = 1'b0;
      end
    end
  end

  // ------------------------------------------------ bus monitor
  int   grants = 0, concat = 0, closes = 0, regains = 0, stores = 0, delivered = 0;
  int   sched_grants = 0, idle_stopped = 0;
  bit   last_arb_nonzero = 1'b0;
  logic [7:0] grant_log [64];
  logic [10:0] edge_log [256];
  int   nedge = 0;
  always @(posedge bus_clk) begin
    if (nedge < 256) edge_log[nedge] = bus;
    nedge++;
    if (bus.arbiter_ctrl) begin
      if (bus.data == 8'h00) begin
        closes++;
        last_arb_nonzero = 1'b0;
      end else begin
        if (last_arb_nonzero) concat++;
        if (grants < 64) grant_log[grants] = bus.data;
        grants++;
        if (bus.data == 8'h30) sched_grants++;
        last_arb_nonzero = 1'b1;
      end
    end
  end
  logic [2:0] stored_q = '0;
  always @(posedge sys_clk) begin
    if (regain) regains++;
    if (stored > stored_q) stores++;
    if (stored < stored_q) delivered++;
    stored_q <= stored;
    if (idle && rst_n) begin
      idle_stopped++;
      if (bus_clk) begin failures++; $display("FAIL: bus clock high while idle"); end
    end
  end

  task automatic wait_idle;
    repeat (4) @(posedge sys_clk);
    wait (idle && send_req == '0 && !wake_req);
    repeat (4) @(posedge sys_clk);
  endtask

  // ------------------------------------------------ watchdog
  initial begin
    repeat (200000) @(posedge sys_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int g0, c0, s0, d0, r0;
  initial begin
    for (int k = 0; k < NPU; k++) begin
      wp_reg[k] = 1;
      for (int i = 0; i < 32; i++) tx_mem[k][i] = 8'h00;
    end
    repeat (5) @(posedge sys_clk);
    rst_n = 1'b1;
    repeat (5) @(posedge sys_clk);

    // ---- 1: PU 33h -> 34h, idle, PU 34h -> 33h
    $display("scenario 1 at %0t", $time);
    nedge = 0;
    load(2, 3, 8'h34, 8'h33, 8'h31);
    expect_frame(3, 3, 8'h34, 8'h33, 8'h31);
    send(2);
    wait (rx_count[3] == 1);
    // edge by edge: grant, take-over gap, dest, src, data+last, 00h
    check(edge_log[0] == {1'b1, 8'h33, 1'b0, 1'b1}, "edge1: grant 33h");
    check(edge_log[1][10] == 1'b0 && edge_log[1][1] == 1'b0, "edge2: sender takes over");
    check(edge_log[2] == {1'b0, 8'h34, 1'b0, 1'b1}, "edge3: destination 34h");
    check(edge_log[3] == {1'b0, 8'h33, 1'b0, 1'b0}, "edge4: source 33h, receiver acknowledges");
    check(edge_log[4] == {1'b0, 8'h31, 1'b1, 1'b1}, "edge5: last byte 31h");
    check(edge_log[5] == {1'b1, 8'h00, 1'b0, 1'b1}, "edge6: idle 00h");
    wait_idle();
    check(nedge == 6, $sformatf("six bus clock edges for a three-byte frame, got %0d", nedge));
    load(3, 5, 8'h33, 8'h34, 8'h31, 8'h84, 8'h86);
    expect_frame(2, 5, 8'h33, 8'h34, 8'h31, 8'h84, 8'h86);
    send(3);
    wait (rx_count[2] == 1);
    wait_idle();
    check(closes == 2, $sformatf("two idle closes, got %0d", closes));

    // ---- 2: four chained transfers
    $display("scenario 2 at %0t", $time);
    c0 = concat; g0 = grants;
    load(2, 3, 8'h34, 8'h33, 8'h31); expect_frame(3, 3, 8'h34, 8'h33, 8'h31);
    load(0, 3, 8'h32, 8'h31, 8'h33); expect_frame(1, 3, 8'h32, 8'h31, 8'h33);
    load(3, 5, 8'h33, 8'h34, 8'h31, 8'hc9, 8'heb); expect_frame(2, 5, 8'h33, 8'h34, 8'h31, 8'hc9, 8'heb);
    load(1, 3, 8'h31, 8'h32, 8'h33); expect_frame(0, 3, 8'h31, 8'h32, 8'h33);
    fork
      send(2);
      begin wait (mbs[2]); send(0); end
      begin wait (mbs[0]); send(3); end
      begin wait (mbs[3]); send(1); end
    join
    wait_idle();
    check(rx_count[3] == 2 && rx_count[1] == 1 && rx_count[2] == 2 && rx_count[0] == 1,
          "four chained frames delivered");
    check(concat - c0 == 3, $sformatf("three chained grants, got %0d", concat - c0));
    check(grant_log[g0] == 8'h33 && grant_log[g0+1] == 8'h31 &&
          grant_log[g0+2] == 8'h34 && grant_log[g0+3] == 8'h32, "chained grant order 33 31 34 32");

    // ---- 3: contention right after PU 31h used the bus
    $display("scenario 3 at %0t", $time);
    load(0, 3, 8'h32, 8'h31, 8'ha1); expect_frame(1, 3, 8'h32, 8'h31, 8'ha1);
    send(0);
    wait (rx_count[1] == 2);
    wait_idle();
    g0 = grants;
    load(0, 3, 8'h33, 8'h31, 8'ha2); expect_frame(2, 3, 8'h33, 8'h31, 8'ha2);
    load(4, 3, 8'h37, 8'h35, 8'hb1); expect_frame(6, 3, 8'h37, 8'h35, 8'hb1);
    fork send(0); send(4); join
    wait_idle();
    check(grant_log[g0] == 8'h35 && grant_log[g0+1] == 8'h31,
          "31h not granted twice in a row under contention");
    check(rx_count[2] == 3 && rx_count[6] == 1, "contention frames delivered");

    // ---- 4: busy receiver (PU 33h holds an unread frame)
    $display("scenario 4 at %0t", $time);
    hold[2] = 1'b1;
    s0 = stores; d0 = delivered; r0 = sched_grants;
    load(4, 3, 8'h33, 8'h35, 8'h11); expect_frame(2, 3, 8'h33, 8'h35, 8'h11);
    send(4);
    wait (waiting[2]);
    load(3, 5, 8'h33, 8'h34, 8'h31, 8'h8d, 8'h52);
    send(3);
    repeat (20) @(posedge sys_clk);
    check(stores - s0 == 1 && stored == 3'd1, "scheduler stored the refused frame");
    check(wake_req && wake_id == 8'h33, "wake request names 33h");
    repeat (300) @(posedge sys_clk);
    check(sched_grants - r0 >= 2, "scheduler retried while the receiver was busy");
    check(stored == 3'd1, "refused retry keeps the frame");
    hold[2] = 1'b0;
    wait (rx_count[2] == 4);
    expect_frame(2, 5, 8'h33, 8'h34, 8'h31, 8'h8d, 8'h52);
    wait (rx_count[2] == 5);
    wait_idle();
    check(delivered - d0 == 1 && stored == 3'd0, "stored frame delivered by the scheduler");

    // ---- 5: asleep receiver 36h
    $display("scenario 5 at %0t", $time);
    asleep[5] = 1'b1;
    load(0, 4, 8'h36, 8'h31, 8'h77, 8'h78); expect_frame(5, 4, 8'h36, 8'h31, 8'h77, 8'h78);
    send(0);
    wait (rx_count[5] == 1);
    wait_idle();
    check(wakes >= 1 && !asleep[5], "asleep receiver woken through the scheduler");

    // ---- 6: PU 37h withdraws its request once granted
    $display("scenario 6 at %0t", $time);
    r0 = regains;
    load(6, 3, 8'h31, 8'h37, 8'h55);
    @(negedge sys_clk) send_req[6] = 1'b1;
    while (!grant) @(negedge sys_clk);
    send_req[6] = 1'b0;
    wait_idle();
    check(regains - r0 == 1, "arbiter regained the bus from a silent PU");
    check(!mbs[6], "silent PU never started");
    expect_frame(0, 3, 8'h31, 8'h37, 8'h55);
    send(6);
    wait (rx_count[0] == 1);
    wait_idle();

    // ---- 7: five frames for a sleeping PU 31h, only four slots
    $display("scenario 7 at %0t", $time);
    asleep[0] = 1'b1;
    hold[0] = 1'b1;                 // keep the power controller off for now
    s0 = stores;
    for (int k = 1; k <= 5; k++) load(k, 3, 8'h31, 8'h31 + 8'(k), 8'(k));
    fork send(1); send(2); send(3); send(4); send(5); join
    repeat (4) @(posedge sys_clk);
    wait (idle);
    check(stored == 3'd4, $sformatf("four frames queued, got %0d", stored));
    check(drops == 8'd1, $sformatf("one frame dropped, got %0d", drops));
    hold[0] = 1'b0;
    asleep[0] = 1'b0;
    wait (rx_count[0] == 5);
    wait_idle();
    check(stored == 3'd0, "queue drained");

    // ---- mechanism coverage
    $display("grants=%0d concat=%0d closes=%0d regains=%0d stores=%0d delivered=%0d sched_grants=%0d wakes=%0d drops=%0d",
             grants, concat, closes, regains, stores, delivered, sched_grants, wakes, drops);
    check(closes > 0,        "mechanism: idle close with clock stop");
    check(idle_stopped > 0,  "mechanism: bus clock stopped while idle");
    check(concat > 0,        "mechanism: chained grants");
    check(regains > 0,       "mechanism: regain");
    check(stores > 0,        "mechanism: scheduler store");
    check(delivered > 0,     "mechanism: scheduler resend");
    check(wakes > 0,         "mechanism: wake request");
    check(drops > 0,         "mechanism: scheduler overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
