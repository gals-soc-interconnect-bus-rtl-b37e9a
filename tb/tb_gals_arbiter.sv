// tb_gals_arbiter: unit test of the arbiter with four request lines
// (IDs 30h..33h), a priority table that favours line 3, per-line clock
// dividers 3, 2, 1, 1 and a maximum frame length of 6 bytes. Sender models
// drop their request at the grant edge and raise bus_last_byte after a
// given number of bytes. Checked: grant IDs and order by priority, no
// consecutive grant of one line under contention, chained grants without
// 00h, the closing 00h and the stopped clock, the bus clock period per
// sender, and the regain of the bus from a sender that stays silent.
`timescale 1ns/1ps
module tb_gals_arbiter;
  import gals_bus_pkg::*;

  localparam int N = 4;
  logic         sys_clk = 1'b0, rst_n = 1'b1;
  always #5 sys_clk = !sys_clk;

  logic [N-1:0] req = '0;
  bus_t         bus;
  logic         bus_clk, ctrl, grant, regain, idle;
  logic [7:0]   adata;

  gals_arbiter #(
    .NREQ(N), .ID_BASE(8'h30),
    .PRIO_RANK({4'd0, 4'd1, 4'd1, 4'd1}),
    .CLK_DIV({8'd1, 8'd1, 8'd2, 8'd3}),
    .MAX_LEN(6)
  ) dut (
    .sys_clk, .rst_n, .bus_request(req), .bus_i(bus), .bus_clk,
    .arb_ctrl_o(ctrl), .arb_data_o(adata), .grant_o(grant), .regain_o(regain), .idle_o(idle)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // sender models and bus monitor
  int         flen [N];                 // bytes each sender sends, 0 = silent
  logic [7:0] glog [32];
  int         ngrant = 0, ncl = 0, regains = 0, cur = -1, cnt = 0;
  int         period [N];
  int         sys_cnt = 0, last_rise = 0, edges_since_grant = 0, regain_edges = 0;
  always @(posedge sys_clk) sys_cnt++;
  always @(posedge sys_clk) if (regain) regains++;

  always @(posedge bus_clk) begin
    int p;
    p = sys_cnt - last_rise;
    last_rise = sys_cnt;
    if (ctrl) begin
      if (cur >= 0 && flen[cur] == 0) regain_edges = edges_since_grant;
      if (adata == 8'h00) begin
        ncl++; cur = -1;
      end else begin
        cur = int'(adata - 8'h30);
        glog[ngrant] = adata; ngrant++;
        req[cur] <= 1'b0;
        cnt = 0; edges_since_grant = 0;
      end
      bus.last_byte <= 1'b0;
    end else begin
      edges_since_grant++;
      if (cur >= 0) begin
        cnt++;
        if (cnt >= 2) period[cur] = p;      // a full period inside the frame
        bus.last_byte <= (flen[cur] != 0 && cnt == flen[cur]);
      end
    end
  end

  task automatic wait_idle;
    repeat (3) @(posedge sys_clk);
    wait (idle && req == '0);
    repeat (3) @(posedge sys_clk);
  endtask

  initial begin
    repeat (3000) @(posedge sys_clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int g0, c0, rise_cnt;
  initial begin
    bus = '0; bus.ready = 1'b1;
    flen = '{3, 3, 2, 4};
    #1 rst_n = 1'b0; #12 rst_n = 1'b1;
    repeat (3) @(posedge sys_clk);
    check(idle && !bus_clk && !ctrl, "idle after reset");

    // 1: one request, divider 2
    @(negedge sys_clk) req[1] = 1'b1;
    wait_idle();
    check(ngrant == 1 && glog[0] == 8'h31, "line 1 granted as 31h");
    check(ncl == 1, "closed with 00h");
    check(period[1] == 4, $sformatf("31h bus clock period 4 sys clocks, got %0d", period[1]));
    rise_cnt = 0;
    fork
      begin repeat (20) @(posedge sys_clk); end
      forever begin @(posedge bus_clk); rise_cnt++; end
    join_any
    disable fork;
    check(rise_cnt == 0, "bus clock stopped while idle");

    // 2: three lines together: priority table, chaining
    g0 = ngrant; c0 = ncl;
    @(negedge sys_clk) req = 4'b1011;
    wait_idle();
    check(glog[g0] == 8'h33 && glog[g0+1] == 8'h30 && glog[g0+2] == 8'h31,
          "order 33h (rank 0), 30h, 31h");
    check(ncl - c0 == 1, "three grants chained, one closing 00h");
    check(period[0] == 6, $sformatf("30h bus clock period 6, got %0d", period[0]));
    check(period[3] == 2, $sformatf("33h bus clock period 2, got %0d", period[3]));

    // 3: line 3 used the bus last; with line 0 it must wait its turn
    @(negedge sys_clk) req[3] = 1'b1;
    wait_idle();
    g0 = ngrant;
    @(negedge sys_clk) req = 4'b1001;
    wait_idle();
    check(glog[g0] == 8'h30 && glog[g0+1] == 8'h33, "33h not granted twice in a row");

    // 4: silent sender: the arbiter takes the bus back
    flen[2] = 0;
    @(negedge sys_clk) req[2] = 1'b1;
    wait_idle();
    check(regains == 1, "regain after silence");
    check(regain_edges == 6 + 2, $sformatf("regain %0d edges after the grant, exp 8", regain_edges));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
