// tb_sweep_unit: one bus of N PUs with scripted PUs, used by
// tb_gals_pu_sweep to run the same traffic on systems of different sizes.
//
// The PU models sit directly on the pointer/handshake ports of gals_soc_bus
// and run on sys_clk. Traffic, in three phases after reset:
//   A  PU 0 alone sends a 4-byte frame {ID1, ID0, A5h, 00h} to PU 1. The
//      bus must show exactly L + 3 = 7 rising bus_clk edges: grant, hand-
//      over, four bytes, closing 00h.
//   B  all N PUs raise send_request in the same cycle, PU k sending
//      {ID(k+1 mod N), ID(k), k, ~k} to its neighbour. The arbiter must
//      chain the N grants: N * (L + 2) + 1 edges in one burst, with the
//      clock stopped only at the end.
//   C  2000 sys_clk cycles of silence: the bus clock must not move.
// Every received frame is read through rx_read_pointer and compared byte
// by byte with the frame worked out here; the scheduler must store
// nothing, because every receiver is free. The unit reports its counts
// and the edges of phases A and B through its outputs.
`timescale 1ns/1ps
module tb_sweep_unit #(
  parameter int unsigned N = 2
) (
  input  logic sys_clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   edges_a,
  output int   edges_b
);
  import gals_bus_pkg::*;
  localparam int unsigned Q = 5, P = 5, L = 4;
  localparam logic [7:0] ID_BASE = 8'h30;

  logic [N-1:0]         sreq, mbs, asleep, waiting, clr;
  logic [N-1:0][Q-1:0]  twp, trp;
  logic [N-1:0][7:0]    tdat, rdat;
  logic [N-1:0][P-1:0]  rwp, rrp;
  logic                 wake_req, bus_clk, grant, regain, idle;
  logic [7:0]           wake_id, drops;
  logic [2:0]           stored;
  bus_t                 bus;

  gals_soc_bus #(.NUM_PU(N)) dut (
    .sys_clk, .rst_n,
    .pu_send_request(sreq), .pu_tx_write_pointer(twp), .pu_tx_read_pointer(trp),
    .pu_tx_data(tdat), .pu_message_being_sent(mbs),
    .pu_asleep(asleep), .pu_rx_write_pointer(rwp), .pu_rx_read_pointer(rrp),
    .pu_rx_data(rdat), .pu_waiting_read(waiting), .pu_clear_indication(clr),
    .wake_req, .wake_id, .sched_stored(stored), .sched_drops(drops),
    .bus_clk_o(bus_clk), .bus_o(bus), .grant_o(grant), .regain_o(regain), .idle_o(idle)
  );

  function automatic logic [7:0] id_of(input int k);
    return ID_BASE + 8'(k) + 8'd1;
  endfunction

  // transmit memories, read asynchronously by the interfaces
  logic [7:0] tmem [N][L];
  always_comb for (int k = 0; k < N; k++) tdat[k] = tmem[k][trp[k][1:0]];

  int edges = 0;
  always @(posedge bus_clk) edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [N=%0d]: %s (t=%0t)", N, what, $time); end
  endtask

  // receiving PU models: read every frame, compare, clear
  int rx_got [N];
  logic [7:0] rx_exp [N][L];
  for (genvar k = 0; k < N; k++) begin : g_rx
    initial begin
      rx_got[k] = 0;
      forever begin
        @(posedge sys_clk);
        if (waiting[k]) begin
          check(int'(rwp[k]) == L, $sformatf("PU %0d frame length", k));
          for (int i = 0; i < L; i++) begin
            rrp[k] = P'(i);
            @(posedge sys_clk);
            check(rdat[k] == rx_exp[k][i], $sformatf("PU %0d byte %0d", k, i));
          end
          clr[k] = 1'b1;
          wait (!waiting[k]);
          @(posedge sys_clk) clr[k] = 1'b0;
          rx_got[k]++;
        end
      end
    end
  end

  task automatic wait_quiet;
    wait (idle);
    repeat (20) @(posedge sys_clk);
  endtask

  initial begin
    int e0, d;
    done = 1'b0; checks = 0; failures = 0; edges_a = 0; edges_b = 0;
    sreq = '0; asleep = '0; clr = '0; twp = '0; rrp = '0;
    for (int k = 0; k < N; k++) for (int i = 0; i < L; i++) tmem[k][i] = 8'h00;
    wait (rst_n);
    repeat (10) @(posedge sys_clk);

    // ---- A: one frame alone
    tmem[0][0] = id_of(1); tmem[0][1] = id_of(0); tmem[0][2] = 8'hA5; tmem[0][3] = 8'h00;
    for (int i = 0; i < L; i++) rx_exp[1][i] = tmem[0][i];
    e0 = edges;
    twp[0] = Q'(L);
    @(posedge sys_clk) sreq[0] = 1'b1;
    wait (mbs[0]);
    @(posedge sys_clk) sreq[0] = 1'b0;
    wait (rx_got[1] == 1);
    wait_quiet;
    edges_a = edges - e0;
    check(edges_a == L + 3, $sformatf("single frame took %0d bus edges, expected %0d", edges_a, L + 3));

    // ---- B: everyone at once
    for (int k = 0; k < N; k++) begin
      d = (k + 1) % N;
      tmem[k][0] = id_of(d); tmem[k][1] = id_of(k); tmem[k][2] = 8'(k); tmem[k][3] = ~8'(k);
      for (int i = 0; i < L; i++) rx_exp[d][i] = tmem[k][i];
      twp[k] = Q'(L);
    end
    e0 = edges;
    @(posedge sys_clk) sreq = '1;
    // each PU drops its request as soon as its transmission has begun
    while (sreq != '0) begin
      @(posedge sys_clk);
      sreq = sreq & ~mbs;
    end
    for (int k = 0; k < N; k++) wait (rx_got[k] == ((k == 1) ? 2 : 1));
    wait_quiet;
    edges_b = edges - e0;
    check(edges_b == N * (L + 2) + 1,
          $sformatf("chained burst took %0d bus edges, expected %0d", edges_b, N * (L + 2) + 1));
    check(stored == 0 && drops == 0 && !wake_req, "scheduler kept nothing");

    // ---- C: silence
    e0 = edges;
    repeat (2000) @(posedge sys_clk);
    check(edges == e0, "bus clock stopped while idle");
    check(idle, "arbiter reports idle");
    done = 1'b1;
  end
endmodule
