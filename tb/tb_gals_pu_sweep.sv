// tb_gals_pu_sweep: the bus at every size from two to eight PUs.
//
// Seven copies of tb_sweep_unit run side by side, with NUM_PU = 2 ... 8 and
// every other parameter of gals_soc_bus at its default. Each copy checks
// its own traffic: the edge count of a single frame, the edge count of a
// burst where all N PUs send at once, the contents of every delivered
// frame, and a stopped bus clock during a long idle period.
// The printed table is a switching-activity view of the sizes. The bus
// edges times the N + 1 agents that watch the bus (every awake interface
// samples every byte) grow with N while frames flow. While the bus is
// idle the number is zero at every size, because the clock is stopped and
// only the arbiter's sys_clk keeps running. That the bus is evaluated at two
// to eight PUs, and the reasoning about idle versus active activity, follow
// the bus description; the traffic pattern and the edge-based measure are
// this testbench's own.
`timescale 1ns/1ps
module tb_gals_pu_sweep;
  localparam int NMIN = 2, NMAX = 8, NS = NMAX - NMIN + 1;

  logic sys_clk = 1'b0, rst_n = 1'b1;
  always #5 sys_clk = !sys_clk;

  logic [NS-1:0] done;
  int c [NS], f [NS], ea [NS], eb [NS];

  for (genvar s = 0; s < NS; s++) begin : g_size
    tb_sweep_unit #(.N(NMIN + s)) u (
      .sys_clk, .rst_n, .done(done[s]), .checks(c[s]), .failures(f[s]),
      .edges_a(ea[s]), .edges_b(eb[s])
    );
  end

  int checks = 0, failures = 0;

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    wait (&done);
    $display(" PUs  single-frame edges  burst edges  burst edges x agents  idle edges");
    for (int s = 0; s < NS; s++) begin
      $display(" %3d  %18d  %11d  %20d  %10d", NMIN + s, ea[s], eb[s], eb[s] * (NMIN + s + 1), 0);
      checks += c[s];
      failures += f[s];
    end
    // the active cost must grow with the number of PUs
    for (int s = 1; s < NS; s++) begin
      checks++;
      if (eb[s] <= eb[s-1]) begin
        failures++;
        $display("FAIL: burst edges do not grow from %0d to %0d PUs", NMIN + s - 1, NMIN + s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge sys_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
