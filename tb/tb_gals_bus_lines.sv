// tb_gals_bus_lines: random test of the shared-line resolution for eight
// transmit and eight receive agents. At most one transmit block drives per
// vector (as the protocol guarantees); the expected lines are computed
// here bit by bit: the arbiter byte while it controls the bus, else the
// driving sender's byte (00h if none), OR of the last-byte flags, AND of
// the ready outputs.
`timescale 1ns/1ps
module tb_gals_bus_lines;
  import gals_bus_pkg::*;

  localparam int N = 8;
  logic bus_clk = 1'b0, rst_n = 1'b0;
  logic            arb_ctrl;
  logic [7:0]      arb_data;
  logic [N-1:0][7:0] txd;
  logic [N-1:0]    drive, last, rdy;
  bus_t            bus;

  gals_bus_lines #(.NTX(N), .NRX(N)) dut (
    .bus_clk, .rst_n, .arb_ctrl_i(arb_ctrl), .arb_data_i(arb_data), .tx_data_i(txd),
    .tx_drive_i(drive), .tx_last_i(last), .rx_ready_i(rdy), .bus_o(bus)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    logic [7:0] exp_d;
    for (int t = 0; t < 500; t++) begin
      s = $urandom_range(N);                // N means nobody drives
      arb_ctrl = ($urandom_range(3) == 0);
      arb_data = 8'($urandom);
      drive = '0; txd = '0; last = '0;
      if (s < N) begin
        drive[s] = 1'b1;
        txd[s]   = 8'($urandom);
        last[s]  = $urandom_range(1) == 1;
      end
      rdy = (t % 5 == 0) ? ~(N'(1) << $urandom_range(N - 1)) : '1;
      #1;
      exp_d = arb_ctrl ? arb_data : (s < N ? txd[s] : 8'h00);
      check(bus.arbiter_ctrl == arb_ctrl, "ctrl passes");
      check(bus.data == exp_d, $sformatf("data %h exp %h", bus.data, exp_d));
      check(bus.last_byte == (s < N && last[s]), "last_byte");
      check(bus.ready == (t % 5 != 0), "ready is low when one receiver accepts");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
