// tb_gals_lfsr_pu: LFSR unit alone. A reference LFSR run in lock-step
// gives the register value at every cycle; two queries must return values
// of that sequence, within a few cycles of the query, and differ; a frame
// with another command gets no reply.
`timescale 1ns/1ps
module tb_gals_lfsr_pu;
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
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [15:0] val, ref_r;
  gals_lfsr_pu dut (.pu_clk(clk), .rst_n, .lfsr_o(val), .tx_write_pointer(twp), .tx_read_pointer(trp), .tx_data(td), .message_being_sent(mbs), .send_request(sreq), .rx_write_pointer(rwp), .rx_read_pointer(rrp), .rx_data(rd), .waiting_read(wr), .clear_indication(clr));
  always @(posedge clk) ref_r <= !rst_n ? 16'hACE1 : {ref_r[14:0], ref_r[15] ^ ref_r[13] ^ ref_r[12] ^ ref_r[10]};
  logic [15:0] r1, r2;
  int mism = 0;
  always @(negedge clk) if (rst_n && val != ref_r) mism++;
  initial begin
    #1 rst_n = 1'b0; #10 rst_n = 1'b1;
    for (int i = 0; i < 16; i++) f[i] = 8'h00;
    repeat (37) @(posedge clk);
    f[0:2] = '{8'h34, 8'h33, 8'h01};
    fork link.deliver(f, 3); link.collect(); join
    r1 = {link.got[3], link.got[4]};
    check(link.ngot == 5 && link.got[0] == 8'h33 && link.got[1] == 8'h34 && link.got[2] == 8'h81, "reply header");
    fork link.deliver(f, 3); link.collect(); join
    r2 = {link.got[3], link.got[4]};
    check(r1 != r2 && r1 != 0 && r2 != 0, "two different non-zero values");
    check(mism == 0, "register follows x^16+x^14+x^13+x^11+1 from ACE1h");
    f[2] = 8'h09;
    link.deliver(f, 3);
    repeat (20) @(posedge clk);
    check(!sreq, "other command: no reply");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
