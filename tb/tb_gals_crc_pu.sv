// tb_gals_crc_pu: CRC unit alone. Frames of different lengths, among
// them the check string "123456789" (29B1h), are sent; each reply must
// carry the CRC-16/CCITT (1021h, init FFFFh) computed here byte-wise.
`timescale 1ns/1ps
module tb_gals_crc_pu;
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
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  gals_crc_pu dut (.pu_clk(clk), .rst_n, .tx_write_pointer(twp), .tx_read_pointer(trp), .tx_data(td), .message_being_sent(mbs), .send_request(sreq), .rx_write_pointer(rwp), .rx_read_pointer(rrp), .rx_data(rd), .waiting_read(wr), .clear_indication(clr));
  function automatic logic [15:0] crc_ref(input logic [7:0] b [16], input int from, input int to);
    logic [15:0] c = 16'hFFFF;
    for (int i = from; i < to; i++) begin
      c ^= {b[i], 8'h00};
      for (int k = 0; k < 8; k++) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return c;
  endfunction
  logic [15:0] e;
  initial begin
    #1 rst_n = 1'b0; #10 rst_n = 1'b1;
    f[0:2] = '{8'h35, 8'h36, 8'h01};
    for (int i = 0; i < 9; i++) f[3 + i] = 8'h31 + 8'(i);
    for (int i = 12; i < 16; i++) f[i] = 8'h00;
    check(crc_ref(f, 3, 12) == 16'h29B1, "reference check value");
    fork link.deliver(f, 12); link.collect(); join
    check(link.ngot == 5 && link.got[0] == 8'h36 && link.got[1] == 8'h35 && link.got[2] == 8'h81, "reply header");
    check({link.got[3], link.got[4]} == 16'h29B1, $sformatf("CRC 123456789 = %h%h", link.got[3], link.got[4]));
    for (int n = 0; n < 6; n++) begin
      int len;
      len = 3 + int'($urandom_range(13));
      for (int i = 3; i < 16; i++) f[i] = 8'($urandom);
      e = crc_ref(f, 3, len);
      fork link.deliver(f, len); link.collect(); join
      check({link.got[3], link.got[4]} == e, $sformatf("CRC of %0d bytes", len - 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
