// tb_pu_link: testbench model of the PU-side ports of a bus interface, used
// to test a PU alone. deliver() stores a frame in a receive RAM, raises
// waiting_read and waits for the PU to read it and raise
// clear_indication. collect() waits for send_request, raises
// message_being_sent, reads the frame through tx_read_pointer/tx_data and
// lowers message_being_sent again.
`timescale 1ns/1ps
module tb_pu_link #(
  parameter int Q = 5,
  parameter int P = 5
) (
  input  logic         clk,
  input  logic [Q-1:0] tx_write_pointer,
  output logic [Q-1:0] tx_read_pointer,
  input  logic [7:0]   tx_data,
  output logic         message_being_sent,
  input  logic         send_request,
  output logic [P-1:0] rx_write_pointer,
  input  logic [P-1:0] rx_read_pointer,
  output logic [7:0]   rx_data,
  output logic         waiting_read,
  input  logic         clear_indication
);
  logic [7:0] ram [32];
  logic [7:0] got [32];
  int         ngot;

  initial begin
    tx_read_pointer = '0; message_being_sent = 1'b0; rx_write_pointer = '0; waiting_read = 1'b0;
    for (int i = 0; i < 32; i++) ram[i] = 8'h00;
  end
  assign rx_data = ram[rx_read_pointer];

  task automatic deliver(input logic [7:0] f [16], input int len);
    for (int i = 0; i < len; i++) ram[i] = f[i];
    rx_write_pointer = P'(len);
    @(posedge clk) waiting_read = 1'b1;
    wait (clear_indication);
    waiting_read = 1'b0;
    wait (!clear_indication);
  endtask

  task automatic collect;
    wait (send_request);
    repeat (3) @(posedge clk);
    message_being_sent = 1'b1;
    ngot = int'(tx_write_pointer);
    for (int i = 0; i < ngot; i++) begin
      tx_read_pointer = Q'(i);
      @(posedge clk);
      got[i] = tx_data;
    end
    wait (!send_request);
    message_being_sent = 1'b0;
    tx_read_pointer = '0;
  endtask
endmodule
