// gals_arbiter: bus arbiter and bus clock generator.
//
// The arbiter is the only block of the bus whose clock (sys_clk, the main
// system clock) never stops. It
//   * synchronises the request lines (one per resource, two flip-flops),
//   * picks the next sender: the requesting line with the lowest entry of
//     the priority table PRIO_RANK (ties to the lowest line), with the line
//     granted last masked out whenever any other line requests, so one PU is
//     not granted twice in a row under contention,
//   * drives bus_arbiter_ctrl high with the sender's ID (ID_BASE + line) on
//     bus_data, then starts bus_clk with a half period of CLK_DIV[line]
//     sys_clk cycles (bus rate = sys rate / (2*CLK_DIV[line])),
//   * releases the lines after the grant edge and waits for bus_last_byte,
//   * then either grants the next requester at once (concatenated
//     transmissions, no idle gap) or sends 00h and stops bus_clk,
//   * takes the bus back (regain) when no last byte has come MAX_LEN+2 bus
//     edges after the grant, e.g. because the sender was switched off.
//
// Timing: outputs change only at sys_clk edges where bus_clk falls (or
// while it is stopped low); bus_last_byte is sampled at the sys_clk edge
// where bus_clk rises, i.e. the same value the bus agents sample at that
// rising edge. With CLK_DIV = 1 a transmission of L bytes occupies L+2 bus
// clock periods including the grant, plus one period for the closing 00h.
//
// The request/grant protocol, the 00h idle byte, clock stopping, the
// priority and rate tables, the no-consecutive-grant rule and the regain
// mechanism follow the bus description. The table contents, the timeout
// length, the synchroniser and indexing the rate table by the sender are
// this implementation's choices.
module gals_arbiter
  import gals_bus_pkg::*;
#(
  parameter int unsigned              NREQ      = 8,
  parameter logic [7:0]               ID_BASE   = 8'h30,
  parameter logic [NREQ-1:0][3:0]     PRIO_RANK = '0,
  parameter logic [NREQ-1:0][7:0]     CLK_DIV   = {NREQ{8'd1}},
  parameter int unsigned              MAX_LEN   = 31
) (
  input  logic            sys_clk,
  input  logic            rst_n,
  input  logic [NREQ-1:0] bus_request,
  input  bus_t            bus_i,
  output logic            bus_clk,
  output logic            arb_ctrl_o,   // bus_arbiter_ctrl, also "arbiter drives bus_data"
  output logic [7:0]      arb_data_o,
  // status
  output logic            grant_o,      // one sys_clk pulse per grant issued
  output logic            regain_o,     // one sys_clk pulse per forced regain
  output logic            idle_o        // bus clock stopped
);

  localparam int unsigned LW = (NREQ > 1) ? $clog2(NREQ) : 1;

  typedef enum logic [1:0] {A_IDLE, A_GRANT, A_BODY} arb_state_e;

  arb_state_e       state;
  logic [NREQ-1:0]  req_m, req_s;
  logic [NREQ-1:0]  cand;
  logic             any_req;
  logic [LW-1:0]    winner, last_line;
  logic [7:0]       half, hcnt;
  logic [7:0]       edges;
  logic             end_seen;
  logic             tick;

  // next sender from the priority table
  always_comb begin
    cand = req_s & ~(NREQ'(1) << last_line);
    if (cand == '0) cand = req_s;
    any_req = (req_s != '0);
    winner  = '0;
    for (int i = NREQ - 1; i >= 0; i--) begin
      if (cand[i] && (!cand[winner] || PRIO_RANK[i] <= PRIO_RANK[winner]))
        winner = LW'(i);
    end
  end

  assign tick   = (hcnt == half - 8'd1) || (half == 8'd0);
  assign idle_o = (state == A_IDLE);

  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) begin
      req_m <= '0;
      req_s <= '0;
    end else begin
      req_m <= bus_request;
      req_s <= req_m;
    end
  end

  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= A_IDLE;
      bus_clk    <= 1'b0;
      arb_ctrl_o <= 1'b0;
      arb_data_o <= IDLE_ID;
      last_line  <= '0;
      half       <= 8'd1;
      hcnt       <= '0;
      edges      <= '0;
      end_seen   <= 1'b0;
      grant_o    <= 1'b0;
      regain_o   <= 1'b0;
    end else begin
      grant_o  <= 1'b0;
      regain_o <= 1'b0;
      if (state == A_IDLE) begin
        bus_clk <= 1'b0;
        hcnt    <= '0;
        if (any_req) begin
          arb_ctrl_o <= 1'b1;
          arb_data_o <= ID_BASE + 8'(winner);
          half       <= CLK_DIV[winner];
          last_line  <= winner;
          grant_o    <= 1'b1;
          state      <= A_GRANT;
        end
      end else if (!tick) begin
        hcnt <= hcnt + 8'd1;
      end else begin
        hcnt    <= '0;
        bus_clk <= !bus_clk;
        if (!bus_clk) begin
          // rising bus_clk edge: agents sample the lines now
          if (state == A_BODY) begin
            edges <= edges + 8'd1;
            if (bus_i.last_byte) begin
              end_seen <= 1'b1;
            end else if (32'(edges) + 1 >= MAX_LEN + 2) begin
              end_seen <= 1'b1;
              regain_o <= 1'b1;
            end
          end
        end else begin
          // falling bus_clk edge: the arbiter may change its outputs
          if (state == A_GRANT) begin
            arb_ctrl_o <= 1'b0;
            edges      <= '0;
            end_seen   <= 1'b0;
            if (arb_data_o == IDLE_ID) begin
              state <= A_IDLE;              // 00h sent: stop the clock
            end else begin
              arb_data_o <= IDLE_ID;
              state      <= A_BODY;
            end
          end else if (end_seen) begin
            arb_ctrl_o <= 1'b1;
            state      <= A_GRANT;
            if (any_req) begin
              arb_data_o <= ID_BASE + 8'(winner);
              half       <= CLK_DIV[winner];
              last_line  <= winner;
              grant_o    <= 1'b1;
            end else begin
              arb_data_o <= IDLE_ID;
            end
          end
        end
      end
    end
  end

  // the arbiter's own lines never change while bus_clk is high
  a_ctrl_stable: assert property (@(posedge sys_clk) disable iff (!rst_n)
                                  (arb_ctrl_o != $past(arb_ctrl_o)) |-> !bus_clk);

endmodule
