// vc_power_ctrl: power state of the virtual channels of one input port.
//
// It acts on the turn-off / turn-on requests sent by the upstream router's
// ratio monitor. On a turn-off it power-gates one VC that is powered, empty,
// not in use in this router and not allocated (nor owed credits) upstream;
// the last powered VC is only gated when the request carries `last_ok`.
// On a turn-on it wakes a VC that has been gated for more than T_BE cycles;
// a woken VC takes T_WAKE cycles before it can be allocated again. For the
// adaptive router class it reports two kinds of events: a powered VC that
// stayed idle for more than T_BE consecutive cycles (it could have been
// gated: counter1), and a turn-on that arrives while every gated VC of the
// port has been off for less than T_BE cycles (gating was premature:
// counter2). The method fixes those rules. This design's choices: all VCs
// are on after reset, the highest-numbered candidate is gated and the
// lowest-numbered one woken, a refused turn-on still wakes a VC when no VC
// of the port is powered (so the port always recovers), and the idle event
// fires once per idle period.
//
// Timing: requests are sampled on the rising edge; vc_on/vc_pwr are
// registered. A VC woken in cycle t is WAKING for T_WAKE cycles and is on
// from cycle t+T_WAKE+1. With PG_EN = 0 every VC stays on (used for the
// injection port, which has no upstream monitor).
module vc_power_ctrl
  import vcpg_pkg::*;
#(
  parameter int unsigned NVC    = NVC_DEF,
  parameter int unsigned T_BE   = T_BE_DEF,
  parameter int unsigned T_WAKE = T_WAKE_DEF,
  parameter bit          PG_EN  = 1'b1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           off_req,
  input  logic           on_req,
  input  logic           last_ok,
  input  logic [NVC-1:0] up_busy,    // upstream holds the VC (allocated/credits out)
  input  logic [NVC-1:0] vc_empty,   // buffer of the VC is empty
  input  logic [NVC-1:0] vc_inuse,   // VC holds a packet in this router
  output logic [NVC-1:0] vc_on,      // powered and allocatable
  output logic [NVC-1:0] vc_pwr,     // power switch closed (on or waking)
  output logic [NVC-1:0] idle_evt,   // counter1 events
  output logic           ineff_evt,  // counter2 event
  output logic           gate_evt,   // a VC was gated this cycle
  output logic           wake_evt    // a VC was woken this cycle
);
  localparam int unsigned TW = $clog2(T_BE + 2) > $clog2(T_WAKE + 1) ?
                               $clog2(T_BE + 2) : $clog2(T_WAKE + 1);

  vcpwr_e         st   [NVC];
  logic [TW-1:0]  tcnt [NVC];  // time gated, or wakeup progress
  logic [TW-1:0]  irun [NVC];  // consecutive idle cycles while on

  logic [NVC-1:0] is_on, is_off, is_wake, free_v, cand_off, cand_on;
  int unsigned    n_on;
  always_comb begin
    n_on = 0;
    for (int unsigned v = 0; v < NVC; v++) begin
      is_on[v]    = (st[v] == VCP_ON);
      is_off[v]   = (st[v] == VCP_OFF);
      is_wake[v]  = (st[v] == VCP_WAKING);
      free_v[v]   = vc_empty[v] && !vc_inuse[v] && !up_busy[v];
      cand_off[v] = is_on[v] && free_v[v];
      cand_on[v]  = is_off[v] && (tcnt[v] > TW'(T_BE));
      n_on += 32'(is_on[v]);
    end
  end

  assign vc_on  = is_on;
  assign vc_pwr = is_on | is_wake;

  // Select the VC to gate (highest candidate) and to wake (lowest).
  logic [NVC-1:0] sel_off, sel_on;
  logic           do_off, do_on, refuse;
  always_comb begin
    sel_off = '0;
    sel_on  = '0;
    for (int v = 0; v < NVC; v++)
      if (cand_off[v]) sel_off = NVC'(1) << v;  // keep the highest
    for (int v = NVC - 1; v >= 0; v--)
      if (cand_on[v]) sel_on = NVC'(1) << v;    // keep the lowest
    refuse = 1'b0;
    if (sel_on == '0 && is_off != '0) begin
      refuse = 1'b1;
      if ((is_on | is_wake) == '0)
        for (int v = NVC - 1; v >= 0; v--)
          if (is_off[v]) sel_on = NVC'(1) << v;
    end
    do_off = PG_EN && off_req && (sel_off != '0) && ((n_on > 1) || last_ok);
    do_on  = PG_EN && on_req && (sel_on != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NVC; v++) begin
        st[v]   <= VCP_ON;
        tcnt[v] <= '0;
        irun[v] <= '0;
      end
      idle_evt  <= '0;
      ineff_evt <= 1'b0;
      gate_evt  <= 1'b0;
      wake_evt  <= 1'b0;
    end else begin
      ineff_evt <= PG_EN && on_req && refuse;
      gate_evt  <= do_off;
      wake_evt  <= do_on;
      for (int v = 0; v < NVC; v++) begin
        idle_evt[v] <= 1'b0;
        case (st[v])
          VCP_ON: begin
            if (do_off && sel_off[v]) begin
              st[v]   <= VCP_OFF;
              tcnt[v] <= '0;
              irun[v] <= '0;
            end else if (free_v[v] && PG_EN) begin
              if (irun[v] == TW'(T_BE)) idle_evt[v] <= 1'b1;
              if (irun[v] <= TW'(T_BE)) irun[v] <= irun[v] + 1'b1;
            end else begin
              irun[v] <= '0;
            end
          end
          VCP_OFF: begin
            if (do_on && sel_on[v]) begin
              st[v]   <= VCP_WAKING;
              tcnt[v] <= '0;
            end else if (tcnt[v] <= TW'(T_BE)) begin
              tcnt[v] <= tcnt[v] + 1'b1;
            end
          end
          default: begin  // VCP_WAKING
            if (tcnt[v] >= TW'(T_WAKE - 1)) begin
              st[v]   <= VCP_ON;
              tcnt[v] <= '0;
              irun[v] <= '0;
            end else begin
              tcnt[v] <= tcnt[v] + 1'b1;
            end
          end
        endcase
      end
    end
  end

  a_gate_only_free: assert property (@(posedge clk) disable iff (!rst_n)
    do_off |-> ((sel_off & free_v) == sel_off))
    else $error("vc_power_ctrl: gating a VC that is in use");
endmodule
