// vc_ratio_monitor: decides when the VCs behind one output port are turned
// off or on.
//
// The metric is the ratio of won to lost VC-allocation requests for the
// port. Two CNT_W-bit counters accumulate wins and losses; the overflow of
// either resets the other. A comparator checks wins against losses shifted
// left by the threshold exponent (thresholds are powers of two): above
// 2^off_shift a VC is turned off, below 2^on_shift one is turned on. The
// exponents come from the class (cold/warm/hot) of the router that owns the
// VCs. After every request both counters restart and no new ratio decision
// is taken for MIN_EVAL cycles. The last powered VC may only be turned off
// after IDLE_LIM cycles with no request for the port (`last_ok` marks such a
// request). All of that follows the method; two points are this design's:
// a loss is every request for the port that got no VC in a cycle, and when
// requests wait while no downstream VC is powered an immediate turn-on is
// sent regardless of the hold time, so a fully gated port cannot stall.
//
// Interface: req_cnt/win_cnt come from the VC allocator each cycle;
// ds_vc_on/ds_vc_pwr/ds_class come back from the downstream input port.
// off_req/on_req/last_ok are registered one-cycle pulses to the downstream
// router. ovf_evt pulses when a counter overflow reset the other counter.
module vc_ratio_monitor
  import vcpg_pkg::*;
#(
  parameter int unsigned NVC      = NVC_DEF,
  parameter int unsigned RCW      = 5,            // width of req/win counts
  parameter int unsigned CNT_W    = CNT_W_DEF,
  parameter int unsigned MIN_EVAL = MIN_EVAL_DEF,
  parameter int unsigned IDLE_LIM = IDLE_LIM_DEF
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [RCW-1:0] req_cnt,
  input  logic [RCW-1:0] win_cnt,
  input  logic [NVC-1:0] ds_vc_on,
  input  logic [NVC-1:0] ds_vc_pwr,
  input  rclass_e        ds_class,
  output logic           off_req,
  output logic           on_req,
  output logic           last_ok,
  output logic           ovf_evt
);
  localparam int unsigned HW = $clog2(MIN_EVAL + 1);
  localparam int unsigned IW = $clog2(IDLE_LIM + 1);
  localparam int unsigned XW = CNT_W + 8;  // room for loses << 7

  logic [CNT_W-1:0] wins, loses;
  logic [HW-1:0]    hold;
  logic [IW-1:0]    idle;
  logic [1:0]       cool;

  // Counter update with the cross reset on overflow.
  logic [CNT_W:0] wins_n, loses_n;
  logic           w_ovf, l_ovf;
  assign wins_n  = {1'b0, wins}  + (CNT_W+1)'(win_cnt);
  assign loses_n = {1'b0, loses} + (CNT_W+1)'(req_cnt - win_cnt);
  assign w_ovf   = wins_n[CNT_W];
  assign l_ovf   = loses_n[CNT_W];

  // Ratio comparator.
  logic [XW-1:0] wins_x, off_lim, on_lim;
  logic          ratio_off, ratio_on;
  assign wins_x    = XW'(wins);
  assign off_lim   = XW'(loses) << off_shift(ds_class);
  assign on_lim    = XW'(loses) << on_shift(ds_class);
  assign ratio_off = wins_x > off_lim;
  assign ratio_on  = wins_x < on_lim;

  int unsigned n_on;
  always_comb begin
    n_on = 0;
    for (int unsigned v = 0; v < NVC; v++) n_on += 32'(ds_vc_on[v]);
  end

  logic hold_done, idle_long, any_off, any_pwr, emergency;
  assign hold_done = (hold >= HW'(MIN_EVAL));
  assign idle_long = (idle >= IW'(IDLE_LIM));
  assign any_off   = (ds_vc_pwr != {NVC{1'b1}});
  assign any_pwr   = (ds_vc_pwr != '0);
  assign emergency = (req_cnt != '0) && !any_pwr && (cool == 2'd0);

  logic dec_off, dec_on, dec_last;
  always_comb begin
    dec_off  = 1'b0;
    dec_on   = 1'b0;
    dec_last = 1'b0;
    if (emergency) begin
      dec_on = 1'b1;
    end else if (hold_done && (cool == 2'd0)) begin
      if (ratio_off && (n_on > 1)) begin
        dec_off = 1'b1;
      end else if (ratio_on && any_off) begin
        dec_on = 1'b1;
      end else if (idle_long && (n_on >= 1)) begin
        dec_off  = 1'b1;
        dec_last = 1'b1;
      end
    end
  end

  wire change = dec_off || dec_on;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wins    <= '0;
      loses   <= '0;
      hold    <= '0;
      idle    <= '0;
      cool    <= '0;
      off_req <= 1'b0;
      on_req  <= 1'b0;
      last_ok <= 1'b0;
      ovf_evt <= 1'b0;
    end else begin
      off_req <= dec_off;
      on_req  <= dec_on;
      last_ok <= dec_last;
      ovf_evt <= !change && (w_ovf || l_ovf);
      if (change) begin
        wins  <= '0;
        loses <= '0;
        hold  <= '0;
        cool  <= 2'd3;
      end else begin
        wins  <= l_ovf ? '0 : wins_n[CNT_W-1:0];
        loses <= w_ovf ? '0 : loses_n[CNT_W-1:0];
        if (!hold_done) hold <= hold + 1'b1;
        if (cool != 2'd0) cool <= cool - 2'd1;
      end
      if (req_cnt != '0)  idle <= '0;
      else if (!idle_long) idle <= idle + 1'b1;
    end
  end

  a_one_request: assert property (@(posedge clk) disable iff (!rst_n)
    !(off_req && on_req))
    else $error("vc_ratio_monitor: turn-off and turn-on in the same cycle");
  a_win_le_req: assert property (@(posedge clk) disable iff (!rst_n)
    win_cnt <= req_cnt)
    else $error("vc_ratio_monitor: more wins than requests");
endmodule
