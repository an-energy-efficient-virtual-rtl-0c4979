// router_class_ctrl: adaptive hot / warm / cold class of one router.
//
// The class sets how eagerly the VCs of this router's input ports are
// gated: thresholds 4/16 (cold), 8/32 (warm) or 16/64 (hot) for turn-on /
// turn-off, given here as shift amounts. The class starts from the router's
// place in the mesh (strap input init_cls: hot in the middle, cold in the corners,
// warm between) and then follows the traffic with two counters per input
// port. counter1 counts powered VCs that were idle for more than
// T_break-even cycles; when it exceeds C1_LIM (31) both counters of that
// port are cleared and the router moves one class colder. counter2 counts
// turn-on requests that found every gated VC gated for less than
// T_break-even; when it exceeds C2_LIM (7) both are cleared and the router
// moves one class hotter. The rules are the method's. This design's
// choices: the counters are per port and any port can move the router,
// "hotter" wins when two ports disagree in the same cycle, and classes
// saturate at cold and hot.
//
// Timing: events are counted on the rising edge; the class and the shift
// outputs change one cycle after the event that crossed a limit.
module router_class_ctrl
  import vcpg_pkg::*;
#(
  parameter int unsigned NP         = 4,
  parameter int unsigned NVC        = NVC_DEF,
  parameter int unsigned C1_LIM     = C1_LIM_DEF,
  parameter int unsigned C2_LIM     = C2_LIM_DEF
) (
  input  logic           clk,
  input  logic           rst_n,
  input  rclass_e        init_cls,   // class taken at reset (position strap)
  input  logic [NVC-1:0] idle_evt  [NP],
  input  logic [NP-1:0]  ineff_evt,
  output rclass_e        cls,
  output logic [2:0]     on_sh,
  output logic [2:0]     off_sh,
  output logic           colder_evt,
  output logic           hotter_evt
);
  localparam int unsigned C1W = $clog2(C1_LIM + NVC + 1);
  localparam int unsigned C2W = $clog2(C2_LIM + 2);

  logic [C1W-1:0] c1 [NP];
  logic [C2W-1:0] c2 [NP];

  logic [C1W-1:0] c1_n [NP];
  logic [C2W-1:0] c2_n [NP];
  logic [NP-1:0]  c1_hit, c2_hit;
  always_comb begin
    for (int p = 0; p < NP; p++) begin
      c1_n[p] = c1[p];
      for (int v = 0; v < NVC; v++) c1_n[p] = c1_n[p] + C1W'(idle_evt[p][v]);
      c2_n[p]   = c2[p] + C2W'(ineff_evt[p]);
      c1_hit[p] = (c1_n[p] > C1W'(C1_LIM));
      c2_hit[p] = (c2_n[p] > C2W'(C2_LIM));
    end
  end

  wire go_hotter = (c2_hit != '0);
  wire go_colder = (c1_hit != '0) && !go_hotter;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cls        <= init_cls;
      colder_evt <= 1'b0;
      hotter_evt <= 1'b0;
      for (int p = 0; p < NP; p++) begin
        c1[p] <= '0;
        c2[p] <= '0;
      end
    end else begin
      colder_evt <= go_colder;
      hotter_evt <= go_hotter;
      if (go_hotter && cls != CLS_HOT)
        cls <= (cls == CLS_COLD) ? CLS_WARM : CLS_HOT;
      else if (go_colder && cls != CLS_COLD)
        cls <= (cls == CLS_HOT) ? CLS_WARM : CLS_COLD;
      for (int p = 0; p < NP; p++) begin
        if (c1_hit[p] || c2_hit[p]) begin
          c1[p] <= '0;
          c2[p] <= '0;
        end else begin
          c1[p] <= c1_n[p];
          c2[p] <= c2_n[p];
        end
      end
    end
  end

  assign on_sh  = on_shift(cls);
  assign off_sh = off_shift(cls);
endmodule
