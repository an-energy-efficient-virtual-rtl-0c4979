// noc_router: 2-cycle wormhole virtual-channel router for a 2D mesh, with
// power-gated VCs.
//
// Five ports (N, E, S, W, local), NVC VCs of DEPTH flits per input port,
// XY routing. Cycle 1: a flit waits at the head of its VC buffer; route
// computation, VC allocation and switch allocation happen combinationally
// (a head flit bids for the switch speculatively while it bids for a VC,
// and its switch grant counts only if the VC grant comes in the same
// cycle). Cycle 2: the winner crosses the switch into the output register,
// which drives the link. A flit is thus written into the next router's VC
// buffer two cycles after reaching the head of this one. Credit-based flow
// control; an output VC is free again once its tail has left and all its
// credits are back.
//
// Power gating. Each output port has a vc_ratio_monitor fed by the VC
// allocator's wins and losses for that port; its turn-off/turn-on requests
// travel with the link to the downstream router. Each input port has a
// vc_power_ctrl that carries out requests arriving from upstream and
// reports which of its VCs are on, waking or off; a VC that is not on is
// never allocated upstream. During the cycle a turn-off request is on the
// link the upstream router allocates no VC of that port, so the downstream
// router never gates a VC that is being allocated. A router_class_ctrl
// holds this router's hot/warm/cold class; the class is sent back upstream
// and sets the thresholds the upstream monitors use for this router's VCs.
// The injection (local) input port has no upstream monitor; its VCs stay on.
//
// Link format (FW = FLIT_W + 2 + log2 NVC bits): {head, tail, vc, data}.
// A head flit carries the destination in data[CW-1:0] (x) and
// data[2*CW-1:CW] (y). The router's own coordinates and its class at reset
// are strap inputs, so one router design serves every node. Router
// organisation, pipeline, speculation, the
// link format and the side-band signals are this design's choices; the
// VC count, buffer depth, flit width, routing, flow control and allocation
// policy follow the network configuration.
module noc_router
  import vcpg_pkg::*;
#(
  parameter int unsigned NVC        = NVC_DEF,
  parameter int unsigned DEPTH      = VC_DEPTH_DEF,
  parameter int unsigned FLIT_W     = FLIT_W_DEF,
  parameter int unsigned CW         = 4,
  parameter int unsigned T_BE       = T_BE_DEF,
  parameter int unsigned T_WAKE     = T_WAKE_DEF,
  parameter int unsigned MIN_EVAL   = MIN_EVAL_DEF,
  parameter int unsigned IDLE_LIM   = IDLE_LIM_DEF,
  parameter int unsigned CNT_W      = CNT_W_DEF,
  parameter int unsigned C1_LIM     = C1_LIM_DEF,
  parameter int unsigned C2_LIM     = C2_LIM_DEF,
  localparam int unsigned VW        = $clog2(NVC),
  localparam int unsigned FW        = FLIT_W + 2 + VW
) (
  input  logic            clk,
  input  logic            rst_n,
  // position straps: coordinates and the class taken at reset
  input  logic [CW-1:0]   my_x,
  input  logic [CW-1:0]   my_y,
  input  rclass_e         init_cls,
  // input side of each port (from the upstream router)
  input  logic            in_v       [NPORTS],
  input  logic [FW-1:0]   in_flit    [NPORTS],
  input  logic            in_off_req [NPORTS],
  input  logic            in_on_req  [NPORTS],
  input  logic            in_last_ok [NPORTS],
  input  logic [NVC-1:0]  in_up_busy [NPORTS],
  output logic            in_cr_v    [NPORTS],
  output logic [VW-1:0]   in_cr_vc   [NPORTS],
  output logic [NVC-1:0]  in_vc_on   [NPORTS],
  output logic [NVC-1:0]  in_vc_pwr  [NPORTS],
  output rclass_e         cls,
  // output side of each port (to the downstream router)
  output logic            out_v       [NPORTS],
  output logic [FW-1:0]   out_flit    [NPORTS],
  output logic            out_off_req [NPORTS],
  output logic            out_on_req  [NPORTS],
  output logic            out_last_ok [NPORTS],
  output logic [NVC-1:0]  out_busy    [NPORTS],
  input  logic            out_cr_v    [NPORTS],
  input  logic [VW-1:0]   out_cr_vc   [NPORTS],
  input  logic [NVC-1:0]  out_vc_on   [NPORTS],
  input  logic [NVC-1:0]  out_vc_pwr  [NPORTS],
  input  rclass_e         out_cls     [NPORTS],
  // event pulses, for power accounting and observation
  output logic [NPORTS-1:0] ev_gate,
  output logic [NPORTS-1:0] ev_wake,
  output logic [NPORTS-1:0] ev_ineff,
  output logic [NPORTS-1:0] ev_ovf,
  output logic              ev_colder,
  output logic              ev_hotter
);
  localparam int unsigned NI  = NPORTS * NVC;
  localparam int unsigned BW  = FLIT_W + 2;        // stored: {head, tail, data}
  localparam int unsigned CRW = $clog2(DEPTH + 1);
  localparam int unsigned RCW = $clog2(NI + 1);

  // ---------------------------------------------------------------- buffers
  logic [BW-1:0] buf_q   [NI];
  logic [NI-1:0] buf_empty, buf_rd, ivc_active;
  logic [NVC-1:0] pc_on [NPORTS], pc_pwr [NPORTS], pc_idle [NPORTS];
  logic [NPORTS-1:0] pc_ineff;

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    for (genvar v = 0; v < NVC; v++) begin : g_vc
      logic wr;
      assign wr = in_v[p] && (32'(in_flit[p][FLIT_W +: VW]) == v);
      vc_buffer #(.W(BW), .DEPTH(DEPTH)) u_buf (
        .clk(clk), .rst_n(rst_n), .pwr_en(pc_pwr[p][v]),
        .wr(wr), .wdata({in_flit[p][FW-1 -: 2], in_flit[p][FLIT_W-1:0]}),
        .rd(buf_rd[p*NVC + v]), .rdata(buf_q[p*NVC + v]),
        .empty(buf_empty[p*NVC + v]), .full()
      );
    end

    vc_power_ctrl #(
      .NVC(NVC), .T_BE(T_BE), .T_WAKE(T_WAKE), .PG_EN(p != P_LOCAL)
    ) u_pwr (
      .clk(clk), .rst_n(rst_n),
      .off_req(in_off_req[p]), .on_req(in_on_req[p]), .last_ok(in_last_ok[p]),
      .up_busy(in_up_busy[p]),
      .vc_empty(buf_empty[p*NVC +: NVC]), .vc_inuse(ivc_active[p*NVC +: NVC]),
      .vc_on(pc_on[p]), .vc_pwr(pc_pwr[p]), .idle_evt(pc_idle[p]),
      .ineff_evt(pc_ineff[p]), .gate_evt(ev_gate[p]), .wake_evt(ev_wake[p])
    );
    assign in_vc_on[p]  = pc_on[p];
    assign in_vc_pwr[p] = pc_pwr[p];
  end
  assign ev_ineff = pc_ineff;

  // ------------------------------------------------------- route compute
  function automatic logic [2:0] route(logic [BW-1:0] f);
    logic [CW-1:0] dx, dy;
    dx = f[CW-1:0];
    dy = f[2*CW-1:CW];
    if (dx > my_x)      route = 3'(P_EAST);
    else if (dx < my_x) route = 3'(P_WEST);
    else if (dy > my_y) route = 3'(P_SOUTH);
    else if (dy < my_y) route = 3'(P_NORTH);
    else                route = 3'(P_LOCAL);
  endfunction

  // ------------------------------------------------ input VC state
  logic [2:0]    ivc_port [NI];
  logic [VW-1:0] ivc_ovc  [NI];

  // ------------------------------------------------ output VC state
  logic [NVC-1:0] ovc_busy [NPORTS];
  logic [CRW-1:0] ovc_cred [NPORTS][NVC];
  logic [NVC-1:0] ovc_free [NPORTS];

  always_comb
    for (int o = 0; o < NPORTS; o++)
      for (int v = 0; v < NVC; v++) begin
        ovc_free[o][v] = !ovc_busy[o][v] && (ovc_cred[o][v] == CRW'(DEPTH)) &&
                         out_vc_on[o][v] && !out_off_req[o];
        out_busy[o][v] = ovc_busy[o][v] || (ovc_cred[o][v] != CRW'(DEPTH));
      end

  // ------------------------------------------------ allocation requests
  logic [NI-1:0] va_req, sa_req, is_head_wait;
  logic [2:0]    rq_port [NI];
  always_comb begin
    for (int i = 0; i < NI; i++) begin
      is_head_wait[i] = !ivc_active[i] && !buf_empty[i] && buf_q[i][BW-1];
      rq_port[i]      = ivc_active[i] ? ivc_port[i] : route(buf_q[i]);
      va_req[i]       = is_head_wait[i];
      sa_req[i]       = is_head_wait[i] ||
                        (ivc_active[i] && !buf_empty[i] &&
                         (ovc_cred[ivc_port[i]][ivc_ovc[i]] != '0));
    end
  end

  logic [NI-1:0]   va_gnt, sa_gnt, move;
  logic [VW-1:0]   va_vc [NI];
  logic [RCW-1:0]  mon_req [NPORTS], mon_win [NPORTS];

  vc_allocator #(.NIN(NPORTS), .NOUT(NPORTS), .NVC(NVC), .RCW(RCW)) u_va (
    .clk(clk), .rst_n(rst_n), .req(va_req), .req_port(rq_port),
    .out_free(ovc_free), .gnt(va_gnt), .gnt_vc(va_vc),
    .req_cnt(mon_req), .win_cnt(mon_win)
  );

  switch_allocator #(.NIN(NPORTS), .NOUT(NPORTS), .NVC(NVC)) u_sa (
    .clk(clk), .rst_n(rst_n), .req(sa_req), .req_port(rq_port), .gnt(sa_gnt)
  );

  logic [VW-1:0] mv_vc [NI];
  always_comb
    for (int i = 0; i < NI; i++) begin
      move[i]   = sa_gnt[i] && (ivc_active[i] || va_gnt[i]);
      mv_vc[i]  = ivc_active[i] ? ivc_ovc[i] : va_vc[i];
      buf_rd[i] = move[i];
    end

  // ------------------------------------------------ sequential state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NI; i++) begin
        ivc_active[i] <= 1'b0;
        ivc_port[i]   <= '0;
        ivc_ovc[i]    <= '0;
      end
      for (int o = 0; o < NPORTS; o++) begin
        ovc_busy[o] <= '0;
        for (int v = 0; v < NVC; v++) ovc_cred[o][v] <= CRW'(DEPTH);
        out_v[o]    <= 1'b0;
        out_flit[o] <= '0;
        in_cr_v[o]  <= 1'b0;
        in_cr_vc[o] <= '0;
      end
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        out_v[o]   <= 1'b0;
        in_cr_v[o] <= 1'b0;
      end
      // credits returned by downstream routers
      for (int o = 0; o < NPORTS; o++)
        for (int v = 0; v < NVC; v++)
          if (out_cr_v[o] && (32'(out_cr_vc[o]) == v) &&
              !(move_to(o, v)))
            ovc_cred[o][v] <= ovc_cred[o][v] + 1'b1;
      for (int i = 0; i < NI; i++) begin
        // VC allocation
        if (va_gnt[i]) begin
          ivc_active[i]             <= 1'b1;
          ivc_port[i]               <= rq_port[i];
          ivc_ovc[i]                <= va_vc[i];
          ovc_busy[rq_port[i]][va_vc[i]] <= 1'b1;
        end
        // switch traversal
        if (move[i]) begin
          out_v[rq_port[i]]    <= 1'b1;
          out_flit[rq_port[i]] <= {buf_q[i][BW-1 -: 2], mv_vc[i],
                                   buf_q[i][FLIT_W-1:0]};
          in_cr_v[i / NVC]     <= 1'b1;
          in_cr_vc[i / NVC]    <= VW'(i % NVC);
          if (!(out_cr_v[rq_port[i]] && out_cr_vc[rq_port[i]] == mv_vc[i]))
            ovc_cred[rq_port[i]][mv_vc[i]] <= ovc_cred[rq_port[i]][mv_vc[i]] - 1'b1;
          if (buf_q[i][BW-2]) begin  // tail leaves: release both VCs
            ivc_active[i]                  <= 1'b0;
            ovc_busy[rq_port[i]][mv_vc[i]] <= 1'b0;
          end
        end
      end
    end
  end

  // Does a flit leave on output VC (o, v) this cycle?
  function automatic logic move_to(int o, int v);
    move_to = 1'b0;
    for (int i = 0; i < NI; i++)
      if (move[i] && (32'(rq_port[i]) == o) && (32'(mv_vc[i]) == v))
        move_to = 1'b1;
  endfunction

  // ------------------------------------------------ power-gating control
  for (genvar o = 0; o < NPORTS; o++) begin : g_mon
    vc_ratio_monitor #(
      .NVC(NVC), .RCW(RCW), .CNT_W(CNT_W), .MIN_EVAL(MIN_EVAL),
      .IDLE_LIM(IDLE_LIM)
    ) u_mon (
      .clk(clk), .rst_n(rst_n), .req_cnt(mon_req[o]), .win_cnt(mon_win[o]),
      .ds_vc_on(out_vc_on[o]), .ds_vc_pwr(out_vc_pwr[o]), .ds_class(out_cls[o]),
      .off_req(out_off_req[o]), .on_req(out_on_req[o]),
      .last_ok(out_last_ok[o]), .ovf_evt(ev_ovf[o])
    );
  end

  router_class_ctrl #(
    .NP(NPORTS), .NVC(NVC), .C1_LIM(C1_LIM), .C2_LIM(C2_LIM)
  ) u_cls (
    .clk(clk), .rst_n(rst_n), .init_cls(init_cls),
    .idle_evt(pc_idle), .ineff_evt(pc_ineff),
    .cls(cls), .on_sh(), .off_sh(), .colder_evt(ev_colder),
    .hotter_evt(ev_hotter)
  );

  // ------------------------------------------------ protocol checks
  for (genvar p = 0; p < NPORTS; p++) begin : g_chk
    a_write_on_vc: assert property (@(posedge clk) disable iff (!rst_n)
      in_v[p] |-> pc_pwr[p][in_flit[p][FLIT_W +: VW]])
      else $error("noc_router: flit written into a power-gated VC");
  end
endmodule
