// tb_noc_router: self-checking test of one power-gated VC router.
//
// The router sits at (1,1) of a 3x3 mesh; the test plays all five
// neighbours. Upstream models send 4-flit packets on VCs they allocate
// themselves with credit flow control, using only VCs the router reports
// on. Downstream models take every flit, return its credit one cycle
// later, and check that each packet leaves through the XY-routing port of
// its destination, whole, in order and with its payload. Checked timing: a
// lone packet's head leaves two cycles after it enters. Power gating:
// turn-off requests sent into the north input port gate VCs down to one
// (and to none with last_ok), a turn-on wakes one after T_WAKE cycles;
// sustained uncontended traffic makes the router send turn-off requests on
// its outputs, and a downstream port with no powered VC gets a turn-on.
`timescale 1ns/1ps
module tb_noc_router;
  import vcpg_pkg::*;
  localparam int unsigned NVC = 4, DEPTH = 4, FLIT_W = 32, CW = 4;
  localparam int unsigned VW = 2, FW = FLIT_W + 2 + VW, PKT = 4;
  localparam int unsigned MIN_EVAL = 20, IDLE_LIM = 200, T_BE = 15, T_WAKE = 4;

  logic clk = 0, rst_n = 0;
  logic            in_v [NPORTS], in_off_req [NPORTS], in_on_req [NPORTS], in_last_ok [NPORTS];
  logic [FW-1:0]   in_flit [NPORTS];
  logic [NVC-1:0]  in_up_busy [NPORTS], in_vc_on [NPORTS], in_vc_pwr [NPORTS];
  logic            in_cr_v [NPORTS];
  logic [VW-1:0]   in_cr_vc [NPORTS];
  rclass_e         cls;
  logic            out_v [NPORTS], out_off_req [NPORTS], out_on_req [NPORTS], out_last_ok [NPORTS];
  logic [FW-1:0]   out_flit [NPORTS];
  logic [NVC-1:0]  out_busy [NPORTS], out_vc_on [NPORTS], out_vc_pwr [NPORTS];
  logic            out_cr_v [NPORTS];
  logic [VW-1:0]   out_cr_vc [NPORTS];
  rclass_e         out_cls [NPORTS];
  logic [NPORTS-1:0] ev_gate, ev_wake, ev_ineff, ev_ovf;
  logic ev_colder, ev_hotter;

  logic [CW-1:0] my_x = 1, my_y = 1;
  rclass_e init_cls = CLS_WARM;
  noc_router #(.NVC(NVC), .DEPTH(DEPTH), .FLIT_W(FLIT_W), .CW(CW), .T_BE(T_BE), .T_WAKE(T_WAKE),
               .MIN_EVAL(MIN_EVAL), .IDLE_LIM(IDLE_LIM)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  function automatic int xy_port(int dx, int dy);
    if (dx > 1) return P_EAST;
    if (dx < 1) return P_WEST;
    if (dy > 1) return P_SOUTH;
    if (dy < 1) return P_NORTH;
    return P_LOCAL;
  endfunction

  // ---------------- upstream models
  int  credits [NPORTS][NVC];
  bit  sending [NPORTS];
  int  cur_vc [NPORTS], cur_idx [NPORTS], cur_dx [NPORTS], cur_dy [NPORTS], cur_id [NPORTS];
  bit  gen_en [NPORTS];
  int  rate = 50;  // percent chance to start a packet
  int  sent_pkts = 0;
  int  next_id = 1;
  int  force_dst = -1;

  // ---------------- downstream models
  bit  rx_open [NPORTS][NVC];
  int  rx_id [NPORTS][NVC], rx_idx [NPORTS][NVC];
  int  got_pkts = 0;
  time first_out_time = 0;
  int  n_out_off = 0, n_out_on = 0;
  bit  ds_cr_v [NPORTS];
  int  ds_cr_vc [NPORTS];

  always_comb
    for (int p = 0; p < NPORTS; p++) begin
      out_cr_v[p]  = ds_cr_v[p];
      out_cr_vc[p] = VW'(ds_cr_vc[p]);
      out_cls[p]   = CLS_WARM;
    end

  initial begin
    for (int p = 0; p < NPORTS; p++) begin
      in_v[p] = 0; in_flit[p] = '0; in_off_req[p] = 0; in_on_req[p] = 0; in_last_ok[p] = 0;
      in_up_busy[p] = '0; out_vc_on[p] = '1; out_vc_pwr[p] = '1;
      sending[p] = 0; gen_en[p] = 0; ds_cr_v[p] = 0; ds_cr_vc[p] = 0;
      for (int v = 0; v < NVC; v++) begin credits[p][v] = DEPTH; rx_open[p][v] = 0; end
    end
  end

  // Drive one cycle of upstream traffic (called at negedge).
  task automatic drive_inputs();
    for (int p = 0; p < NPORTS; p++) begin
      in_v[p] = 0;
      if (!sending[p] && gen_en[p] && $urandom_range(0, 99) < rate) begin
        int cand = -1;
        for (int v = 0; v < NVC; v++)
          if (in_vc_on[p][v] && credits[p][v] == DEPTH && !in_up_busy[p][v]) cand = v;
        if (cand >= 0) begin
          sending[p] = 1; cur_vc[p] = cand; cur_idx[p] = 0; cur_id[p] = next_id++;
          do begin
            cur_dx[p] = (force_dst >= 0) ? force_dst % 3 : $urandom_range(0, 2);
            cur_dy[p] = (force_dst >= 0) ? force_dst / 3 : $urandom_range(0, 2);
          end while (xy_port(cur_dx[p], cur_dy[p]) == p && p != P_LOCAL);
          in_up_busy[p][cand] = 1;
        end
      end
      if (sending[p] && credits[p][cur_vc[p]] > 0) begin
        logic [FLIT_W-1:0] d;
        d = {cur_id[p][11:0], 4'(cur_idx[p]), 4'(p), 4'(0), 4'(cur_dy[p]), 4'(cur_dx[p])};
        in_v[p] = 1;
        in_flit[p] = {cur_idx[p] == 0, cur_idx[p] == PKT - 1, VW'(cur_vc[p]), d};
        credits[p][cur_vc[p]]--;
        cur_idx[p]++;
        if (cur_idx[p] == PKT) begin
          sending[p] = 0; sent_pkts++;
          in_up_busy[p][cur_vc[p]] = 0;
        end
      end
    end
  endtask

  // keep the upstream-busy vector honest: a VC is busy while credits are out
  always @(negedge clk)
    for (int p = 0; p < NPORTS; p++)
      for (int v = 0; v < NVC; v++)
        if (!(sending[p] && cur_vc[p] == v)) in_up_busy[p][v] = (credits[p][v] != DEPTH);

  // credits coming back from the router, outputs leaving it
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (in_cr_v[p]) credits[p][in_cr_vc[p]]++;
      ds_cr_v[p] <= 0;
      n_out_off += out_off_req[p];
      n_out_on  += out_on_req[p];
      if (out_v[p]) begin
        int v;
        bit hd, tl;
        logic [FLIT_W-1:0] d;
        v  = int'(out_flit[p][FLIT_W +: VW]);
        hd = out_flit[p][FW-1];
        tl = out_flit[p][FW-2];
        d  = out_flit[p][FLIT_W-1:0];
        ds_cr_v[p] <= 1; ds_cr_vc[p] <= v;
        if (first_out_time == 0) first_out_time = $time;
        check("flit on a powered downstream VC", out_vc_on[p][v]);
        if (hd) begin
          check("head on a free VC", !rx_open[p][v]);
          check("XY output port", xy_port(d[3:0], d[7:4]) == p);
          rx_open[p][v] = 1; rx_id[p][v] = d[31:20]; rx_idx[p][v] = 0;
        end else begin
          check("body on an open VC", rx_open[p][v]);
        end
        check("flit order", int'(d[19:16]) == rx_idx[p][v]);
        check("packet id", int'(d[31:20]) == rx_id[p][v]);
        rx_idx[p][v]++;
        if (tl) begin
          check("packet length", rx_idx[p][v] == PKT);
          rx_open[p][v] = 0; got_pkts++;
        end
      end
    end
  end

  task automatic run(int n);
    repeat (n) begin @(negedge clk); drive_inputs(); end
  endtask
  task automatic quiesce();
    for (int p = 0; p < NPORTS; p++) gen_en[p] = 0;
    repeat (200) begin @(negedge clk); drive_inputs(); end
  endtask

  int t0, c0;
  time tin;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // 1: one packet from west to east, check the 2-cycle hop
    force_dst = 2 + 3 * 1;  // (2,1)
    gen_en[P_WEST] = 1; rate = 100;
    @(negedge clk); drive_inputs(); tin = $time; gen_en[P_WEST] = 0;
    repeat (10) begin @(negedge clk); drive_inputs(); end
    // driven at a falling edge, written at the next rising edge, in the
    // output register one rising edge later, seen by the sink at the third:
    // the flit is on the output link two cycles after it was on the input
    check("two-cycle hop", first_out_time - tin == 25);
    check("one packet out", got_pkts == 1);
    force_dst = -1;

    // 2: random traffic on all inputs
    for (int p = 0; p < NPORTS; p++) gen_en[p] = 1;
    rate = 60;
    run(3000);
    quiesce();
    check("all packets delivered", got_pkts == sent_pkts);
    $display("phase 2: sent %0d delivered %0d", sent_pkts, got_pkts);

    // 3: turn-off requests into the north input port
    for (int k = 0; k < 5; k++) begin
      @(negedge clk) in_off_req[P_NORTH] = 1;
      @(negedge clk) in_off_req[P_NORTH] = 0;
      repeat (2) @(negedge clk);
    end
    check("north port down to one VC", $countones(in_vc_on[P_NORTH]) == 1);
    @(negedge clk) begin in_off_req[P_NORTH] = 1; in_last_ok[P_NORTH] = 1; end
    @(negedge clk) begin in_off_req[P_NORTH] = 0; in_last_ok[P_NORTH] = 0; end
    @(negedge clk);
    check("north port fully gated", in_vc_pwr[P_NORTH] == 0);
    repeat (T_BE + 2) @(negedge clk);
    @(negedge clk) in_on_req[P_NORTH] = 1;
    @(negedge clk) in_on_req[P_NORTH] = 0;
    check("north VC waking", in_vc_pwr[P_NORTH] != 0 && in_vc_on[P_NORTH] == 0);
    repeat (T_WAKE) @(negedge clk);
    check("north VC on after T_WAKE", $countones(in_vc_on[P_NORTH]) == 1);

    // 4: traffic through the gated port still flows (on one VC)
    sent_pkts = 0; got_pkts = 0;
    for (int p = 0; p < NPORTS; p++) gen_en[p] = 1;
    rate = 30;
    c0 = n_out_off;
    run(2000);
    quiesce();
    check("delivered with gated VCs", got_pkts == sent_pkts);
    check("router requested turn-offs downstream", n_out_off > c0);

    // 5: downstream east port with nothing powered: immediate turn-on
    out_vc_on[P_EAST] = '0; out_vc_pwr[P_EAST] = '0;
    c0 = n_out_on;
    force_dst = 2 + 3 * 1; gen_en[P_WEST] = 1; rate = 100;
    repeat (6) begin @(negedge clk); drive_inputs(); end
    check("turn-on for a fully gated downstream port", n_out_on > c0);
    out_vc_pwr[P_EAST] = 4'b0001;
    repeat (T_WAKE) begin @(negedge clk); drive_inputs(); end
    out_vc_on[P_EAST] = 4'b0001;
    gen_en[P_WEST] = 0;
    quiesce();
    check("delivered after wakeup", got_pkts == sent_pkts);
    $display("out turn-off %0d turn-on %0d, sent %0d delivered %0d",
             n_out_off, n_out_on, sent_pkts, got_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
