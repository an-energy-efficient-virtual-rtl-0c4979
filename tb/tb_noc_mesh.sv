// tb_noc_mesh: end-to-end test of the power-gated mesh at reduced size.
//
// A 4x4 mesh with 32-bit flits runs through light uniform traffic (VCs get
// gated, idle ports lose their last VC, routers cool down), heavy uniform
// traffic beyond saturation (VCs are woken, fully gated ports are woken on
// demand, win/lose counters overflow), hotspot traffic, and a drain. Every
// packet must arrive whole at its destination. Each power-gating mechanism
// must occur at least once: VC gated, VC woken, port fully gated, fully
// gated port woken, refused (premature) turn-on, router colder, router
// hotter, counter overflow cross reset. The hold time is shortened to 10
// cycles (below T_break-even) so that premature turn-ons can happen, and
// the counters are 6 bits wide so that they overflow within the run;
// counter2 moves a router hotter after two refused turn-ons instead of
// eight, as premature turn-ons are rare.
`timescale 1ns/1ps
module tb_noc_mesh;
  import vcpg_pkg::*;
  localparam int unsigned K = 4, N = K * K, NVC = 4, DEPTH = 4, FLIT_W = 32, CW = 4;
  localparam int unsigned VW = $clog2(NVC), FW = FLIT_W + 2 + VW;

  logic clk = 0, rst_n = 0;
  logic inj_v [N], inj_cr_v [N], ej_v [N];
  logic [FW-1:0] inj_flit [N], ej_flit [N];
  logic [VW-1:0] inj_cr_vc [N];
  rclass_e cls [N];
  logic [NVC-1:0] vc_pwr [N][NPORTS];
  logic [NPORTS-1:0] ev_gate [N], ev_wake [N], ev_ineff [N], ev_ovf [N];
  logic ev_colder [N], ev_hotter [N];

  int unsigned rate = 0, hot_node = 5;
  logic hotspot = 0;
  int unsigned sent, delivered, errors, tchecks, backlog;
  longint unsigned lat_sum, pwr_vc_cycles, all_vc_cycles;
  int unsigned n_gate, n_wake, n_ineff, n_ovf, n_colder, n_hotter, n_port_off, n_port_on;

  noc_mesh #(.K(K), .NVC(NVC), .DEPTH(DEPTH), .FLIT_W(FLIT_W), .CW(CW),
             .MIN_EVAL(10), .IDLE_LIM(300), .CNT_W(6), .C2_LIM(1)) dut (.*);

  mesh_traffic #(.K(K), .NVC(NVC), .DEPTH(DEPTH), .FLIT_W(FLIT_W), .CW(CW)) u_trf (
    .clk, .rst_n, .rate, .hotspot, .hot_node, .pattern(0), .inj_v, .inj_flit, .inj_cr_v,
    .inj_cr_vc, .ej_v, .ej_flit, .vc_pwr, .ev_gate, .ev_wake, .ev_ineff,
    .ev_ovf, .ev_colder, .ev_hotter, .sent, .delivered, .errors,
    .checks(tchecks), .backlog, .lat_sum, .n_gate, .n_wake, .n_ineff, .n_ovf,
    .n_colder, .n_hotter, .n_port_off, .n_port_on, .pwr_vc_cycles, .all_vc_cycles
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic phase(string name, int unsigned r, bit hs, int cycles);
    longint unsigned p0 = pwr_vc_cycles, a0 = all_vc_cycles;
    int unsigned d0 = delivered;
    rate = r; hotspot = hs;
    repeat (cycles) @(posedge clk);
    if (cycles >= 1000) $display("%-10s rate %0d/1e5: delivered %0d, powered VCs %0.1f%%", name, r,
             delivered - d0, 100.0 * real'(pwr_vc_cycles - p0) / real'(all_vc_cycles - a0));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    phase("light", 500, 0, 6000);
    phase("heavy", 30000, 0, 4000);
    phase("hotspot", 8000, 1, 3000);
    phase("light2", 300, 0, 3000);
    for (int b = 0; b < 40; b++) begin  // bursts: gate, then demand again
      phase("burst-on", 20000, 0, 30);
      phase("burst-off", 0, 0, 150);
    end
    rate = 0;
    for (int i = 0; i < 20000 && !(delivered == sent && backlog == 0 && i > 50); i++)
      @(posedge clk);
    repeat (20) @(posedge clk);
    $display("sent %0d delivered %0d flits checked %0d avg latency %0.1f",
             sent, delivered, tchecks, real'(lat_sum) / real'(delivered));
    $display("gate %0d wake %0d port-off %0d port-on %0d ineff %0d ovf %0d colder %0d hotter %0d",
             n_gate, n_wake, n_port_off, n_port_on, n_ineff, n_ovf, n_colder, n_hotter);
    check("packets sent", sent > 1000);
    check("every packet delivered", delivered == sent);
    check("no packet errors", errors == 0);
    check("VC gated", n_gate > 0);
    check("VC woken", n_wake > 0);
    check("port fully gated (last VC)", n_port_off > 0);
    check("fully gated port woken", n_port_on > 0);
    check("premature turn-on refused (counter2)", n_ineff > 0);
    check("router made colder", n_colder > 0);
    check("router made hotter", n_hotter > 0);
    check("counter overflow cross reset", n_ovf > 0);
    checks += tchecks;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
