// tb_noc_mesh_full: the mesh at its default size (8x8, 4 VCs of 4 flits,
// 128-bit flits, T_break-even 15, T_wakeup 4, hold 100, idle limit 1000).
//
// Uniform random traffic at a light and a medium rate, then a drain. Every
// packet must arrive whole at its destination; VCs must be gated under the
// light load and woken when the load rises; the share of powered VCs on
// router-to-router ports is printed for each phase.
`timescale 1ns/1ps
module tb_noc_mesh_full;
  import vcpg_pkg::*;
  localparam int unsigned K = 8, N = K * K, NVC = NVC_DEF;
  localparam int unsigned VW = $clog2(NVC), FW = FLIT_W_DEF + 2 + VW;

  logic clk = 0, rst_n = 0;
  logic inj_v [N], inj_cr_v [N], ej_v [N];
  logic [FW-1:0] inj_flit [N], ej_flit [N];
  logic [VW-1:0] inj_cr_vc [N];
  rclass_e cls [N];
  logic [NVC-1:0] vc_pwr [N][NPORTS];
  logic [NPORTS-1:0] ev_gate [N], ev_wake [N], ev_ineff [N], ev_ovf [N];
  logic ev_colder [N], ev_hotter [N];

  int unsigned rate = 0, hot_node = 27;
  logic hotspot = 0;
  int unsigned sent, delivered, errors, tchecks, backlog;
  longint unsigned lat_sum, pwr_vc_cycles, all_vc_cycles;
  int unsigned n_gate, n_wake, n_ineff, n_ovf, n_colder, n_hotter, n_port_off, n_port_on;

  noc_mesh dut (.*);

  mesh_traffic #(.K(K)) u_trf (
    .clk, .rst_n, .rate, .hotspot, .hot_node, .pattern(0), .inj_v, .inj_flit, .inj_cr_v,
    .inj_cr_vc, .ej_v, .ej_flit, .vc_pwr, .ev_gate, .ev_wake, .ev_ineff,
    .ev_ovf, .ev_colder, .ev_hotter, .sent, .delivered, .errors,
    .checks(tchecks), .backlog, .lat_sum, .n_gate, .n_wake, .n_ineff, .n_ovf,
    .n_colder, .n_hotter, .n_port_off, .n_port_on, .pwr_vc_cycles, .all_vc_cycles
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic phase(string name, int unsigned r, int cycles);
    longint unsigned p0, a0;
    int unsigned d0;
    p0 = pwr_vc_cycles; a0 = all_vc_cycles; d0 = delivered;
    rate = r;
    repeat (cycles) @(posedge clk);
    $display("%-8s rate %0d/1e5 packets/node/cycle: delivered %0d, powered VCs %0.1f%%",
             name, r, delivered - d0,
             100.0 * real'(pwr_vc_cycles - p0) / real'(all_vc_cycles - a0));
  endtask

  int unsigned g0, w0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    phase("light", 1000, 3000);
    g0 = n_gate; w0 = n_wake;
    phase("medium", 8000, 3000);
    rate = 0;
    for (int i = 0; i < 20000 && !(delivered == sent && backlog == 0 && i > 50); i++)
      @(posedge clk);
    repeat (20) @(posedge clk);
    $display("sent %0d delivered %0d avg latency %0.1f cycles", sent, delivered,
             real'(lat_sum) / real'(delivered));
    $display("gate %0d wake %0d port-off %0d port-on %0d ineff %0d ovf %0d colder %0d hotter %0d",
             n_gate, n_wake, n_port_off, n_port_on, n_ineff, n_ovf, n_colder, n_hotter);
    check("packets sent", sent > 1000);
    check("every packet delivered", delivered == sent);
    check("no packet errors", errors == 0);
    check("VCs gated under light load", g0 > 0);
    check("VCs woken when the load rose", n_wake > w0);
    checks += tchecks;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
