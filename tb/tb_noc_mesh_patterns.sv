// tb_noc_mesh_patterns: the synthetic permutation patterns on a 4x4 mesh.
//
// Runs uniform random traffic and the five permutation patterns (bit
// complement, bit reversal, shuffle, tornado, transpose) one after another,
// each first at a light and then at a heavier rate, with every router and
// power-gating parameter at its default (4 VCs of 4 flits, 128-bit flits,
// 4-flit packets, T_break-even 15, T_wakeup 4). The mesh is 4x4 instead of
// 8x8 only to keep the run short; the permutations need K to be a power
// of two. For each pattern and rate the share of powered VCs on
// router-to-router ports and the packets delivered are printed. Checks:
// every packet arrives whole at the node the pattern names, every pattern
// delivers packets, VCs are gated under light load and woken under the
// heavier load, and the mesh drains at the end.
`timescale 1ns/1ps
module tb_noc_mesh_patterns;
  import vcpg_pkg::*;
  localparam int unsigned K = 4, N = K * K, NVC = NVC_DEF;
  localparam int unsigned VW = $clog2(NVC), FW = FLIT_W_DEF + 2 + VW;

  logic clk = 0, rst_n = 0;
  logic inj_v [N], inj_cr_v [N], ej_v [N];
  logic [FW-1:0] inj_flit [N], ej_flit [N];
  logic [VW-1:0] inj_cr_vc [N];
  rclass_e cls [N];
  logic [NVC-1:0] vc_pwr [N][NPORTS];
  logic [NPORTS-1:0] ev_gate [N], ev_wake [N], ev_ineff [N], ev_ovf [N];
  logic ev_colder [N], ev_hotter [N];

  int unsigned rate = 0, hot_node = 0, pattern = 0;
  logic hotspot = 0;
  int unsigned sent, delivered, errors, tchecks, backlog;
  longint unsigned lat_sum, pwr_vc_cycles, all_vc_cycles;
  int unsigned n_gate, n_wake, n_ineff, n_ovf, n_colder, n_hotter, n_port_off, n_port_on;

  noc_mesh #(.K(K)) dut (.*);

  mesh_traffic #(.K(K)) u_trf (
    .clk, .rst_n, .rate, .hotspot, .hot_node, .pattern, .inj_v, .inj_flit,
    .inj_cr_v, .inj_cr_vc, .ej_v, .ej_flit, .vc_pwr, .ev_gate, .ev_wake,
    .ev_ineff, .ev_ovf, .ev_colder, .ev_hotter, .sent, .delivered, .errors,
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

  // one phase; returns the packets delivered and the gate/wake events seen
  task automatic phase(string name, int unsigned r, int cycles,
                       output int unsigned dd, output int unsigned dg,
                       output int unsigned dw);
    longint unsigned p0, a0;
    int unsigned d0, g0, w0;
    p0 = pwr_vc_cycles; a0 = all_vc_cycles; d0 = delivered; g0 = n_gate; w0 = n_wake;
    rate = r;
    repeat (cycles) @(posedge clk);
    dd = delivered - d0; dg = n_gate - g0; dw = n_wake - w0;
    $display("%-14s rate %5d/1e5: delivered %5d, gated %4d, woken %4d, powered VCs %5.1f%%",
             name, r, dd, dg, dw,
             100.0 * real'(pwr_vc_cycles - p0) / real'(all_vc_cycles - a0));
  endtask

  string names [6] = '{"uniform", "bit-complement", "bit-reversal", "shuffle",
                       "tornado", "transpose"};
  int unsigned dd, dg, dw, dd2, dg2, dw2, gl, wh;

  initial begin
    gl = 0; wh = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 6; p++) begin
      pattern = p;
      phase(names[p], 1500, 2000, dd, dg, dw);
      gl += dg;
      phase(names[p], 12000, 2000, dd2, dg2, dw2);
      wh += dw2;
      check($sformatf("%s delivers packets", names[p]), dd + dd2 > 0);
    end
    rate = 0;
    for (int i = 0; i < 20000 && !(delivered == sent && backlog == 0 && i > 50); i++)
      @(posedge clk);
    repeat (20) @(posedge clk);
    $display("sent %0d delivered %0d avg latency %0.1f cycles", sent, delivered,
             real'(lat_sum) / real'(delivered));
    $display("gate %0d wake %0d port-off %0d port-on %0d ineff %0d ovf %0d colder %0d hotter %0d",
             n_gate, n_wake, n_port_off, n_port_on, n_ineff, n_ovf, n_colder, n_hotter);
    check("every packet delivered", delivered == sent);
    check("no packet errors", errors == 0);
    check("VCs gated under light load", gl > 0);
    check("VCs woken under heavier load", wh > 0);
    checks += tchecks;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
