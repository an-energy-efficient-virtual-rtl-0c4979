// switch_allocator: separable input-first switch allocator of a router.
//
// An input VC requests the crossbar when it has a flit ready for its output
// port (and, for a body flit, a credit). Stage 1 picks one VC per input port
// round-robin; stage 2 picks one input port per output port round-robin.
// At most one flit leaves each input port and at most one enters each output
// port per cycle. The stage-1 pointer of an input port moves only when its
// choice also won stage 2. Policy named by the network configuration;
// arbiters are this design's choice. Combinational grants, pointers update
// on the rising edge.
module switch_allocator
  import vcpg_pkg::*;
#(
  parameter int unsigned NIN  = NPORTS,
  parameter int unsigned NOUT = NPORTS,
  parameter int unsigned NVC  = NVC_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NIN*NVC-1:0] req,
  input  logic [2:0]         req_port [NIN*NVC],
  output logic [NIN*NVC-1:0] gnt
);
  logic [NVC-1:0] s1_gnt [NIN];
  logic [NIN-1:0] s1_adv;
  logic [2:0]     s1_port [NIN];
  logic [NIN-1:0] s1_any;

  for (genvar n = 0; n < NIN; n++) begin : g_s1
    rr_arbiter #(.N(NVC)) u_arb (
      .clk(clk), .rst_n(rst_n), .req(req[n*NVC +: NVC]), .advance(s1_adv[n]),
      .gnt(s1_gnt[n])
    );
    always_comb begin
      s1_any[n]  = (s1_gnt[n] != '0);
      s1_port[n] = '0;
      for (int v = 0; v < NVC; v++)
        if (s1_gnt[n][v]) s1_port[n] = req_port[n*NVC + v];
    end
  end

  logic [NIN-1:0] s2_req [NOUT];
  logic [NIN-1:0] s2_gnt [NOUT];
  for (genvar o = 0; o < NOUT; o++) begin : g_s2
    always_comb
      for (int n = 0; n < NIN; n++)
        s2_req[o][n] = s1_any[n] && (32'(s1_port[n]) == o);
    rr_arbiter #(.N(NIN)) u_arb (
      .clk(clk), .rst_n(rst_n), .req(s2_req[o]), .advance(1'b1),
      .gnt(s2_gnt[o])
    );
  end

  always_comb begin
    for (int n = 0; n < NIN; n++) begin
      s1_adv[n] = 1'b0;
      for (int o = 0; o < NOUT; o++)
        if (s2_gnt[o][n]) s1_adv[n] = 1'b1;
      for (int v = 0; v < NVC; v++)
        gnt[n*NVC + v] = s1_adv[n] && s1_gnt[n][v];
    end
  end
endmodule
