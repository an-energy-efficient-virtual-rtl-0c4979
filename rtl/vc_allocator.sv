// vc_allocator: separable input-first virtual-channel allocator of a router.
//
// Every input VC whose head flit waits for an output VC raises req with the
// output port chosen by routing. Stage 1: each requester picks one free
// VC of that output port with a round-robin arbiter. Stage 2: each output
// VC grants one of the input VCs that picked it, again round-robin. Only
// VCs marked free (idle, all credits back, powered and awake downstream)
// take part, so a power-gated VC is never allocated. Besides the grants the
// allocator reports, per output port, how many requests it saw and how many
// won this cycle; losses (requests minus wins) include requests that found
// no free VC at all. These counts feed the power-gating ratio monitors.
//
// The policy (separable, input first) is the network's; the round-robin
// arbiters and the loss definition are this design's. Purely combinational
// apart from the arbiter pointers, which move on the rising edge.
module vc_allocator
  import vcpg_pkg::*;
#(
  parameter int unsigned NIN = NPORTS,
  parameter int unsigned NOUT = NPORTS,
  parameter int unsigned NVC = NVC_DEF,
  parameter int unsigned RCW = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NIN*NVC-1:0]      req,
  input  logic [2:0]              req_port [NIN*NVC],
  input  logic [NVC-1:0]          out_free [NOUT],
  output logic [NIN*NVC-1:0]      gnt,
  output logic [$clog2(NVC)-1:0]  gnt_vc   [NIN*NVC],
  output logic [RCW-1:0]          req_cnt  [NOUT],
  output logic [RCW-1:0]          win_cnt  [NOUT]
);
  localparam int unsigned NI = NIN * NVC;
  localparam int unsigned VW = $clog2(NVC);

  // Stage 1: each input VC picks one free output VC of its port.
  logic [NVC-1:0] s1_req [NI];
  logic [NVC-1:0] s1_gnt [NI];
  logic [NI-1:0]  s1_adv;

  for (genvar i = 0; i < NI; i++) begin : g_s1
    always_comb begin
      s1_req[i] = '0;
      for (int p = 0; p < NOUT; p++)
        if (req[i] && (32'(req_port[i]) == p)) s1_req[i] = out_free[p];
    end
    rr_arbiter #(.N(NVC)) u_arb (
      .clk(clk), .rst_n(rst_n), .req(s1_req[i]), .advance(s1_adv[i]),
      .gnt(s1_gnt[i])
    );
  end

  // Stage 2: each output VC picks one input VC among those that chose it.
  logic [NI-1:0] s2_req [NOUT*NVC];
  logic [NI-1:0] s2_gnt [NOUT*NVC];

  for (genvar o = 0; o < NOUT * NVC; o++) begin : g_s2
    always_comb begin
      for (int i = 0; i < NI; i++)
        s2_req[o][i] = req[i] && (32'(req_port[i]) == o / NVC) &&
                       s1_gnt[i][o % NVC];
    end
    rr_arbiter #(.N(NI)) u_arb (
      .clk(clk), .rst_n(rst_n), .req(s2_req[o]), .advance(1'b1),
      .gnt(s2_gnt[o])
    );
  end

  always_comb begin
    for (int i = 0; i < NI; i++) begin
      gnt[i]    = 1'b0;
      gnt_vc[i] = '0;
      for (int o = 0; o < NOUT * NVC; o++)
        if (s2_gnt[o][i]) begin
          gnt[i]    = 1'b1;
          gnt_vc[i] = VW'(o % NVC);
        end
      s1_adv[i] = gnt[i];
    end
    for (int p = 0; p < NOUT; p++) begin
      req_cnt[p] = '0;
      win_cnt[p] = '0;
      for (int i = 0; i < NI; i++)
        if (req[i] && (32'(req_port[i]) == p)) begin
          req_cnt[p] = req_cnt[p] + 1'b1;
          if (gnt[i]) win_cnt[p] = win_cnt[p] + 1'b1;
        end
    end
  end
endmodule
