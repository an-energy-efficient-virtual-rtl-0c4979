// noc_mesh: K x K 2D mesh network-on-chip whose virtual channels are
// power-gated on demand (top level).
//
// Router (x, y) sits at index y*K + x. Its east output drives the west input
// of (x+1, y), its south output the north input of (x, y+1), and so on;
// each link carries flits plus the turn-off/turn-on requests and the
// upstream VC-busy vector forward, and credits, the VC power state and the
// router class backward. Every router starts in the class its position
// gives (hot centre, cold corners, warm elsewhere), computed by
// vcpg_pkg::init_class. Ports on the mesh boundary are tied off.
//
// Each node has an injection port (a flit link with credits, the local input
// port of its router, whose VCs are always on) and an ejection port (the
// local output of the router; the sink is assumed always ready, so its
// credits are returned in the same cycle). The power state of every input VC
// and the events of the power-gating logic are brought out for power
// accounting. Defaults: 8 x 8 mesh, 4 VCs x 4 flits, 128-bit flits.
module noc_mesh
  import vcpg_pkg::*;
#(
  parameter int unsigned K        = 8,
  parameter int unsigned NVC      = NVC_DEF,
  parameter int unsigned DEPTH    = VC_DEPTH_DEF,
  parameter int unsigned FLIT_W   = FLIT_W_DEF,
  parameter int unsigned CW       = 4,
  parameter int unsigned T_BE     = T_BE_DEF,
  parameter int unsigned T_WAKE   = T_WAKE_DEF,
  parameter int unsigned MIN_EVAL = MIN_EVAL_DEF,
  parameter int unsigned IDLE_LIM = IDLE_LIM_DEF,
  parameter int unsigned CNT_W    = CNT_W_DEF,
  parameter int unsigned C1_LIM   = C1_LIM_DEF,
  parameter int unsigned C2_LIM   = C2_LIM_DEF,
  localparam int unsigned N       = K * K,
  localparam int unsigned VW      = $clog2(NVC),
  localparam int unsigned FW      = FLIT_W + 2 + VW
) (
  input  logic            clk,
  input  logic            rst_n,
  // injection, one per node
  input  logic            inj_v     [N],
  input  logic [FW-1:0]   inj_flit  [N],
  output logic            inj_cr_v  [N],
  output logic [VW-1:0]   inj_cr_vc [N],
  // ejection, one per node
  output logic            ej_v      [N],
  output logic [FW-1:0]   ej_flit   [N],
  // observation
  output rclass_e         cls       [N],
  output logic [NVC-1:0]  vc_pwr    [N][NPORTS],
  output logic [NPORTS-1:0] ev_gate [N],
  output logic [NPORTS-1:0] ev_wake [N],
  output logic [NPORTS-1:0] ev_ineff[N],
  output logic [NPORTS-1:0] ev_ovf  [N],
  output logic            ev_colder [N],
  output logic            ev_hotter [N]
);
  // router-side signal arrays
  logic            r_in_v      [N][NPORTS];
  logic [FW-1:0]   r_in_flit   [N][NPORTS];
  logic            r_in_off    [N][NPORTS];
  logic            r_in_on     [N][NPORTS];
  logic            r_in_last   [N][NPORTS];
  logic [NVC-1:0]  r_in_busy   [N][NPORTS];
  logic            r_in_cr_v   [N][NPORTS];
  logic [VW-1:0]   r_in_cr_vc  [N][NPORTS];
  logic [NVC-1:0]  r_in_vc_on  [N][NPORTS];
  logic [NVC-1:0]  r_in_vc_pwr [N][NPORTS];
  logic            r_out_v     [N][NPORTS];
  logic [FW-1:0]   r_out_flit  [N][NPORTS];
  logic            r_out_off   [N][NPORTS];
  logic            r_out_on    [N][NPORTS];
  logic            r_out_last  [N][NPORTS];
  logic [NVC-1:0]  r_out_busy  [N][NPORTS];
  logic            r_out_cr_v  [N][NPORTS];
  logic [VW-1:0]   r_out_cr_vc [N][NPORTS];
  logic [NVC-1:0]  r_out_vc_on [N][NPORTS];
  logic [NVC-1:0]  r_out_vc_pwr[N][NPORTS];
  rclass_e         r_out_cls   [N][NPORTS];

  // Neighbour of router n through port p, -1 at the mesh boundary.
  function automatic int nbr(int n, int p);
    int x, y;
    x = n % K;
    y = n / K;
    case (p)
      P_NORTH: nbr = (y > 0)     ? n - K : -1;
      P_EAST:  nbr = (x < K - 1) ? n + 1 : -1;
      P_SOUTH: nbr = (y < K - 1) ? n + K : -1;
      P_WEST:  nbr = (x > 0)     ? n - 1 : -1;
      default: nbr = -1;
    endcase
  endfunction

  function automatic int opposite(int p);
    case (p)
      P_NORTH: opposite = P_SOUTH;
      P_EAST:  opposite = P_WEST;
      P_SOUTH: opposite = P_NORTH;
      default: opposite = P_EAST;
    endcase
  endfunction

  for (genvar n = 0; n < N; n++) begin : g_node
    noc_router #(
      .NVC(NVC), .DEPTH(DEPTH), .FLIT_W(FLIT_W), .CW(CW),
      .T_BE(T_BE), .T_WAKE(T_WAKE), .MIN_EVAL(MIN_EVAL), .IDLE_LIM(IDLE_LIM),
      .CNT_W(CNT_W), .C1_LIM(C1_LIM), .C2_LIM(C2_LIM)
    ) u_router (
      .clk(clk), .rst_n(rst_n),
      .my_x(CW'(n % K)), .my_y(CW'(n / K)),
      .init_cls(init_class(n % K, n / K, K)),
      .in_v(r_in_v[n]), .in_flit(r_in_flit[n]), .in_off_req(r_in_off[n]),
      .in_on_req(r_in_on[n]), .in_last_ok(r_in_last[n]),
      .in_up_busy(r_in_busy[n]), .in_cr_v(r_in_cr_v[n]),
      .in_cr_vc(r_in_cr_vc[n]), .in_vc_on(r_in_vc_on[n]),
      .in_vc_pwr(r_in_vc_pwr[n]), .cls(cls[n]),
      .out_v(r_out_v[n]), .out_flit(r_out_flit[n]), .out_off_req(r_out_off[n]),
      .out_on_req(r_out_on[n]), .out_last_ok(r_out_last[n]),
      .out_busy(r_out_busy[n]), .out_cr_v(r_out_cr_v[n]),
      .out_cr_vc(r_out_cr_vc[n]), .out_vc_on(r_out_vc_on[n]),
      .out_vc_pwr(r_out_vc_pwr[n]), .out_cls(r_out_cls[n]),
      .ev_gate(ev_gate[n]), .ev_wake(ev_wake[n]), .ev_ineff(ev_ineff[n]),
      .ev_ovf(ev_ovf[n]), .ev_colder(ev_colder[n]), .ev_hotter(ev_hotter[n])
    );

    assign vc_pwr[n] = r_in_vc_pwr[n];

    for (genvar p = 0; p < NPORTS; p++) begin : g_port
      if (p == P_LOCAL) begin : g_local
        // injection into the local input port
        assign r_in_v[n][p]    = inj_v[n];
        assign r_in_flit[n][p] = inj_flit[n];
        assign r_in_off[n][p]  = 1'b0;
        assign r_in_on[n][p]   = 1'b0;
        assign r_in_last[n][p] = 1'b0;
        assign r_in_busy[n][p] = '0;
        assign inj_cr_v[n]     = r_in_cr_v[n][p];
        assign inj_cr_vc[n]    = r_in_cr_vc[n][p];
        // ejection from the local output port: always-ready sink
        assign ej_v[n]            = r_out_v[n][p];
        assign ej_flit[n]         = r_out_flit[n][p];
        assign r_out_cr_v[n][p]   = r_out_v[n][p];
        assign r_out_cr_vc[n][p]  = r_out_flit[n][p][FLIT_W +: VW];
        assign r_out_vc_on[n][p]  = '1;
        assign r_out_vc_pwr[n][p] = '1;
        assign r_out_cls[n][p]    = CLS_WARM;
      end else if (nbr(n, p) < 0) begin : g_edge
        assign r_in_v[n][p]       = 1'b0;
        assign r_in_flit[n][p]    = '0;
        assign r_in_off[n][p]     = 1'b0;
        assign r_in_on[n][p]      = 1'b0;
        assign r_in_last[n][p]    = 1'b0;
        assign r_in_busy[n][p]    = '0;
        assign r_out_cr_v[n][p]   = 1'b0;
        assign r_out_cr_vc[n][p]  = '0;
        assign r_out_vc_on[n][p]  = '0;
        assign r_out_vc_pwr[n][p] = '0;
        assign r_out_cls[n][p]    = CLS_WARM;
      end else begin : g_link
        localparam int M = nbr(n, p);
        localparam int Q = opposite(p);
        // input port p of n is fed by output port Q of neighbour M
        assign r_in_v[n][p]       = r_out_v[M][Q];
        assign r_in_flit[n][p]    = r_out_flit[M][Q];
        assign r_in_off[n][p]     = r_out_off[M][Q];
        assign r_in_on[n][p]      = r_out_on[M][Q];
        assign r_in_last[n][p]    = r_out_last[M][Q];
        assign r_in_busy[n][p]    = r_out_busy[M][Q];
        // output port p of n feeds input port Q of M
        assign r_out_cr_v[n][p]   = r_in_cr_v[M][Q];
        assign r_out_cr_vc[n][p]  = r_in_cr_vc[M][Q];
        assign r_out_vc_on[n][p]  = r_in_vc_on[M][Q];
        assign r_out_vc_pwr[n][p] = r_in_vc_pwr[M][Q];
        assign r_out_cls[n][p]    = cls[M];
      end
    end
  end
endmodule
