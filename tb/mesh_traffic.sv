// mesh_traffic: traffic generator, checker and power meter for noc_mesh.
//
// Every node generates 4-flit packets as a Bernoulli process of `rate`
// packets per node per 100000 cycles, to a uniform random destination or,
// when `hotspot` is set, half of them to node `hot_node`, or, when `pattern`
// is not 0, to the node a permutation pattern gives (1 bit complement,
// 2 bit reversal, 3 shuffle, 4 tornado, 5 transpose; K a power of two).
// A node that a pattern maps onto itself injects nothing. A node injects
// into its router's local port with credit flow control, one packet per
// local VC at a time. At the ejection side each packet is checked: right
// node, flits in order and on one VC, intact source/sequence fields; its
// latency is added up. The harness also counts the power-gating events of
// the mesh, ports that were fully gated (last VC gated) and then woken,
// and integrates the number of powered VCs of connected router ports to
// give the fraction of VC leakage saved against always-on VCs.
//
// Head flit data: [CW-1:0] dest x, [2CW-1:CW] dest y, [15:8] source node,
// [19:16] flit index, [31:20] packet sequence number of the source.
module mesh_traffic
  import vcpg_pkg::*;
#(
  parameter int unsigned K      = 8,
  parameter int unsigned NVC    = NVC_DEF,
  parameter int unsigned DEPTH  = VC_DEPTH_DEF,
  parameter int unsigned FLIT_W = FLIT_W_DEF,
  parameter int unsigned CW     = 4,
  localparam int unsigned N     = K * K,
  localparam int unsigned VW    = $clog2(NVC),
  localparam int unsigned FW    = FLIT_W + 2 + VW,
  localparam int unsigned PKT   = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  int unsigned     rate,
  input  logic            hotspot,
  input  int unsigned     hot_node,
  input  int unsigned     pattern,
  output logic            inj_v     [N],
  output logic [FW-1:0]   inj_flit  [N],
  input  logic            inj_cr_v  [N],
  input  logic [VW-1:0]   inj_cr_vc [N],
  input  logic            ej_v      [N],
  input  logic [FW-1:0]   ej_flit   [N],
  input  logic [NVC-1:0]  vc_pwr    [N][NPORTS],
  input  logic [NPORTS-1:0] ev_gate [N],
  input  logic [NPORTS-1:0] ev_wake [N],
  input  logic [NPORTS-1:0] ev_ineff[N],
  input  logic [NPORTS-1:0] ev_ovf  [N],
  input  logic            ev_colder [N],
  input  logic            ev_hotter [N],
  output int unsigned     sent,
  output int unsigned     delivered,
  output int unsigned     errors,
  output int unsigned     checks,
  output int unsigned     backlog,
  output longint unsigned lat_sum,
  output int unsigned     n_gate, n_wake, n_ineff, n_ovf, n_colder, n_hotter,
  output int unsigned     n_port_off, n_port_on,
  output longint unsigned pwr_vc_cycles, all_vc_cycles
);
  localparam int unsigned B = $clog2(N);

  // destination of node n under the selected permutation (-1: random)
  function automatic int pat_dst(int n);
    int x, y, r;
    x = n % K; y = n / K; r = 0;
    case (pattern)
      1: r = ~n & (N - 1);
      2: for (int i = 0; i < B; i++) r |= ((n >> i) & 1) << (B - 1 - i);
      3: r = ((n << 1) | (n >> (B - 1))) & (N - 1);
      4: r = y * K + (x + (K + 1) / 2 - 1) % K;
      5: r = x * K + y;
      default: r = -1;
    endcase
    return r;
  endfunction

  int unsigned   queue   [N];
  int            credits [N][NVC];
  bit            sending [N];
  int            cur_vc  [N], cur_idx [N], cur_dst [N];
  int unsigned   seq     [N];
  longint unsigned cyc;
  longint unsigned t_inj [N][64];
  bit            rx_open [N][NVC];
  int            rx_src  [N][NVC], rx_seq [N][NVC], rx_idx [N][NVC];
  bit            was_off [N][NPORTS];

  function automatic bit connected(int n, int p);
    int x, y;
    x = n % K;
    y = n / K;
    case (p)
      P_NORTH: return y > 0;
      P_EAST:  return x < K - 1;
      P_SOUTH: return y < K - 1;
      P_WEST:  return x > 0;
      default: return 0;
    endcase
  endfunction

  task automatic err(string what, int n);
    errors++;
    if (errors < 20) $display("ERROR %s at node %0d cycle %0d", what, n, cyc);
  endtask

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sent <= 0; delivered <= 0; errors <= 0; checks <= 0; backlog <= 0;
      lat_sum <= 0; cyc <= 0;
      n_gate <= 0; n_wake <= 0; n_ineff <= 0; n_ovf <= 0; n_colder <= 0;
      n_hotter <= 0; n_port_off <= 0; n_port_on <= 0;
      pwr_vc_cycles <= 0; all_vc_cycles <= 0;
      for (int n = 0; n < N; n++) begin
        queue[n] = 0; sending[n] = 0; seq[n] = 0;
        inj_v[n] <= 0; inj_flit[n] <= '0;
        for (int v = 0; v < NVC; v++) begin credits[n][v] = DEPTH; rx_open[n][v] = 0; end
        for (int p = 0; p < NPORTS; p++) was_off[n][p] = 0;
      end
    end else begin
      int unsigned bl, ns, nd, nc;
      longint unsigned ls;
      bl = 0; ns = 0; nd = 0; nc = 0; ls = 0;
      cyc <= cyc + 1;
      for (int n = 0; n < N; n++) begin
        // credits returned by the router
        if (inj_cr_v[n]) credits[n][inj_cr_vc[n]]++;
        // packet generation
        if ($urandom_range(0, 99999) < rate && pat_dst(n) != n) queue[n]++;
        // packet start
        if (!sending[n] && queue[n] > 0) begin
          int cand;
          cand = -1;
          for (int v = 0; v < NVC; v++) if (credits[n][v] == DEPTH) cand = v;
          if (cand >= 0) begin
            sending[n] = 1; cur_vc[n] = cand; cur_idx[n] = 0; queue[n]--;
            if (hotspot && $urandom_range(0, 1) == 0) cur_dst[n] = int'(hot_node);
            else if (pattern != 0) cur_dst[n] = pat_dst(n);
            else cur_dst[n] = $urandom_range(0, N - 1);
            if (cur_dst[n] == n) cur_dst[n] = (n + 1) % N;
            t_inj[n][seq[n] % 64] = cyc;
          end
        end
        // one flit per cycle
        inj_v[n] <= 1'b0;
        if (sending[n] && credits[n][cur_vc[n]] > 0) begin
          logic [FLIT_W-1:0] d;
          d = '0;
          d[CW-1:0]    = CW'(cur_dst[n] % K);
          d[2*CW-1:CW] = CW'(cur_dst[n] / K);
          d[15:8]      = 8'(n);
          d[19:16]     = 4'(cur_idx[n]);
          d[31:20]     = 12'(seq[n]);
          inj_v[n]    <= 1'b1;
          inj_flit[n] <= {cur_idx[n] == 0, cur_idx[n] == PKT - 1, VW'(cur_vc[n]), d};
          credits[n][cur_vc[n]]--;
          cur_idx[n]++;
          if (cur_idx[n] == PKT) begin
            sending[n] = 0; seq[n]++;
            ns++;
          end
        end
        bl += queue[n];
        // ejection checks
        if (ej_v[n]) begin
          int v, s, q, ix;
          logic [FLIT_W-1:0] d;
          d  = ej_flit[n][FLIT_W-1:0];
          v  = int'(ej_flit[n][FLIT_W +: VW]);
          s  = int'(d[15:8]);
          q  = int'(d[31:20]);
          ix = int'(d[19:16]);
          nc++;
          if (ej_flit[n][FW-1]) begin
            if (rx_open[n][v]) err("head on an open VC", n);
            if (int'(d[CW-1:0]) + K * int'(d[2*CW-1:CW]) != n) err("wrong destination", n);
            rx_open[n][v] = 1; rx_src[n][v] = s; rx_seq[n][v] = q; rx_idx[n][v] = 0;
          end else if (!rx_open[n][v]) err("body without head", n);
          if (s != rx_src[n][v] || q != rx_seq[n][v]) err("interleaved packet", n);
          if (ix != rx_idx[n][v]) err("flit order", n);
          rx_idx[n][v]++;
          if (ej_flit[n][FW-2]) begin
            if (rx_idx[n][v] != PKT) err("packet length", n);
            rx_open[n][v] = 0;
            nd++;
            ls += cyc - t_inj[s][q % 64];
          end
        end
      end
      backlog   <= bl;
      sent      <= sent + ns;
      delivered <= delivered + nd;
      checks    <= checks + nc;
      lat_sum   <= lat_sum + ls;
      // power-gating events and VC power integration
      begin
        int unsigned g, w, ie, o, c, h, po, pn;
        longint unsigned pw, al;
        g = 0; w = 0; ie = 0; o = 0; c = 0; h = 0; po = 0; pn = 0; pw = 0; al = 0;
        for (int n = 0; n < N; n++) begin
          g  += $countones(ev_gate[n]);
          w  += $countones(ev_wake[n]);
          ie += $countones(ev_ineff[n]);
          o  += $countones(ev_ovf[n]);
          c  += ev_colder[n];
          h  += ev_hotter[n];
          for (int p = 0; p < 4; p++) if (connected(n, p)) begin
            pw += $countones(vc_pwr[n][p]);
            al += NVC;
            if (vc_pwr[n][p] == 0 && !was_off[n][p]) begin po++; was_off[n][p] = 1; end
            if (vc_pwr[n][p] != 0 && was_off[n][p])  begin pn++; was_off[n][p] = 0; end
          end
        end
        n_gate <= n_gate + g; n_wake <= n_wake + w; n_ineff <= n_ineff + ie;
        n_ovf <= n_ovf + o; n_colder <= n_colder + c; n_hotter <= n_hotter + h;
        n_port_off <= n_port_off + po; n_port_on <= n_port_on + pn;
        pwr_vc_cycles <= pwr_vc_cycles + pw; all_vc_cycles <= all_vc_cycles + al;
      end
    end
  end
endmodule
