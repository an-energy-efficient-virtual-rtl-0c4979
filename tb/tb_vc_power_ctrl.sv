// tb_vc_power_ctrl: self-checking test of the per-port VC power controller.
//
// Directed part: gating picks only free VCs and keeps the last one unless
// the request allows it, a turn-on before T_break-even is refused (and
// counted as inefficient) unless no VC is powered at all, a woken VC is
// usable exactly T_WAKE cycles later, and an idle VC raises one event after
// more than T_BE idle cycles. Random part: every output, every cycle,
// against a reference model written from the rules of the method.
`timescale 1ns/1ps
module tb_vc_power_ctrl;
  import vcpg_pkg::*;
  localparam int unsigned NVC = 4, T_BE = 15, T_WAKE = 4;

  logic clk = 0, rst_n = 0;
  logic off_req = 0, on_req = 0, last_ok = 0;
  logic [NVC-1:0] up_busy = '0, vc_empty = '1, vc_inuse = '0;
  logic [NVC-1:0] vc_on, vc_pwr, idle_evt;
  logic ineff_evt, gate_evt, wake_evt;
  int checks = 0, failures = 0, cycle = 0;

  vc_power_ctrl #(.NVC(NVC), .T_BE(T_BE), .T_WAKE(T_WAKE)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [NVC-1:0] got, logic [NVC-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %b expected %b", what, cycle, got, exp);
    end
  endtask

  // reference model
  int st[NVC];      // 0 on, 1 off, 2 waking
  int tc[NVC], ir[NVC];
  logic [NVC-1:0] e_idle;
  logic e_ineff, e_gate, e_wake;

  task automatic model_reset();
    for (int v = 0; v < NVC; v++) begin st[v] = 0; tc[v] = 0; ir[v] = 0; end
    e_idle = '0; e_ineff = 0; e_gate = 0; e_wake = 0;
  endtask

  task automatic model_step();
    int non = 0, goff = -1, gon = -1;
    bit anyoff = 0, anypwr = 0, refuse = 0;
    bit freev[NVC];
    for (int v = 0; v < NVC; v++) begin
      freev[v] = vc_empty[v] && !vc_inuse[v] && !up_busy[v];
      if (st[v] == 0) non++;
      if (st[v] == 1) anyoff = 1;
      if (st[v] != 1) anypwr = 1;
      if (st[v] == 0 && freev[v]) goff = v;            // highest
    end
    for (int v = NVC - 1; v >= 0; v--)
      if (st[v] == 1 && tc[v] > T_BE) gon = v;          // lowest
    if (gon < 0 && anyoff) begin
      refuse = 1;
      if (!anypwr) for (int v = NVC - 1; v >= 0; v--) if (st[v] == 1) gon = v;
    end
    e_gate  = off_req && goff >= 0 && (non > 1 || last_ok);
    e_wake  = on_req && gon >= 0;
    e_ineff = on_req && refuse;
    e_idle  = '0;
    for (int v = 0; v < NVC; v++) begin
      case (st[v])
        0: if (e_gate && v == goff) begin st[v] = 1; tc[v] = 0; ir[v] = 0; end
           else if (freev[v]) begin
             if (ir[v] == T_BE) e_idle[v] = 1;
             if (ir[v] <= T_BE) ir[v]++;
           end else ir[v] = 0;
        1: if (e_wake && v == gon) begin st[v] = 2; tc[v] = 0; end
           else if (tc[v] <= T_BE) tc[v]++;
        default: if (tc[v] >= T_WAKE - 1) begin st[v] = 0; tc[v] = 0; ir[v] = 0; end
                 else tc[v]++;
      endcase
    end
  endtask

  function automatic logic [NVC-1:0] m_on();
    for (int v = 0; v < NVC; v++) m_on[v] = (st[v] == 0);
  endfunction
  function automatic logic [NVC-1:0] m_pwr();
    for (int v = 0; v < NVC; v++) m_pwr[v] = (st[v] != 1);
  endfunction

  int n_gate = 0, n_wake = 0, n_ineff = 0, n_idle = 0;
  task automatic step();
    @(posedge clk);
    model_step();
    #1;
    check("vc_on", vc_on, m_on());
    check("vc_pwr", vc_pwr, m_pwr());
    check("idle_evt", idle_evt, e_idle);
    check("ineff_evt", NVC'(ineff_evt), NVC'(e_ineff));
    check("gate_evt", NVC'(gate_evt), NVC'(e_gate));
    check("wake_evt", NVC'(wake_evt), NVC'(e_wake));
    n_gate += gate_evt; n_wake += wake_evt; n_ineff += ineff_evt;
    n_idle += $countones(idle_evt);
    @(negedge clk);
    off_req = 0; on_req = 0; last_ok = 0;
  endtask

  task automatic pulse_off(bit last);
    off_req = 1; last_ok = last; step();
  endtask
  task automatic pulse_on();
    on_req = 1; step();
  endtask

  int t0;
  initial begin
    model_reset();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    step();
    check("all on after reset", vc_on, '1);

    // gate with VC3 busy upstream and VC2 not empty: VC1 is the choice
    up_busy = 4'b1000; vc_empty = 4'b1011;
    pulse_off(0);
    check("VC1 gated", vc_pwr, 4'b1101);
    up_busy = '0; vc_empty = '1;
    pulse_off(0); pulse_off(0);
    check("one VC left", vc_on, 4'b0001);
    pulse_off(0);
    check("last VC kept", vc_on, 4'b0001);
    // turn-on too early: refused, counted
    t0 = n_ineff;
    pulse_on();
    check("early turn-on refused", vc_pwr, 4'b0001);
    checks++; if (n_ineff != t0 + 1) begin failures++; $display("FAIL no ineff"); end
    repeat (T_BE + 2) step();
    pulse_on();
    check("VC1 waking", vc_pwr, 4'b0011);
    check("VC1 not yet usable", vc_on, 4'b0001);
    repeat (T_WAKE - 1) begin step(); check("still waking", vc_on, 4'b0001); end
    step();
    check("VC1 usable after T_WAKE", vc_on, 4'b0011);
    // last VC with last_ok: whole port off, then forced wake
    pulse_off(0); pulse_off(1);
    check("port fully gated", vc_pwr, 4'b0000);
    pulse_on();
    check("wake of the longest-gated VC", vc_pwr, 4'b0100);
    repeat (T_WAKE + 2) step();
    // fully gated port: VC3 has been off longest
    pulse_off(1);
    check("port fully gated again", vc_pwr, 4'b0000);
    pulse_on();
    check("VC3 is the one gated long enough", vc_pwr, 4'b1000);
    repeat (T_WAKE + 2) step();
    // idle event: one per idle period
    t0 = n_idle;
    repeat (3 * T_BE) step();
    checks++; if (n_idle != t0 + 1) begin failures++; $display("FAIL idle events %0d", n_idle - t0); end

    // random phase
    for (int i = 0; i < 30000; i++) begin
      off_req = ($urandom_range(0, 9) == 0);
      on_req  = !off_req && ($urandom_range(0, 9) == 0);
      last_ok = off_req && $urandom_range(0, 1);
      if ($urandom_range(0, 7) == 0) begin
        up_busy  = NVC'($urandom) & NVC'($urandom);
        vc_empty = NVC'($urandom) | NVC'($urandom);
        vc_inuse = NVC'($urandom) & NVC'($urandom);
      end
      step();
    end
    checks++;
    if (n_gate == 0 || n_wake == 0 || n_ineff == 0 || n_idle == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("gate %0d wake %0d ineff %0d idle %0d", n_gate, n_wake, n_ineff, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
