// tb_vc_ratio_monitor: self-checking test of the win/lose ratio monitor.
//
// Directed phases check the decisions one by one (turn-off after the hold
// time with only wins, turn-on with losses, exact threshold edges for the
// three router classes, the idle path that may gate the last VC, the
// immediate turn-on when no downstream VC is powered, and the overflow
// cross reset). A random phase then compares every output, every cycle,
// with a cycle-level reference model written from the rules of the method.
// Short hold and idle times are used to keep the run brief.
`timescale 1ns/1ps
module tb_vc_ratio_monitor;
  import vcpg_pkg::*;
  localparam int unsigned NVC = 4, RCW = 5, CNT_W = 6;
  localparam int unsigned MIN_EVAL = 10, IDLE_LIM = 40;

  logic clk = 0, rst_n = 0;
  logic [RCW-1:0] req_cnt = '0, win_cnt = '0;
  logic [NVC-1:0] ds_vc_on = '1, ds_vc_pwr = '1;
  rclass_e ds_class = CLS_WARM;
  logic off_req, on_req, last_ok, ovf_evt;
  int checks = 0, failures = 0, cycle = 0;

  vc_ratio_monitor #(.NVC(NVC), .RCW(RCW), .CNT_W(CNT_W), .MIN_EVAL(MIN_EVAL),
                     .IDLE_LIM(IDLE_LIM)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %0b expected %0b", what, cycle, got, exp);
    end
  endtask

  // Reference model state
  int m_w, m_l, m_hold, m_idle, m_cool;
  logic e_off, e_on, e_last, e_ovf;

  function automatic int popc(logic [NVC-1:0] v);
    popc = 0;
    foreach (v[i]) popc += v[i];
  endfunction

  function automatic int shamt(rclass_e c, bit off);
    int base = off ? 5 : 3;
    if (c == CLS_COLD) return base - 1;
    if (c == CLS_HOT)  return base + 1;
    return base;
  endfunction

  task automatic model_step();
    int wn, ln, lim = 1 << CNT_W;
    bit emer, d_off, d_on, d_last, wo, lo;
    d_off = 0; d_on = 0; d_last = 0;
    emer = (req_cnt != 0) && (ds_vc_pwr == 0) && (m_cool == 0);
    if (emer) d_on = 1;
    else if (m_hold >= MIN_EVAL && m_cool == 0) begin
      if (m_w > (m_l << shamt(ds_class, 1)) && popc(ds_vc_on) > 1) d_off = 1;
      else if (m_w < (m_l << shamt(ds_class, 0)) && ds_vc_pwr != '1) d_on = 1;
      else if (m_idle >= IDLE_LIM && popc(ds_vc_on) >= 1) begin d_off = 1; d_last = 1; end
    end
    wn = m_w + win_cnt;
    ln = m_l + (req_cnt - win_cnt);
    wo = wn >= lim; lo = ln >= lim;
    e_off = d_off; e_on = d_on; e_last = d_last;
    e_ovf = !(d_off || d_on) && (wo || lo);
    if (d_off || d_on) begin
      m_w = 0; m_l = 0; m_hold = 0; m_cool = 3;
    end else begin
      m_w = lo ? 0 : wn % lim;
      m_l = wo ? 0 : ln % lim;
      if (m_hold < MIN_EVAL) m_hold++;
      if (m_cool > 0) m_cool--;
    end
    if (req_cnt != 0) m_idle = 0; else if (m_idle < IDLE_LIM) m_idle++;
  endtask

  // one clock: inputs already applied; update model and compare
  int n_off = 0, n_on = 0, n_last = 0, n_ovf = 0;
  task automatic step(bit compare = 1);
    @(posedge clk);
    model_step();
    #1;
    if (compare) begin
      check("off_req", off_req, e_off);
      check("on_req", on_req, e_on);
      check("last_ok", last_ok, e_last);
      check("ovf_evt", ovf_evt, e_ovf);
    end
    n_off += off_req; n_on += on_req; n_last += last_ok; n_ovf += ovf_evt;
  endtask

  task automatic drive(int r, int w);
    req_cnt = RCW'(r); win_cnt = RCW'(w);
  endtask

  task automatic reset_all();
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    m_w = 0; m_l = 0; m_hold = 0; m_idle = 0; m_cool = 0;
  endtask

  int t0, t1;
  initial begin
    m_w = 0; m_l = 0; m_hold = 0; m_idle = 0; m_cool = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1: only wins, all VCs on: first turn-off exactly when the hold ends
    drive(1, 1);
    t0 = cycle;
    while (!off_req && cycle < t0 + 50) step();
    checks++;
    if (cycle - t0 != MIN_EVAL + 1) begin
      failures++; $display("FAIL turn-off latency %0d", cycle - t0);
    end
    check("no last_ok on ratio turn-off", last_ok, 0);

    // 2: with one VC left, the ratio alone may not gate it
    ds_vc_on = 4'b0001; ds_vc_pwr = 4'b0001;
    repeat (3 * MIN_EVAL) begin step(); check("keep last VC", off_req, 0); end

    // 3: losses only -> turn-on once the hold is over
    drive(2, 0);
    t0 = n_on;
    repeat (3 * MIN_EVAL) step();
    checks++; if (n_on == t0) begin failures++; $display("FAIL no turn-on"); end

    // 4: exact threshold edges: wins = T*loses is not beyond the threshold
    for (int c = 0; c < 3; c++) begin
      int toff, ton;
      ds_class = rclass_e'(c);
      toff = 1 << shamt(ds_class, 1);
      ton  = 1 << shamt(ds_class, 0);
      ds_vc_on = '1; ds_vc_pwr = '1;
      // restart from reset, then wait out the hold time
      drive(0, 0); reset_all(); repeat (MIN_EVAL + 5) step();
      // one loss, then exactly toff wins spread over cycles: no turn-off
      drive(1, 0); step();
      for (int i = 0; i < toff; i++) begin drive(1, 1); step(); end
      drive(0, 0); step(); check("ratio == off threshold keeps VC", off_req, 0);
      drive(1, 1); step(); step(); check("ratio above off threshold", off_req, 1);
      // turn-on edge: loses = 1 and wins = ton -> not below
      ds_vc_on = 4'b0011; ds_vc_pwr = 4'b0011;
      drive(0, 0); reset_all(); repeat (MIN_EVAL + 5) step();
      for (int i = 0; i < ton; i++) begin drive(1, 1); step(); end
      drive(1, 0); step(); drive(0, 0); step();
      check("ratio == on threshold", on_req, 0);
    end

    // 5: idle path: no requests for IDLE_LIM cycles gates even the last VC
    ds_class = CLS_WARM; ds_vc_on = 4'b0001; ds_vc_pwr = 4'b0001;
    drive(0, 0);
    t0 = n_last;
    repeat (IDLE_LIM + MIN_EVAL + 5) step();
    checks++; if (n_last == t0) begin failures++; $display("FAIL no idle turn-off"); end

    // 6: all VCs gated and a request waits: immediate turn-on
    ds_vc_on = '0; ds_vc_pwr = '0;
    drive(0, 0); repeat (5) step();
    drive(1, 0); step(); check("emergency turn-on", on_req, 1);
    ds_vc_pwr = 4'b0001; step(); step();
    drive(0, 0); ds_vc_on = 4'b0001; repeat (3) step();

    // 7: overflow of the win counter clears losses
    ds_vc_on = 4'b0001; ds_vc_pwr = 4'b1111;
    t0 = n_ovf;
    drive(20, 18); repeat (20) step();
    checks++; if (n_ovf == t0) begin failures++; $display("FAIL no overflow"); end

    // 8: random phase against the model
    for (int i = 0; i < 20000; i++) begin
      int r = $urandom_range(0, 6);
      drive(r, $urandom_range(0, r));
      if ($urandom_range(0, 30) == 0) begin
        ds_vc_pwr = NVC'($urandom);
        ds_vc_on  = ds_vc_pwr & NVC'($urandom);
      end
      if ($urandom_range(0, 200) == 0) ds_class = rclass_e'($urandom_range(0, 2));
      if ($urandom_range(0, 300) == 0) begin drive(0, 0); repeat (IDLE_LIM + 1) step(); end
      step();
    end
    checks++;
    if (n_off == 0 || n_on == 0 || n_last == 0 || n_ovf == 0) begin
      failures++; $display("FAIL some decision never happened");
    end
    $display("turn-off %0d turn-on %0d last %0d overflow %0d", n_off, n_on, n_last, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
