// tb_router_class_ctrl: self-checking test of the adaptive router class.
//
// Starting hot, 32 idle events move the router to warm and 32 more to cold
// (31 do not); cold saturates. Eight refused turn-ons move it one class
// hotter (seven do not). The threshold shifts are checked for each class
// against the 4/16, 8/32 and 16/64 thresholds. A random phase compares the
// class with a reference model every cycle.
`timescale 1ns/1ps
module tb_router_class_ctrl;
  import vcpg_pkg::*;
  localparam int unsigned NP = 5, NVC = 4;

  logic clk = 0, rst_n = 0;
  logic [NVC-1:0] idle_evt [NP];
  logic [NP-1:0]  ineff_evt = '0;
  rclass_e cls;
  logic [2:0] on_sh, off_sh;
  logic colder_evt, hotter_evt;
  int checks = 0, failures = 0;

  rclass_e init_cls = CLS_HOT;
  router_class_ctrl #(.NP(NP), .NVC(NVC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int m_cls, c1[NP], c2[NP];
  task automatic model_step();
    bit hot = 0, cold = 0;
    int n1[NP], n2[NP];
    for (int p = 0; p < NP; p++) begin
      n1[p] = c1[p] + $countones(idle_evt[p]);
      n2[p] = c2[p] + ineff_evt[p];
      if (n2[p] > 7) hot = 1;
      if (n1[p] > 31) cold = 1;
    end
    if (hot) begin if (m_cls < 2) m_cls++; end
    else if (cold) begin if (m_cls > 0) m_cls--; end
    for (int p = 0; p < NP; p++)
      if (n1[p] > 31 || n2[p] > 7) begin c1[p] = 0; c2[p] = 0; end
      else begin c1[p] = n1[p]; c2[p] = n2[p]; end
  endtask

  int n_cold = 0, n_hot = 0;
  task automatic step();
    @(posedge clk);
    model_step();
    #1;
    check("class", int'(cls), m_cls);
    n_cold += colder_evt; n_hot += hotter_evt;
    @(negedge clk);
    for (int p = 0; p < NP; p++) idle_evt[p] = '0;
    ineff_evt = '0;
  endtask

  task automatic idle_events(int port, int n);
    repeat (n) begin idle_evt[port] = 4'b0001; step(); end
  endtask
  task automatic ineff_events(int port, int n);
    repeat (n) begin ineff_evt[port] = 1'b1; step(); end
  endtask

  initial begin
    for (int p = 0; p < NP; p++) begin idle_evt[p] = '0; c1[p] = 0; c2[p] = 0; end
    m_cls = 2;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    step();
    check("initial class", int'(cls), int'(CLS_HOT));
    check("hot on threshold 16", 1 << on_sh, 16);
    check("hot off threshold 64", 1 << off_sh, 64);
    idle_events(0, 31);
    check("31 idle events keep hot", int'(cls), int'(CLS_HOT));
    idle_events(0, 1);
    check("32nd idle event: warm", int'(cls), int'(CLS_WARM));
    check("warm on threshold 8", 1 << on_sh, 8);
    check("warm off threshold 32", 1 << off_sh, 32);
    idle_events(2, 32);
    check("cold", int'(cls), int'(CLS_COLD));
    check("cold on threshold 4", 1 << on_sh, 4);
    check("cold off threshold 16", 1 << off_sh, 16);
    idle_events(2, 32);
    check("cold saturates", int'(cls), int'(CLS_COLD));
    ineff_events(1, 7);
    check("7 refused turn-ons keep cold", int'(cls), int'(CLS_COLD));
    ineff_events(1, 1);
    check("8th: warm", int'(cls), int'(CLS_WARM));
    ineff_events(3, 16);
    check("hot again", int'(cls), int'(CLS_HOT));
    for (int i = 0; i < 20000; i++) begin
      for (int p = 0; p < NP; p++) begin
        idle_evt[p]  = ($urandom_range(0, 3) == 0) ? NVC'($urandom) : '0;
        ineff_evt[p] = ($urandom_range(0, 25) == 0);
      end
      step();
    end
    check("colder happened", int'(n_cold > 0), 1);
    check("hotter happened", int'(n_hot > 0), 1);
    $display("colder %0d hotter %0d", n_cold, n_hot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
