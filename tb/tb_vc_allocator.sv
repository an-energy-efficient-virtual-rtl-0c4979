// tb_vc_allocator: self-checking test of the separable VC allocator.
//
// Random requests and free-VC masks. Every cycle the test checks that each
// grant goes to a requester, names a VC that is free at the requested
// output port, that no output VC is granted twice, that an output port
// with a free VC and a requester grants at least one, and that the
// per-port request and win counts match the requests and grants. A VC
// that keeps requesting a port with a free VC must win within NIN*NVC
// cycles.
`timescale 1ns/1ps
module tb_vc_allocator;
  localparam int unsigned NIN = 5, NOUT = 5, NVC = 4, RCW = 5, NI = NIN * NVC;
  logic clk = 0, rst_n = 0;
  logic [NI-1:0] req = '0, gnt;
  logic [2:0] req_port [NI];
  logic [NVC-1:0] out_free [NOUT];
  logic [$clog2(NVC)-1:0] gnt_vc [NI];
  logic [RCW-1:0] req_cnt [NOUT], win_cnt [NOUT];
  int checks = 0, failures = 0;

  vc_allocator #(.NIN(NIN), .NOUT(NOUT), .NVC(NVC), .RCW(RCW)) dut (.*);
  always #5 clk = ~clk;

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

  int wait_cnt = 0, n_grants = 0, n_contended = 0;
  initial begin
    foreach (req_port[i]) req_port[i] = '0;
    foreach (out_free[o]) out_free[o] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      bit persist = (it >= 10000);
      for (int i = 0; i < NI; i++) begin
        if (persist && i == 7) begin req[i] = 1; req_port[i] = 3'd2; end
        else begin
          req[i] = ($urandom_range(0, 2) == 0);
          req_port[i] = 3'($urandom_range(0, NOUT - 1));
        end
      end
      for (int o = 0; o < NOUT; o++) out_free[o] = NVC'($urandom);
      if (persist) out_free[2] = out_free[2] | 4'b0001;
      #1;
      begin
        int used [NOUT][NVC];
        int rc [NOUT], wc [NOUT];
        foreach (used[o, v]) used[o][v] = 0;
        foreach (rc[o]) begin rc[o] = 0; wc[o] = 0; end
        for (int i = 0; i < NI; i++) begin
          if (req[i]) rc[req_port[i]]++;
          if (gnt[i]) begin
            check("grant to a requester", req[i]);
            check("granted VC is free", out_free[req_port[i]][gnt_vc[i]]);
            used[req_port[i]][gnt_vc[i]]++;
            wc[req_port[i]]++;
            n_grants++;
          end
        end
        for (int o = 0; o < NOUT; o++) begin
          for (int v = 0; v < NVC; v++) check("output VC granted once", used[o][v] <= 1);
          check("req count", int'(req_cnt[o]) == rc[o]);
          check("win count", int'(win_cnt[o]) == wc[o]);
          if (rc[o] > 0 && out_free[o] != 0) check("port with free VC grants", wc[o] > 0);
          if (rc[o] > wc[o]) n_contended++;
        end
      end
      if (persist) begin
        if (gnt[7]) wait_cnt = 0; else wait_cnt++;
        check("no starvation", wait_cnt <= NI);
      end
      @(negedge clk);
    end
    check("losses seen", n_contended > 0);
    $display("grants %0d contended %0d", n_grants, n_contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
