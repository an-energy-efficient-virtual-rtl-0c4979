// tb_switch_allocator: self-checking test of the separable switch allocator.
//
// Random requests; every cycle the test checks that grants go to
// requesters, that each input port and each output port gets at most one
// grant, that some grant is given whenever anything is requested, and that
// a VC that keeps requesting is served within NIN*NVC cycles.
`timescale 1ns/1ps
module tb_switch_allocator;
  localparam int unsigned NIN = 5, NOUT = 5, NVC = 4, NI = NIN * NVC;
  logic clk = 0, rst_n = 0;
  logic [NI-1:0] req = '0, gnt;
  logic [2:0] req_port [NI];
  int checks = 0, failures = 0;

  switch_allocator #(.NIN(NIN), .NOUT(NOUT), .NVC(NVC)) dut (.*);
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

  int wait_cnt = 0, n_grants = 0;
  initial begin
    foreach (req_port[i]) req_port[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      bit persist = (it >= 10000);
      for (int i = 0; i < NI; i++) begin
        req[i] = ($urandom_range(0, 1) == 0);
        req_port[i] = 3'($urandom_range(0, NOUT - 1));
      end
      if (persist) begin req[13] = 1; req_port[13] = 3'd1; end
      #1;
      begin
        int per_in [NIN], per_out [NOUT];
        foreach (per_in[n]) per_in[n] = 0;
        foreach (per_out[o]) per_out[o] = 0;
        for (int i = 0; i < NI; i++)
          if (gnt[i]) begin
            check("grant to a requester", req[i]);
            per_in[i / NVC]++;
            per_out[req_port[i]]++;
            n_grants++;
          end
        foreach (per_in[n]) check("one grant per input port", per_in[n] <= 1);
        foreach (per_out[o]) check("one grant per output port", per_out[o] <= 1);
        if (req != 0) check("some grant", gnt != 0);
      end
      if (persist) begin
        if (gnt[13]) wait_cnt = 0; else wait_cnt++;
        check("no starvation", wait_cnt <= NI);
      end
      @(negedge clk);
    end
    $display("grants %0d", n_grants);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
