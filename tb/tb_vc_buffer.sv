// tb_vc_buffer: self-checking test of the power-gateable VC FIFO.
//
// Random writes and reads are compared with a queue model: head data,
// empty and full every cycle. Gating the supply empties the buffer, and a
// gated buffer accepts nothing. A flit written in one cycle is readable in
// the next.
`timescale 1ns/1ps
module tb_vc_buffer;
  localparam int unsigned W = 20, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic pwr_en = 1, wr = 0, rd = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic empty, full;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  vc_buffer #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  int n_full = 0, n_gate = 0;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check("empty after reset", W'(empty), 1);
    // one write, readable next cycle
    wr = 1; wdata = 20'hABCDE;
    @(negedge clk) wr = 0;
    check("not empty after write", W'(empty), 0);
    check("head data", rdata, 20'hABCDE);
    q.push_back(20'hABCDE);
    for (int i = 0; i < 40000; i++) begin
      if ($urandom_range(0, 500) == 0) begin
        // power-gate for a few cycles
        pwr_en = 0; wr = 0; rd = 0;
        repeat (3) @(negedge clk);
        q.delete();
        check("empty while gated", W'(empty), 1);
        pwr_en = 1;
        n_gate++;
        @(negedge clk);
      end
      wr = !full && $urandom_range(0, 1);
      rd = !empty && $urandom_range(0, 1);
      wdata = W'($urandom);
      @(posedge clk);
      if (rd) void'(q.pop_front());
      if (wr) q.push_back(wdata);
      @(negedge clk);
      wr = 0; rd = 0;
      check("empty", W'(empty), W'(q.size() == 0));
      check("full", W'(full), W'(q.size() == DEPTH));
      if (q.size() > 0) check("head", rdata, q[0]);
      n_full += full;
    end
    checks++;
    if (n_full == 0 || n_gate == 0) begin failures++; $display("FAIL never full/gated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
