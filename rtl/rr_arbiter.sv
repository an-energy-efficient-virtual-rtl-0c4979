// rr_arbiter: round-robin arbiter used by the separable allocators.
//
// Grants one of N requests per cycle, one-hot. The search starts one
// position after the last granted index, so every requester is served within
// N grants. The priority pointer moves only when `advance` is high and a
// grant was given, so an allocator can keep the pointer still when a
// first-stage grant loses in its second stage. Grant is combinational from
// req; the pointer updates on the rising clock edge. Round-robin priority is
// this design's choice; the allocation policy itself is only named as
// "separable input first".
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;  // highest priority index

  always_comb begin
    int unsigned idx;
    gnt = '0;
    for (int unsigned i = 0; i < N; i++) begin
      idx = (32'(ptr) + i) % N;
      if (req[idx] && (gnt == '0)) gnt[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (advance && (gnt != '0)) begin
      for (int unsigned i = 0; i < N; i++)
        if (gnt[i]) ptr <= IW'((i + 1) % N);
    end
  end
endmodule
