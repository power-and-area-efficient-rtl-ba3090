// rr_arbiter: N-input round-robin arbiter, the building block of both
// allocators.
//
// The request with the highest priority wins, priority starting at index
// `ptr` and wrapping around. The grant is combinational. The pointer moves to
// one past the winner only in a cycle where `advance` is high, so the caller
// decides when a grant counts as used (the switch allocator advances its
// first-stage arbiters only when the second stage also grants). After reset
// index 0 has the highest priority.
//
// Interface: req[N] in, advance in, gnt[N] one-hot out, gnt_idx out, any out.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N-1:0]                req,
  input  logic                        advance,
  output logic [N-1:0]                gnt,
  output logic [$clog2(N+1)-1:0]      gnt_idx,
  output logic                        any
);
  localparam int unsigned IW = $clog2(N+1);

  logic [IW-1:0] ptr;

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    any     = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      int unsigned idx;
      idx = (int'(ptr) + i) % N;
      if (!any && req[idx]) begin
        any          = 1'b1;
        gnt[idx]     = 1'b1;
        gnt_idx      = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      ptr <= '0;
    else if (advance && any)
      ptr <= (gnt_idx == IW'(N - 1)) ? '0 : gnt_idx + 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
