// tb_rr_arbiter: self-checking test of the round-robin arbiter.
// Drives random request vectors and random advance strobes for 2000 cycles
// and compares the grant with a reference that keeps its own priority
// pointer. Also checks that a full request vector is served in rotation.
module tb_rr_arbiter;
  localparam int unsigned N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic [$clog2(N+1)-1:0] gnt_idx;
  logic advance, any;
  int checks = 0, failures = 0;
  int ref_ptr;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_grant(logic [N-1:0] r, int p);
    for (int i = 0; i < N; i++)
      if (r[(p + i) % N]) return (p + i) % N;
    return -1;
  endfunction

  initial begin
    req = '0; advance = 0; ref_ptr = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // rotation with all requesting
    for (int k = 0; k < 2 * N; k++) begin
      req = '1; advance = 1;
      #1;
      checks++;
      if (gnt_idx != ($clog2(N+1))'(k % N) || gnt != (N'(1) << (k % N))) begin
        failures++; $display("rotation: k=%0d gnt=%b", k, gnt);
      end
      @(posedge clk); #1;
    end
    ref_ptr = 0;
    for (int k = 0; k < 2000; k++) begin
      int e;
      req = N'($urandom); advance = $urandom % 2;
      #1;
      e = ref_grant(req, ref_ptr);
      checks++;
      if (e < 0) begin
        if (any || gnt != '0) begin failures++; $display("spurious grant %b", gnt); end
      end else if (!any || gnt != (N'(1) << e) || int'(gnt_idx) != e) begin
        failures++; $display("req=%b ptr=%0d exp=%0d got=%b", req, ref_ptr, e, gnt);
      end
      @(posedge clk); #1;
      if (advance && e >= 0) ref_ptr = (e + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
