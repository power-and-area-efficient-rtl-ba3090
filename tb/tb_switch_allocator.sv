// tb_switch_allocator: checks the separable switch allocator cycle by cycle
// against a reference model with its own round-robin pointers (V-input per
// input port, advanced only on a second-stage win; P-input per output port).
// Random requests for 3000 cycles, plus the structural rules: at most one
// grant per input port and per output port, grants only to requesters.
module tb_switch_allocator;
  import noc_pkg::*;
  localparam int unsigned NP = P, NV = V, NI = NP * NV;
  logic clk = 0, rst_n = 0;
  logic [NI-1:0] req, gnt;
  logic [$clog2(NP)-1:0] req_port [NI];
  logic [$clog2(NP)-1:0] out_sel [NP];
  logic [NP-1:0] out_valid;
  int checks = 0, failures = 0, conflicts = 0;
  int p1 [NP], p2 [NP];

  switch_allocator #(.NP(NP), .NV(NV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("%0t: %s", $time, msg); end
  endtask

  initial begin
    req = '0;
    foreach (req_port[i]) req_port[i] = '0;
    foreach (p1[i]) begin p1[i] = 0; p2[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      int w [NP];
      int wport [NP];
      int win [NP];
      logic [NI-1:0] exp_gnt;
      @(negedge clk);
      for (int i = 0; i < NI; i++) begin
        req[i] = ($urandom % 3) == 0;
        req_port[i] = ($clog2(NP))'($urandom % NP);
      end
      #1;
      // reference stage 1
      for (int p = 0; p < NP; p++) begin
        w[p] = -1;
        for (int j = 0; j < NV; j++) begin
          automatic int v = (p1[p] + j) % NV;
          if (w[p] < 0 && req[p*NV + v]) w[p] = v;
        end
        wport[p] = (w[p] >= 0) ? int'(req_port[p*NV + w[p]]) : -1;
      end
      // reference stage 2
      exp_gnt = '0;
      for (int o = 0; o < NP; o++) begin
        automatic int n = 0;
        win[o] = -1;
        for (int j = 0; j < NP; j++) begin
          automatic int p = (p2[o] + j) % NP;
          if (wport[p] == o) begin
            n++;
            if (win[o] < 0) win[o] = p;
          end
        end
        if (n > 1) conflicts++;
        check(out_valid[o] == (win[o] >= 0), $sformatf("out_valid[%0d]", o));
        if (win[o] >= 0) begin
          check(int'(out_sel[o]) == win[o], $sformatf("out_sel[%0d]", o));
          exp_gnt[win[o]*NV + w[win[o]]] = 1'b1;
        end
      end
      check(gnt == exp_gnt, $sformatf("gnt %h exp %h", gnt, exp_gnt));
      check((gnt & ~req) == '0, "grant without request");
      for (int p = 0; p < NP; p++) check($countones(gnt[p*NV +: NV]) <= 1, "one grant per input port");
      // reference pointer update
      for (int o = 0; o < NP; o++)
        if (win[o] >= 0) begin
          p2[o] = (win[o] + 1) % NP;
          p1[win[o]] = (w[win[o]] + 1) % NV;
        end
    end
    check(conflicts > 100, "output conflicts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
