// tb_vc_allocator: checks the separable VC allocator cycle by cycle against a
// reference model: stage 1 per input VC picks the first free VC of the
// requested output port from its own round-robin pointer (advanced when the
// input VC is granted), stage 2 per output VC picks one requester from its
// own pointer; output VCs stay busy until released. Random requests and
// releases for 3000 cycles; also checks that a lone request gets VC 0 of its
// port and that an output VC is never handed out twice.
module tb_vc_allocator;
  import noc_pkg::*;
  localparam int unsigned NP = P, NV = V, NI = NP * NV;
  logic clk = 0, rst_n = 0;
  logic [NI-1:0] req, gnt, release_vc, busy;
  logic [$clog2(NP)-1:0] req_port [NI];
  logic [$clog2(NV)-1:0] gnt_vc [NI];
  int checks = 0, failures = 0, conflicts = 0, grants = 0;
  int p1 [NI], p2 [NI];
  logic [NI-1:0] mbusy;

  vc_allocator #(.NP(NP), .NV(NV)) dut (.*);

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
    req = '0; release_vc = '0;
    foreach (req_port[i]) req_port[i] = '0;
    foreach (p1[i]) begin p1[i] = 0; p2[i] = 0; end
    mbusy = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // a lone request from input VC 7 for port 3 gets VC 0 of port 3
    req[7] = 1'b1; req_port[7] = 3'd3;
    #1;
    check(gnt == (NI'(1) << 7) && gnt_vc[7] == 0, "lone request gets VC 0");
    @(posedge clk); #1;
    check(busy == (NI'(1) << 12), "port 3 VC 0 busy");
    mbusy = busy; p1[7] = 1; p2[12] = 8;
    @(negedge clk); release_vc = NI'(1) << 12; req = '0;
    @(posedge clk); #1;
    check(busy == '0, "released");
    mbusy = '0;
    for (int k = 0; k < 3000; k++) begin
      int s1 [NI];
      logic [NI-1:0] exp_gnt;
      @(negedge clk);
      for (int i = 0; i < NI; i++) begin
        req[i] = ($urandom % 3) == 0;
        req_port[i] = ($clog2(NP))'($urandom % NP);
      end
      release_vc = NI'({$urandom, $urandom}) & mbusy & NI'({$urandom, $urandom});
      #1;
      check(busy == mbusy, "busy state");
      for (int i = 0; i < NI; i++) begin
        s1[i] = -1;
        if (req[i])
          for (int j = 0; j < NV; j++) begin
            automatic int v = (p1[i] + j) % NV;
            if (s1[i] < 0 && !mbusy[int'(req_port[i]) * NV + v]) s1[i] = v;
          end
      end
      exp_gnt = '0;
      for (int o = 0; o < NI; o++) begin
        automatic int n = 0, win = -1;
        for (int j = 0; j < NI; j++) begin
          automatic int i = (p2[o] + j) % NI;
          if (s1[i] >= 0 && int'(req_port[i]) * NV + s1[i] == o) begin
            n++;
            if (win < 0) win = i;
          end
        end
        if (n > 1) conflicts++;
        if (win >= 0) begin
          exp_gnt[win] = 1'b1;
          p2[o] = (win + 1) % NI;
          p1[win] = (s1[win] + 1) % NV;
          mbusy[o] = 1'b1;
          grants++;
        end
      end
      check(gnt == exp_gnt, $sformatf("gnt %h exp %h", gnt, exp_gnt));
      for (int i = 0; i < NI; i++)
        if (gnt[i]) check(int'(gnt_vc[i]) == s1[i], $sformatf("gnt_vc[%0d]", i));
      mbusy &= ~release_vc;
      @(posedge clk);
    end
    check(conflicts > 100 && grants > 500, "conflicts and grants exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
