// tb_vc_buffer: self-checking test of the input buffer of one port.
// A reference model keeps one queue per VC. Random writes (only into VCs
// with room, as credit flow control guarantees) and random reads run for
// several thousand cycles; every cycle rd_valid and the front flit of each VC
// and the bypass strobe are compared with the model. The test also changes
// the VC split at runtime to 7/1/4/4 slots, fills VC 0 with 7 flits and the
// 1-slot VC with one, checks a split that does not fit is refused, and
// repeats the random traffic with the new split.
module tb_vc_buffer;
  import noc_pkg::*;
  localparam int unsigned NV = 4, DEPTH = 4;
  localparam int unsigned CW = $clog2(NV*DEPTH+1);
  logic clk = 0, rst_n = 0;
  logic cfg_we, cfg_done, cfg_err;
  logic [CW-1:0] cfg_depth [NV];
  logic wr_valid;
  flit_t wr_flit;
  logic [NV-1:0] rd_en, rd_valid;
  flit_t rd_flit [NV];
  logic [CW-1:0] count [NV], size [NV];
  logic empty, bypass_hit;
  int checks = 0, failures = 0, bypasses = 0;
  flit_t q [NV][$];
  int sz [NV];

  vc_buffer #(.NV(NV), .DEPTH(DEPTH)) dut (.*);

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

  function automatic flit_t rand_flit(int v);
    flit_t f;
    f = {$urandom, $urandom, $urandom, $urandom};
    f.vc = VC_W'(v);
    return f;
  endfunction

  // one cycle: optional write into VC wv (-1 none), read mask rmask
  task automatic cycle(int wv, logic [NV-1:0] rmask);
    flit_t f;
    logic [NV-1:0] exp_valid;
    bit exp_bypass;
    @(negedge clk);
    f = rand_flit(wv < 0 ? 0 : wv);
    wr_valid = (wv >= 0);
    wr_flit  = f;
    for (int v = 0; v < NV; v++)
      exp_valid[v] = (q[v].size() > 0) || (wv == v);
    rd_en = rmask & exp_valid;
    #1;
    exp_bypass = 0;
    for (int v = 0; v < NV; v++) begin
      check(rd_valid[v] == exp_valid[v], $sformatf("rd_valid[%0d]", v));
      if (exp_valid[v])
        check(rd_flit[v] == (q[v].size() > 0 ? q[v][0] : f), $sformatf("front of VC %0d", v));
      if (wv == v && q[v].size() == 0 && rd_en[v]) exp_bypass = 1;
    end
    check(bypass_hit == exp_bypass, "bypass strobe");
    if (exp_bypass) bypasses++;
    @(posedge clk);
    for (int v = 0; v < NV; v++) begin
      if (wv == v) q[v].push_back(f);
      if (rd_en[v]) void'(q[v].pop_front());
    end
  endtask

  task automatic random_traffic(int n);
    for (int k = 0; k < n; k++) begin
      int wv;
      logic [NV-1:0] rm;
      wv = $urandom % NV;
      // credit rule: the write needs room after this cycle's read
      if (($urandom % 4) == 0 || q[wv].size() >= sz[wv]) wv = -1;
      rm = '0;
      if ($urandom % 3 != 0) rm[$urandom % NV] = 1'b1;
      cycle(wv, rm);
      #1;
      for (int v = 0; v < NV; v++)
        check(int'(count[v]) == q[v].size(), $sformatf("count VC %0d", v));
    end
  endtask

  task automatic drain();
    for (int v = 0; v < NV; v++)
      while (q[v].size() > 0) cycle(-1, NV'(1) << v);
  endtask

  initial begin
    cfg_we = 0; wr_valid = 0; wr_flit = '0; rd_en = '0;
    for (int v = 0; v < NV; v++) begin cfg_depth[v] = CW'(DEPTH); sz[v] = DEPTH; end
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    #1;
    for (int v = 0; v < NV; v++) check(int'(size[v]) == DEPTH, "reset size");
    check(empty, "empty after reset");
    random_traffic(3000);
    drain();
    // runtime re-split: 7/1/4/4
    @(negedge clk);
    cfg_depth[0] = 7; cfg_depth[1] = 1; cfg_depth[2] = 4; cfg_depth[3] = 4;
    cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
    #1;
    check(cfg_done && !cfg_err, "split accepted");
    sz[0] = 7; sz[1] = 1; sz[2] = 4; sz[3] = 4;
    for (int v = 0; v < NV; v++) check(int'(size[v]) == sz[v], "new size");
    for (int k = 0; k < 7; k++) cycle(0, '0);
    cycle(1, '0);
    #1;
    check(count[0] == 7 && count[1] == 1, "VC0 holds 7 flits, VC1 holds 1");
    drain();
    // a split larger than the store is refused
    @(negedge clk);
    cfg_depth[0] = 8; cfg_depth[1] = 8; cfg_depth[2] = 1; cfg_depth[3] = 1;
    cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
    #1;
    check(cfg_err && !cfg_done, "oversized split refused");
    check(int'(size[0]) == 7, "old split kept");
    random_traffic(3000);
    check(bypasses > 50, $sformatf("bypass used (%0d)", bypasses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
