// tb_channel_dir_ctrl: two channel-direction-control FSMs wired back to back,
// as at the two ends of one bidirectional channel. Checks for 4000 cycles of
// random send demand that exactly one end owns the channel, that may_send is
// never high at both ends, that a release is followed by the other end
// owning the channel in the next cycle, that an idle owner hands over at
// once when asked, and that under constant demand from both ends ownership
// alternates with the hold cap (no end waits more than HOLD_MAX+2 cycles).
module tb_channel_dir_ctrl;
  localparam int unsigned HOLD = 6;
  logic clk = 0, rst_n = 0;
  logic req_a, req_b;               // local demand
  logic rq_ab, rq_ba, rl_ab, rl_ba; // a->b and b->a signals
  logic own_a, own_b, ms_a, ms_b;
  int checks = 0, failures = 0;
  int wait_a, wait_b, handovers;
  logic rel_a_q, rel_b_q;

  channel_dir_ctrl #(.INIT_OWNER(1'b1), .HOLD_MAX(HOLD)) u_a (
    .clk, .rst_n, .local_req(req_a), .peer_req(rq_ba), .peer_rel(rl_ba),
    .req_out(rq_ab), .rel_out(rl_ab), .owner(own_a), .may_send(ms_a));
  channel_dir_ctrl #(.INIT_OWNER(1'b0), .HOLD_MAX(HOLD)) u_b (
    .clk, .rst_n, .local_req(req_b), .peer_req(rq_ab), .peer_rel(rl_ab),
    .req_out(rq_ba), .rel_out(rl_ba), .owner(own_b), .may_send(ms_b));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("%0t: %s", $time, msg); end
  endtask

  initial begin
    req_a = 0; req_b = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    #1;
    check(own_a && !own_b, "reset owner");
    // idle owner a, b asks: hand over within 3 cycles
    req_b = 1;
    @(posedge clk); #1;           // b raises request
    check(rq_ba, "b requests");
    check(rl_ab && !ms_a, "idle a releases at once");
    @(posedge clk); #1;
    check(own_b && !own_a, "b owns after release");
    check(!rq_ba, "request dropped once owner");
    // a asks while b keeps sending: b holds HOLD cycles then releases
    req_a = 1;
    begin
      int n = 0;
      while (!own_a && n < 3 * HOLD) begin @(posedge clk); #1; n++; end
      check(own_a, "a gets the channel back under the hold cap");
      check(n <= HOLD + 2, $sformatf("hold cap respected (%0d cycles)", n));
    end
    // random phase
    wait_a = 0; wait_b = 0; handovers = 0;
    for (int k = 0; k < 4000; k++) begin
      req_a = ($urandom % 4) != 0;
      req_b = ($urandom % 3) != 0;
      #1;
      rel_a_q = rl_ab; rel_b_q = rl_ba;
      @(posedge clk); #1;
      check(own_a ^ own_b, "exactly one owner");
      check(!(ms_a && ms_b), "never both sending");
      if (rel_a_q) begin check(own_b, "a released -> b owns"); handovers++; end
      if (rel_b_q) begin check(own_a, "b released -> a owns"); handovers++; end
      wait_a = (req_a && !own_a) ? wait_a + 1 : 0;
      wait_b = (req_b && !own_b) ? wait_b + 1 : 0;
      check(wait_a <= HOLD + 3 && wait_b <= HOLD + 3, "bounded wait");
    end
    check(handovers > 100, $sformatf("handovers happened (%0d)", handovers));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
