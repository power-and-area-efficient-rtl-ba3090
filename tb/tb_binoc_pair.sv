// tb_binoc_pair: two BiNoC routers joined by one bidirectional channel.
//
// Router A sits at (0,0) and router B at (1,0); A's east port and B's west
// port form the channel, A being the end that owns it after reset. Each
// router's local port has a traffic source (one packet per input VC in
// flight, credit tracked) and a sink that checks per-VC packet order and
// every payload bit and returns credits with random stalls. Both sources
// send most packets across the channel, so its direction has to change
// back and forth under the real pipeline timing of both routers. Checks:
// every packet arrives intact and in order at the right router, the two ends
// never drive the channel in the same cycle, exactly one end owns it, and
// the channel changed direction in both senses.
module tb_binoc_pair;
  import noc_pkg::*;
  localparam int unsigned NV = V;
  localparam int unsigned CW = $clog2(NV*VC_DEPTH+1);
  localparam int unsigned N_PKT = 40;          // packets per source
  localparam int unsigned E = int'(PORT_EAST), W = int'(PORT_WEST), L = int'(PORT_LOCAL);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  flit_t a_in [P], a_out [P], b_in [P], b_out [P];
  logic [P-1:0] a_iv, a_ov, b_iv, b_ov;
  logic [P-1:0] a_ci, a_co, b_ci, b_co;
  logic [VC_W-1:0] a_civ [P], a_cov [P], b_civ [P], b_cov [P];
  logic [P-1:0] a_rqi, a_rli, a_rqo, a_rlo, a_own, b_rqi, b_rli, b_rqo, b_rlo, b_own;
  logic cfg_we = 1'b0;
  logic [CW-1:0] cfg_depth [NV];
  logic a_cd, a_ce, b_cd, b_ce;

  // ---- local sources (index 0 = A, 1 = B) ----
  flit_t src_flit [2];
  logic [1:0] src_valid;
  int src_cred [2][NV];
  bit src_busy [2][NV];
  int src_id [2][NV], src_seq [2][NV], src_todo [2];
  int pkt_dst [int];            // 0 = router A, 1 = router B
  bit pkt_done [int];
  int next_id = 0, sent = 0, recv = 0;

  // ---- local sinks ----
  logic [1:0] snk_cv;
  logic [VC_W-1:0] snk_cvc [2];
  int snk_cnt [2][NV], snk_id [2][NV], snk_seq [2][NV];
  bit snk_open [2][NV];


  binoc_router #(.X(4'd0), .Y(4'd0)) u_a (
    .clk, .rst_n, .in_flit(a_in), .in_valid(a_iv), .out_flit(a_out), .out_valid(a_ov),
    .credit_in(a_ci), .credit_in_vc(a_civ), .credit_out(a_co), .credit_out_vc(a_cov),
    .cdc_req_in(a_rqi), .cdc_rel_in(a_rli), .cdc_req_out(a_rqo), .cdc_rel_out(a_rlo),
    .chan_owner(a_own), .cfg_we, .cfg_depth, .cfg_done(a_cd), .cfg_err(a_ce));
  binoc_router #(.X(4'd1), .Y(4'd0)) u_b (
    .clk, .rst_n, .in_flit(b_in), .in_valid(b_iv), .out_flit(b_out), .out_valid(b_ov),
    .credit_in(b_ci), .credit_in_vc(b_civ), .credit_out(b_co), .credit_out_vc(b_cov),
    .cdc_req_in(b_rqi), .cdc_rel_in(b_rli), .cdc_req_out(b_rqo), .cdc_rel_out(b_rlo),
    .chan_owner(b_own), .cfg_we, .cfg_depth, .cfg_done(b_cd), .cfg_err(b_ce));

  // ---- the channel between A.east and B.west, everything else idle ----
  always_comb begin
    for (int p = 0; p < P; p++) begin
      if (p != L) begin a_in[p] = '0; a_iv[p] = 1'b0; b_in[p] = '0; b_iv[p] = 1'b0; end
      a_ci[p] = 1'b0; a_civ[p] = '0; b_ci[p] = 1'b0; b_civ[p] = '0;
      a_rqi[p] = 1'b0; a_rli[p] = 1'b0; b_rqi[p] = 1'b0; b_rli[p] = 1'b0;
    end
    a_in[E] = b_out[W]; a_iv[E] = b_ov[W];
    b_in[W] = a_out[E]; b_iv[W] = a_ov[E];
    a_ci[E] = b_co[W];  a_civ[E] = b_cov[W];
    b_ci[W] = a_co[E];  b_civ[W] = a_cov[E];
    a_rqi[E] = b_rqo[W]; a_rli[E] = b_rlo[W];
    b_rqi[W] = a_rqo[E]; b_rli[W] = a_rlo[E];
    a_in[L] = src_flit[0]; a_iv[L] = src_valid[0];
    b_in[L] = src_flit[1]; b_iv[L] = src_valid[1];
    a_ci[L] = snk_cv[0]; a_civ[L] = snk_cvc[0];
    b_ci[L] = snk_cv[1]; b_civ[L] = snk_cvc[1];
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("%0t: %s", $time, msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PAYLOAD_W-1:0] make_payload(int src, int id, int seq);
    logic [PAYLOAD_W-1:0] pl;
    logic [31:0] h;
    h = 32'(id) * 32'd2246822519 ^ 32'(seq) * 32'd3266489917 ^ 32'(src);
    pl = {h, h ^ 32'hdead_beef, ~h, h - 32'd3};
    pl[PAYLOAD_W-1 -: 3]  = 3'(src);
    pl[PAYLOAD_W-4 -: 16] = 16'(id);
    pl[PAYLOAD_W-20 -: 8] = 8'(seq);
    return pl;
  endfunction

  int n_a_rel = 0, n_b_rel = 0, n_cross = 0;

  always @(negedge clk) if (rst_n) begin
    for (int r = 0; r < 2; r++) begin
      flit_t f;
      logic ov;
      f  = (r == 0) ? a_out[L] : b_out[L];
      ov = (r == 0) ? a_ov[L] : b_ov[L];
      // sink receive
      if (ov) begin
        int v, id, seq, src;
        v = int'(f.vc);
        src = int'(f.payload[PAYLOAD_W-1 -: 3]);
        id  = int'(f.payload[PAYLOAD_W-4 -: 16]);
        seq = int'(f.payload[PAYLOAD_W-20 -: 8]);
        snk_cnt[r][v]++;
        check(snk_cnt[r][v] <= VC_DEPTH, "credit overrun at a sink");
        check(pkt_dst.exists(id) && pkt_dst[id] == r, $sformatf("packet %0d at wrong router %0d", id, r));
        check(f.payload == make_payload(src, id, seq), $sformatf("payload pkt %0d seq %0d", id, seq));
        if (seq == 0) begin
          check(!snk_open[r][v], "head while VC open");
          snk_open[r][v] = 1; snk_id[r][v] = id; snk_seq[r][v] = 0;
        end else begin
          check(snk_open[r][v] && snk_id[r][v] == id && snk_seq[r][v] + 1 == seq, "flit order");
          snk_seq[r][v] = seq;
        end
        if (seq == PKT_LEN - 1) begin
          snk_open[r][v] = 0;
          check(!pkt_done[id], "duplicate packet");
          pkt_done[id] = 1; recv++;
          if (src != r) n_cross++;
        end
      end
      // sink drain
      snk_cv[r] = 1'b0;
      if ($urandom % 3 != 0)
        for (int v = 0; v < NV; v++)
          if (!snk_cv[r] && snk_cnt[r][v] > 0) begin
            snk_cv[r] = 1'b1; snk_cvc[r] = VC_W'(v); snk_cnt[r][v]--;
          end
      // source credits
      if ((r == 0) ? a_co[L] : b_co[L]) src_cred[r][(r == 0) ? a_cov[L] : b_cov[L]]++;
      // source: start packets, send one flit
      src_valid[r] = 1'b0;
      if (src_todo[r] > 0)
        for (int v = 0; v < NV; v++)
          if (!src_busy[r][v] && $urandom % 3 == 0) begin
            pkt_dst[next_id] = ($urandom % 5 == 0) ? r : 1 - r;
            pkt_done[next_id] = 0;
            src_busy[r][v] = 1; src_id[r][v] = next_id; src_seq[r][v] = 0;
            next_id++; sent++; src_todo[r]--;
            break;
          end
      begin
        automatic int cand [$];
        for (int v = 0; v < NV; v++)
          if (src_busy[r][v] && src_cred[r][v] > 0) cand.push_back(v);
        if (cand.size() > 0) begin
          int v, id, seq;
          flit_t g;
          v = cand[$urandom % cand.size()];
          id = src_id[r][v]; seq = src_seq[r][v];
          g.ftype = (seq == 0) ? FT_HEAD : (seq == PKT_LEN - 1) ? FT_TAIL : FT_BODY;
          g.vc = VC_W'(v);
          g.dst_x = COORD_W'(pkt_dst[id]);
          g.dst_y = '0;
          g.payload = make_payload(r, id, seq);
          src_flit[r] = g; src_valid[r] = 1'b1;
          src_cred[r][v]--; src_seq[r][v]++;
          if (seq == PKT_LEN - 1) src_busy[r][v] = 0;
        end
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    check(!(a_ov[E] && b_ov[W]), "both routers drive the channel");
    check(a_own[E] ^ b_own[W], "exactly one channel owner");
    if (a_rlo[E]) n_a_rel++;
    if (b_rlo[W]) n_b_rel++;
  end

  initial begin
    foreach (cfg_depth[v]) cfg_depth[v] = CW'(VC_DEPTH);
    for (int r = 0; r < 2; r++) begin
      src_flit[r] = '0; src_todo[r] = N_PKT; snk_cvc[r] = '0;
      for (int v = 0; v < NV; v++) begin
        src_cred[r][v] = VC_DEPTH; src_busy[r][v] = 0; snk_cnt[r][v] = 0; snk_open[r][v] = 0;
      end
    end
    src_valid = '0; snk_cv = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    while (!(src_todo[0] == 0 && src_todo[1] == 0 && recv == sent)) @(posedge clk);
    repeat (20) @(posedge clk);
    check(recv == 2 * N_PKT, $sformatf("delivered %0d of %0d", recv, 2 * N_PKT));
    $display("hand-overs A->B %0d, B->A %0d, packets across the channel %0d", n_a_rel, n_b_rel, n_cross);
    check(n_a_rel > 0 && n_b_rel > 0, "channel direction changed both ways");
    check(n_cross > N_PKT, "traffic crossed the channel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
