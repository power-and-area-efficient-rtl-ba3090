// tb_binoc_router: end-to-end test of the BiNoC router at its default size
// (5 ports, 4 VCs of 4 flits, 128-bit flits, 16-flit packets).
//
// The router sits at (1,1) of a 3x3 mesh. Every port has a traffic source
// that plays the neighbour: it keeps up to V packets in flight, one per input
// VC, tracks the router's credits, and on mesh ports only drives the channel
// while its own channel_dir_ctrl (the far end of the pair) owns it. Its flits
// reach the router through two register stages, as a neighbour router's SA
// and ST stages would delay them. Every output port has a sink that models
// the downstream VC buffers: it checks the XY output port, the per-VC packet
// order and every payload bit, checks credits are never overrun, and
// returns credits with random stalls.
//
// Phases: (1) one packet local->east through an idle router: the head must
// appear 4 cycles after it arrives and the 16 flits in 16 consecutive
// cycles; (2) random all-to-all traffic, during which a re-split request
// must be refused; (3) a runtime re-split of the VC
// buffers to 7/1/4/4 slots, then random traffic again. It counts how often
// each mechanism occurs (bypass, VA and SA conflicts, credit stalls, channel
// hand-overs both ways, hand-over forced by the hold cap, VC interleaving on
// a channel, source blocked by a full input VC) and fails if one never does.
module tb_binoc_router;
  import noc_pkg::*;
  localparam int unsigned NV = V;
  localparam int unsigned CW = $clog2(NV*VC_DEPTH+1);
  localparam int unsigned N_PKT_PHASE = 30;   // packets per source per phase
  localparam logic [P-1:0] ROUTER_OWNER = 5'b00110;

  logic clk = 0, rst_n = 0;
  flit_t in_flit [P], out_flit [P];
  logic [P-1:0] in_valid, out_valid;
  logic [P-1:0] credit_in, credit_out;
  logic [VC_W-1:0] credit_in_vc [P], credit_out_vc [P];
  logic [P-1:0] cdc_req_in, cdc_rel_in, cdc_req_out, cdc_rel_out, chan_owner;
  logic cfg_we, cfg_done, cfg_err;
  logic [CW-1:0] cfg_depth [NV];

  binoc_router dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("%0t cyc %0d: %s", $time, cyc, msg); end
  endtask

  // ---------------- packet contents ----------------
  function automatic logic [PAYLOAD_W-1:0] make_payload(int src, int id, int seq);
    logic [PAYLOAD_W-1:0] pl;
    logic [31:0] h;
    h = 32'(id) * 32'd2654435761 ^ 32'(seq) * 32'd40503 ^ 32'(src) * 32'd977;
    pl = {h, ~h, h ^ 32'h5a5a_a5a5, h + 32'd17};
    pl[PAYLOAD_W-1 -: 3]  = 3'(src);
    pl[PAYLOAD_W-4 -: 16] = 16'(id);
    pl[PAYLOAD_W-20 -: 8] = 8'(seq);
    return pl;
  endfunction

  function automatic port_e xy(int dx, int dy);
    if (dx > 1) return PORT_EAST;
    if (dx < 1) return PORT_WEST;
    if (dy > 1) return PORT_NORTH;
    if (dy < 1) return PORT_SOUTH;
    return PORT_LOCAL;
  endfunction

  int pkt_dx [int], pkt_dy [int];
  bit pkt_done [int];
  int next_id = 0;
  int sent_pkts = 0, recv_pkts = 0;

  // ---------------- sources ----------------
  int  src_cred [P][NV];
  int  src_size [NV];
  bit  src_busy [P][NV];        // VC carries a packet being sent
  int  src_id   [P][NV];
  int  src_seq  [P][NV];
  int  src_todo [P];            // packets still to start
  flit_t pipe1_flit [P];
  logic [P-1:0] pipe1_valid;
  logic [P-1:0] peer_req, peer_rel, peer_owner, peer_may, peer_local;

  for (genvar p = 1; p < P; p++) begin : g_peer
    channel_dir_ctrl #(.INIT_OWNER(!ROUTER_OWNER[p]), .HOLD_MAX(PKT_LEN)) u_peer (
      .clk, .rst_n,
      .local_req (peer_local[p]),
      .peer_req  (cdc_req_out[p]),
      .peer_rel  (cdc_rel_out[p]),
      .req_out   (peer_req[p]),
      .rel_out   (peer_rel[p]),
      .owner     (peer_owner[p]),
      .may_send  (peer_may[p])
    );
  end
  assign peer_may[0] = 1'b1;
  assign peer_req[0] = 1'b0;
  assign peer_rel[0] = 1'b0;
  assign peer_owner[0] = 1'b1;
  assign cdc_req_in = peer_req;
  assign cdc_rel_in = peer_rel;

  // ---------------- sinks ----------------
  int  snk_cnt  [P][NV];        // flits held in the modelled downstream VC
  int  snk_size [NV];
  bit  snk_open [P][NV];
  int  snk_id   [P][NV];
  int  snk_seq  [P][NV];
  int  snk_stall [P];
  int  last_vc [P];
  bit  snk_fast = 0;

  // ---------------- mechanism counters ----------------
  int n_bypass = 0, n_va_conf = 0, n_sa_conf = 0, n_credit_stall = 0;
  int n_rel_router = 0, n_rel_peer = 0, n_hold_cap = 0, n_interleave = 0;
  int n_src_blocked = 0, n_resize = 0;

  // latency probe
  longint t_head_in = -1, t_head_out = -1;
  int east_run = 0, east_best = 0;

  logic [P-1:0] gen_enable;

  always @(negedge clk) if (rst_n) begin
    // ---- sinks: receive ----
    for (int o = 0; o < P; o++) begin
      if (out_valid[o]) begin
        flit_t f;
        int v, id, seq, src;
        f = out_flit[o];
        v = int'(f.vc);
        src = int'(f.payload[PAYLOAD_W-1 -: 3]);
        id  = int'(f.payload[PAYLOAD_W-4 -: 16]);
        seq = int'(f.payload[PAYLOAD_W-20 -: 8]);
        snk_cnt[o][v]++;
        check(snk_cnt[o][v] <= snk_size[v], $sformatf("credit overrun port %0d vc %0d", o, v));
        check(pkt_dx.exists(id), $sformatf("unknown packet %0d", id));
        if (pkt_dx.exists(id)) begin
          check(xy(pkt_dx[id], pkt_dy[id]) == port_e'(o), $sformatf("pkt %0d left on wrong port %0d", id, o));
          check(f.dst_x == COORD_W'(pkt_dx[id]) && f.dst_y == COORD_W'(pkt_dy[id]), "destination field");
        end
        check(f.payload == make_payload(src, id, seq), $sformatf("payload pkt %0d seq %0d", id, seq));
        check(f.ftype == (seq == 0 ? FT_HEAD : seq == PKT_LEN - 1 ? FT_TAIL : FT_BODY), "flit type");
        if (seq == 0) begin
          check(!snk_open[o][v], "head while VC busy");
          snk_open[o][v] = 1; snk_id[o][v] = id; snk_seq[o][v] = 0;
        end else begin
          check(snk_open[o][v] && snk_id[o][v] == id && snk_seq[o][v] + 1 == seq,
                $sformatf("order port %0d vc %0d pkt %0d seq %0d", o, v, id, seq));
          snk_seq[o][v] = seq;
        end
        if (seq == PKT_LEN - 1) begin
          snk_open[o][v] = 0;
          check(!pkt_done[id], "packet delivered twice");
          pkt_done[id] = 1;
          recv_pkts++;
        end
        if (last_vc[o] >= 0 && last_vc[o] != v && snk_open[o][last_vc[o]]) n_interleave++;
        last_vc[o] = v;
        if (o == int'(PORT_EAST) && id == 0) begin
          if (seq == 0) t_head_out = cyc;
          east_run++;
          if (east_run > east_best) east_best = east_run;
        end
      end else if (o == int'(PORT_EAST)) east_run = 0;
      for (int v = 0; v < NV; v++)
        if (snk_cnt[o][v] == snk_size[v]) n_credit_stall++;
    end
    // ---- sinks: drain one flit per port and return its credit ----
    for (int o = 0; o < P; o++) begin
      credit_in[o] = 1'b0;
      if (snk_stall[o] > 0) snk_stall[o]--;
      else if (!snk_fast && $urandom % 40 == 0) snk_stall[o] = 5 + $urandom % 20;
      else begin
        automatic int v0 = $urandom % NV;
        for (int j = 0; j < NV; j++) begin
          automatic int v = (v0 + j) % NV;
          if (!credit_in[o] && snk_cnt[o][v] > 0 && (snk_fast || $urandom % 2 == 0)) begin
            credit_in[o] = 1'b1;
            credit_in_vc[o] = VC_W'(v);
            snk_cnt[o][v]--;
          end
        end
      end
    end
    // ---- sources: credits back from the router ----
    for (int p = 0; p < P; p++)
      if (credit_out[p]) src_cred[p][credit_out_vc[p]]++;
    // ---- sources: channel pipeline ----
    for (int p = 0; p < P; p++) begin
      in_flit[p]  = pipe1_flit[p];
      in_valid[p] = pipe1_valid[p];
      if (p == 0 && in_valid[p] && in_flit[p].ftype == FT_HEAD &&
          int'(in_flit[p].payload[PAYLOAD_W-4 -: 16]) == 0) t_head_in = cyc;
    end
    // ---- sources: start packets, pick a VC, send ----
    for (int p = 0; p < P; p++) begin
      automatic int cand [$];
      pipe1_valid[p] = 1'b0;
      if (gen_enable[p] && src_todo[p] > 0)
        for (int v = 0; v < NV; v++)
          if (!src_busy[p][v] && ($urandom % 4 == 0 || next_id == 0)) begin
            int dx, dy;
            if (next_id == 0) begin dx = 2; dy = 1; end
            else begin dx = $urandom % 3; dy = $urandom % 3; end
            pkt_dx[next_id] = dx; pkt_dy[next_id] = dy; pkt_done[next_id] = 0;
            src_busy[p][v] = 1; src_id[p][v] = next_id; src_seq[p][v] = 0;
            next_id++; sent_pkts++; src_todo[p]--;
            break;
          end
      for (int v = 0; v < NV; v++)
        if (src_busy[p][v]) begin
          if (src_cred[p][v] > 0) cand.push_back(v);
          else n_src_blocked++;
        end
      peer_local[p] = cand.size() > 0;
      if (cand.size() > 0 && peer_may[p]) begin
        int v, id, seq;
        flit_t f;
        v = cand[$urandom % cand.size()];
        id = src_id[p][v]; seq = src_seq[p][v];
        f.ftype = (seq == 0) ? FT_HEAD : (seq == PKT_LEN - 1) ? FT_TAIL : FT_BODY;
        f.vc = VC_W'(v);
        f.dst_x = COORD_W'(pkt_dx[id]);
        f.dst_y = COORD_W'(pkt_dy[id]);
        f.payload = make_payload(p, id, seq);
        pipe1_flit[p] = f;
        pipe1_valid[p] = 1'b1;
        src_cred[p][v]--;
        src_seq[p][v]++;
        if (seq == PKT_LEN - 1) src_busy[p][v] = 0;
      end
    end
  end

  // ---------------- mechanism probes ----------------
  always @(posedge clk) if (rst_n) begin
    n_bypass  += $countones(dut.bypass_hit);
    if (($countones(dut.va_req) > $countones(dut.va_gnt)) && dut.va_gnt != '0) n_va_conf++;
    if ((dut.sa_req & ~dut.sa_gnt) != '0 && dut.sa_gnt != '0) n_sa_conf++;
    for (int p = 1; p < P; p++) begin
      if (cdc_rel_out[p]) begin
        n_rel_router++;
        if (dut.local_req[p]) n_hold_cap++;
      end
      if (peer_rel[p]) begin
        n_rel_peer++;
        if (peer_local[p]) n_hold_cap++;
      end
      check(!(in_valid[p] && out_valid[p]), "both ends drive a channel");
      check(peer_owner[p] ^ chan_owner[p], "exactly one owner per channel");
    end
    if (cfg_done) n_resize++;
  end

  task automatic wait_quiet(int limit);
    int n = 0;
    while (n < limit) begin
      bit busy = 0;
      @(posedge clk);
      n++;
      for (int p = 0; p < P; p++) begin
        if (src_todo[p] > 0 || in_valid[p] || pipe1_valid[p] || out_valid[p]) busy = 1;
        for (int v = 0; v < NV; v++)
          if (src_busy[p][v] || snk_cnt[p][v] > 0 || src_cred[p][v] != src_size[v]) busy = 1;
      end
      if (!busy && sent_pkts == recv_pkts) begin
        repeat (10) @(posedge clk);
        return;
      end
    end
    check(0, "network did not drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    cfg_we = 0;
    foreach (cfg_depth[v]) cfg_depth[v] = CW'(VC_DEPTH);
    for (int p = 0; p < P; p++) begin
      in_flit[p] = '0; pipe1_flit[p] = '0; credit_in_vc[p] = '0;
      snk_stall[p] = 0; last_vc[p] = -1; src_todo[p] = 0;
      for (int v = 0; v < NV; v++) begin
        src_cred[p][v] = VC_DEPTH; src_busy[p][v] = 0;
        snk_cnt[p][v] = 0; snk_open[p][v] = 0;
      end
    end
    for (int v = 0; v < NV; v++) begin src_size[v] = VC_DEPTH; snk_size[v] = VC_DEPTH; end
    in_valid = '0; pipe1_valid = '0; credit_in = '0; peer_local = '0; gen_enable = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;

    // ---- phase 1: one packet local -> east, idle router ----
    snk_fast = 1;
    src_todo[0] = 1; gen_enable = 5'b00001;
    wait_quiet(500);
    check(t_head_out - t_head_in == 4, $sformatf("head latency %0d cycles (expected 4)", t_head_out - t_head_in));
    check(east_best == PKT_LEN, $sformatf("packet streamed in %0d-flit run (expected %0d)", east_best, PKT_LEN));

    // ---- phase 2: random traffic ----
    snk_fast = 0;
    for (int p = 0; p < P; p++) src_todo[p] = N_PKT_PHASE;
    gen_enable = '1;
    // a re-split requested while traffic flows must be refused
    repeat (200) @(posedge clk);
    @(negedge clk);
    cfg_depth[0] = 1; cfg_we = 1;
    @(negedge clk);
    cfg_we = 0; cfg_depth[0] = CW'(VC_DEPTH);
    #1;
    check(cfg_err && !cfg_done, "re-split refused while busy");
    wait_quiet(60000);

    // ---- phase 3: runtime VC re-split 7/1/4/4 and random traffic ----
    @(negedge clk);
    cfg_depth[0] = 7; cfg_depth[1] = 1; cfg_depth[2] = 4; cfg_depth[3] = 4;
    cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
    #1;
    check(cfg_done && !cfg_err, "runtime re-split accepted");
    for (int v = 0; v < NV; v++) begin
      src_size[v] = int'(cfg_depth[v]); snk_size[v] = int'(cfg_depth[v]);
      for (int p = 0; p < P; p++) src_cred[p][v] = int'(cfg_depth[v]);
    end
    for (int p = 0; p < P; p++) src_todo[p] = N_PKT_PHASE;
    wait_quiet(60000);

    check(sent_pkts == recv_pkts, $sformatf("delivered %0d of %0d packets", recv_pkts, sent_pkts));
    check(sent_pkts == 1 + 2 * P * N_PKT_PHASE, "all packets generated");
    $display("mechanisms: bypass=%0d va_conflict=%0d sa_conflict=%0d credit_stall=%0d",
             n_bypass, n_va_conf, n_sa_conf, n_credit_stall);
    $display("            handover_router=%0d handover_peer=%0d hold_cap=%0d interleave=%0d src_blocked=%0d resize=%0d",
             n_rel_router, n_rel_peer, n_hold_cap, n_interleave, n_src_blocked, n_resize);
    check(n_bypass > 0, "bypass never used");
    check(n_va_conf > 0, "no VC allocation conflict");
    check(n_sa_conf > 0, "no switch allocation conflict");
    check(n_credit_stall > 0, "no credit stall");
    check(n_rel_router > 0, "router never handed a channel over");
    check(n_rel_peer > 0, "neighbour never handed a channel over");
    check(n_hold_cap > 0, "hold cap never forced a hand-over");
    check(n_interleave > 0, "no VC interleaving on a channel");
    check(n_src_blocked > 0, "input VC never full");
    check(n_resize == 1, "runtime VC re-split not taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
