// tb_binoc_mesh: a 2x2 mesh of BiNoC routers at their default size.
//
// Router r sits at (r % 2, r / 2). Horizontal neighbours are joined east to
// west and vertical neighbours north to south, each by one bidirectional
// channel with its direction-control FSM pair; the north and east ends own
// their channel after reset. Edge ports are left idle. Every local port has a
// traffic source (one packet per input VC in flight, credits tracked) that
// sends 16-flit packets to random routers, and a sink that checks the packet
// reached the right router with per-VC order and payload intact and returns
// credits with random stalls. Checks that all packets arrive, that no channel
// is ever driven from both ends or owned by both, that packets took two hops
// (through an intermediate router), and that every channel changed
// direction in both senses.
module tb_binoc_mesh;
  import noc_pkg::*;
  localparam int unsigned R  = 4;
  localparam int unsigned NV = V;
  localparam int unsigned CW = $clog2(NV*VC_DEPTH+1);
  localparam int unsigned N_PKT = 40;          // packets per source
  localparam int unsigned L = int'(PORT_LOCAL), NO = int'(PORT_NORTH),
                          EA = int'(PORT_EAST), SO = int'(PORT_SOUTH), WE = int'(PORT_WEST);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  flit_t r_in [R][P], r_out [R][P];
  logic [P-1:0] r_iv [R], r_ov [R], r_ci [R], r_co [R];
  logic [VC_W-1:0] r_civ [R][P], r_cov [R][P];
  logic [P-1:0] r_rqi [R], r_rli [R], r_rqo [R], r_rlo [R], r_own [R];
  logic cfg_we = 1'b0;
  logic [CW-1:0] cfg_depth [NV];
  logic [R-1:0] r_cd, r_ce;

  // local sources and sinks
  flit_t src_flit [R];
  logic [R-1:0] src_valid;
  logic [R-1:0] snk_cv;
  logic [VC_W-1:0] snk_cvc [R];
  int src_cred [R][NV];
  bit src_busy [R][NV];
  int src_id [R][NV], src_seq [R][NV], src_todo [R];
  int pkt_dst [int];
  int pkt_src [int];
  bit pkt_done [int];
  int next_id = 0, sent = 0, recv = 0, n_two_hop = 0;
  int snk_cnt [R][NV], snk_id [R][NV], snk_seq [R][NV];
  bit snk_open [R][NV];

  for (genvar r = 0; r < R; r++) begin : g_r
    binoc_router #(.X(COORD_W'(r % 2)), .Y(COORD_W'(r / 2))) u_r (
      .clk, .rst_n, .in_flit(r_in[r]), .in_valid(r_iv[r]), .out_flit(r_out[r]), .out_valid(r_ov[r]),
      .credit_in(r_ci[r]), .credit_in_vc(r_civ[r]), .credit_out(r_co[r]), .credit_out_vc(r_cov[r]),
      .cdc_req_in(r_rqi[r]), .cdc_rel_in(r_rli[r]), .cdc_req_out(r_rqo[r]), .cdc_rel_out(r_rlo[r]),
      .chan_owner(r_own[r]), .cfg_we, .cfg_depth, .cfg_done(r_cd[r]), .cfg_err(r_ce[r]));
  end

  // neighbour of router r through port p, or -1 at the mesh edge
  function automatic int nb(int r, int p);
    int x = r % 2, y = r / 2;
    case (p)
      EA: return (x == 0) ? r + 1 : -1;
      WE: return (x == 1) ? r - 1 : -1;
      NO: return (y == 0) ? r + 2 : -1;
      SO: return (y == 1) ? r - 2 : -1;
      default: return -1;
    endcase
  endfunction

  function automatic int opp(int p);
    case (p)
      EA: return WE;
      WE: return EA;
      NO: return SO;
      SO: return NO;
      default: return L;
    endcase
  endfunction

  always_comb begin
    for (int r = 0; r < R; r++)
      for (int p = 0; p < P; p++) begin
        automatic int n = nb(r, p);
        automatic int q = opp(p);
        if (p == L) begin
          r_in[r][p] = src_flit[r]; r_iv[r][p] = src_valid[r];
          r_ci[r][p] = snk_cv[r];   r_civ[r][p] = snk_cvc[r];
          r_rqi[r][p] = 1'b0;       r_rli[r][p] = 1'b0;
        end else if (n < 0) begin
          r_in[r][p] = '0; r_iv[r][p] = 1'b0; r_ci[r][p] = 1'b0; r_civ[r][p] = '0;
          r_rqi[r][p] = 1'b0; r_rli[r][p] = 1'b0;
        end else begin
          r_in[r][p]  = r_out[n][q];  r_iv[r][p]  = r_ov[n][q];
          r_ci[r][p]  = r_co[n][q];   r_civ[r][p] = r_cov[n][q];
          r_rqi[r][p] = r_rqo[n][q];  r_rli[r][p] = r_rlo[n][q];
        end
      end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("%0t: %s", $time, msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PAYLOAD_W-1:0] make_payload(int src, int id, int seq);
    logic [PAYLOAD_W-1:0] pl;
    logic [31:0] h;
    h = 32'(id) * 32'd668265263 ^ 32'(seq) * 32'd374761393 ^ 32'(src) * 32'd7;
    pl = {~h, h, h ^ 32'h1234_5678, h + 32'd99};
    pl[PAYLOAD_W-1 -: 3]  = 3'(src);
    pl[PAYLOAD_W-4 -: 16] = 16'(id);
    pl[PAYLOAD_W-20 -: 8] = 8'(seq);
    return pl;
  endfunction

  // hand-overs per channel end: [router][port]
  int n_rel [R][P];

  always @(negedge clk) if (rst_n) begin
    for (int r = 0; r < R; r++) begin
      // sink receive
      if (r_ov[r][L]) begin
        flit_t f;
        int v, id, seq, src;
        f = r_out[r][L];
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
          if ((pkt_src[id] ^ r) == 3) n_two_hop++;
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
      if (r_co[r][L]) src_cred[r][r_cov[r][L]]++;
      // source: start packets, send one flit
      src_valid[r] = 1'b0;
      if (src_todo[r] > 0)
        for (int v = 0; v < NV; v++)
          if (!src_busy[r][v] && $urandom % 3 == 0) begin
            pkt_dst[next_id] = $urandom % R;
            pkt_src[next_id] = r;
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
          g.dst_x = COORD_W'(pkt_dst[id] % 2);
          g.dst_y = COORD_W'(pkt_dst[id] / 2);
          g.payload = make_payload(r, id, seq);
          src_flit[r] = g; src_valid[r] = 1'b1;
          src_cred[r][v]--; src_seq[r][v]++;
          if (seq == PKT_LEN - 1) src_busy[r][v] = 0;
        end
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < R; r++)
      for (int p = 1; p < P; p++) begin
        automatic int n = nb(r, p);
        if (n >= 0) begin
          check(!(r_ov[r][p] && r_ov[n][opp(p)]), "both ends drive a channel");
          check(r_own[r][p] ^ r_own[n][opp(p)], "exactly one owner per channel");
          if (r_rlo[r][p]) n_rel[r][p]++;
        end
      end
  end

  initial begin
    foreach (cfg_depth[v]) cfg_depth[v] = CW'(VC_DEPTH);
    for (int r = 0; r < R; r++) begin
      src_flit[r] = '0; src_todo[r] = N_PKT; snk_cvc[r] = '0;
      for (int p = 0; p < P; p++) n_rel[r][p] = 0;
      for (int v = 0; v < NV; v++) begin
        src_cred[r][v] = VC_DEPTH; src_busy[r][v] = 0; snk_cnt[r][v] = 0; snk_open[r][v] = 0;
      end
    end
    src_valid = '0; snk_cv = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    while (!(recv == sent && sent == R * N_PKT)) @(posedge clk);
    repeat (20) @(posedge clk);
    check(recv == R * N_PKT, $sformatf("delivered %0d of %0d", recv, R * N_PKT));
    check(n_two_hop > 0, "no two-hop packet");
    for (int r = 0; r < R; r++)
      for (int p = 1; p < P; p++)
        if (nb(r, p) >= 0) begin
          $display("router %0d port %0d handed its channel over %0d times", r, p, n_rel[r][p]);
          check(n_rel[r][p] > 0, $sformatf("router %0d never released port %0d", r, p));
        end
    $display("two-hop packets %0d", n_two_hop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
