// binoc_router: four-stage virtual-channel router for a bidirectional-channel
// network-on-chip (BiNoC), with runtime-sized VC buffers.
//
// Five ports (local, north, east, south, west), NV virtual channels per input
// port, each VC with its own region of the port's flit buffer. A packet moves
// through four pipeline stages, all of whose decisions are registered:
//   RC  the head flit at the front of its VC is routed (XY) - also the cycle
//       in which it is written into the buffer (BW)
//   VA  the VC allocator gives the packet a VC of its output port
//   SA  the switch allocator gives one flit per input port and per output
//       port the crossbar; the flit leaves its buffer and a credit goes back
//   ST  the flit crosses the crossbar into the output register, which drives
//       the channel (link traversal) in the next cycle
// Body and tail flits skip RC and VA and inherit the head's output VC; the
// tail frees the output VC when it wins SA. A flit arriving at an empty VC
// whose packet already holds an output VC is visible to SA in its arrival
// cycle (buffer bypass). Timing: a head flit seen on in_* in cycle t appears
// on out_* in cycle t+4 when nothing blocks it; body flits in cycle t+2.
//
// Flow control is credit based, one credit per flit slot of each downstream
// VC. Credits come back on credit_in/credit_in_vc and leave on
// credit_out/credit_out_vc one cycle after a flit leaves an input buffer.
//
// Mesh ports (1..4) carry bidirectional channels. Per channel a
// channel_dir_ctrl FSM, paired with the one in the neighbour, decides which
// end may send; the switch allocator only grants an output whose channel
// this router currently owns. The two directions of a channel's data wires
// appear here as separate in_*/out_* ports; an assertion checks that they
// are never both valid. The local port is an ordinary pair of channels.
//
// cfg_we with cfg_depth sets the flit slots of every VC (the same split at
// all input ports) while the router is idle; the output credit counters are
// reloaded with the same sizes, so the whole network must be given the same
// split while it is quiescent. cfg_done/cfg_err report the outcome one cycle
// later; cfg_err also flags a request made while the router was busy.
//
// The pipeline, allocators, bypass, runtime VC sizing and channel direction
// control follow the described design. XY routing, the flit format, the
// credit interface, the hand-over protocol details and the representation of
// a bidirectional channel as two one-way buses are this design's choices.
module binoc_router
  import noc_pkg::*;
#(
  parameter logic [COORD_W-1:0] X          = 4'd1,
  parameter logic [COORD_W-1:0] Y          = 4'd1,
  parameter int unsigned        NV         = V,
  parameter int unsigned        DEPTH      = VC_DEPTH,
  parameter int unsigned        HOLD_MAX   = PKT_LEN,
  // which mesh ports own their channel after reset (north and east)
  parameter logic [P-1:0]       BIDIR_OWNER = 5'b00110
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // flit channels
  input  flit_t                    in_flit       [P],
  input  logic [P-1:0]             in_valid,
  output flit_t                    out_flit      [P],
  output logic [P-1:0]             out_valid,
  // credits
  input  logic [P-1:0]             credit_in,
  input  logic [$clog2(NV)-1:0]    credit_in_vc  [P],
  output logic [P-1:0]             credit_out,
  output logic [$clog2(NV)-1:0]    credit_out_vc [P],
  // channel direction control, paired with the neighbour's (port 0 unused)
  input  logic [P-1:0]             cdc_req_in,
  input  logic [P-1:0]             cdc_rel_in,
  output logic [P-1:0]             cdc_req_out,
  output logic [P-1:0]             cdc_rel_out,
  output logic [P-1:0]             chan_owner,
  // runtime VC sizing
  input  logic                     cfg_we,
  input  logic [$clog2(NV*DEPTH+1)-1:0] cfg_depth [NV],
  output logic                     cfg_done,
  output logic                     cfg_err
);
  localparam int unsigned NI = P * NV;
  localparam int unsigned VW = $clog2(NV);
  localparam int unsigned PW = $clog2(P);
  localparam int unsigned CW = $clog2(NV * DEPTH + 1);

  typedef enum logic [1:0] {VS_IDLE, VS_VA, VS_ACTIVE} vc_state_e;

  // ---------------- input buffers ----------------
  logic [NV-1:0] rd_en    [P];
  logic [NV-1:0] rd_valid [P];
  flit_t         rd_flit  [P][NV];
  logic [CW-1:0] buf_size [P][NV];
  logic [CW-1:0] buf_cnt  [P][NV];
  logic [P-1:0]  buf_empty, buf_cfg_done, buf_cfg_err, bypass_hit;

  // ---------------- per input VC state ----------------
  vc_state_e     vstate [NI];
  logic [PW-1:0] vroute [NI];
  logic [VW-1:0] voutvc [NI];
  port_e         rc_port [NI];

  // ---------------- allocators ----------------
  logic [NI-1:0] va_req, va_gnt, sa_req, sa_gnt, vc_release, vc_busy;
  logic [VW-1:0] va_gnt_vc [NI];
  logic [PW-1:0] sa_out_sel [P];
  logic [P-1:0]  sa_out_valid;

  // ---------------- switch traversal ----------------
  flit_t         st_flit  [P];
  logic [PW-1:0] st_sel   [P];
  logic [P-1:0]  st_valid;
  flit_t         xb_flit  [P];
  logic [P-1:0]  xb_valid;

  // ---------------- credits and channels ----------------
  logic [CW-1:0] cred [P][NV];
  logic [P-1:0]  may_send, local_req;

  logic all_idle, cfg_go;

  for (genvar p = 0; p < P; p++) begin : g_in
    vc_buffer #(.NV(NV), .DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .cfg_we     (cfg_go),
      .cfg_depth  (cfg_depth),
      .cfg_done   (buf_cfg_done[p]),
      .cfg_err    (buf_cfg_err[p]),
      .wr_valid   (in_valid[p]),
      .wr_flit    (in_flit[p]),
      .rd_en      (rd_en[p]),
      .rd_valid   (rd_valid[p]),
      .rd_flit    (rd_flit[p]),
      .count      (buf_cnt[p]),
      .size       (buf_size[p]),
      .empty      (buf_empty[p]),
      .bypass_hit (bypass_hit[p])
    );
    assign rd_en[p] = sa_gnt[p*NV +: NV];

    for (genvar v = 0; v < NV; v++) begin : g_vc
      localparam int unsigned I = p * NV + v;
      route_compute u_rc (
        .cur_x    (X),
        .cur_y    (Y),
        .dst_x    (rd_flit[p][v].dst_x),
        .dst_y    (rd_flit[p][v].dst_y),
        .out_port (rc_port[I])
      );
    end
  end

  // ---------------- RC / VA / SA requests ----------------
  always_comb begin
    for (int unsigned i = 0; i < NI; i++) begin
      int unsigned p, v;
      p = i / NV;
      v = i % NV;
      va_req[i] = (vstate[i] == VS_VA);
      sa_req[i] = (vstate[i] == VS_ACTIVE) && rd_valid[p][v]
               && (cred[vroute[i]][voutvc[i]] != '0)
               && may_send[vroute[i]];
    end
  end

  vc_allocator #(.NP(P), .NV(NV)) u_va (
    .clk, .rst_n,
    .req        (va_req),
    .req_port   (vroute),
    .gnt        (va_gnt),
    .gnt_vc     (va_gnt_vc),
    .release_vc (vc_release),
    .busy       (vc_busy)
  );

  switch_allocator #(.NP(P), .NV(NV)) u_sa (
    .clk, .rst_n,
    .req       (sa_req),
    .req_port  (vroute),
    .gnt       (sa_gnt),
    .out_sel   (sa_out_sel),
    .out_valid (sa_out_valid)
  );

  // output VCs freed by departing tail flits
  always_comb begin
    vc_release = '0;
    for (int unsigned i = 0; i < NI; i++)
      if (sa_gnt[i] && is_tail(rd_flit[i / NV][i % NV].ftype))
        vc_release[int'(vroute[i]) * NV + int'(voutvc[i])] = 1'b1;
  end

  // per input VC state machine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NI; i++) begin
        vstate[i] <= VS_IDLE;
        vroute[i] <= '0;
        voutvc[i] <= '0;
      end
    end else begin
      for (int unsigned i = 0; i < NI; i++) begin
        unique case (vstate[i])
          VS_IDLE:
            if (rd_valid[i / NV][i % NV] && is_head(rd_flit[i / NV][i % NV].ftype)) begin
              vroute[i] <= PW'(rc_port[i]);
              vstate[i] <= VS_VA;
            end
          VS_VA:
            if (va_gnt[i]) begin
              voutvc[i] <= va_gnt_vc[i];
              vstate[i] <= VS_ACTIVE;
            end
          VS_ACTIVE:
            if (sa_gnt[i] && is_tail(rd_flit[i / NV][i % NV].ftype))
              vstate[i] <= VS_IDLE;
          default: vstate[i] <= VS_IDLE;
        endcase
      end
    end
  end

  // ---------------- SA -> ST register, credits out ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned p = 0; p < P; p++) begin
        st_flit[p]       <= '0;
        st_sel[p]        <= '0;
        credit_out_vc[p] <= '0;
      end
      st_valid   <= '0;
      credit_out <= '0;
    end else begin
      st_valid <= sa_out_valid;
      for (int unsigned o = 0; o < P; o++)
        st_sel[o] <= sa_out_sel[o];
      credit_out <= '0;
      for (int unsigned p = 0; p < P; p++) begin
        for (int unsigned v = 0; v < NV; v++) begin
          if (sa_gnt[p*NV + v]) begin
            st_flit[p]       <= rd_flit[p][v];
            st_flit[p].vc    <= VW'(voutvc[p*NV + v]);
            credit_out[p]    <= 1'b1;
            credit_out_vc[p] <= VW'(v);
          end
        end
      end
    end
  end

  // ---------------- ST: crossbar and output registers ----------------
  crossbar #(.NP(P)) u_xbar (
    .in_flit   (st_flit),
    .sel       (st_sel),
    .sel_valid (st_valid),
    .out_flit  (xb_flit),
    .out_valid (xb_valid)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned o = 0; o < P; o++) out_flit[o] <= '0;
      out_valid <= '0;
    end else begin
      for (int unsigned o = 0; o < P; o++) out_flit[o] <= xb_flit[o];
      out_valid <= xb_valid;
    end
  end

  // ---------------- output credit counters ----------------
  logic [NV-1:0] cred_use  [P];   // a flit took a credit of (o, v)
  logic [NV-1:0] cred_back [P];   // a credit of (o, v) came back

  always_comb begin
    for (int unsigned o = 0; o < P; o++) begin
      cred_use[o]  = '0;
      cred_back[o] = '0;
      if (credit_in[o]) cred_back[o][credit_in_vc[o]] = 1'b1;
    end
    for (int unsigned i = 0; i < NI; i++)
      if (sa_gnt[i]) cred_use[vroute[i]][voutvc[i]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned o = 0; o < P; o++)
        for (int unsigned v = 0; v < NV; v++)
          cred[o][v] <= CW'(DEPTH);
    end else if (buf_cfg_done[0]) begin
      // new split taken: downstream VCs are empty and have the same sizes
      for (int unsigned o = 0; o < P; o++)
        for (int unsigned v = 0; v < NV; v++)
          cred[o][v] <= buf_size[0][v];
    end else begin
      for (int unsigned o = 0; o < P; o++)
        for (int unsigned v = 0; v < NV; v++)
          case ({cred_use[o][v], cred_back[o][v]})
            2'b10:   cred[o][v] <= cred[o][v] - 1'b1;
            2'b01:   cred[o][v] <= cred[o][v] + 1'b1;
            default: ;
          endcase
    end
  end

  // ---------------- channel direction control ----------------
  always_comb begin
    local_req = '0;
    for (int unsigned i = 0; i < NI; i++)
      if (vstate[i] == VS_VA || (vstate[i] == VS_ACTIVE && rd_valid[i / NV][i % NV]))
        local_req[vroute[i]] = 1'b1;
  end

  assign may_send[PORT_LOCAL]    = 1'b1;
  assign chan_owner[PORT_LOCAL]  = 1'b1;
  assign cdc_req_out[PORT_LOCAL] = 1'b0;
  assign cdc_rel_out[PORT_LOCAL] = 1'b0;

  for (genvar p = 1; p < P; p++) begin : g_cdc
    channel_dir_ctrl #(.INIT_OWNER(BIDIR_OWNER[p]), .HOLD_MAX(HOLD_MAX)) u_cdc (
      .clk, .rst_n,
      .local_req (local_req[p]),
      .peer_req  (cdc_req_in[p]),
      .peer_rel  (cdc_rel_in[p]),
      .req_out   (cdc_req_out[p]),
      .rel_out   (cdc_rel_out[p]),
      .owner     (chan_owner[p]),
      .may_send  (may_send[p])
    );
    // the two directions of a bidirectional channel never carry data at once
    assert property (@(posedge clk) disable iff (!rst_n) !(out_valid[p] && in_valid[p]))
      else $error("binoc_router: both ends drive channel %0d", p);
  end

  // ---------------- runtime VC sizing ----------------
  always_comb begin
    all_idle = (&buf_empty) && (in_valid == '0) && (st_valid == '0);
    for (int unsigned i = 0; i < NI; i++)
      if (vstate[i] != VS_IDLE) all_idle = 1'b0;
  end
  logic cfg_busy;   // a split requested while the router was busy
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg_busy <= 1'b0;
    else        cfg_busy <= cfg_we && !all_idle;
  end

  assign cfg_go   = cfg_we && all_idle;
  assign cfg_done = buf_cfg_done[0];
  assign cfg_err  = (|buf_cfg_err) || cfg_busy;

  // a VC in IDLE only ever sees a head flit at its front
  for (genvar i = 0; i < NI; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      (vstate[i] == VS_IDLE && rd_valid[i / NV][i % NV]) |-> is_head(rd_flit[i / NV][i % NV].ftype))
      else $error("binoc_router: body flit without head at input VC %0d", i);
  end

endmodule
