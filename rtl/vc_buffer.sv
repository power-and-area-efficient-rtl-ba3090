// vc_buffer: input buffer and buffer control of one router input port.
//
// One single-ported flit store of NV*DEPTH slots is shared by the NV virtual
// channels of the port. Each VC owns a contiguous region of it and uses that
// region as a circular FIFO. Region sizes are set at runtime through
// cfg_we/cfg_depth (each VC 1..NV*DEPTH slots, sum at most NV*DEPTH); after
// reset every VC has DEPTH slots. A new partition is taken only while the
// whole port is empty (cfg_done pulses when it is taken, cfg_err when it is
// refused); the caller must load the matching credit counts upstream.
//
// Write (buffer write, BW): a flit with wr_valid goes to the VC named by its
// vc field. Read: rd_valid[v]/rd_flit[v] show the oldest flit of VC v and
// rd_en[v] removes it. Bypass: when VC v is empty, an arriving flit is shown
// on rd_flit[v] in the same cycle; if rd_en[v] takes it, it is never written
// (bypass_hit pulses). Flow control is by credits, so a write to a full VC is
// an error and is flagged by an assertion.
//
// The runtime-sized private VC regions and the bypass follow the described
// design; the contiguous-region layout and the reconfigure-when-empty rule
// are this design's choices.
module vc_buffer
  import noc_pkg::*;
#(
  parameter int unsigned NV    = V,
  parameter int unsigned DEPTH = VC_DEPTH
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // runtime VC sizing
  input  logic                  cfg_we,
  input  logic [$clog2(NV*DEPTH+1)-1:0] cfg_depth [NV],
  output logic                  cfg_done,
  output logic                  cfg_err,
  // write side
  input  logic                  wr_valid,
  input  flit_t                 wr_flit,
  // read side
  input  logic [NV-1:0]         rd_en,
  output logic [NV-1:0]         rd_valid,
  output flit_t                 rd_flit [NV],
  // status
  output logic [$clog2(NV*DEPTH+1)-1:0] count [NV],
  output logic [$clog2(NV*DEPTH+1)-1:0] size  [NV],
  output logic                  empty,
  output logic                  bypass_hit
);
  localparam int unsigned SLOTS = NV * DEPTH;
  localparam int unsigned AW    = $clog2(SLOTS);
  localparam int unsigned CW    = $clog2(SLOTS + 1);
  localparam int unsigned VW    = (NV > 1) ? $clog2(NV) : 1;

  flit_t           mem  [SLOTS];
  logic [CW-1:0]   base [NV];
  logic [CW-1:0]   rptr [NV];   // offset of the oldest flit in the region
  logic [CW-1:0]   wptr [NV];   // offset of the next free slot

  logic [VW-1:0]   wvc;
  logic [NV-1:0]   bypass;      // flit taken straight from the input
  logic [NV-1:0]   store;       // flit written into the region
  logic [NV-1:0]   pop;         // stored flit removed

  assign wvc = VW'(wr_flit.vc);

  // ---- read side with bypass ----
  logic [NV-1:0] arriving;
  logic [NV-1:0] is_empty;

  always_comb begin
    for (int unsigned v = 0; v < NV; v++) begin
      arriving[v] = wr_valid && (wvc == VW'(v));
      is_empty[v] = (count[v] == '0);
    end
  end

  // front flit: the stored one, or the arriving one when the VC is empty
  always_comb begin
    for (int unsigned v = 0; v < NV; v++) begin
      rd_valid[v] = is_empty[v] ? arriving[v] : 1'b1;
      rd_flit[v]  = is_empty[v] ? wr_flit : mem[AW'(base[v] + rptr[v])];
    end
  end

  // kept apart from the block above: rd_en may depend on rd_valid
  always_comb begin
    bypass = arriving & is_empty & rd_en;
    store  = arriving & ~bypass;
    pop    = rd_en & ~is_empty;
  end

  assign bypass_hit = |bypass;

  assign empty = &is_empty;

  // ---- runtime partition check ----
  localparam int unsigned SUMW = CW + VW + 1;
  logic [SUMW-1:0] psum [NV+1];   // psum[v]: first slot of VC v
  logic            cfg_ok;
  logic [CW-1:0]   cfg_base [NV];

  always_comb begin
    psum[0] = '0;
    cfg_ok  = 1'b1;
    for (int unsigned v = 0; v < NV; v++) begin
      psum[v+1]   = psum[v] + SUMW'(cfg_depth[v]);
      cfg_base[v] = CW'(psum[v]);
      if (cfg_depth[v] == '0) cfg_ok = 1'b0;
    end
    if (psum[NV] > SUMW'(SLOTS)) cfg_ok = 1'b0;
  end

  wire cfg_take = cfg_we && cfg_ok && empty && !wr_valid;

  // ---- pointers, counters, partition ----
  function automatic logic [CW-1:0] wrap_inc(logic [CW-1:0] p, logic [CW-1:0] sz);
    return (p + 1'b1 == sz) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned v = 0; v < NV; v++) begin
        base[v]  <= CW'(v * DEPTH);
        size[v]  <= CW'(DEPTH);
        rptr[v]  <= '0;
        wptr[v]  <= '0;
        count[v] <= '0;
      end
      cfg_done <= 1'b0;
      cfg_err  <= 1'b0;
    end else begin
      cfg_done <= cfg_take;
      cfg_err  <= cfg_we && !cfg_take;
      for (int unsigned v = 0; v < NV; v++) begin
        if (cfg_take) begin
          base[v]  <= cfg_base[v];
          size[v]  <= cfg_depth[v];
          rptr[v]  <= '0;
          wptr[v]  <= '0;
          count[v] <= '0;
        end else begin
          if (store[v]) wptr[v] <= wrap_inc(wptr[v], size[v]);
          if (pop[v])   rptr[v] <= wrap_inc(rptr[v], size[v]);
          case ({store[v], pop[v]})
            2'b10:   count[v] <= count[v] + 1'b1;
            2'b01:   count[v] <= count[v] - 1'b1;
            default: ;
          endcase
        end
      end
    end
  end

  // flit store: single write port
  always_ff @(posedge clk) begin
    if (wr_valid && store[wvc])
      mem[AW'(base[wvc] + wptr[wvc])] <= wr_flit;
  end

  // credit flow control must never overrun a VC region
  for (genvar g = 0; g < NV; g++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      !(store[g] && !pop[g] && count[g] == size[g]))
      else $error("vc_buffer: write to full VC %0d", g);
  end

endmodule
