// vc_allocator: separable two-stage virtual-channel allocator (VA stage).
//
// Every input VC whose head flit has been routed requests one output port.
// Stage 1: per input VC, an NV-input round-robin arbiter picks one currently
// free VC of that output port. Stage 2: per output VC, an (NP*NV)-input
// round-robin arbiter picks one of the input VCs that chose it. A winner gets
// the output VC for its whole packet; the VC stays busy until `release` for it
// is pulsed (the router pulses it when the tail flit leaves). As the scheme
// does not search for a best matching, a loser simply retries next cycle.
// A stage-1 arbiter advances only when its pick is granted in stage 2.
//
// Interface: req/req_port per input VC (index p*NV+v), gnt/gnt_vc per input
// VC (combinational, same cycle), release and busy per output VC (index
// port*NV+vc). The two-stage separable structure and round-robin arbiters
// follow the described design; the lack of VC classes is this design's choice.
module vc_allocator
  import noc_pkg::*;
#(
  parameter int unsigned NP = P,
  parameter int unsigned NV = V
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NP*NV-1:0]        req,
  input  logic [$clog2(NP)-1:0]   req_port [NP*NV],
  output logic [NP*NV-1:0]        gnt,
  output logic [$clog2(NV)-1:0]   gnt_vc   [NP*NV],
  input  logic [NP*NV-1:0]        release_vc,
  output logic [NP*NV-1:0]        busy
);
  localparam int unsigned NI = NP * NV;
  localparam int unsigned IW = $clog2(NV + 1);
  localparam int unsigned SW = $clog2(NI + 1);

  logic [NV-1:0] s1_req [NI];
  logic [NV-1:0] s1_gnt [NI];
  logic [IW-1:0] s1_idx [NI];
  logic [NI-1:0] s1_any;

  logic [NI-1:0] s2_req [NI];   // indexed by output VC, bit = input VC
  logic [NI-1:0] s2_gnt [NI];
  logic [SW-1:0] s2_idx [NI];
  logic [NI-1:0] s2_any;

  // ---- stage 1: one free output VC per requesting input VC ----
  for (genvar i = 0; i < NI; i++) begin : g_s1
    always_comb begin
      for (int unsigned v = 0; v < NV; v++)
        s1_req[i][v] = req[i] && !busy[int'(req_port[i]) * NV + v];
    end
    rr_arbiter #(.N(NV)) u_arb (
      .clk, .rst_n,
      .req     (s1_req[i]),
      .advance (gnt[i]),
      .gnt     (s1_gnt[i]),
      .gnt_idx (s1_idx[i]),
      .any     (s1_any[i])
    );
    assign gnt_vc[i] = s1_idx[i][$clog2(NV)-1:0];
  end

  // ---- stage 2: one input VC per output VC ----
  for (genvar o = 0; o < NI; o++) begin : g_s2
    always_comb begin
      for (int unsigned i = 0; i < NI; i++)
        s2_req[o][i] = s1_any[i]
                    && (int'(req_port[i]) == o / NV)
                    && (int'(s1_idx[i]) == o % NV);
    end
    rr_arbiter #(.N(NI)) u_arb (
      .clk, .rst_n,
      .req     (s2_req[o]),
      .advance (1'b1),
      .gnt     (s2_gnt[o]),
      .gnt_idx (s2_idx[o]),
      .any     (s2_any[o])
    );
  end

  always_comb begin
    gnt = '0;
    for (int unsigned o = 0; o < NI; o++)
      gnt |= s2_gnt[o];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy <= '0;
    else        busy <= (busy & ~release_vc) | s2_any;
  end

  // an output VC is handed out only while free, and only once
  assert property (@(posedge clk) disable iff (!rst_n) (s2_any & busy) == '0);

endmodule
