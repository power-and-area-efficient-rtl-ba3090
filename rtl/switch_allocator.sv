// switch_allocator: separable two-stage switch allocator (SA stage).
//
// Stage 1: per input port, an NV-input round-robin arbiter picks one of the
// port's VCs that has a flit ready for its output port, because all VCs of a
// port share one crossbar input. Stage 2: per output port, an NP-input
// round-robin arbiter picks one of the input ports whose stage-1 winner wants
// that output. A stage-1 arbiter advances only when its winner also wins
// stage 2, which keeps the VCs of a port fair; a stage-1 winner that loses
// stage 2 blocks its port's other VCs for that cycle (some switch bandwidth
// is wasted, as expected of this organisation).
//
// Interface: req/req_port per input VC (index p*NV+v); gnt per input VC
// (one-hot per port), and per output port out_sel (winning input port) and
// out_valid. Combinational; the router registers the result.
module switch_allocator
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
  output logic [$clog2(NP)-1:0]   out_sel  [NP],
  output logic [NP-1:0]           out_valid
);
  localparam int unsigned PW  = $clog2(NP);
  localparam int unsigned IW  = $clog2(NV + 1);
  localparam int unsigned OW  = $clog2(NP + 1);

  logic [NV-1:0] s1_gnt [NP];
  logic [IW-1:0] s1_idx [NP];
  logic [NP-1:0] s1_any;
  logic [PW-1:0] s1_port [NP];
  logic [NP-1:0] s1_adv;

  logic [NP-1:0] s2_req [NP];
  logic [NP-1:0] s2_gnt [NP];
  logic [OW-1:0] s2_idx [NP];

  for (genvar p = 0; p < NP; p++) begin : g_s1
    rr_arbiter #(.N(NV)) u_arb (
      .clk, .rst_n,
      .req     (req[p*NV +: NV]),
      .advance (s1_adv[p]),
      .gnt     (s1_gnt[p]),
      .gnt_idx (s1_idx[p]),
      .any     (s1_any[p])
    );
    assign s1_port[p] = req_port[p*NV + int'(s1_idx[p])];
  end

  for (genvar o = 0; o < NP; o++) begin : g_s2
    always_comb
      for (int unsigned p = 0; p < NP; p++)
        s2_req[o][p] = s1_any[p] && (int'(s1_port[p]) == o);
    rr_arbiter #(.N(NP)) u_arb (
      .clk, .rst_n,
      .req     (s2_req[o]),
      .advance (1'b1),
      .gnt     (s2_gnt[o]),
      .gnt_idx (s2_idx[o]),
      .any     (out_valid[o])
    );
    assign out_sel[o] = s2_idx[o][PW-1:0];
  end

  always_comb begin
    s1_adv = '0;
    for (int unsigned o = 0; o < NP; o++)
      s1_adv |= s2_gnt[o];
    for (int unsigned p = 0; p < NP; p++)
      gnt[p*NV +: NV] = s1_adv[p] ? s1_gnt[p] : '0;
  end

endmodule
