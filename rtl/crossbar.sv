// crossbar: P x P switch traversal (ST) datapath.
//
// Each input port has a single crossbar input shared by its V virtual
// channels, so the crossbar size does not depend on V. For every output the
// switch allocator supplies the index of the input that drives it and a valid
// bit; an output with no valid selection carries an all-zero flit.
// Combinational; the router registers its outputs at the end of ST.
module crossbar
  import noc_pkg::*;
#(
  parameter int unsigned NP = P
) (
  input  flit_t                     in_flit  [NP],
  input  logic [$clog2(NP)-1:0]     sel      [NP],
  input  logic [NP-1:0]             sel_valid,
  output flit_t                     out_flit [NP],
  output logic [NP-1:0]             out_valid
);
  always_comb begin
    for (int unsigned o = 0; o < NP; o++) begin
      out_valid[o] = sel_valid[o];
      out_flit[o]  = sel_valid[o] ? in_flit[sel[o]] : '0;
    end
  end
endmodule
