// tb_crossbar: drives random flits and random per-output selections into the
// 5x5 crossbar and checks every output against the selected input (or an
// all-zero flit when the output is not selected).
module tb_crossbar;
  import noc_pkg::*;
  flit_t in_flit [P];
  logic [$clog2(P)-1:0] sel [P];
  logic [P-1:0] sel_valid;
  flit_t out_flit [P];
  logic [P-1:0] out_valid;
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      for (int p = 0; p < P; p++) begin
        in_flit[p] = {$urandom, $urandom, $urandom, $urandom};
        sel[p] = ($clog2(P))'($urandom % P);
      end
      sel_valid = P'($urandom);
      #1;
      for (int o = 0; o < P; o++) begin
        checks++;
        if (out_valid[o] != sel_valid[o] ||
            out_flit[o] != (sel_valid[o] ? in_flit[sel[o]] : flit_t'('0))) begin
          failures++;
          $display("output %0d wrong (sel=%0d v=%b)", o, sel[o], sel_valid[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
