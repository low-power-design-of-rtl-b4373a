// Workload testbench: 1000 random operand pairs through roba_multiplier at its
// defaults (N = 32, S-RoBA), the input set used for switching-activity based
// energy estimation of the multiplier.
//
// Each product is compared with the reference model. Independently of that
// model, the relative error against the true product must stay within 1/9:
// rounding moves an operand by at most one third of its value (just below the
// tie 3*2^(m-1) going down, just above it going up), and the error is the
// product of the two relative rounding steps. The bench prints the mean and
// largest relative error and the number of output bit toggles between
// successive vectors, a switching-activity figure for the product bus.
module tb_roba_random_vectors;
  import roba_ref_pkg::*;

  localparam int VECTORS = 1000;

  int checks = 0;
  int failures = 0;
  int toggles = 0;

  logic [31:0] a, b;
  logic [63:0] p, p_prev;

  real err_sum = 0.0;
  real err_max = 0.0;
  int  nonzero = 0;

  roba_multiplier dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wide_t sa, sb, got, exact;
    real   rel;
    p_prev = '0;
    for (int i = 0; i < VECTORS; i++) begin
      a = $urandom;
      b = $urandom;
      #1;
      sa  = wide_t'($signed(a));
      sb  = wide_t'($signed(b));
      got = wide_t'($signed(p));
      checks++;
      if (wide_t'(p) != roba_ref(sa, sb, 32, 1)) begin
        failures++;
        $display("FAIL a=%0d b=%0d p=%0d", sa, sb, got);
      end
      exact = sa * sb;
      if (exact != 0) begin
        rel = $itor(got - exact) / $itor(exact);
        if (rel < 0.0) rel = -rel;
        err_sum += rel;
        if (rel > err_max) err_max = rel;
        nonzero++;
        checks++;
        if (rel > 1.0 / 9.0 + 1e-12) begin
          failures++;
          $display("FAIL relative error %f above 1/9 for a=%0d b=%0d", rel, sa, sb);
        end
      end
      toggles += $countones(p ^ p_prev);
      p_prev = p;
    end
    $display("vectors=%0d mean_rel_error=%f max_rel_error=%f output_toggles=%0d",
             VECTORS, err_sum / nonzero, err_max, toggles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_roba_random_vectors
