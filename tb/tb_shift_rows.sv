// Self-checking testbench for shift_rows with NB = 2 (the width used by the
// encryption path) and NB = 4 (AES). The NB = 4 case is checked against the
// FIPS-197 example state, whose expected output is written out by hand; both
// are also checked against a per-byte index formula on random states.
module tb_shift_rows;

  int checks = 0;
  int failures = 0;

  logic [63:0]  in2, out2;
  logic [127:0] in4, out4;

  shift_rows #(.NB(2)) dut2 (.state_in(in2), .state_out(out2));
  shift_rows #(.NB(4)) dut4 (.state_in(in4), .state_out(out4));

  // byte k of a word, counted from the top
  function automatic logic [7:0] byte_of128(input logic [127:0] w, input int k);
    return w[127 - 8 * k -: 8];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // FIPS-197 Appendix B, round 1: after SubBytes -> after ShiftRows
    in4 = 128'hd42711aee0bf98f1b8b45de51e415230;
    #1;
    checks++;
    if (out4 != 128'hd4bf5d30e0b452aeb84111f11e2798e5) begin
      failures++;
      $display("FAIL NB=4 example got %h", out4);
    end
    // NB = 2: rows 1 and 3 swap their two bytes, rows 0 and 2 stay
    in2 = 64'h0001020304050607;
    #1;
    checks++;
    if (out2 != 64'h0005020704010603) begin
      failures++;
      $display("FAIL NB=2 example got %h", out2);
    end
    for (int t = 0; t < 200; t++) begin
      in4 = {$urandom, $urandom, $urandom, $urandom};
      in2 = {$urandom, $urandom};
      #1;
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) begin
          checks++;
          if (byte_of128(out4, 4 * c + r) != byte_of128(in4, 4 * ((c + r) % 4) + r)) failures++;
        end
      for (int c = 0; c < 2; c++)
        for (int r = 0; r < 4; r++) begin
          checks++;
          if (byte_of128({out2, 64'd0}, 4 * c + r) != byte_of128({in2, 64'd0}, 4 * ((c + r) % 2) + r)) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_shift_rows
