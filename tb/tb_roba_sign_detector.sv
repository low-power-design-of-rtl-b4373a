// Self-checking testbench for roba_sign_detector at N = 8 (exhaustive) and
// N = 32 (corner values plus random words). The expected magnitude is formed
// with signed integer arithmetic, independent of the block's negation circuit.
module tb_roba_sign_detector;

  int checks = 0;
  int failures = 0;

  logic [7:0]  x8, mag8;
  logic        neg8;
  logic [31:0] x32, mag32;
  logic        neg32;

  roba_sign_detector #(.N(8))  dut8  (.x(x8),  .neg(neg8),  .mag(mag8));
  roba_sign_detector #(.N(32)) dut32 (.x(x32), .neg(neg32), .mag(mag32));

  task automatic check8(input logic [7:0] v);
    int sv;
    int exp_mag;
    x8 = v;
    #1;
    sv = int'($signed(v));
    exp_mag = (sv < 0) ? -sv : sv;
    checks++;
    if (neg8 !== (sv < 0) || int'(mag8) != exp_mag) begin
      failures++;
      $display("FAIL N=8 x=%0d neg=%0b mag=%0d expected mag=%0d", sv, neg8, mag8, exp_mag);
    end
  endtask

  task automatic check32(input logic [31:0] v);
    longint sv;
    longint exp_mag;
    x32 = v;
    #1;
    sv = longint'($signed(v));
    exp_mag = (sv < 0) ? -sv : sv;
    checks++;
    if (neg32 !== (sv < 0) || longint'(mag32) != exp_mag) begin
      failures++;
      $display("FAIL N=32 x=%0d neg=%0b mag=%0d expected mag=%0d", sv, neg32, mag32, exp_mag);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) check8(8'(v));
    check32(32'h0000_0000);
    check32(32'h8000_0000);
    check32(32'h7fff_ffff);
    check32(32'hffff_ffff);
    for (int i = 0; i < 500; i++) check32($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_roba_sign_detector
