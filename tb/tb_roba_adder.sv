// Self-checking testbench for roba_adder at its default width (65 bits).
// Expected sums are computed in 128-bit arithmetic and truncated.
module tb_roba_adder;

  int checks = 0;
  int failures = 0;

  logic [64:0] x, y, s;

  roba_adder dut (.x(x), .y(y), .s(s));

  task automatic check(input logic [64:0] xv, input logic [64:0] yv);
    logic [127:0] e;
    x = xv;
    y = yv;
    #1;
    e = 128'(xv) + 128'(yv);
    checks++;
    if (s != e[64:0]) begin
      failures++;
      $display("FAIL %h + %h = %h expected %h", xv, yv, s, e[64:0]);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check({1'b0, {64{1'b1}}}, 65'd1);
    check({1'b0, 64'h8000_0000_0000_0000}, {1'b0, 64'h8000_0000_0000_0000});
    for (int i = 0; i < 1000; i++) check({$urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_roba_adder
