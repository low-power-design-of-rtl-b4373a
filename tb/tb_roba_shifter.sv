// Self-checking testbench for roba_shifter at its default sizes (33-bit input,
// 33-bit one-hot select, 65-bit output). Expected values are x * 2^i computed by
// 128-bit multiplication; an all-zero select must give zero.
module tb_roba_shifter;

  int checks = 0;
  int failures = 0;

  logic [32:0] x, sel;
  logic [64:0] y;

  roba_shifter dut (.x(x), .sel(sel), .y(y));

  task automatic check(input logic [32:0] xv, input int pos);
    logic [127:0] e;
    x   = xv;
    sel = (pos < 0) ? 33'd0 : (33'd1 << pos);
    #1;
    e = (pos < 0) ? 128'd0 : (128'(xv) * (128'd1 << pos));
    checks++;
    if (128'(y) != e) begin
      failures++;
      $display("FAIL x=%h pos=%0d y=%h expected %h", xv, pos, y, e);
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
    for (int pos = -1; pos <= 32; pos++) begin
      check(33'h1_0000_0000, pos);
      check(33'h0_ffff_ffff, pos);
      for (int i = 0; i < 20; i++) check({$urandom, 1'b0} >> 0, pos);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_roba_shifter
