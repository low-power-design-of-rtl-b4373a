// Self-checking testbench for roba_rounding. N = 10 is checked exhaustively and
// N = 32 with corner and random values. The reference finds the nearest power of
// two by comparing distances with integer arithmetic (ties go to the larger
// power), which is independent of the bit-pattern rule in the block. It also
// counts how often rounding went up, down, hit a tie, or met an exact power.
module tb_roba_rounding;

  int checks = 0;
  int failures = 0;
  int n_up = 0, n_down = 0, n_tie = 0, n_exact = 0;

  logic [9:0]  x10;
  logic [10:0] xr10;
  logic [31:0] x32;
  logic [32:0] xr32;

  roba_rounding #(.N(10)) dut10 (.x(x10), .xr(xr10));
  roba_rounding #(.N(32)) dut32 (.x(x32), .xr(xr32));

  function automatic longint nearest_pow2(input longint v);
    longint lo;
    if (v == 0) return 0;
    lo = 1;
    while (lo * 2 <= v) lo = lo * 2;
    if (lo == v) return v;
    // distance to the lower and to the upper power; a tie goes up
    return ((v - lo) < (2 * lo - v)) ? lo : 2 * lo;
  endfunction

  task automatic tally(input longint v, input longint r);
    longint lo;
    if (v == 0) return;
    lo = 1;
    while (lo * 2 <= v) lo = lo * 2;
    if (lo == v)                 n_exact++;
    else if (2 * (v - lo) == lo) n_tie++;
    else if (r > v)              n_up++;
    else                         n_down++;
  endtask

  task automatic check10(input int v);
    longint e;
    x10 = 10'(v);
    #1;
    e = nearest_pow2(longint'(v));
    tally(longint'(v), e);
    checks++;
    if (longint'(xr10) != e) begin
      failures++;
      $display("FAIL N=10 x=%0d got %0d expected %0d", v, xr10, e);
    end
  endtask

  task automatic check32(input logic [31:0] v);
    longint e;
    x32 = v;
    #1;
    e = nearest_pow2(longint'(v));
    checks++;
    if (longint'(xr32) != e || $countones(xr32) > 1) begin
      failures++;
      $display("FAIL N=32 x=%0d got %0d expected %0d", v, xr32, e);
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
    for (int v = 0; v < 1024; v++) check10(v);
    check32(32'h0);
    check32(32'h1);
    check32(32'h3);
    check32(32'hc000_0000);
    check32(32'hbfff_ffff);
    check32(32'h8000_0000);
    check32(32'hffff_ffff);
    check32(32'h6000_0000);
    for (int i = 0; i < 1000; i++) check32($urandom >> ($urandom % 32));
    $display("rounding cases: up=%0d down=%0d tie=%0d exact=%0d", n_up, n_down, n_tie, n_exact);
    if (n_up == 0 || n_down == 0 || n_tie == 0 || n_exact == 0) begin
      failures++;
      $display("FAIL a rounding case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_roba_rounding
