// Self-checking testbench for roba_sign_set in both variants (EXACT = 1 for
// S-RoBA, EXACT = 0 for AS-RoBA) at 64 bits. The expected negative results are
// 0 - x and -1 - x, computed by subtraction rather than by inversion.
module tb_roba_sign_set;

  int checks = 0;
  int failures = 0;

  logic [63:0] x, y_exact, y_approx;
  logic        neg;

  roba_sign_set #(.W(64), .EXACT(1'b1)) dut_exact  (.x(x), .neg(neg), .y(y_exact));
  roba_sign_set #(.W(64), .EXACT(1'b0)) dut_approx (.x(x), .neg(neg), .y(y_approx));

  task automatic check(input logic [63:0] xv, input logic nv);
    logic [63:0] e_exact, e_approx;
    x   = xv;
    neg = nv;
    #1;
    e_exact  = nv ? (64'd0 - xv) : xv;
    e_approx = nv ? (64'hffff_ffff_ffff_ffff - xv) : xv;
    checks += 2;
    if (y_exact != e_exact) begin
      failures++;
      $display("FAIL exact x=%h neg=%0b y=%h expected %h", xv, nv, y_exact, e_exact);
    end
    if (y_approx != e_approx) begin
      failures++;
      $display("FAIL approx x=%h neg=%0b y=%h expected %h", xv, nv, y_approx, e_approx);
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
    check(64'd0, 1'b0);
    check(64'd0, 1'b1);
    check(64'd1, 1'b1);
    for (int i = 0; i < 500; i++) check({$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_roba_sign_set
