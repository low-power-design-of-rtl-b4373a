// Self-checking testbench for conv_unit at its defaults (N = 32, S-RoBA).
// The expected word is the reference RoBA product of (data XOR key) and key.
// Cases where data equals key (zero multiplicand) and where the product is
// negative are counted and must both occur.
module tb_conv_unit;
  import roba_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  int n_zero = 0, n_neg = 0;

  logic [31:0] data, key;
  logic [63:0] mixed;

  conv_unit dut (.data(data), .key(key), .mixed(mixed));

  task automatic check(input logic [31:0] d, input logic [31:0] k);
    wide_t e;
    logic [31:0] w;
    data = d;
    key  = k;
    #1;
    w = d ^ k;
    e = roba_ref(wide_t'($signed(w)), wide_t'($signed(k)), 32, 1);
    if (w == 0) n_zero++;
    if ((w[31] ^ k[31]) && w != 0 && k != 0) n_neg++;
    checks++;
    if (wide_t'(mixed) != e) begin
      failures++;
      $display("FAIL data=%h key=%h mixed=%h expected %h", d, k, mixed, e[63:0]);
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
    check(32'h0123_4567, 32'h0123_4567);
    check(32'h0000_0000, 32'h8000_0000);
    check(32'h0000_0003, 32'h0000_0005);
    for (int i = 0; i < 1000; i++) check($urandom, $urandom >> ($urandom % 32));
    $display("cases: zero=%0d negative=%0d", n_zero, n_neg);
    if (n_zero == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_conv_unit
