// End-to-end, self-checking testbench for crypto_roba_top at its default
// parameters (N = 32, S-RoBA).
//
// Words are driven on the falling clock edge with random gaps in in_valid. A
// reference model (XOR, reference RoBA product, reference S-Box, ShiftRows by
// index) predicts each cipher word, which must appear exactly one rising edge
// after the word was sampled, together with out_valid; during idle cycles the
// cipher must hold. A hand-worked vector and an asynchronous reset in mid-run
// are included. The bench counts the mechanisms of the datapath (operand
// rounding up, down and on a tie, a negative product through the sign set, a
// zero multiplicand, a power-of-two operand, idle cycles, reset) and fails if
// any of them never occurred.
module tb_crypto_roba_top;
  import roba_ref_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  int n_up = 0, n_down = 0, n_tie = 0, n_neg = 0, n_zero = 0, n_pow2 = 0;
  int n_idle = 0, n_reset = 0, n_words = 0;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid;
  logic [31:0] data, key;
  logic        out_valid;
  logic [63:0] cipher;

  logic [63:0] expected;
  logic        expected_valid;

  crypto_roba_top dut (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .data     (data),
    .key      (key),
    .out_valid(out_valid),
    .cipher   (cipher)
  );

  always #5 clk = ~clk;

  function automatic logic [63:0] model(input logic [31:0] d, input logic [31:0] k);
    logic [31:0] w;
    logic [63:0] m, s;
    w = d ^ k;
    m = 64'(roba_ref(wide_t'($signed(w)), wide_t'($signed(k)), 32, 1));
    for (int i = 0; i < 8; i++) s[8 * i +: 8] = sbox_ref(m[8 * i +: 8]);
    return shift_rows2_ref(s);
  endfunction

  task automatic classify(input logic [31:0] v);
    wide_t mag, r, lo;
    mag = wide_t'($signed(v));
    if (mag < 0) mag = -mag;
    if (mag == 0) begin
      n_zero++;
      return;
    end
    r  = nearest_pow2(mag);
    lo = 1;
    while (lo * 2 <= mag) lo = lo * 2;
    if (lo == mag)                 n_pow2++;
    else if (2 * (mag - lo) == lo) n_tie++;
    else if (r > mag)              n_up++;
    else                           n_down++;
  endtask

  // Drive one cycle of input on the falling edge, then check after the next
  // rising edge.
  task automatic cycle(input logic v, input logic [31:0] d, input logic [31:0] k);
    @(negedge clk);
    in_valid = v;
    data     = d;
    key      = k;
    if (v) begin
      expected       = model(d, k);
      expected_valid = 1'b1;
      n_words++;
      classify(d ^ k);
      classify(k);
      if (((d[31] ^ k[31]) ^ k[31]) && (d ^ k) != 0 && k != 0) n_neg++;
    end else begin
      n_idle++;
    end
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== v) begin
      failures++;
      $display("FAIL out_valid=%0b expected %0b", out_valid, v);
    end
    if (expected_valid) begin
      checks++;
      if (cipher != expected) begin
        failures++;
        $display("FAIL data=%h key=%h cipher=%h expected %h", d, k, cipher, expected);
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n          = 1'b0;
    in_valid       = 1'b0;
    data           = '0;
    key            = '0;
    expected_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0 || cipher != 64'd0) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end
    @(negedge clk);
    rst_n = 1'b1;

    // Hand-worked vector: data ^ key = 2, key = 1 -> product 2; the S-Box maps
    // bytes 00 -> 63 and 02 -> 77; ShiftRows moves the last byte (row 3,
    // column 1) to row 3, column 0.
    cycle(1'b1, 32'h0000_0003, 32'h0000_0001);
    checks++;
    if (cipher != 64'h6363_6377_6363_6363) begin
      failures++;
      $display("FAIL hand-worked vector: %h", cipher);
    end

    cycle(1'b1, 32'h1234_5678, 32'h1234_5678);   // zero multiplicand
    cycle(1'b1, 32'h8000_0000, 32'hffff_fff4);   // key -12: tie, negative product
    cycle(1'b0, 32'hdead_beef, 32'hcafe_f00d);   // idle: cipher must hold
    for (int i = 0; i < 3000; i++) begin
      cycle(($urandom % 4) != 0, $urandom, $urandom >> ($urandom % 32));
    end

    // asynchronous reset in the middle of the stream
    @(negedge clk);
    #2;
    rst_n = 1'b0;
    #1;
    n_reset++;
    checks++;
    if (out_valid !== 1'b0 || cipher != 64'd0) begin
      failures++;
      $display("FAIL asynchronous reset did not clear the outputs");
    end
    expected_valid = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) cycle(1'b1, $urandom, $urandom);

    $display("words=%0d idle=%0d reset=%0d round_up=%0d round_down=%0d tie=%0d negative=%0d zero=%0d pow2=%0d",
             n_words, n_idle, n_reset, n_up, n_down, n_tie, n_neg, n_zero, n_pow2);
    if (n_words == 0 || n_idle == 0 || n_reset == 0 || n_up == 0 || n_down == 0 ||
        n_tie == 0 || n_neg == 0 || n_zero == 0 || n_pow2 == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_crypto_roba_top
