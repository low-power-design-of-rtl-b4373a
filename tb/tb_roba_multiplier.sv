// Self-checking testbench for roba_multiplier.
//
// Six instances: U-RoBA, S-RoBA and AS-RoBA at N = 8, checked exhaustively over
// all 65536 operand pairs, and the same three at the default N = 32 with corner
// and random operands. Every result is compared with the reference model in
// roba_ref_pkg. Two further properties are checked against the true product:
// a power-of-two operand makes S-RoBA exact, and the error of the unsigned
// variant equals -(Ar-A)*(Br-B). The bench counts negative results, operand
// ties (3*2^(p-2)) and zero operands and fails if any never occurred.
module tb_roba_multiplier;
  import roba_pkg::*;
  import roba_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  int n_neg = 0, n_tie = 0, n_zero = 0, n_pow2 = 0;

  logic [7:0]  a8, b8;
  logic [15:0] pu8, ps8, pa8;
  logic [31:0] a32, b32;
  logic [63:0] pu32, ps32, pa32;

  roba_multiplier #(.N(8),  .MODE(ROBA_UNSIGNED))      u8  (.a(a8),  .b(b8),  .p(pu8));
  roba_multiplier #(.N(8),  .MODE(ROBA_SIGNED))        s8  (.a(a8),  .b(b8),  .p(ps8));
  roba_multiplier #(.N(8),  .MODE(ROBA_SIGNED_APPROX)) as8 (.a(a8),  .b(b8),  .p(pa8));
  roba_multiplier #(.N(32), .MODE(ROBA_UNSIGNED))      u32 (.a(a32), .b(b32), .p(pu32));
  roba_multiplier #(.N(32), .MODE(ROBA_SIGNED))        s32 (.a(a32), .b(b32), .p(ps32));
  roba_multiplier #(.N(32), .MODE(ROBA_SIGNED_APPROX)) as32(.a(a32), .b(b32), .p(pa32));

  function automatic bit is_tie(input wide_t m);
    wide_t lo;
    if (m < 3) return m == 3;
    lo = 1;
    while (lo * 2 <= m) lo = lo * 2;
    return 2 * (m - lo) == lo;
  endfunction

  task automatic cmp(input string tag, input wide_t got, input wide_t exp, input wide_t a, input wide_t b);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%0d b=%0d got %0h expected %0h", tag, a, b, got, exp);
    end
  endtask

  task automatic run8(input logic [7:0] av, input logic [7:0] bv);
    wide_t ua, ub, sa, sb, m;
    a8 = av;
    b8 = bv;
    #1;
    ua = wide_t'(av);
    ub = wide_t'(bv);
    sa = wide_t'($signed(av));
    sb = wide_t'($signed(bv));
    cmp("U8",  wide_t'(pu8), roba_ref(ua, ub, 8, 0), ua, ub);
    cmp("S8",  wide_t'(ps8), roba_ref(sa, sb, 8, 1), sa, sb);
    cmp("AS8", wide_t'(pa8), roba_ref(sa, sb, 8, 2), sa, sb);
    // unsigned error identity against the true product
    m = (ua * ub) - (nearest_pow2(ua) - ua) * (nearest_pow2(ub) - ub);
    cmp("U8-identity", wide_t'(pu8), m, ua, ub);
    if ((sa < 0) != (sb < 0) && sa != 0 && sb != 0) n_neg++;
    if (is_tie(ua) || is_tie(ub)) n_tie++;
    if (av == 0 || bv == 0) n_zero++;
  endtask

  task automatic run32(input logic [31:0] av, input logic [31:0] bv);
    wide_t ua, ub, sa, sb, exact, mask;
    a32 = av;
    b32 = bv;
    #1;
    ua = wide_t'(av);
    ub = wide_t'(bv);
    sa = wide_t'($signed(av));
    sb = wide_t'($signed(bv));
    cmp("U32",  wide_t'(pu32), roba_ref(ua, ub, 32, 0), ua, ub);
    cmp("S32",  wide_t'(ps32), roba_ref(sa, sb, 32, 1), sa, sb);
    cmp("AS32", wide_t'(pa32), roba_ref(sa, sb, 32, 2), sa, sb);
    if ($countones(av) == 1 && av != 32'h8000_0000) begin
      mask  = (wide_t'(1) <<< 64) - 1;
      exact = (sa * sb) & mask;
      cmp("S32-pow2-exact", wide_t'(ps32), exact, sa, sb);
      n_pow2++;
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        run8(8'(i), 8'(j));
    run32(32'h0, 32'h1234_5678);
    run32(32'hffff_ffff, 32'hffff_ffff);
    run32(32'h8000_0000, 32'h8000_0000);
    run32(32'h7fff_ffff, 32'h8000_0001);
    run32(32'hc000_0000, 32'h6000_0000);
    run32(32'h0000_0400, 32'hdead_beef);
    for (int i = 0; i < 2000; i++) run32($urandom >> ($urandom % 32), $urandom >> ($urandom % 32));
    for (int i = 0; i < 64; i++) run32(32'd1 << (i % 31), $urandom);
    $display("cases: negative=%0d tie=%0d zero=%0d pow2=%0d", n_neg, n_tie, n_zero, n_pow2);
    if (n_neg == 0 || n_tie == 0 || n_zero == 0 || n_pow2 == 0) begin
      failures++;
      $display("FAIL a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_roba_multiplier
