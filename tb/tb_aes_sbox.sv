// Self-checking testbench for aes_sbox.
//
// The expected table is rebuilt here by a different method: the inverse of
// each byte is found by searching for the y with x*y = 1 (shift-and-add GF(2^8)
// multiplication), and the affine map is applied bit by bit from its defining
// equation b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i. A few
// published AES S-Box entries are checked as well, and the table must be a
// permutation.
module tb_aes_sbox;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0] in_byte, out_byte;
  bit         seen [256];

  aes_sbox dut (.in_byte(in_byte), .out_byte(out_byte));

  task automatic check(input logic [7:0] x, input logic [7:0] e);
    in_byte = x;
    #1;
    checks++;
    if (out_byte != e) begin
      failures++;
      $display("FAIL S(%h) = %h expected %h", x, out_byte, e);
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
    // published entries
    check(8'h00, 8'h63);
    check(8'h01, 8'h7c);
    check(8'h53, 8'hed);
    check(8'h10, 8'hca);
    check(8'hff, 8'h16);
    check(8'h9a, 8'hb8);
    // whole table
    for (int v = 0; v < 256; v++) begin
      check(8'(v), sbox_ref(8'(v)));
      seen[out_byte] = 1'b1;
    end
    for (int v = 0; v < 256; v++) begin
      checks++;
      if (!seen[v]) begin
        failures++;
        $display("FAIL output %h never produced", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_aes_sbox
