// tb_aes_key_step: chains ten key-expansion steps and compares every round key
// with the reference key schedule, for the key 000102..0f (whose last round key
// must be 13111d7fe3944a17f307a78b4d2b30c5), the FIPS-197 key 2b7e..3c (last
// round key d014f9a8c9ee2589e13f0cc8b6630ca6) and random keys.
module tb_aes_key_step;
  import aes_pkg::*;
  import tb_aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  block_t k_in, k_out;
  byte_t  rc;

  aes_key_step dut (.key_i(k_in), .rcon_i(rc), .key_o(k_out));

  task automatic check(string what, block_t got, block_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic run_key(block_t key, output block_t last);
    u128 rk [11];
    u8   r = 8'h01;
    ref_expand(key, rk);
    k_in = key;
    for (int i = 1; i <= 10; i++) begin
      rc = r;
      @(posedge clk);
      check($sformatf("round key %0d", i), k_out, rk[i]);
      k_in = k_out;
      r = gmul(r, 8'h02);
    end
    last = k_in;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t last;
    run_key(128'h000102030405060708090a0b0c0d0e0f, last);
    check("last round key", last, 128'h13111d7fe3944a17f307a78b4d2b30c5);
    run_key(128'h2b7e151628aed2a6abf7158809cf4f3c, last);
    check("fips last round key", last, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    for (int n = 0; n < 30; n++) run_key(rand128(), last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
