// tb_aes_decrypt: checks one combinational inverse-cipher round against the
// reference model, normal and last rounds, for the normal and the inverted
// copy (fed ~state, it must give ~(normal result)). A chain of ten rounds with
// the reference round keys, used backwards, must decrypt the FIPS-197 example
// ciphertext 69c4e0d86a7b0430d8cdb78070b4c55a back to 00112233..ff, and random
// blocks back to their plaintexts.
module tb_aes_decrypt;
  import aes_pkg::block_t;
  import tb_aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  block_t s, k, o_n, o_i;
  logic   last;

  aes_decrypt #(.INVERTED(1'b0)) dut_n (.state_i(s),  .rkey_i(k), .last_i(last), .state_o(o_n));
  aes_decrypt #(.INVERTED(1'b1)) dut_i (.state_i(~s), .rkey_i(k), .last_i(last), .state_o(o_i));

  task automatic check(string what, block_t got, block_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Decrypts ct with the DUT rounds and checks against pt.
  task automatic chain(block_t key, block_t ct, block_t pt);
    u128 rk [11];
    ref_expand(key, rk);
    s = ct ^ rk[10];
    for (int r = 1; r <= 10; r++) begin
      k = rk[10-r]; last = (r == 10);
      @(posedge clk);
      check("inverted chain", o_i, ~o_n);
      s = o_n;
    end
    check("chain result", s, pt);
  endtask

  initial begin
    trace_t tr;
    block_t key, pt, ct;
    for (int n = 0; n < 300; n++) begin
      s = rand128(); k = rand128(); last = n[0];
      @(posedge clk);
      check("normal", o_n, ref_inv_round(s, k, last));
      check("inverted", o_i, ~ref_inv_round(s, k, last));
    end
    chain(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a,
          128'h00112233445566778899aabbccddeeff);
    for (int n = 0; n < 20; n++) begin
      key = rand128();
      pt  = rand128();
      ct  = ref_encrypt(key, pt, tr);
      chain(key, ct, pt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
