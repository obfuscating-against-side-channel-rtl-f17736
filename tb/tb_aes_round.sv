// tb_aes_round: checks one combinational AES round against the reference model.
// Random states and keys, normal and final rounds, for the normal copy and for
// the inverted copy; the inverted copy fed ~state must give ~(normal result).
// Also the first round of the FIPS-197 example (key 000102..0f, plaintext
// 00112233..ff) must give 89d810e8855ace682d1843d8cb128fe4.
module tb_aes_round;
  import aes_pkg::block_t;
  import tb_aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  block_t s, k, o_n, o_i;
  logic   last;

  aes_round #(.INVERTED(1'b0)) dut_n (.state_i(s),  .rkey_i(k), .last_i(last), .state_o(o_n));
  aes_round #(.INVERTED(1'b1)) dut_i (.state_i(~s), .rkey_i(k), .last_i(last), .state_o(o_i));

  task automatic check(string what, block_t got, block_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u128 rk [11];
    for (int n = 0; n < 400; n++) begin
      s = rand128(); k = rand128(); last = n[0];
      @(posedge clk);
      check("normal", o_n, ref_round(s, k, last));
      check("inverted", o_i, ~ref_round(s, k, last));
    end
    // FIPS-197 Appendix C.1, round 1.
    ref_expand(128'h000102030405060708090a0b0c0d0e0f, rk);
    s = 128'h00102030405060708090a0b0c0d0e0f0; k = rk[1]; last = 1'b0;
    @(posedge clk);
    check("fips round 1", o_n, 128'h89d810e8855ace682d1843d8cb128fe4);
    check("fips round 1 inverted", o_i, 128'h7627ef177aa53197d2e7bc2734ed701b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
