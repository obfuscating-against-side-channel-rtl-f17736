// tb_bitbal_aes: checks the bit-balanced AES pair.
//  * ciphertext equals the reference model, the inverted output is its complement;
//  * 23 enabled cycles from key request to result;
//  * in every cycle each state register of the inverted core holds the complement
//    of its twin in the normal core, and in every round cycle the two round
//    results together have Hamming weight 128;
//  * all four storage slots are used;
//  * every other random block is decrypted instead, with the same checks.
module tb_bitbal_aes;
  import aes_pkg::*;
  import tb_aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic       rst_n, ce, krdy, drdy, dec, kdvld;
  block_t     key, din, dout, dout_inv;
  logic       kvld, dvld, busy, pre;
  logic [1:0] slot;

  bitbal_aes dut (
    .clk(clk), .rst_n(rst_n), .ce_i(ce), .krdy_i(krdy), .drdy_i(drdy), .dec_i(dec), .key_i(key),
    .din_i(din), .dout_o(dout), .dout_inv_o(dout_inv), .kvld_o(kvld), .kdvld_o(kdvld), .dvld_o(dvld),
    .busy_o(busy), .precharge_o(pre), .slot_o(slot)
  );

  task automatic check(string what, block_t got, block_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  int slot_used [4] = '{0, 0, 0, 0};
  int n_round = 0, n_pre = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < 4; i++)
        check($sformatf("complementary slot %0d", i),
              dut.u_core_inv.u_store.regs[i], ~dut.u_core_norm.u_store.regs[i]);
      check("complementary input register", dut.u_core_inv.din_reg, ~dut.u_core_norm.din_reg);
      if (ce && dut.u_core_norm.store_we) begin
        n_round++;
        slot_used[slot]++;
        check("balanced Hamming weight", block_t'($countones(dut.u_core_norm.result) +
                                                  $countones(dut.u_core_inv.result)), 128);
      end
      if (ce && pre) n_pre++;
    end
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    trace_t tr;
    block_t exp;
    rst_n = 0; ce = 1; krdy = 0; drdy = 0; dec = 0; key = 0; din = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // cycle count with the enable held high
    key = 128'h000102030405060708090a0b0c0d0e0f;
    din = 128'h00112233445566778899aabbccddeeff;
    krdy = 1; @(posedge clk); #1 krdy = 0; drdy = 1; t = 1;
    @(posedge clk); #1 drdy = 0; t++;
    while (!dvld) begin @(posedge clk); #1 t++; end
    check("cycles", block_t'(t), 23);
    check("ciphertext", dout, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    check("inverted ciphertext", dout_inv, 128'h963b1f279584fbcf2732487f8f4b3aa5);
    // random blocks under a random enable
    fork
      forever begin @(posedge clk); #1 ce = ($urandom_range(0, 3) == 0); end
    join_none
    for (int n = 0; n < 30; n++) begin
      if (n % 5 == 0) begin
        key = rand128();
        krdy = 1; @(posedge clk); #1 krdy = 0;
      end
      dec = n[0];
      din = rand128();
      exp = dec ? ref_decrypt(key, din, tr) : ref_encrypt(key, din, tr);
      drdy = 1; @(posedge clk); #1 drdy = 0;
      wait (busy); wait (!busy && dvld);
      @(posedge clk); #1;
      check("random ciphertext", dout, exp);
      check("random inverted ciphertext", dout_inv, ~exp);
    end
    disable fork;
    dec = 0;
    check("round cycles", block_t'(n_round), block_t'(31 * 11));
    check("precharge cycles", block_t'(n_pre), block_t'(31 * 10));
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (slot_used[i] == 0) begin failures++; $display("FAIL slot %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
