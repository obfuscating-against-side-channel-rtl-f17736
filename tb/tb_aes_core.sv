// tb_aes_core: checks the iterative AES core in its three variants.
//  dut      : normal copy with precharge and four-slot storage (the default)
//  dut_inv  : inverted copy, fed the complemented plaintext
//  dut_base : normal copy without the Hamming-distance features
// Checks: the eleven intermediate values of the example block (key 000102..0f,
// plaintext 00112233..ff) and their complements in the inverted copy; the
// ciphertext 69c4e0d86a7b0430d8cdb78070b4c55a; 23 cycles from key request to
// result with precharge and 13 without; all-zero round inputs in each precharge
// cycle and 10 precharge cycles per block; writes go to the slot chosen by
// slot_i; random keys and blocks under a random clock enable against the
// reference model; a data request that arrives before any key waits for it.
// Decryption: KD of the example key equals its last round key
// 13111d7fe3944a17f307a78b4d2b30c5; decrypting the example ciphertext gives the
// reference inverse-cipher intermediate values (complemented in the inverted
// copy), 22 cycles from data request to result with precharge, 12 without;
// random blocks are decrypted under the random clock enable as well.
module tb_aes_core;
  import aes_pkg::*;
  import tb_aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic       rst_n, ce, krdy, drdy, dec;
  block_t     key, din;
  logic [1:0] slot;
  block_t     dout, dout_inv, dout_base;
  logic       kvld, dvld, busy, pre, kvld_i, dvld_i, busy_i, kvld_b, dvld_b, busy_b;
  logic       kdvld, kdvld_i, kdvld_b;
  logic [3:0] rnd;

  aes_core dut (
    .clk(clk), .rst_n(rst_n), .ce_i(ce), .krdy_i(krdy), .drdy_i(drdy), .dec_i(dec), .key_i(key),
    .din_i(din), .slot_i(slot), .dout_o(dout), .kvld_o(kvld), .kdvld_o(kdvld), .dvld_o(dvld),
    .busy_o(busy), .precharge_o(pre), .round_o(rnd)
  );
  aes_core #(.INVERTED(1'b1)) dut_inv (
    .clk(clk), .rst_n(rst_n), .ce_i(ce), .krdy_i(krdy), .drdy_i(drdy), .dec_i(dec), .key_i(key),
    .din_i(~din), .slot_i(slot), .dout_o(dout_inv), .kvld_o(kvld_i), .kdvld_o(kdvld_i), .dvld_o(dvld_i),
    .busy_o(busy_i), .precharge_o(), .round_o()
  );
  aes_core #(.HD_PROTECT(1'b0)) dut_base (
    .clk(clk), .rst_n(rst_n), .ce_i(ce), .krdy_i(krdy), .drdy_i(drdy), .dec_i(dec), .key_i(key),
    .din_i(din), .slot_i(slot), .dout_o(dout_base), .kvld_o(kvld_b), .kdvld_o(kdvld_b), .dvld_o(dvld_b),
    .busy_o(busy_b), .precharge_o(), .round_o()
  );

  // Intermediate values of the example block, normal and inverted copy.
  localparam block_t IV [11] = '{
    128'h00102030405060708090a0b0c0d0e0f0, 128'h89d810e8855ace682d1843d8cb128fe4,
    128'h4915598f55e5d7a0daca94fa1f0a63f7, 128'hfa636a2825b339c940668a3157244d17,
    128'h247240236966b3fa6ed2753288425b6c, 128'hc81677bc9b7ac93b25027992b0261996,
    128'hc62fe109f75eedc3cc79395d84f9cf5d, 128'hd1876c0f79c4300ab45594add66ff41f,
    128'hfde3bad205e5d0d73547964ef1fe37f1, 128'hbd6e7c3df2b5779e0b61216e8b10b689,
    128'h69c4e0d86a7b0430d8cdb78070b4c55a};
  localparam block_t IV_INV [11] = '{
    128'hffefdfcfbfaf9f8f7f6f5f4f3f2f1f0f, 128'h7627ef177aa53197d2e7bc2734ed701b,
    128'hb6eaa670aa1a285f25356b05e0f59c08, 128'h059c95d7da4cc636bf9975cea8dbb2e8,
    128'hdb8dbfdc96994c05912d8acd77bda493, 128'h37e98843648536c4dafd866d4fd9e669,
    128'h39d01ef608a1123c3386c6a27b0630a2, 128'h2e7893f0863bcff54baa6b5229900be0,
    128'h021c452dfa1a2f28cab869b10e01c80e, 128'h429183c20d4a8861f49ede9174ef4976,
    128'h963b1f279584fbcf2732487f8f4b3aa5};

  task automatic check(string what, block_t got, block_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  // Monitor of the default instance: intermediate values, precharge, slots.
  block_t seen_n [$], seen_i [$];
  int     n_pre = 0;
  int     slot_used [4] = '{0, 0, 0, 0};
  logic [1:0] slot_cap;
  always @(posedge clk) begin
    if (rst_n && ce && dut.store_we) begin
      seen_n.push_back(dut.result);
      seen_i.push_back(dut_inv.result);
      slot_cap = slot;
      slot_used[slot_cap]++;
      #1 check("written slot", block_t'(dut.u_store.ptr), block_t'(slot_cap));
    end
  end
  always @(posedge clk) begin
    if (rst_n && pre) begin
      checks++;
      if (dut.round_in != '0 || dut.round_key != '0 || dut_inv.round_in != '0) begin
        failures++;
        $display("FAIL precharge cycle with nonzero round input");
      end
      if (ce) n_pre++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) slot <= 2'($urandom());

  initial begin
    int t, t_base, t_hd;
    rst_n = 0; ce = 1; krdy = 0; drdy = 0; dec = 0; key = 0; din = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // --- example block, ce = 1, cycle counts --------------------------------
    key = 128'h000102030405060708090a0b0c0d0e0f;
    din = 128'h00112233445566778899aabbccddeeff;
    seen_n.delete(); seen_i.delete(); n_pre = 0;
    krdy = 1; @(posedge clk); #1 krdy = 0; drdy = 1; t = 1;
    @(posedge clk); #1 drdy = 0; t++;
    t_base = 0; t_hd = 0;
    while (!dvld) begin
      if (dvld_b && t_base == 0) t_base = t;
      @(posedge clk); #1 t++;
    end
    t_hd = t;
    check("cycles with precharge", block_t'(t_hd), block_t'(23));
    check("cycles without precharge", block_t'(t_base), block_t'(13));
    check("ciphertext", dout, IV[10]);
    check("inverted ciphertext", dout_inv, IV_INV[10]);
    check("baseline ciphertext", dout_base, IV[10]);
    check("number of round cycles", block_t'(seen_n.size()), block_t'(11));
    for (int r = 0; r < 11 && r < seen_n.size(); r++) begin
      check($sformatf("intermediate value %0d", r), seen_n[r], IV[r]);
      check($sformatf("inverted intermediate value %0d", r), seen_i[r], IV_INV[r]);
    end
    check("precharge cycles", block_t'(n_pre), block_t'(10));

    // --- decryption of the example ciphertext ----------------------------------
    begin
      trace_t dtr;
      block_t dpt;
      wait (kdvld && kdvld_b);
      @(posedge clk); #1;
      check("decryption key KD", dut.kd_reg, 128'h13111d7fe3944a17f307a78b4d2b30c5);
      check("decryption key KD inverted copy", dut_inv.kd_reg, 128'h13111d7fe3944a17f307a78b4d2b30c5);
      din = IV[10];
      dpt = ref_decrypt(key, din, dtr);
      seen_n.delete(); seen_i.delete(); n_pre = 0;
      dec = 1; drdy = 1; t = 1; @(posedge clk); #1 drdy = 0;
      t_base = 0;
      while (!dvld) begin
        if (dvld_b && t_base == 0) t_base = t;
        @(posedge clk); #1 t++;
      end
      check("decryption cycles with precharge", block_t'(t), block_t'(22));
      check("decryption cycles without precharge", block_t'(t_base), block_t'(12));
      check("plaintext", dout, 128'h00112233445566778899aabbccddeeff);
      check("inverted plaintext", dout_inv, ~dpt);
      check("baseline plaintext", dout_base, dpt);
      check("number of decryption round cycles", block_t'(seen_n.size()), block_t'(11));
      for (int r = 0; r < 11 && r < seen_n.size(); r++) begin
        check($sformatf("decryption value %0d", r), seen_n[r], dtr[r]);
        check($sformatf("inverted decryption value %0d", r), seen_i[r], ~dtr[r]);
      end
      check("decryption precharge cycles", block_t'(n_pre), block_t'(10));
      dec = 0;
    end

    // --- random keys and blocks under a random clock enable -------------------
    fork
      forever begin @(posedge clk); #1 ce = ($urandom_range(0, 2) == 0); end
    join_none
    for (int n = 0; n < 40; n++) begin
      trace_t tr;
      block_t exp;
      if (n % 4 == 0) begin
        key = rand128();
        @(posedge clk); #1 krdy = 1; @(posedge clk); #1 krdy = 0;
      end
      dec = n[0];
      din = rand128();
      exp = dec ? ref_decrypt(key, din, tr) : ref_encrypt(key, din, tr);
      drdy = 1; @(posedge clk); #1 drdy = 0;
      wait (busy); wait (!busy && dvld && dvld_b);
      @(posedge clk); #1;
      check("random ciphertext", dout, exp);
      check("random inverted ciphertext", dout_inv, ~exp);
      check("random baseline ciphertext", dout_base, exp);
    end
    disable fork;
    ce = 1; dec = 0;

    // --- data request before any key -------------------------------------------
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    din = 128'h3243f6a8885a308d313198a2e0370734;
    drdy = 1; @(posedge clk); #1 drdy = 0;
    repeat (5) @(posedge clk);
    #1 checks++;
    if (busy) begin failures++; $display("FAIL started without a key"); end
    krdy = 1; @(posedge clk); #1 krdy = 0;
    wait (dvld); @(posedge clk); #1;
    check("waiting request ciphertext", dout, 128'h3925841d02dc09fbdc118597196a0b32);

    for (int i = 0; i < 4; i++) begin
      checks++;
      if (slot_used[i] == 0) begin failures++; $display("FAIL slot %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
