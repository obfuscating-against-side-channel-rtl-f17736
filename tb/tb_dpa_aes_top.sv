// tb_dpa_aes_top: end-to-end test of the DPA-resistant AES system at its default
// (and only) configuration, driven over the register bus like the host program:
// write key, KRDY, write block, DRDY, poll status, read the four ciphertext words.
// It encrypts the standard example block and random blocks with random keys and
// compares with the reference model, and counts how often each mechanism
// happened; any that never happened is a failure:
//   random periods of 3, 4, 5 and 6 system clocks, LFSR reseed per encryption,
//   precharge cycles (10 per block), each of the 4 storage slots, a soft reset,
//   a command dropped while busy, and differing encryption times (misalignment).
// It also decrypts the example ciphertext and random blocks (CTRL bit DEC).
// Each block must take 22 random-clock cycles from data request to result (plus
// one for the key) and its inverted twin must hold the complemented ciphertext.
module tb_dpa_aes_top;
  import aes_pkg::*;
  import tb_aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic        rst_n, we, rclk, busy, dvld;
  logic [3:0]  addr;
  logic [31:0] wdata, rdata;

  dpa_aes_top dut (
    .clk(clk), .rst_n(rst_n), .bus_we_i(we), .bus_addr_i(addr), .bus_wdata_i(wdata),
    .bus_rdata_o(rdata), .rclk_o(rclk), .busy_o(busy), .dvld_o(dvld)
  );

  task automatic check(string what, block_t got, block_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  // ---- mechanism monitors --------------------------------------------------
  int   period_seen [3:6];
  int   n_reseed = 0, n_pre = 0, n_srst = 0, n_dropped = 0, n_starts = 0;
  int   slot_used [4] = '{0, 0, 0, 0};
  int   cyc = 0, last_rise = -1, p;
  logic rclk_q = 1;
  logic busy_q = 0;
  always @(posedge clk) begin
    cyc++;
    rclk_q <= rclk;
    busy_q <= busy;
    if (rst_n) begin
      if (rclk && !rclk_q) begin
        if (last_rise >= 0) begin
          p = cyc - last_rise;
          checks++;
          if (p < 3 || p > 6) begin failures++; $display("FAIL random period %0d", p); end
          else period_seen[p]++;
        end
        last_rise = cyc;
      end
      if (dut.u_rclkgen.lds_i) n_reseed++;
      if (dut.rclk_en && dut.u_bitbal.precharge_o) n_pre++;
      if (dut.rclk_en && dut.u_bitbal.u_core_norm.store_we) slot_used[dut.u_bitbal.slot_o]++;
      if (dut.srst) n_srst++;
      if (busy && !busy_q) n_starts++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- bus access ------------------------------------------------------------
  task automatic wr(logic [3:0] a, logic [31:0] d);
    @(posedge clk); #1 we = 1; addr = a; wdata = d;
    @(posedge clk); #1 we = 0;
  endtask

  task automatic rd(logic [3:0] a, output logic [31:0] d);
    @(posedge clk); #1 addr = a; #1 d = rdata;
  endtask

  task automatic send_key(block_t k);
    for (int w = 0; w < 4; w++) wr(4'(1 + w), k[127 - 32*w -: 32]);
    wr(4'd0, 32'h1);                             // KRDY
  endtask

  int n_dec = 0;  // decrypted blocks
  int dur [$];   // system clocks per block, data request to result

  // Random-clock edges and system clocks from the data request (the DRDY pulse
  // inside the design) to the result.
  int   nce_q [$];
  int   nce = 0, t0 = 0;
  logic counting = 0, saw_busy = 0;
  always @(posedge clk) begin
    if (!rst_n) counting = 0;
    else if (dut.drdy) begin
      counting = 1; saw_busy = 0; nce = int'(dut.rclk_en); t0 = cyc;
    end else if (counting) begin
      if (dut.core_busy) saw_busy = 1;
      if (saw_busy && dut.core_dvld) begin
        nce_q.push_back(nce);
        dur.push_back(cyc - t0);
        counting = 0;
      end else if (dut.rclk_en) nce++;
    end
  end

  // Encrypts (dec = 0) or decrypts (dec = 1) one block over the bus.
  task automatic run(block_t d, bit dec, output block_t ct);
    logic [31:0] st, w;
    int  n0;
    bit  kd_ready;
    n0 = nce_q.size();
    for (int w2 = 0; w2 < 4; w2++) wr(4'(5 + w2), d[127 - 32*w2 -: 32]);
    kd_ready = !dec || dut.u_bitbal.kdvld_o;
    wr(4'd0, dec ? 32'ha : 32'h2);               // DRDY, with DEC for decryption
    // poll the status register like the host
    do rd(4'd0, st); while (st[0] || !st[1]);
    repeat (2) @(posedge clk);                   // let the monitor record the block
    checks++;
    if (nce_q.size() != n0 + 1) begin failures++; $display("FAIL block not timed"); end
    else if (kd_ready) check("random-clock cycles per block", block_t'(nce_q[n0]), 22);
    else begin
      // decryption right after a key load also waits for KD
      checks++;
      if (nce_q[n0] < 22 || nce_q[n0] > 32) begin
        failures++; $display("FAIL decryption waiting for KD took %0d cycles", nce_q[n0]);
      end
    end
    if (dec) n_dec++;
    $display("block %0d: %0d random-clock cycles, %0d system clocks", n0, nce_q[$], dur[$]);
    for (int i = 0; i < 4; i++) begin
      rd(4'(11 + i), w);
      ct[127 - 32*i -: 32] = w;
    end
    check("inverted twin", dut.u_bitbal.dout_inv_o, ~ct);
  endtask

  task automatic encrypt(block_t d, output block_t ct);
    run(d, 1'b0, ct);
  endtask

  initial begin
    block_t ct, key;
    trace_t tr;
    logic [31:0] st;
    rst_n = 0; we = 0; addr = 0; wdata = 0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;

    // Standard example block; then the key whose last round key is the one attacked.
    send_key(128'h000102030405060708090a0b0c0d0e0f);
    encrypt(128'h00112233445566778899aabbccddeeff, ct);
    check("example ciphertext", ct, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);

    // Random plaintexts under the fixed key, as in the trace collection.
    for (int n = 0; n < 12; n++) begin
      block_t pt;
      pt = rand128();
      encrypt(pt, ct);
      check("fixed-key ciphertext", ct, ref_encrypt(128'h000102030405060708090a0b0c0d0e0f, pt, tr));
    end

    // Random keys.
    for (int n = 0; n < 6; n++) begin
      block_t pt;
      pt = rand128();
      key = rand128();
      send_key(key);
      encrypt(pt, ct);
      check("random-key ciphertext", ct, ref_encrypt(key, pt, tr));
    end

    // Decryption: the example ciphertext right after its key (waits for KD),
    // then random ciphertexts under that key.
    key = 128'h000102030405060708090a0b0c0d0e0f;
    send_key(key);
    run(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1'b1, ct);
    check("example plaintext", ct, 128'h00112233445566778899aabbccddeeff);
    for (int n = 0; n < 6; n++) begin
      block_t c;
      c = rand128();
      run(c, n[0], ct);
      check(n[0] ? "decrypted block" : "encrypted block after decryption", ct,
            n[0] ? ref_decrypt(128'h000102030405060708090a0b0c0d0e0f, c, tr)
                 : ref_encrypt(128'h000102030405060708090a0b0c0d0e0f, c, tr));
    end

    // A second DRDY while busy is dropped: exactly one encryption runs.
    begin
      int s0;
      block_t pt;
      s0 = n_starts;
      pt = rand128();
      for (int w = 0; w < 4; w++) wr(4'(5 + w), pt[127 - 32*w -: 32]);
      wr(4'd0, 32'h2);
      wait (busy);
      wr(4'd0, 32'h2);
      n_dropped++;
      wait (dvld && !busy);
      repeat (200) @(posedge clk);
      check("dropped command: one start", block_t'(n_starts - s0), 1);
      rd(4'd11, st);
      check("dropped command: result word", block_t'(st), block_t'(ref_encrypt(key, pt, tr) >> 96));
    end

    // Soft reset clears the key; a new key and block work afterwards.
    wr(4'd0, 32'h4);
    rd(4'd0, st);
    check("status after soft reset", block_t'(st[2:0]), 0);
    send_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    encrypt(128'h3243f6a8885a308d313198a2e0370734, ct);
    check("ciphertext after soft reset", ct, 128'h3925841d02dc09fbdc118597196a0b32);

    // ---- mechanism coverage --------------------------------------------------
    for (int q = 3; q <= 6; q++) begin
      checks++;
      if (period_seen[q] == 0) begin failures++; $display("FAIL period %0dx never seen", q); end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (slot_used[i] == 0) begin failures++; $display("FAIL slot %0d never used", i); end
    end
    checks++; if (n_reseed == 0) begin failures++; $display("FAIL no reseed"); end
    check("precharge cycles", block_t'(n_pre), block_t'(10 * n_starts));
    checks++; if (n_srst == 0) begin failures++; $display("FAIL no soft reset"); end
    checks++; if (n_dropped == 0) begin failures++; $display("FAIL no dropped command"); end
    check("decrypted blocks", block_t'(n_dec), block_t'(4));
    begin
      int lo, hi;
      lo = dur[0]; hi = dur[0];
      foreach (dur[i]) begin
        if (dur[i] < lo) lo = dur[i];
        if (dur[i] > hi) hi = dur[i];
      end
      checks++;
      if (lo == hi) begin failures++; $display("FAIL encryption time never varied"); end
      $display("encryption time %0d..%0d system clocks over %0d blocks", lo, hi, dur.size());
    end
    $display("periods 3x=%0d 4x=%0d 5x=%0d 6x=%0d, reseeds=%0d, precharge=%0d, slots=%0d/%0d/%0d/%0d, soft resets=%0d, dropped=%0d, decrypted=%0d",
             period_seen[3], period_seen[4], period_seen[5], period_seen[6], n_reseed, n_pre,
             slot_used[0], slot_used[1], slot_used[2], slot_used[3], n_srst, n_dropped, n_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
