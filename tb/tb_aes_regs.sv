// tb_aes_regs: checks the register interface: key and data words land in the
// right bit positions, CTRL writes give one-cycle KRDY/DRDY/SRST pulses in the
// next cycle, KRDY/DRDY are dropped while busy, and the status word and the four
// ciphertext words read back correctly (unmapped addresses read zero); the
// DEC bit travels with DRDY and a DRDY without it selects encryption.
module tb_aes_regs;
  import aes_pkg::*;
  import tb_aes_ref_pkg::rand128;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic        rst_n, we, krdy, drdy, dec, srst, busy, dvld, kvld, sbusy, sdvld;
  logic [3:0]  addr;
  logic [31:0] wdata, rdata;
  block_t      key, din, dout;

  aes_regs dut (
    .clk(clk), .rst_n(rst_n), .bus_we_i(we), .bus_addr_i(addr), .bus_wdata_i(wdata),
    .bus_rdata_o(rdata), .key_o(key), .din_o(din), .krdy_o(krdy), .drdy_o(drdy), .dec_o(dec),
    .srst_o(srst), .dout_i(dout), .busy_i(busy), .dvld_i(dvld), .kvld_i(kvld),
    .stat_busy_o(sbusy), .stat_dvld_o(sdvld)
  );

  task automatic check(string what, block_t got, block_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic wr(logic [3:0] a, logic [31:0] d);
    we = 1; addr = a; wdata = d;
    @(posedge clk); #1 we = 0;
  endtask

  task automatic cmd(logic [31:0] d, logic exp_k, logic exp_d, logic exp_s);
    wr(4'd0, d);
    check("krdy pulse", block_t'(krdy), block_t'(exp_k));
    check("drdy pulse", block_t'(drdy), block_t'(exp_d));
    check("srst pulse", block_t'(srst), block_t'(exp_s));
    @(posedge clk); #1;
    check("krdy one cycle", block_t'(krdy), 0);
    check("drdy one cycle", block_t'(drdy), 0);
    check("srst one cycle", block_t'(srst), 0);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t k, d;
    rst_n = 0; we = 0; addr = 0; wdata = 0; busy = 0; dvld = 0; kvld = 0; dout = 0;
    @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      k = rand128(); d = rand128();
      for (int w = 0; w < 4; w++) wr(4'(1 + w), k[127 - 32*w -: 32]);
      for (int w = 0; w < 4; w++) wr(4'(5 + w), d[127 - 32*w -: 32]);
      check("key register", key, k);
      check("data register", din, d);
    end
    cmd(32'h1, 1, 0, 0);
    // a start is pending until the core reports busy: old result hidden
    dvld = 1;
    cmd(32'h2, 0, 1, 0);
    addr = 4'd0; #1;
    check("pending start reads busy", block_t'(rdata[1:0]), block_t'(2'b01));
    check("pending start status ports", block_t'({sdvld, sbusy}), block_t'(2'b01));
    cmd(32'h2, 0, 0, 0);                 // second start dropped while pending
    cmd(32'h1, 1, 0, 0);                 // a key may still follow
    busy = 1; @(posedge clk); #1 busy = 0; dvld = 0;
    addr = 4'd0; #1;
    check("pending cleared by busy", block_t'(rdata[1:0]), 0);
    // DEC travels with DRDY
    wr(4'd0, 32'ha);
    check("dec with drdy", block_t'({drdy, dec}), block_t'(2'b11));
    busy = 1; repeat (2) @(posedge clk); #1 busy = 0;
    wr(4'd0, 32'h2);
    check("enc with drdy", block_t'({drdy, dec}), block_t'(2'b10));
    busy = 1; repeat (2) @(posedge clk); #1 busy = 0;
    @(posedge clk); #1;
    cmd(32'h4, 0, 0, 1);
    cmd(32'h0, 0, 0, 0);
    busy = 1;
    cmd(32'h3, 0, 0, 0);
    cmd(32'h4, 0, 0, 1);
    busy = 0;
    for (int s = 0; s < 8; s++) begin
      {kvld, dvld, busy} = 3'(s);
      addr = 4'd0; #1;
      check("status", block_t'(rdata), block_t'(s));
      check("status ports", block_t'({sdvld, sbusy}), block_t'(s[1:0]));
    end
    dout = rand128();
    for (int w = 0; w < 4; w++) begin
      addr = 4'(11 + w); #1;
      check("ciphertext word", block_t'(rdata), block_t'(dout[127 - 32*w -: 32]));
    end
    addr = 4'd15; #1;
    check("unmapped", block_t'(rdata), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
