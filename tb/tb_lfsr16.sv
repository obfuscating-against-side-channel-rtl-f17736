// tb_lfsr16: checks the 16-bit LFSR against a bit-level model of the feedback
// x^16+x^15+x^13+x^4+1, its seed load, enable, the zero-seed guard and its
// maximal period of 65535 steps.
module tb_lfsr16;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic        rst_n, load, en;
  logic [15:0] seed, q, m;

  lfsr16 #(.RESET_VAL(16'hACE1)) dut (
    .clk(clk), .rst_n(rst_n), .load_i(load), .seed_i(seed), .en_i(en), .q_o(q)
  );

  function automatic logic [15:0] model_step(logic [15:0] v);
    return {v[14:0], v[15] ^ v[14] ^ v[12] ^ v[3]};
  endfunction

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %04h expected %04h", what, got, exp);
    end
  endtask

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int period;
    rst_n = 0; load = 0; en = 0; seed = 0;
    @(posedge clk); #1 rst_n = 1;
    check("reset value", q, 16'hACE1);
    // random load/enable pattern against the model
    m = q;
    for (int n = 0; n < 2000; n++) begin
      load = ($urandom_range(0, 9) == 0);
      en   = $urandom_range(0, 1);
      seed = 16'($urandom());
      @(posedge clk); #1;
      if (load) m = (seed == 0) ? 16'h0001 : seed;
      else if (en) m = model_step(m);
      check("sequence", q, m);
    end
    // zero seed is replaced
    load = 1; seed = 16'h0; @(posedge clk); #1 load = 0;
    check("zero seed", q, 16'h0001);
    // period: 65535 steps back to the start, never earlier
    load = 1; seed = 16'h7575; @(posedge clk); #1 load = 0; en = 1;
    period = 0;
    do begin
      @(posedge clk); #1; period++;
    end while (q != 16'h7575 && period < 70000);
    check("period", 16'(period), 16'd65535);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
