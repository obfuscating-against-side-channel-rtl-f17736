// tb_rclkgen: checks the random clock generator.
//  * every random-clock period is 3, 4, 5 or 6 system clocks and all four occur;
//  * after a seed load the sequence of periods matches a model that polls the
//    LFSR's top bit twice per period (seeds 7575, as in the document's example,
//    and random seeds);
//  * rclk is high for floor(P/2) system clocks of each period;
//  * rclk_en is high exactly in the system cycle ending with a rising rclk edge.
module tb_rclkgen;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic        rst_n, lds, rclk, rclk_en;
  logic [15:0] seed;
  logic [2:0]  period;

  rclkgen dut (
    .clk(clk), .rst_n(rst_n), .lds_i(lds), .seed_i(seed),
    .rclk_o(rclk), .rclk_en_o(rclk_en), .period_o(period)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic logic [15:0] step(logic [15:0] v);
    return {v[14:0], v[15] ^ v[14] ^ v[12] ^ v[3]};
  endfunction

  // Monitor: rising edges, high time, enable alignment.
  int   cyc = 0, hi = 0, last_rise = -1;
  int   seen [3:6];
  int   edges [$];
  logic rclk_q = 0, en_q = 0;
  int   p;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    rclk_q <= rclk;
    en_q   <= rclk_en;
    if (rst_n) begin
      if (rclk && !rclk_q) begin
        check("enable before rising edge", int'(en_q), 1);
        if (last_rise >= 0) begin
          p = cyc - last_rise;
          checks++;
          if (p < 3 || p > 6) begin
            failures++;
            $display("FAIL period %0d out of range", p);
          end else seen[p]++;
          check("high time", hi, p / 2);
        end
        last_rise <= cyc;
        edges.push_back(cyc);
        hi <= 1;
      end else begin
        if (en_q) begin
          failures++; checks++;
          $display("FAIL enable without rising edge");
        end
        if (rclk) hi <= hi + 1;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic seeded_run(logic [15:0] s, int n);
    logic [15:0] m;
    int exp;
    // wait for a cycle that ends with a rising edge, then load in the next one
    do @(posedge clk); while (!rclk_en);
    #1 lds = 1; seed = s;
    @(posedge clk); #1 lds = 0;
    edges.delete();
    m = (s == 0) ? 16'h0001 : s;
    wait (edges.size() >= n + 1);
    for (int i = 0; i < n; i++) begin
      logic b1, b0;
      b1 = m[15]; m = step(m);
      b0 = m[15]; m = step(m);
      exp = 3 + int'({b1, b0});
      check($sformatf("seeded period %0d (seed %04h)", i, s), edges[i+1] - edges[i], exp);
    end
  endtask

  initial begin
    rst_n = 0; lds = 0; seed = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    seeded_run(16'h7575, 60);
    for (int k = 0; k < 10; k++) seeded_run(16'($urandom()), 40);
    for (int p = 3; p <= 6; p++) begin
      checks++;
      if (seen[p] == 0) begin
        failures++;
        $display("FAIL period %0d never seen", p);
      end
    end
    $display("periods seen: 3x=%0d 4x=%0d 5x=%0d 6x=%0d", seen[3], seen[4], seen[5], seen[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
