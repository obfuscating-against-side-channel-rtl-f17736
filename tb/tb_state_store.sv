// tb_state_store: checks the randomised state storage. Random writes to random
// slots; the read port must show the last written word, the chosen slot must hold
// it and every other slot must keep its old content. Also checks the reset value.
module tb_state_store;
  import aes_pkg::block_t;
  import tb_aes_ref_pkg::rand128;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic       rst_n, we;
  logic [1:0] sel;
  block_t     d, q;
  block_t     model [4];
  block_t     last;

  state_store #(.SLOTS(4), .INIT('1)) dut (
    .clk(clk), .rst_n(rst_n), .we_i(we), .sel_i(sel), .d_i(d), .q_o(q)
  );

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
    int used [4] = '{0, 0, 0, 0};
    rst_n = 0; we = 0; sel = 0; d = 0;
    @(posedge clk); #1 rst_n = 1;
    check("reset value", q, '1);
    for (int i = 0; i < 4; i++) model[i] = '1;
    last = '1;
    for (int n = 0; n < 1000; n++) begin
      we = $urandom_range(0, 1); sel = 2'($urandom()); d = rand128();
      @(posedge clk); #1;
      if (we) begin
        model[sel] = d; last = d; used[sel]++;
      end
      check("read port", q, last);
      for (int i = 0; i < 4; i++) check($sformatf("slot %0d", i), dut.regs[i], model[i]);
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (used[i] == 0) begin failures++; $display("FAIL slot %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
