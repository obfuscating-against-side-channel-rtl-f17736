// tb_aes_sbox: exhaustive check of both S-box tables.
// The normal table is compared with an S-box computed from the GF(2^8) inverse
// and affine map; the inverted-rotated table with ~S(~x). Spot values from the
// published tables are checked as well (01->7c, 03->7b, inverted FC->84, 00->e9).
module tb_aes_sbox;
  import tb_aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] a, y_n, y_i;

  aes_sbox #(.INVERTED(1'b0)) dut_n (.a(a), .y(y_n));
  aes_sbox #(.INVERTED(1'b1)) dut_i (.a(a), .y(y_i));

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%02h got %02h expected %02h", what, a, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      @(posedge clk);
      check("normal", y_n, sb(a));
      check("inverted", y_i, ~sb(~a));
    end
    a = 8'h01; @(posedge clk); check("doc 01", y_n, 8'h7c);
    a = 8'h03; @(posedge clk); check("doc 03", y_n, 8'h7b);
    a = 8'hfc; @(posedge clk); check("doc inv fc", y_i, 8'h84);
    a = 8'h00; @(posedge clk); check("doc inv 00", y_i, 8'he9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
