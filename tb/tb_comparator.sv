// tb_comparator: checks the 32-bit equality comparator on equal words,
// words differing in one bit, random words and with the enable low.
module tb_comparator;
  logic [31:0] a, b;
  logic        en, eq;
  int checks = 0, failures = 0;

  comparator #(.WIDTH(32)) dut (.a(a), .b(b), .en(en), .eq(eq));

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic ten);
    logic exp;
    a = ta; b = tb_; en = ten;
    #1;
    exp = ten && (ta === tb_);
    checks++;
    if (eq !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h en=%0d eq=%0d exp=%0d", ta, tb_, ten, eq, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    for (int i = 0; i < 32; i++) begin
      r = $urandom;
      check(r, r, 1'b1);
      check(r, r ^ (32'd1 << i), 1'b1);
      check(r, r, 1'b0);
    end
    for (int i = 0; i < 200; i++) check($urandom, $urandom, 1'b1);
    check(32'h0, 32'h0, 1'b1);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check(32'hFFFF_FFFF, 32'h7FFF_FFFF, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
