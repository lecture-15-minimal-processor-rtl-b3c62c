// tb_prog_gate: checks the programmable gate for every truth table and every
// operand pair, and the named codes (AND, OR, XOR, NONE, SEL0) against the
// Boolean operators they stand for.
module tb_prog_gate;
  import mp_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] fn;
  logic a, b, y;

  prog_gate dut (.fn, .a, .b, .y);

  task automatic expect_eq(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s fn=%b a=%b b=%b got=%b exp=%b", what, fn, a, b, got, exp);
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
    for (int f = 0; f < 16; f++)
      for (int r = 0; r < 4; r++) begin
        fn = 4'(f);
        b  = r[1];
        a  = r[0];
        #1;
        // row (b,a) = (0,0) is the most significant truth-table bit
        expect_eq(y, fn[3 - r], "table");
      end
    for (int r = 0; r < 4; r++) begin
      b = r[1];
      a = r[0];
      fn = F_AND;  #1; expect_eq(y, a & b, "AND");
      fn = F_OR;   #1; expect_eq(y, a | b, "OR");
      fn = F_XOR;  #1; expect_eq(y, a ^ b, "XOR");
      fn = F_NONE; #1; expect_eq(y, 1'b0,  "NONE");
      fn = F_SEL0; #1; expect_eq(y, a,     "SEL0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
