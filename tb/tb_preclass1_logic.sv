// tb_preclass1_logic: the example netlist must give the carry (o1) and sum
// (o2) of a + b + c for all eight input combinations.
module tb_preclass1_logic;
  int checks = 0, failures = 0;
  logic a, b, c, o1, o2;

  preclass1_logic dut (.a, .b, .c, .o1, .o2);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int sum;
      {c, b, a} = 3'(v);
      sum = int'(a) + int'(b) + int'(c);
      #1;
      checks++;
      if ({o1, o2} !== 2'(sum)) begin
        failures++;
        $display("FAIL abc=%b%b%b o1=%b o2=%b", a, b, c, o1, o2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
