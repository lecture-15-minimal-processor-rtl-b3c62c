// tb_output_regs: reset clears all registers; a write loads only the
// addressed register, at the clock edge; we = 0 changes nothing.
module tb_output_regs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, we = 0, d = 0;
  logic [2:0] wa = 0;
  logic [7:0] q, model;

  output_regs dut (.clk, .rst_n, .we, .wa, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s q=%b exp=%b", what, q, model);
    end
  endtask

  initial begin
    model = '0;
    #1 rst_n = 0;
    #1 chk("reset");
    @(negedge clk); rst_n = 1;
    repeat (300) begin
      @(negedge clk);
      we = 1'($urandom);
      wa = 3'($urandom);
      d  = 1'($urandom);
      #1 chk("before edge");
      @(posedge clk);
      if (we) model[wa] = d;
      #1 chk("after edge");
    end
    rst_n = 0;
    model = '0;
    #1 chk("async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
