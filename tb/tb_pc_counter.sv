// tb_pc_counter: PC is 0 after reset, adds 1 per enabled cycle, holds when
// not enabled, and wraps from 15 to 0.
module tb_pc_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, en = 0;
  logic [3:0] pc;
  int exp_pc;

  pc_counter #(.AW(4)) dut (.clk, .rst_n, .en, .pc);

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
    if (pc !== 4'(exp_pc)) begin
      failures++;
      $display("FAIL %s pc=%0d exp=%0d", what, pc, exp_pc);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    #1;
    exp_pc = 0;
    chk("reset");
    @(negedge clk); rst_n = 1; en = 1;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      exp_pc = (exp_pc + 1) % 16;
      chk("count");
    end
    en = 0;
    repeat (3) begin
      @(negedge clk);
      chk("hold");
    end
    repeat (100) begin
      en = 1'($urandom);
      @(negedge clk);
      if (en) exp_pc = (exp_pc + 1) % 16;
      chk("random enable");
    end
    rst_n = 0; #1;
    exp_pc = 0;
    chk("async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
