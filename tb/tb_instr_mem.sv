// tb_instr_mem: loads every word through the write port and reads it back
// at random addresses; checks that we = 0 leaves the contents unchanged.
module tb_instr_mem;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [3:0] ra, wa;
  logic [14:0] rd, wd;
  logic we;
  logic [14:0] model [16];

  instr_mem dut (.clk, .ra, .rd, .we, .wa, .wd);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      we = 1; wa = 4'(i); wd = 15'($urandom);
      model[i] = wd;
    end
    @(negedge clk);
    we = 0;
    repeat (200) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 3) == 0);
      wa = 4'($urandom);
      wd = 15'($urandom);
      ra = 4'($urandom);
      #1;
      checks++;
      if (rd !== model[ra]) begin
        failures++;
        $display("FAIL ra=%0d rd=%h exp=%h", ra, rd, model[ra]);
      end
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
