// tb_data_mem: random writes and reads on both read ports, compared with a
// reference array; also checks that a write shows on the next cycle, and
// not before the clock edge, and that we = 0 writes nothing.
module tb_data_mem;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [2:0] ra0, ra1, wa;
  logic rd0, rd1, we, wd;
  logic model [8];

  data_mem dut (.clk, .ra0, .rd0, .ra1, .rd1, .we, .wa, .wd);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b", what, got, exp);
    end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra0 = 0; ra1 = 0;
    // fill every slot
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      we = 1; wa = 3'(i); wd = 1'(i % 3 == 0);
      model[i] = wd;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 8; i++) begin
      ra0 = 3'(i); ra1 = 3'(7 - i); #1;
      chk(rd0, model[i], "fill rd0");
      chk(rd1, model[7 - i], "fill rd1");
    end
    // random traffic
    repeat (300) begin
      @(negedge clk);
      we  = 1'($urandom);
      wa  = 3'($urandom);
      wd  = 1'($urandom);
      ra0 = wa;
      ra1 = 3'($urandom);
      #1;
      // before the edge the old value is read
      chk(rd0, model[ra0], "pre-edge rd0");
      chk(rd1, model[ra1], "rd1");
      @(posedge clk);
      if (we) model[wa] = wd;
      #1;
      chk(rd0, model[ra0], "post-edge rd0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
