// tb_mux_flip_flop: Q takes the value D has at the rising clock edge and
// keeps it while D changes with the clock high or low.
module tb_mux_flip_flop;
  int checks = 0, failures = 0;
  logic clk = 0, d = 0, q;
  logic sampled;

  mux_flip_flop dut (.clk, .d, .q);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what);
    checks++;
    if (q !== sampled) begin
      failures++;
      $display("FAIL %s q=%b exp=%b", what, q, sampled);
    end
  endtask

  initial begin
    // clock low: settle D, then rising edge
    d = 1; #5;
    clk = 1; sampled = 1; #1;
    chk("first edge");
    repeat (300) begin
      // clock high: D changes must not reach Q
      #2 d = 1'($urandom); #2;
      chk("clk high, d changed");
      clk = 0; #2;
      chk("after falling edge");
      // clock low: D changes, Q holds
      d = 1'($urandom); #2;
      chk("clk low, d changed");
      d = 1'($urandom); #2;
      sampled = d;
      clk = 1; #1;
      chk("rising edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
