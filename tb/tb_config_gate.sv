// tb_config_gate: loads the AND, OR, XOR and NAND truth tables and random
// tables into the configuration flip-flops and checks the gate for all
// operand pairs; checks that the table changes only on a load at a clock edge.
module tb_config_gate;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, cfg_we = 0, a = 0, b = 0, y;
  logic [3:0] cfg_fn = 0, fn, table_model;

  config_gate dut (.clk, .rst_n, .cfg_we, .cfg_fn, .a, .b, .fn, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_gate(logic [3:0] t, logic x, logic z);
    case (t)
      4'b0001: return x & z;
      4'b0111: return x | z;
      4'b0110: return x ^ z;
      4'b1110: return ~(x & z);
      default: return t[3 - (2 * int'(z) + int'(x))];
    endcase
  endfunction

  task automatic sweep(string what);
    for (int r = 0; r < 4; r++) begin
      {b, a} = 2'(r);
      #1;
      checks++;
      if (fn !== table_model || y !== ref_gate(table_model, a, b)) begin
        failures++;
        $display("FAIL %s fn=%b a=%b b=%b y=%b", what, fn, a, b, y);
      end
    end
  endtask

  initial begin
    #1 rst_n = 0;
    table_model = '0;
    #1 sweep("reset");
    rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      logic [3:0] t;
      case (k)
        0: t = 4'b0001;
        1: t = 4'b0111;
        2: t = 4'b0110;
        3: t = 4'b1110;
        default: t = 4'($urandom);
      endcase
      @(negedge clk);
      cfg_we = 1; cfg_fn = t;
      #1 sweep("before load edge");
      @(negedge clk);
      cfg_we = 0; cfg_fn = ~t;
      table_model = t;
      sweep("after load");
      @(negedge clk);
      sweep("held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
