// tb_input_mux: every select value for random input vectors, at the default
// 8 inputs and at 5 inputs (where selects 5..7 must read 0).
module tb_input_mux;
  int checks = 0, failures = 0;
  logic [7:0] in8;
  logic [4:0] in5;
  logic [2:0] sel;
  logic y8, y5;

  input_mux dut (.in(in8), .sel, .y(y8));
  input_mux #(.N_IN(5)) dut5 (.in(in5), .sel, .y(y5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50) begin
      in8 = 8'($urandom);
      in5 = 5'($urandom);
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s);
        #1;
        checks += 2;
        if (y8 !== in8[s]) begin
          failures++;
          $display("FAIL 8 in=%b sel=%0d y=%b", in8, s, y8);
        end
        if (y5 !== ((s < 5) ? in5[s] : 1'b0)) begin
          failures++;
          $display("FAIL 5 in=%b sel=%0d y=%b", in5, s, y5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
