// tb_mux2: exhaustive check of the 2:1 multiplexer against its truth table
// (output = i0 when S = 0, i1 when S = 1), for the 1-bit and a 4-bit width.
module tb_mux2;
  int checks = 0, failures = 0;
  logic s, i0, i1, y;
  logic [3:0] w0, w1, wy;

  // rows of (S, i0, i1, out)
  localparam logic [3:0] TT [8] = '{4'b0000, 4'b0010, 4'b0101, 4'b0111,
                                    4'b1000, 4'b1011, 4'b1100, 4'b1111};

  mux2 dut (.s, .i0, .i1, .y);
  mux2 #(.W(4)) dut4 (.s, .i0(w0), .i1(w1), .y(wy));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (TT[r]) begin
      {s, i0, i1} = TT[r][3:1];
      #1;
      checks++;
      if (y !== TT[r][0]) begin
        failures++;
        $display("FAIL s=%b i0=%b i1=%b y=%b", s, i0, i1, y);
      end
    end
    repeat (20) begin
      s  = 1'($urandom);
      w0 = 4'($urandom);
      w1 = 4'($urandom);
      #1;
      checks++;
      if (wy !== (s ? w1 : w0)) begin
        failures++;
        $display("FAIL 4-bit s=%b w0=%h w1=%h y=%h", s, w0, w1, wy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
