// tb_one_gate_processor: runs the lecture's example program (majority and
// parity of inputs a, b, c, twelve instructions) on the processor for all
// eight input combinations and checks the outputs against a + b + c, including
// the cycle in which each output register is loaded (instruction 11 writes
// output 1, instruction 12 writes output 0, one instruction per cycle). Then
// it checks that a stopped processor holds its state, and loads a second
// program (NAND, NOR and a copy) to show that changing the instruction memory
// changes the computation.
module tb_one_gate_processor;
  import mp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0, prog_we = 0;
  logic [3:0] prog_addr = 0, pc;
  instr_t prog_data, instr;
  logic [7:0] in = 0, out;
  instr_t prog [16];

  one_gate_processor dut (.clk, .rst_n, .run, .prog_we, .prog_addr, .prog_data,
                          .in, .out, .pc, .instr);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: pc=%0d out=%b in=%b", what, pc, out, in);
    end
  endtask

  task automatic load();
    run = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 4'(i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 0;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
  endtask

  initial begin
    prog_data = '0;
    // the example program
    prog[0]  = mk_instr(T_READ,  F_NONE, 0, 0, 0);  // a = in0
    prog[1]  = mk_instr(T_READ,  F_NONE, 1, 0, 1);  // b = in1
    prog[2]  = mk_instr(T_READ,  F_NONE, 2, 0, 2);  // c = in2
    prog[3]  = mk_instr(T_GATE,  F_AND,  0, 1, 3);  // t1 = a & b
    prog[4]  = mk_instr(T_GATE,  F_AND,  1, 2, 4);  // t2 = b & c
    prog[5]  = mk_instr(T_GATE,  F_OR,   3, 4, 3);  // t1 = t1 | t2
    prog[6]  = mk_instr(T_GATE,  F_AND,  0, 2, 4);  // t2 = a & c
    prog[7]  = mk_instr(T_GATE,  F_OR,   3, 4, 5);  // o1 = t1 | t2
    prog[8]  = mk_instr(T_GATE,  F_XOR,  0, 1, 3);  // t1 = a ^ b
    prog[9]  = mk_instr(T_GATE,  F_XOR,  3, 2, 6);  // o2 = t1 ^ c
    prog[10] = mk_instr(T_WRITE, F_SEL0, 6, 0, 1);  // out1 = o2
    prog[11] = mk_instr(T_WRITE, F_SEL0, 5, 0, 0);  // out0 = o1
    for (int i = 12; i < 16; i++) prog[i] = mk_instr(T_NOP, F_NONE, 0, 0, 0);
    load();
    #1 chk(pc == 0 && out == 0, "after reset");

    for (int v = 0; v < 8; v++) begin
      logic [1:0] sum, prev;
      prev = out[1:0];
      sum = 2'(v[0] + v[1] + v[2]);  // {carry, sum}
      @(negedge clk);
      in = {5'($urandom), 3'(v)};
      run = 1;
      // first pass from PC = 0
      repeat (10) @(negedge clk);
      chk(out[1:0] == prev, "no output before instruction 11");
      @(negedge clk);
      chk(out[1] == sum[0] && out[0] == prev[0], "out1 loaded by instruction 11");
      @(negedge clk);
      chk(out[1:0] == {sum[0], sum[1]}, "out0 loaded by instruction 12");
      chk(out[7:2] == 0, "other outputs untouched");
      repeat (4) @(negedge clk);
      chk(pc == 0, "PC wrapped after 16 instructions");
      run = 0;
    end

    // stopped: PC and outputs hold while inputs change
    @(negedge clk);
    in = ~in;
    repeat (5) @(negedge clk);
    chk(pc == 0, "PC holds while stopped");
    chk(out[1:0] == {^3'd7, 1'b1}, "outputs hold while stopped");

    // a different program: out2 = ~(in3 & in4), out3 = ~(in3 | in4), out4 = in5
    prog[0] = mk_instr(T_READ,  F_NONE,  3, 0, 0);
    prog[1] = mk_instr(T_READ,  F_NONE,  4, 0, 1);
    prog[2] = mk_instr(T_READ,  F_NONE,  5, 0, 7);
    prog[3] = mk_instr(T_GATE,  4'b1110, 0, 1, 2);  // NAND
    prog[4] = mk_instr(T_GATE,  4'b1000, 0, 1, 3);  // NOR
    prog[5] = mk_instr(T_WRITE, F_SEL0,  2, 0, 2);
    prog[6] = mk_instr(T_WRITE, F_SEL0,  3, 0, 3);
    prog[7] = mk_instr(T_WRITE, F_SEL0,  7, 0, 4);
    for (int i = 8; i < 16; i++) prog[i] = mk_instr(T_NOP, F_NONE, 0, 0, 0);
    load();
    repeat (20) begin
      @(negedge clk);
      in = 8'($urandom);
      run = 1;
      repeat (16) @(negedge clk);
      run = 0;
      chk(out[2] == ~(in[3] & in[4]) && out[3] == ~(in[3] | in[4]) && out[4] == in[5],
          "second program");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
