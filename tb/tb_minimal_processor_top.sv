// tb_minimal_processor_top: end-to-end test of the whole design at its
// default size. The one-gate processor is loaded with the example program
// (majority and parity of inputs 0..2) and its output registers are
// compared, after every pass through the program, with the gate-level
// netlist beside it and with a + b + c. Then the processor is stopped,
// reloaded with a program that evaluates a small random netlist of
// random gate functions, and checked against a model of that netlist. The
// mux flip-flop is clocked by the same clock and checked at each edge, and
// the stand-alone configurable gate is reloaded with random truth tables and
// checked for every operand pair.
//
// Mechanisms counted, each of which must occur: program words loaded, READ,
// GATE, WRITE and no-op instructions executed, PC wrap-arounds, stopped
// cycles, reprogramming, flip-flop captures and gate reconfigurations.
module tb_minimal_processor_top;
  import mp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, run = 0, prog_we = 0;
  logic [3:0] prog_addr = 0, pc;
  instr_t prog_data, instr;
  logic [7:0] in = 0, out;
  logic ref_o1, ref_o2, ff_d = 0, ff_q;
  logic cg_we = 0, cg_a = 0, cg_b = 0, cg_y;
  logic [3:0] cg_fn = 0, cg_table;
  instr_t prog [16];

  int n_load = 0, n_read = 0, n_gate = 0, n_write = 0, n_nop = 0, n_wrap = 0,
      n_stop = 0, n_reprog = 0, n_ff = 0, n_cfg = 0;

  minimal_processor_top dut (.clk, .rst_n, .run, .prog_we, .prog_addr, .prog_data,
                             .in, .out, .pc, .instr, .ref_o1, .ref_o2, .ff_d, .ff_q,
                             .cg_we, .cg_fn, .cg_a, .cg_b, .cg_table, .cg_y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // event counters, sampled at each rising edge
  always @(posedge clk) if (rst_n) begin
    if (prog_we) n_load++;
    if (!run) n_stop++;
    else begin
      unique case (instr.itype)
        T_READ:  n_read++;
        T_GATE:  n_gate++;
        T_WRITE: n_write++;
        T_NOP:   n_nop++;
      endcase
      if (pc == 4'd15) n_wrap++;
    end
  end

  // flip-flop: Q after each rising edge is D from just before it
  always @(posedge clk) begin
    logic dq;
    dq = ff_d;
    #1;
    n_ff++;
    chk(ff_q == dq, "mux flip-flop");
  end
  always @(negedge clk) ff_d <= 1'($urandom);

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

  // model of a random program: slots hold values, as the processor does
  function automatic logic [7:0] model_run(logic [7:0] x, logic [7:0] o_prev);
    logic slot [8];
    logic [7:0] o;
    o = o_prev;
    foreach (slot[k]) slot[k] = 1'b0;
    for (int i = 0; i < 16; i++) begin
      instr_t p;
      logic g;
      p = prog[i];
      g = p.fn[3 - (2 * int'(slot[p.in1]) + int'(slot[p.in0]))];
      unique case (p.itype)
        T_READ:  slot[p.out] = x[p.in0];
        T_GATE:  slot[p.out] = g;
        T_WRITE: o[p.out] = g;
        T_NOP:   ;
      endcase
    end
    return o;
  endfunction

  initial begin
    prog_data = '0;
    prog[0]  = mk_instr(T_READ,  F_NONE, 0, 0, 0);
    prog[1]  = mk_instr(T_READ,  F_NONE, 1, 0, 1);
    prog[2]  = mk_instr(T_READ,  F_NONE, 2, 0, 2);
    prog[3]  = mk_instr(T_GATE,  F_AND,  0, 1, 3);
    prog[4]  = mk_instr(T_GATE,  F_AND,  1, 2, 4);
    prog[5]  = mk_instr(T_GATE,  F_OR,   3, 4, 3);
    prog[6]  = mk_instr(T_GATE,  F_AND,  0, 2, 4);
    prog[7]  = mk_instr(T_GATE,  F_OR,   3, 4, 5);
    prog[8]  = mk_instr(T_GATE,  F_XOR,  0, 1, 3);
    prog[9]  = mk_instr(T_GATE,  F_XOR,  3, 2, 6);
    prog[10] = mk_instr(T_WRITE, F_SEL0, 6, 0, 1);
    prog[11] = mk_instr(T_WRITE, F_SEL0, 5, 0, 0);
    for (int i = 12; i < 16; i++) prog[i] = mk_instr(T_NOP, F_NONE, 0, 0, 0);
    load();

    // example program, run continuously; inputs change at the start of a pass
    run = 1;
    for (int p = 0; p < 32; p++) begin
      in = 8'($urandom);
      repeat (16) @(negedge clk);
      chk(pc == 0, "pass ends at PC 0");
      chk(out[0] == ref_o1 && out[1] == ref_o2, "processor matches gate netlist");
      chk(2'(int'(in[0]) + int'(in[1]) + int'(in[2])) == {out[0], out[1]},
          "processor gives a + b + c");
      if (p % 8 == 7) begin
        run = 0;
        repeat (3) @(negedge clk);
        chk(pc == 0, "stopped processor holds PC");
        run = 1;
      end
    end

    // random programs
    repeat (20) begin
      logic [7:0] o_prev;
      for (int i = 0; i < 16; i++) begin
        logic [1:0] t;
        t = 2'($urandom);
        prog[i] = mk_instr(itype_e'(t), 4'($urandom), 3'($urandom), 3'($urandom),
                           3'($urandom));
      end
      // start with reads so no slot is read before it is written
      for (int i = 0; i < 8; i++) prog[i] = mk_instr(T_READ, F_NONE, 3'($urandom), 0, 3'(i));
      o_prev = out;
      load();
      n_reprog++;
      o_prev = '0;  // reset clears the outputs
      run = 1;
      repeat (3) begin
        in = 8'($urandom);
        repeat (16) @(negedge clk);
        o_prev = model_run(in, o_prev);
        chk(out == o_prev, "random program matches model");
      end
      run = 0;
    end

    // stand-alone configurable gate
    repeat (30) begin
      logic [3:0] t;
      t = 4'($urandom);
      @(negedge clk);
      cg_we = 1; cg_fn = t;
      @(negedge clk);
      cg_we = 0; cg_fn = ~t;
      n_cfg++;
      for (int r = 0; r < 4; r++) begin
        {cg_b, cg_a} = 2'(r);
        #1;
        chk(cg_table == t && cg_y == t[3 - r], "configurable gate");
      end
    end

    $display("cfg=%0d", n_cfg);
    $display("loads=%0d read=%0d gate=%0d write=%0d nop=%0d wrap=%0d stopped=%0d reprogram=%0d ff=%0d",
             n_load, n_read, n_gate, n_write, n_nop, n_wrap, n_stop, n_reprog, n_ff);
    chk(n_load > 0,   "program loading happened");
    chk(n_read > 0,   "READ happened");
    chk(n_gate > 0,   "GATE happened");
    chk(n_write > 0,  "WRITE happened");
    chk(n_nop > 0,    "no-op happened");
    chk(n_wrap > 0,   "PC wrap happened");
    chk(n_stop > 0,   "stop happened");
    chk(n_reprog > 0, "reprogramming happened");
    chk(n_ff > 0,     "flip-flop captured");
    chk(n_cfg > 0,    "gate reconfigured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
