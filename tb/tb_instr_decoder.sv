// tb_instr_decoder: decodes the example instruction words of the lecture's
// format (type 2 bits, function 4, In0 3, In1 3, Out 3) and random words,
// and checks the fields and the write controls of each instruction type.
module tb_instr_decoder;
  import mp_pkg::*;
  int checks = 0, failures = 0;
  instr_t instr;
  logic [2:0] ra0, ra1, in_sel, wa;
  gatefn_t fn;
  logic dm_we, dm_src_in, out_we;

  instr_decoder dut (.instr, .ra0, .ra1, .in_sel, .fn, .dm_we, .dm_src_in, .wa, .out_we);

  task automatic chk(logic [14:0] word, logic [3:0] e_fn, int e_a, int e_b, int e_o,
                     logic e_dm, logic e_src, logic e_out);
    instr = word;
    #1;
    checks++;
    if (fn !== e_fn || ra0 !== 3'(e_a) || in_sel !== 3'(e_a) || ra1 !== 3'(e_b) ||
        wa !== 3'(e_o) || dm_we !== e_dm || (e_dm && dm_src_in !== e_src) ||
        out_we !== e_out) begin
      failures++;
      $display("FAIL word=%b fn=%b ra0=%0d ra1=%0d wa=%0d dm_we=%b src=%b out_we=%b",
               word, fn, ra0, ra1, wa, dm_we, dm_src_in, out_we);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // GATE AND 0 1 -> 2
    chk(15'b01_0001_000_001_010, 4'b0001, 0, 1, 2, 1, 0, 0);
    // GATE OR 3 4 -> 3
    chk(15'b010111011100011,     4'b0111, 3, 4, 3, 1, 0, 0);
    // GATE AND 0 2 -> 4
    chk(15'b010001000010100,     4'b0001, 0, 2, 4, 1, 0, 0);
    // READ input 2 -> slot 2
    chk(15'b00_0000_010_000_010, 4'b0000, 2, 0, 2, 1, 1, 0);
    // WRITE SEL0 slot 6 -> output 1
    chk(15'b11_0101_110_000_001, 4'b0101, 6, 0, 1, 0, 0, 1);
    // unused type: no write
    chk(15'b10_0111_001_010_011, 4'b0111, 1, 2, 3, 0, 0, 0);
    // random words against the field layout
    repeat (200) begin
      logic [14:0] w;
      w = 15'($urandom);
      chk(w, w[12:9], int'(w[8:6]), int'(w[5:3]), int'(w[2:0]),
          w[14:13] inside {2'b00, 2'b01}, w[14:13] == 2'b00, w[14:13] == 2'b11);
    end
    // the package helper builds the same word
    instr = mk_instr(T_GATE, F_OR, 3'd3, 3'd4, 3'd3);
    #1;
    checks++;
    if (instr !== 15'b010111011100011) begin
      failures++;
      $display("FAIL mk_instr %b", instr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
