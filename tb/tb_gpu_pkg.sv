// tb_gpu_pkg: checks the shared definitions against the published examples:
// the machine code of the counting loop, the 32/48-bit bus widths, the
// fixed-point constants (-1.25 = 0xFB00, 4.0 = 0x1000) and the shuffle codes
// used by the Mandelbrot program.
module tb_gpu_pkg;
  import gpu_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shuf_code_t sc;
    @(negedge clk);
    check("xor 0 0",    make_instr(OP_XOR,  4'd0, 16'd0, 4'd0, 4'd0) === 32'h20000000);
    check("addi 1 0 7", make_instr(OP_ADDI, 4'd1, 16'd7, 4'd0, 4'd0) === 32'h31000700);
    check("addi 0 0 1", make_instr(OP_ADDI, 4'd0, 16'd1, 4'd0, 4'd0) === 32'h30000100);
    check("bge 1 0",    make_instr(OP_BGE,  4'd1, 16'd0, 4'd0, 4'd0) === 32'h41000000);
    check("jump 2",     make_instr(OP_JUMP, 4'd0, 16'd2, 4'd0, 4'd0) === 32'h50000200);
    check("end",        make_instr(OP_END,  4'd0, 16'd0, 4'd0, 4'd0) === 32'h10000000);
    check("nop",        make_instr(OP_NOP,  4'd0, 16'd0, 4'd0, 4'd0) === 32'h00000000);
    check("instr 32 bits", $bits(instr_t) == 32);
    check("controller_regs 48 bits", $bits(ctrl_regs_t) == 48);
    check("word 16 bits, 10 fraction bits", WORD_W == 16 && FRAC_BITS == 10 && NUM_REGS == 16);
    check("4.0", FIX_FOUR === 16'h1000);
    check("-1.25", fixed_t'(-1.25 * (1 << FRAC_BITS)) === 16'hFB00);
    sc = '{mode: MODE_NEG, src: SRC_OUT1};
    check("negate y code", sc === 4'b1001);
    sc = '{mode: MODE_X2, src: SRC_OUT0};
    check("double x code", sc === 4'b0100);
    // all fifteen opcodes distinct
    begin
      logic [15:0] seen;
      seen = '0;
      for (opcode_e op = op.first(); ; op = op.next()) begin
        seen[op] = 1'b1;
        if (op == op.last()) break;
      end
      check("15 distinct opcodes", $countones(seen) == 15);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
