// tb_controller: self-checking test of the controller with its program BRAM.
// Runs a program built from the counting-loop example of the ISA (xor,
// addi, bge, jump back eight times) followed by add, a memory LOADI, pause,
// a signed bge whose jump must not be taken, a memory WRITE and end. Checks
// the register values forwarded with the memory instructions and read
// through the debug port at the pause checkpoint, the memory handshake,
// pause/resume, and the rate of one instruction per two cycles.
module tb_controller;
  import gpu_pkg::*;

  logic clk = 0, rst = 1;
  logic start = 0, resume = 0;
  logic prog_we = 0;
  logic [9:0] prog_addr = 0, imem_addr;
  logic [31:0] prog_data = 0, imem_data;
  instr_t mem_instr;
  logic mem_instr_valid, paused, done;
  logic [3:0] dbg_sel = 0;
  logic [15:0] dbg_value;
  ctrl_regs_t cregs;
  int checks = 0, failures = 0;
  int n_mem = 0;
  logic last_valid = 0;

  always #5 clk = ~clk;

  instruction_bram #(.DEPTH(1024)) u_imem (.clk, .wr_en(prog_we), .wr_addr(prog_addr),
    .wr_data(prog_data), .rd_addr(imem_addr), .rd_data(imem_data));
  controller #(.IMEM_ADDR_W(10)) dut (.clk, .rst, .start, .resume, .imem_addr, .imem_data,
    .mem_instr, .mem_instr_valid, .controller_regs(cregs), .paused, .done,
    .dbg_sel, .dbg_value);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  instr_t prog [13];

  // memory instructions seen, in order
  always @(posedge clk) begin
    if (!rst && mem_instr_valid) begin
      n_mem++;
      if (last_valid) begin failures++; $display("FAIL back-to-back memory instructions"); end
      if (n_mem == 1) begin
        checks += 3;
        if (mem_instr.op !== OP_LOADI) begin failures++; $display("FAIL op1 %0d", mem_instr.op); end
        if (mem_instr.imm !== 16'hABCD) begin failures++; $display("FAIL imm1"); end
        if (cregs.a !== 16'd15) begin failures++; $display("FAIL loadi reg value %0d", cregs.a); end
      end
      if (n_mem == 2) begin
        checks += 2;
        if (mem_instr.op !== OP_WRITE) begin failures++; $display("FAIL op2 %0d", mem_instr.op); end
        if (cregs !== '{a: 16'd7, b: 16'd8, c: 16'd15}) begin
          failures++; $display("FAIL write regs %0d %0d %0d", cregs.a, cregs.b, cregs.c);
        end
      end
    end
    last_valid <= mem_instr_valid;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    prog[0]  = make_instr(OP_XOR,  4'd0, 16'd0, 4'd0, 4'd0);
    prog[1]  = make_instr(OP_ADDI, 4'd1, 16'd7, 4'd0, 4'd0);
    prog[2]  = make_instr(OP_ADDI, 4'd0, 16'd1, 4'd0, 4'd0);
    prog[3]  = make_instr(OP_BGE,  4'd1, 16'd0, 4'd0, 4'd0);
    prog[4]  = make_instr(OP_JUMP, 4'd0, 16'd2, 4'd0, 4'd0);
    prog[5]  = make_instr(OP_ADD,  4'd2, 16'd0, 4'd0, 4'd1);
    prog[6]  = make_instr(OP_LOADI, 4'd2, 16'hABCD, 4'd0, 4'd0);
    prog[7]  = make_instr(OP_PAUSE, 4'd0, 16'd0, 4'd0, 4'd0);
    prog[8]  = make_instr(OP_ADDI, 4'd3, 16'hFFFF, 4'd3, 4'd0);
    prog[9]  = make_instr(OP_BGE,  4'd3, 16'd0, 4'd0, 4'd0);
    prog[10] = make_instr(OP_JUMP, 4'd0, 16'd12, 4'd0, 4'd0);
    prog[11] = make_instr(OP_WRITE, 4'd1, 16'd0, 4'd0, 4'd2);
    prog[12] = make_instr(OP_END,  4'd0, 16'd0, 4'd0, 4'd0);
    // the encoding printed with the ISA's loop example
    check("encoding addi 1 0 7", prog[1] === 32'h31000700);
    check("encoding bge 1 0", prog[3] === 32'h41000000);
    check("encoding jump 2", prog[4] === 32'h50000200);
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 13; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 0;
    check("idle", !done && !paused);
    start = 1;
    cycles = 0;
    do begin @(negedge clk); start = 0; cycles++; end while (!paused);
    // 29 instructions (0,1, 8 x lines 2-4, 5,6,7): pause executes at 2*28+2
    check($sformatf("cycles to pause %0d", cycles), cycles == 2*28 + 3);
    check("one memory op before pause", n_mem == 1);
    repeat (10) @(negedge clk);
    check("still paused", paused && n_mem == 1);
    // inspect registers at the checkpoint: r0 = 8, r1 = 7, r2 = 15
    dbg_sel = 4'd0; #1 check($sformatf("r0 %0d", dbg_value), dbg_value === 16'd8);
    dbg_sel = 4'd1; #1 check($sformatf("r1 %0d", dbg_value), dbg_value === 16'd7);
    dbg_sel = 4'd2; #1 check($sformatf("r2 %0d", dbg_value), dbg_value === 16'd15);
    resume = 1;
    cycles = 0;
    do begin @(negedge clk); resume = 0; cycles++; end while (!done);
    check($sformatf("cycles to end %0d", cycles), cycles == 2*4 + 3);
    check("two memory ops", n_mem == 2);
    dbg_sel = 4'd3; #1 check("r3 = -1", dbg_value === 16'hFFFF);
    repeat (10) @(negedge clk);
    check("stays done", done && n_mem == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
