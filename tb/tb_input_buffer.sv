// tb_input_buffer: self-checking test of the memory module.
// Runs each memory instruction through the module (one every other cycle,
// as the controller issues them) and checks the 768-bit word sent on WRITE,
// the WRITE flags, the clearing of the operands after WRITE, LOADB from a
// flushed output word, the OR escape test and SENDITERS pixel codes, and
// FBSWAP, against values computed here.
module tb_input_buffer;
  import gpu_pkg::*;
  localparam int N = 16;

  logic clk = 0, rst = 1;
  instr_t instr = '0;
  logic instr_valid = 0;
  ctrl_regs_t regs = '0;
  logic [48*N-1:0] wbm = '0;
  logic wbm_valid = 0;
  logic [48*N-1:0] data;
  logic data_valid, use_new_c, fov;
  logic [12:0] pb_addr;
  logic [4*N-1:0] pb;
  logic pb_valid, swap;
  int checks = 0, failures = 0;
  logic [15:0] model_buf [3*N];

  always #5 clk = ~clk;

  input_buffer #(.NUM_FMA(N)) dut (.clk, .rst, .instr, .instr_valid, .regs,
    .write_buffer_to_mem(wbm), .write_buffer_to_mem_valid(wbm_valid),
    .data, .data_valid, .use_new_c, .fma_output_valid(fov),
    .pixel_batch_addr(pb_addr), .pixel_batch(pb), .pixel_batch_valid(pb_valid),
    .frame_buffer_swap(swap));

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Issue one instruction and an off cycle; return after the off cycle's
  // negedge, with outputs of the instruction visible during the off cycle.
  task automatic issue(opcode_e op, logic [3:0] a, logic [15:0] imm,
                       logic [3:0] b, logic [3:0] c,
                       logic [15:0] ra, logic [15:0] rb);
    @(negedge clk);
    instr = make_instr(op, a, imm, b, c);
    regs.a = ra; regs.b = rb; regs.c = 16'h0;
    instr_valid = 1;
    @(negedge clk);
    instr_valid = 0;
  endtask

  function automatic logic [15:0] shuf(logic [15:0] w0, logic [15:0] w1,
                                       logic [15:0] w2, logic [3:0] code);
    logic [15:0] v;
    case (code[1:0])
      2'd0: v = w0; 2'd1: v = w1; 2'd2: v = w2; default: v = 0;
    endcase
    if (code[3:2] == 2'd1) v = v << 1;
    if (code[3:2] == 2'd2) v = -v;
    return v;
  endfunction

  task automatic check_write(string what, logic rc, logic ov);
    issue(OP_WRITE, {3'b0, rc}, 16'h0, {3'b0, ov}, 4'h0, 16'h0, 16'h0);
    check({what, " data_valid"}, data_valid === 1'b1);
    check({what, " use_new_c"}, use_new_c === rc);
    check({what, " fma_output_valid"}, fov === ov);
    for (int w = 0; w < 3*N; w++)
      check($sformatf("%s word %0d", what, w), data[16*w +: 16] === model_buf[w]);
    for (int w = 0; w < 3*N; w++) model_buf[w] = 0;
    @(negedge clk);
    check({what, " data_valid one cycle"}, data_valid === 1'b0);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] mags [N];
    logic [15:0] it [N];
    logic [3:0] sa, sb, sc;
    for (int w = 0; w < 3*N; w++) model_buf[w] = 0;
    repeat (3) @(negedge clk);
    rst = 0;

    // LOADI into a few words
    for (int k = 0; k < 6; k++) begin
      logic [15:0] idx, v;
      idx = 16'($urandom % (3*N)); v = 16'($urandom);
      issue(OP_LOADI, 4'h1, v, 4'h0, 4'h0, idx, 16'h0);
      model_buf[idx] = v;
    end
    check_write("loadi", 1, 0);
    // WRITE again: the buffer was cleared
    check_write("cleared", 0, 1);

    // LOAD A, B and C with register base and immediate diff
    for (int abc = 0; abc < 3; abc++) begin
      logic [15:0] base, diff;
      base = 16'($urandom); diff = 16'($urandom % 64);
      issue(OP_LOAD, 4'(abc), diff, 4'h3, 4'h0, 16'h0, base);
      for (int i = 0; i < N; i++) model_buf[3*i+abc] = 16'(base + i*diff);
    end
    check_write("load", 1, 1);

    // flushed outputs, then LOADB with x2 and negate, followed by a LOAD of C
    for (int w = 0; w < 3*N; w++) wbm[16*w +: 16] = 16'($urandom);
    @(negedge clk); wbm_valid = 1; @(negedge clk); wbm_valid = 0;
    for (int r = 0; r < 4; r++) begin
      sa = 4'($urandom % 12); sb = 4'($urandom % 12); sc = 4'($urandom % 12);
      if (r == 0) begin sa = 4'b0100; sb = 4'b1001; sc = 4'b0011; end
      issue(OP_LOADB, sa, 16'h0, sb, sc, 16'h0, 16'h0);
      for (int i = 0; i < N; i++) begin
        model_buf[3*i]   = shuf(wbm[16*(3*i) +: 16], wbm[16*(3*i+1) +: 16], wbm[16*(3*i+2) +: 16], sa);
        model_buf[3*i+1] = shuf(wbm[16*(3*i) +: 16], wbm[16*(3*i+1) +: 16], wbm[16*(3*i+2) +: 16], sb);
        model_buf[3*i+2] = shuf(wbm[16*(3*i) +: 16], wbm[16*(3*i+1) +: 16], wbm[16*(3*i+2) +: 16], sc);
      end
      if (r == 1) begin
        issue(OP_LOAD, 4'h2, 16'h8, 4'h5, 4'h0, 16'h0, 16'h0123);
        for (int i = 0; i < N; i++) model_buf[3*i+2] = 16'(16'h0123 + 8*i);
      end
      check_write($sformatf("loadb %0d", r), 1, 1);
    end

    // OR: magnitudes in word 2 of each triplet; 4.0 itself does not escape
    for (int i = 0; i < N; i++) it[i] = 16'hFFFF;
    for (int round = 0; round < 3; round++) begin
      for (int i = 0; i < N; i++) begin
        case ($urandom % 4)
          0: mags[i] = 16'h1000;              // exactly 4.0
          1: mags[i] = 16'h1001;              // just above
          2: mags[i] = 16'($urandom % 16'h1000);
          default: mags[i] = 16'h8000 | 16'($urandom); // negative (overflowed)
        endcase
        wbm[16*(3*i+2) +: 16] = mags[i];
        if (it[i] == 16'hFFFF && $signed(mags[i]) > $signed(16'h1000)) it[i] = 16'(10 + 4*round);
      end
      @(negedge clk); wbm_valid = 1; @(negedge clk); wbm_valid = 0;
      issue(OP_OR, 4'h2, 16'h0, 4'h0, 4'h0, 16'(10 + 4*round), 16'h0);
    end
    issue(OP_SENDITERS, 4'h4, 16'h0, 4'h0, 4'h0, 16'd1234, 16'h0);
    check("senditers valid", pb_valid === 1'b1);
    check("senditers addr", pb_addr === 13'd1234);
    for (int i = 0; i < N; i++) begin
      logic [15:0] s;
      s = it[i] >> 2;
      check($sformatf("pixel %0d", i), pb[4*i +: 4] === ((s > 15) ? 4'd15 : s[3:0]));
    end
    @(negedge clk);
    check("senditers one cycle", pb_valid === 1'b0);
    // after SENDITERS every pixel is fresh again: all black
    issue(OP_SENDITERS, 4'h4, 16'h0, 4'h0, 4'h0, 16'd7, 16'h0);
    check("senditers reset", pb === '1);

    issue(OP_FBSWAP, 4'h0, 16'h0, 4'h0, 4'h0, 16'h0, 16'h0);
    check("fbswap", swap === 1'b1);
    @(negedge clk);
    check("fbswap one cycle", swap === 1'b0);
    // NOP-like opcodes do nothing
    issue(OP_ADD, 4'h0, 16'h0, 4'h0, 4'h0, 16'h0, 16'h0);
    check("non-memory op", data_valid === 1'b0 && pb_valid === 1'b0 && swap === 1'b0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
