// input_buffer: the GPU's memory module, which executes memory instructions.
//
// It holds two register arrays of 3*16*NUM_FMA bits rather than a BRAM, so
// that every FMA's A, B and C can be read and written in one cycle:
//   in_buf    - the operands of the next WRITE, word 3*i+k for FMA i
//               (k = 0 A, 1 B, 2 C);
//   write_buf - the last three outputs of every FMA, replaced as a whole
//               whenever the output buffer flushes (write_buffer_to_mem).
// It also keeps, per FMA, the escape iteration of its pixel and whether it
// has been recorded yet.
//
// Each instr_valid pulse (one per controller instruction, every other cycle)
// executes one instruction; regs holds the values of the registers named in
// the instruction's a, b and c fields:
//   LOADI  in_buf word regs.a <= imm
//   LOAD   word k = reg_a field of every FMA i <= regs.b + i*imm
//   LOADB  A, B, C of every FMA <= shuffle of its write_buf triplet, shuffle
//          codes in the reg_a, reg_b, reg_c fields
//   WRITE  send in_buf to the FMAs (data_valid), with use_new_c = bit 0 of
//          the reg_a field and fma_output_valid = bit 0 of the reg_b field;
//          in_buf is then cleared, so operands not loaded again are zero
//   OR     for every FMA whose pixel has not yet escaped and whose
//          write_buf word 2 (the squared magnitude) is greater than 4.0,
//          record regs.a as its iteration count
//   SENDITERS  send pixel_batch = 16 four-bit codes min(iters >> ITER_SHIFT,
//          15), FMA i in bits [4i+3:4i], to frame address regs.a, then
//          forget all recorded iterations (unrecorded pixels send 15, black)
//   FBSWAP pulse frame_buffer_swap
// Other opcodes are ignored.
//
// regs.c is carried for completeness of the controller_regs bus; no memory
// instruction reads the register named in field c.
//
// Timing: all outputs are registered, one cycle after instr_valid. A flush
// arriving on write_buffer_to_mem_valid is visible to instructions executed
// from the next cycle on. Which instructions exist and what they do follow
// the original ISA; the bit fields that carry LOAD's A/B/C select, WRITE's
// two flags and LOADB's codes, the zeroing of in_buf after WRITE and the
// initial value of the iteration counts are this design's reading.
module input_buffer
  import gpu_pkg::*;
#(
  parameter int NUM_FMA    = 16,
  parameter int FB_ADDR_W  = 13,  // pixel-batch address width
  parameter int ITER_SHIFT = 2    // 2 for max_iters 63, 3 for 127
) (
  input  logic                        clk,
  input  logic                        rst,
  // from the controller
  input  instr_t                      instr,
  input  logic                        instr_valid,
  input  ctrl_regs_t                  regs,
  // from the output buffer
  input  logic [3*WORD_W*NUM_FMA-1:0] write_buffer_to_mem,
  input  logic                        write_buffer_to_mem_valid,
  // to the FMA blocks
  output logic [3*WORD_W*NUM_FMA-1:0] data,
  output logic                        data_valid,
  output logic                        use_new_c,
  output logic                        fma_output_valid,
  // to the frame buffer
  output logic [FB_ADDR_W-1:0]        pixel_batch_addr,
  output logic [4*NUM_FMA-1:0]        pixel_batch,
  output logic                        pixel_batch_valid,
  output logic                        frame_buffer_swap
);

  localparam int NWORDS = 3 * NUM_FMA;

  logic [NWORDS-1:0][WORD_W-1:0] in_buf;
  logic [NWORDS-1:0][WORD_W-1:0] write_buf;
  logic [NUM_FMA-1:0][WORD_W-1:0] iters;
  logic [NUM_FMA-1:0]             escaped;

  logic [NUM_FMA-1:0][3*WORD_W-1:0] shuffled;
  logic [4*NUM_FMA-1:0]             batch_codes;

  for (genvar i = 0; i < NUM_FMA; i++) begin : g_shuf
    shuffle_unit u_shuf (
      .prev  (write_buf[3*i +: 3]),
      .code_a(shuf_code_t'(instr.reg_a)),
      .code_b(shuf_code_t'(instr.reg_b)),
      .code_c(shuf_code_t'(instr.reg_c)),
      .abc   (shuffled[i])
    );
  end

  always_comb begin
    for (int i = 0; i < NUM_FMA; i++) begin
      logic [WORD_W-1:0] shifted;
      shifted = iters[i] >> ITER_SHIFT;
      batch_codes[4*i +: 4] = (shifted > 15) ? 4'd15 : shifted[3:0];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_buf            <= '0;
      write_buf         <= '0;
      iters             <= '1;
      escaped           <= '0;
      data              <= '0;
      data_valid        <= 1'b0;
      use_new_c         <= 1'b0;
      fma_output_valid  <= 1'b0;
      pixel_batch_addr  <= '0;
      pixel_batch       <= '0;
      pixel_batch_valid <= 1'b0;
      frame_buffer_swap <= 1'b0;
    end else begin
      data_valid        <= 1'b0;
      pixel_batch_valid <= 1'b0;
      frame_buffer_swap <= 1'b0;

      if (write_buffer_to_mem_valid) write_buf <= write_buffer_to_mem;

      if (instr_valid) begin
        unique case (instr.op)
          OP_LOADI: begin
            if (int'(regs.a) < NWORDS) in_buf[regs.a] <= instr.imm;
          end
          OP_LOAD: begin
            if (instr.reg_a < 4'd3)
              for (int i = 0; i < NUM_FMA; i++)
                in_buf[3*i + int'(instr.reg_a)] <=
                    regs.b + WORD_W'(i) * instr.imm;
          end
          OP_LOADB: begin
            for (int i = 0; i < NUM_FMA; i++)
              in_buf[3*i +: 3] <= shuffled[i];
          end
          OP_WRITE: begin
            data             <= in_buf;
            data_valid       <= 1'b1;
            use_new_c        <= instr.reg_a[0];
            fma_output_valid <= instr.reg_b[0];
            in_buf           <= '0;
          end
          OP_OR: begin
            for (int i = 0; i < NUM_FMA; i++)
              if (!escaped[i] && $signed(write_buf[3*i+2]) > FIX_FOUR) begin
                iters[i]   <= regs.a;
                escaped[i] <= 1'b1;
              end
          end
          OP_SENDITERS: begin
            pixel_batch       <= batch_codes;
            pixel_batch_addr  <= regs.a[FB_ADDR_W-1:0];
            pixel_batch_valid <= 1'b1;
            iters             <= '1;
            escaped           <= '0;
          end
          OP_FBSWAP: frame_buffer_swap <= 1'b1;
          default: ;
        endcase
      end
    end
  end

  // The memory must not execute on the controller's off cycle, or a WRITE
  // would reach the FMAs twice and corrupt the output buffer's rounds.
  a_off_cycle: assert property (@(posedge clk) disable iff (rst)
                                instr_valid |=> !instr_valid);

endmodule
