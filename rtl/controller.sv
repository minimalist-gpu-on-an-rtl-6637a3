// controller: the finite-state machine that runs GPU programs.
//
// It has sixteen 16-bit registers and a one-bit compare_reg. After start it
// fetches instruction 0 from the instruction BRAM and then alternates
// between WAIT (the BRAM's second read cycle) and EXEC, so one instruction
// completes every two cycles. In EXEC it presents the next address to the
// BRAM at once, so no further cycle is lost.
//   XOR  a b      r[a] <= r[a] ^ r[b]
//   ADD  a b c    r[a] <= r[b] + r[c]
//   ADDI a b imm  r[a] <= r[b] + imm
//   BGE  a b      compare_reg <= r[a] >= r[b] (signed, as the registers hold
//                 fixed-point coordinates as well as counters)
//   JUMP imm      go to line imm if compare_reg is set
//   PAUSE         wait until resume is high, then go on
//   END           stop, done high until the next start
//   NOP           nothing
// Every other opcode is a memory instruction: it is passed to the memory
// module on mem_instr with a one-cycle mem_instr_valid, together with the
// values of the three registers its fields name (controller_regs), in the
// cycle after EXEC. Memory therefore never sees an instruction on the
// controller's off cycle.
//
// dbg_sel/dbg_value read any register at any time, so a program stopped at
// a PAUSE checkpoint can be inspected from switches and LEDs.
//
// The register count and width, the instructions and the two-cycle rhythm
// are the original design's; signed comparison, the start/resume/done
// handshake and the state encoding are this design's choice. Reset clears
// the registers and compare_reg and leaves the controller idle.
module controller
  import gpu_pkg::*;
#(
  parameter int IMEM_ADDR_W = 10
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,       // begin at line 0
  input  logic                   resume,      // continue after PAUSE (btn[1])
  output logic [IMEM_ADDR_W-1:0] imem_addr,
  input  logic [31:0]            imem_data,
  output instr_t                 mem_instr,
  output logic                   mem_instr_valid,
  output ctrl_regs_t             controller_regs,
  output logic                   paused,
  output logic                   done,
  // register inspection (board switches), combinational
  input  logic [3:0]             dbg_sel,
  output logic [WORD_W-1:0]      dbg_value
);

  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_EXEC, S_PAUSE, S_DONE} state_e;

  state_e                       state;
  logic [IMEM_ADDR_W-1:0]       pc;
  logic [IMEM_ADDR_W-1:0]       next_pc;
  logic [NUM_REGS-1:0][WORD_W-1:0] regs;
  logic                         compare_reg;
  instr_t                       ir;
  logic                         is_mem_op;

  assign ir = instr_t'(imem_data);

  always_comb begin
    unique case (ir.op)
      OP_LOADI, OP_LOAD, OP_LOADB, OP_WRITE,
      OP_OR, OP_SENDITERS, OP_FBSWAP: is_mem_op = 1'b1;
      default:                        is_mem_op = 1'b0;
    endcase
  end

  always_comb begin
    next_pc = pc + 1'b1;
    if (ir.op == OP_JUMP && compare_reg) next_pc = ir.imm[IMEM_ADDR_W-1:0];
  end

  // Address presented to the BRAM this cycle.
  always_comb begin
    unique case (state)
      S_EXEC:  imem_addr = next_pc;
      S_PAUSE: imem_addr = pc + 1'b1;
      default: imem_addr = '0;
    endcase
  end

  assign dbg_value = regs[dbg_sel];

  assign paused = (state == S_PAUSE);
  assign done   = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state           <= S_IDLE;
      pc              <= '0;
      regs            <= '0;
      compare_reg     <= 1'b0;
      mem_instr       <= '0;
      mem_instr_valid <= 1'b0;
      controller_regs <= '0;
    end else begin
      mem_instr_valid <= 1'b0;
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            pc    <= '0;
            state <= S_WAIT;
          end
        end
        S_WAIT: state <= S_EXEC;
        S_EXEC: begin
          pc    <= next_pc;
          state <= S_WAIT;
          unique case (ir.op)
            OP_XOR:  regs[ir.reg_a] <= regs[ir.reg_a] ^ regs[ir.reg_b];
            OP_ADD:  regs[ir.reg_a] <= regs[ir.reg_b] + regs[ir.reg_c];
            OP_ADDI: regs[ir.reg_a] <= regs[ir.reg_b] + ir.imm;
            OP_BGE:  compare_reg <= $signed(regs[ir.reg_a]) >= $signed(regs[ir.reg_b]);
            OP_END: begin
              pc    <= pc;
              state <= S_DONE;
            end
            OP_PAUSE: begin
              pc    <= pc;
              state <= S_PAUSE;
            end
            default: ;
          endcase
          if (is_mem_op) begin
            mem_instr         <= ir;
            mem_instr_valid   <= 1'b1;
            controller_regs.a <= regs[ir.reg_a];
            controller_regs.b <= regs[ir.reg_b];
            controller_regs.c <= regs[ir.reg_c];
          end
        end
        S_PAUSE: begin
          if (resume) begin
            pc    <= pc + 1'b1;
            state <= S_WAIT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Memory instructions come at most every other cycle.
  a_mem_rate: assert property (@(posedge clk) disable iff (rst)
                               mem_instr_valid |=> !mem_instr_valid);

endmodule
