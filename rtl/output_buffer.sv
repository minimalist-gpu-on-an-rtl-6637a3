// output_buffer: gathers three rounds of FMA outputs, then flushes them.
//
// Every cycle fma_out_valid is high, the NUM_FMA results are stored in slot
// 0, 1 or 2 of their FMA's triplet (word 3*i+slot). When the third slot is
// filled, the full 3*16*NUM_FMA-bit word is sent on write_buffer_to_mem with
// a one-cycle write_buffer_to_mem_valid, and the next output starts again at
// slot 0. The receiving memory therefore sees each FMA's last three outputs
// together and keeps them until the next three have arrived.
//
// Timing: the flush is registered, valid the cycle after the third output.
// Reset empties the buffer (slot 0, no flush pending).
module output_buffer
  import gpu_pkg::*;
#(
  parameter int NUM_FMA = 16
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [WORD_W*NUM_FMA-1:0]   fma_out,
  input  logic                        fma_out_valid,
  output logic [3*WORD_W*NUM_FMA-1:0] write_buffer_to_mem,
  output logic                        write_buffer_to_mem_valid
);

  logic [1:0]                        slot;
  logic [3*WORD_W*NUM_FMA-1:0]       held;
  logic [3*WORD_W*NUM_FMA-1:0]       merged;

  // held with the incoming outputs placed in the current slot
  always_comb begin
    merged = held;
    for (int i = 0; i < NUM_FMA; i++)
      merged[WORD_W*(3*i) + WORD_W*slot +: WORD_W] = fma_out[WORD_W*i +: WORD_W];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      slot                      <= '0;
      held                      <= '0;
      write_buffer_to_mem       <= '0;
      write_buffer_to_mem_valid <= 1'b0;
    end else begin
      write_buffer_to_mem_valid <= 1'b0;
      if (fma_out_valid) begin
        held <= merged;
        if (slot == 2'd2) begin
          slot                      <= '0;
          write_buffer_to_mem       <= merged;
          write_buffer_to_mem_valid <= 1'b1;
        end else begin
          slot <= slot + 2'd1;
        end
      end
    end
  end

endmodule
