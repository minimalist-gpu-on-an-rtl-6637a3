// fma: one fused multiply-add unit of the GPU.
//
// On every cycle that data_valid is high the unit computes
//     result = ((A * B) >>> 10) + C
// on 16-bit signed fixed point with 10 fractional bits and stores it in its
// output register. The product is taken at full 32-bit precision and
// truncated (arithmetic shift) back to the word; the sum wraps on overflow,
// as in the original design.
//
// replace_c high takes C from the input; low reuses the unit's own last
// result as C, which chains additions for dot products. out_valid pulses
// the cycle after the write only when output_can_be_valid was high, so a
// chain of writes emits just its last sum.
//
// Timing: one cycle from data_valid to out_valid. Reset clears the result
// and out_valid. The single-register structure (inputs straight into the
// multiplier, no separate A/B registers) is this design's choice.
module fma
  import gpu_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   data_valid,          // compute this cycle
  input  fixed_t a,
  input  fixed_t b,
  input  fixed_t c,
  input  logic   replace_c,           // 1: use c, 0: reuse last result
  input  logic   output_can_be_valid, // 1: present this result
  output logic [WORD_W-1:0] out,
  output logic   out_valid
);

  logic signed [2*WORD_W-1:0] mult;
  fixed_t                     acc;    // the unit's C register (last result)
  fixed_t                     addend;
  fixed_t                     sum;

  always_comb begin
    mult   = a * b;
    addend = replace_c ? c : acc;
    sum    = fixed_t'(mult >>> FRAC_BITS) + addend;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= data_valid && output_can_be_valid;
      if (data_valid) acc <= sum;
    end
  end

  assign out = $unsigned(acc);

endmodule
