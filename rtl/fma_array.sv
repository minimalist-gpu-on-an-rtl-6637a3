// fma_array: the NUM_FMA fused multiply-add blocks of the GPU.
//
// The 3*16*NUM_FMA-bit word from the input buffer holds one A/B/C triplet
// per FMA (word 3*i is A, 3*i+1 is B, 3*i+2 is C of FMA i). All units share
// data_valid, use_new_c (replace_c) and fma_output_valid
// (output_can_be_valid), so one WRITE drives every unit in lock step, and
// their 16-bit results are packed as word i of fma_out. fma_out_valid is the
// common out_valid of the units, one cycle after data_valid. 16 units is the
// configuration the GPU is built with.
module fma_array
  import gpu_pkg::*;
#(
  parameter int NUM_FMA = 16
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [3*WORD_W*NUM_FMA-1:0] data,
  input  logic                        data_valid,
  input  logic                        use_new_c,
  input  logic                        fma_output_valid,
  output logic [WORD_W*NUM_FMA-1:0]   fma_out,
  output logic                        fma_out_valid
);

  logic [NUM_FMA-1:0] valid_each;

  for (genvar i = 0; i < NUM_FMA; i++) begin : g_fma
    fma u_fma (
      .clk                (clk),
      .rst                (rst),
      .data_valid         (data_valid),
      .a                  (fixed_t'(data[WORD_W*(3*i+0) +: WORD_W])),
      .b                  (fixed_t'(data[WORD_W*(3*i+1) +: WORD_W])),
      .c                  (fixed_t'(data[WORD_W*(3*i+2) +: WORD_W])),
      .replace_c          (use_new_c),
      .output_can_be_valid(fma_output_valid),
      .out                (fma_out[WORD_W*i +: WORD_W]),
      .out_valid          (valid_each[i])
    );
  end

  // All units see the same controls, so their valids rise together.
  assign fma_out_valid = &valid_each;

  a_lockstep: assert property (@(posedge clk) disable iff (rst)
                               valid_each == '0 || valid_each == '1);

endmodule
