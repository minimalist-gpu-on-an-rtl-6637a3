// instruction_bram: dual-port program memory of the GPU controller.
//
// Port A writes one 32-bit instruction per cycle (wr_en, wr_addr, wr_data)
// and is used to load a program. Port B reads: the address given in cycle t
// is registered, the word is registered again, and rd_data holds it from
// cycle t+2 on, the two-cycle read of an FPGA block RAM with its output
// register. The two ports may be used in the same cycle; a read of the
// address being written returns the old word. That the program
// lives in a dual-port BRAM read in two cycles is the original design's; the
// depth of 1024 instructions is this design's choice. Contents start at
// zero (NOP).
module instruction_bram #(
  parameter int DEPTH  = 1024,
  parameter int ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [31:0]       wr_data,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [31:0]       rd_data
);

  logic [31:0]       mem [DEPTH];
  logic [ADDR_W-1:0] rd_addr_q;

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_addr_q <= rd_addr;
    rd_data   <= mem[rd_addr_q];
  end

endmodule
