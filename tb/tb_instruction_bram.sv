// tb_instruction_bram: self-checking test of the program memory.
// Writes random words through port A and reads them back through port B,
// checking the two-cycle read latency and a back-to-back address stream.
module tb_instruction_bram;
  localparam int DEPTH = 1024;

  logic clk = 0;
  logic wr_en = 0;
  logic [9:0] wr_addr = 0, rd_addr = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  instruction_bram #(.DEPTH(DEPTH)) dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] hist [3];
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 10'(i); wr_data = $urandom; shadow[i] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    // stream of random addresses: data for the address of cycle t at t+2
    for (int t = 0; t < 2000; t++) begin
      rd_addr = 10'($urandom);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = rd_addr;
      @(negedge clk);
      if (t >= 1) begin
        checks++;
        if (rd_data !== shadow[hist[1]]) begin
          failures++; $display("FAIL read addr %0d", hist[1]);
        end
      end
    end
    // latency exactly two: one cycle after the address the word is not yet there
    rd_addr = 10'd5; @(negedge clk); rd_addr = 10'd6; @(negedge clk);
    rd_addr = 10'd7;
    checks++; if (rd_data !== shadow[5]) begin failures++; $display("FAIL latency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
