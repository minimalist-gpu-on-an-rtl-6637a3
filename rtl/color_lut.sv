// color_lut: maps a pixel's 4-bit iteration code to a 24-bit RGB colour.
//
// Codes 0..14 run along a gradient that grows brighter the longer a pixel
// took to escape; code 15 is black and marks pixels taken to be inside the
// set (including those that escaped in the last sixteenth of the iteration
// range, as the codes have only four bits). Sixteen entries with the last
// one black is the original design; the gradient itself is this design's
// own: for code k < 15, red = green = 17k and blue = 120 + 9k.
// Output registered, one cycle after code.
module color_lut (
  input  logic        clk,
  input  logic [3:0]  code,
  output logic [23:0] rgb     // {red, green, blue}
);

  function automatic logic [23:0] entry(logic [3:0] k);
    logic [7:0] r, g, b;
    if (k == 4'd15) return 24'h000000;
    r = 8'(17 * k);
    g = 8'(17 * k);
    b = 8'(120 + 9 * k);
    return {r, g, b};
  endfunction

  always_ff @(posedge clk) rgb <= entry(code);

endmodule
