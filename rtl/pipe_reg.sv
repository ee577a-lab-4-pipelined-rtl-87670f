// pipe_reg: a bank of W D flip-flops, the building block of every pipeline
// register level in the multipliers (the 1- to 8-bit DFF cells of the
// schematics, each with a clock pin and a reset pin).
//
// q takes d on every rising clock edge. rst_n is an asynchronous, active-low
// reset that clears q to zero. The active level follows the simulations, where
// the reset pin is held high during normal operation; asynchronous clearing
// to zero is this design's choice, the document does not specify it.
module pipe_reg #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end
endmodule
