// myrs: clocked set/reset flip-flop holding a pending readout request.
// The original schematic used a trimmed RS flip-flop (MYRS) here; its gate
// level is not reproduced. This version is synchronous to sysclk, and set wins
// over reset so that a request arriving in the cycle the state machine clears
// the previous one is not lost (this design's choice). q follows one cycle
// after set or clr.
module myrs (
  input  logic clk,
  input  logic rst_n,
  input  logic set,
  input  logic clr,
  output logic q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   q <= 1'b0;
    else if (set) q <= 1'b1;
    else if (clr) q <= 1'b0;
endmodule
