// half_sampler: the half-sampling rule that halves the FIFO write rate.
//
// Samples are numbered 0..31 and taken in pairs (even, odd). For an even
// sample: keep it if it is a TDC hit and remember that it was. For the odd
// sample that follows: keep it only if the even one was not a TDC hit. So
// exactly one sample of every pair goes to the FIFO: the even one when it
// carries a TDC hit, otherwise the odd one. This rule is taken as given.
// `keep` is combinational from the inputs of the current sample; the
// remembered flag (first_was_tdc) is updated when `valid` is high on an even
// sample and cleared by `clr` at the start of each channel.
module half_sampler (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic valid,
  input  logic odd,
  input  logic tdc_hit,
  output logic keep
);
  logic first_was_tdc;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)              first_was_tdc <= 1'b0;
    else if (clr)            first_was_tdc <= 1'b0;
    else if (valid && !odd)  first_was_tdc <= tdc_hit;

  assign keep = valid && (odd ? !first_was_tdc : tdc_hit);
endmodule
