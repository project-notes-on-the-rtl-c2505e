// fifo_model: behavioural model of the external FIFO chip's write side. Not
// synthesizable logic. A word is written on the falling (trailing) edge of
// fifo_wr. The model counts strobes narrower than TWMIN, data that changed
// less than TSU before the trailing edge (setup) or within THOLD after it,
// and keeps the words written, in order, for the testbench to compare.
// Nothing is recorded while rst_n is low.
module fifo_model #(
  parameter realtime TWMIN = 25.0,
  parameter realtime TSU   = 9.0,
  parameter realtime THOLD = 1.0
) (
  input  logic       rst_n,
  input  logic       fifo_wr,
  input  logic [7:0] fifo_dat,
  output int         timing_errs
);
  logic [7:0] words[$];
  realtime    t_rise, t_dat, t_fall;

  initial begin
    timing_errs = 0;
    t_rise = 0; t_dat = 0; t_fall = -100.0;
  end

  always @(fifo_dat) begin
    t_dat = $realtime;
    if (rst_n && t_dat - t_fall < THOLD) timing_errs++;
  end

  always @(posedge fifo_wr) t_rise = $realtime;

  always @(negedge fifo_wr) if (rst_n) begin
    t_fall = $realtime;
    if (t_fall - t_rise < TWMIN) timing_errs++;
    if (t_fall - t_dat < TSU)    timing_errs++;
    words.push_back(fifo_dat);
  end
endmodule
