// fifo_out: output register and write strobe for the external FIFO chip.
//
// On wr_req the word is clocked into fifo_dat and fifo_wr goes high for
// WR_CYC sysclk cycles starting on the same edge. fifo_dat then holds until
// the next request, at least HOLD cycles later, so the FIFO sees data valid
// for a whole clk15 period around a write strobe that meets its minimum
// width (25 ns; 2 cycles of 60 MHz are 33 ns) and its 9 ns setup time.
// Registering fifo_dat, the 2-cycle strobe and the 4-cycle hold follow the
// design; the strobe is active high here (polarity not given).
module fifo_out #(
  parameter int unsigned DAT_W  = 8,
  parameter int unsigned WR_CYC = 2,
  parameter int unsigned HOLD   = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_req,
  input  logic [DAT_W-1:0] din,
  output logic [DAT_W-1:0] fifo_dat,
  output logic             fifo_wr
);
  logic [$clog2(HOLD+1)-1:0] age;   // cycles since the last write, saturating

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      fifo_dat <= '0;
      fifo_wr  <= 1'b0;
      age      <= $bits(age)'(HOLD);
    end else if (wr_req) begin
      fifo_dat <= din;
      fifo_wr  <= 1'b1;
      age      <= '0;
    end else begin
      if (age != $bits(age)'(HOLD)) age <= age + 1'b1;
      if (age == $bits(age)'(WR_CYC - 1)) fifo_wr <= 1'b0;
    end

  // A new word may not replace fifo_dat before it has been held HOLD cycles.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           wr_req |-> (age >= $bits(age)'(HOLD - 1)));
endmodule
