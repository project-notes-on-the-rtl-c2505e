// buf_counters: buffer pointers sent to the elefant chips.
//
// buf_rd counts level-1 accepts (ll_accept pulses): a glitch on ll_accept
// advances it, which is why clrout clears both counters after power-on or a
// reset of the front-end boards. buf_wr advances once per completed readout
// (rd_done). The chips latch buf_rd and buf_wr on the clk15 rising edge like
// their other controls, so the counters only change on the phase enable `en`,
// 1.5 sysclk before that edge; strobes arriving in between are counted in a
// pending count and added on the next `en`. The counter widths and the buf_wr
// increment source are this design's choice. Both counters wrap; clrout
// clears counters and pending counts at once and wins over any strobe.
module buf_counters #(
  parameter int unsigned BUF_W = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             clrout,
  input  logic             ll_accept,
  input  logic             rd_done,
  output logic [BUF_W-1:0] buf_rd,
  output logic [BUF_W-1:0] buf_wr
);
  logic [BUF_W-1:0] pend_rd, pend_wr;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      buf_rd  <= '0;
      buf_wr  <= '0;
      pend_rd <= '0;
      pend_wr <= '0;
    end else if (clrout) begin
      buf_rd  <= '0;
      buf_wr  <= '0;
      pend_rd <= '0;
      pend_wr <= '0;
    end else if (en) begin
      buf_rd  <= buf_rd + pend_rd + BUF_W'(ll_accept);
      buf_wr  <= buf_wr + pend_wr + BUF_W'(rd_done);
      pend_rd <= '0;
      pend_wr <= '0;
    end else begin
      pend_rd <= pend_rd + BUF_W'(ll_accept);
      pend_wr <= pend_wr + BUF_W'(rd_done);
    end
endmodule
