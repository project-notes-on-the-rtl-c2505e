// enable_gen: clock-enable generator locking the 60 MHz sysclk logic to the
// 15 MHz clk15 of the front-end chips.
//
// A one-hot ring of DIV flip-flops circulates a single 1, so each ring bit is
// high for one sysclk cycle in every DIV. The `sync` input (clk15 as seen by
// the slave) is sampled, and on its rising edge the ring is re-loaded
// synchronously with the 1 in bit 0. A synchronous load keeps the enable one
// cycle wide; an asynchronous clear of the ring gives a two-cycle enable, the
// fault seen on the original board. If the clk15 phase moves by a cycle, the
// re-load could still put the 1 back into bit 0 right after it left; the
// enable is therefore also suppressed in the cycle after an enable, so that
// re-locking shortens or stretches one period but never doubles the enable.
//
// Outputs (all registered):
//   en[N_COPIES-1:0]  the phase-update enable: identical copies, so that no
//                     single net fans out to all of the control logic (the
//                     original design needed this to meet 60 MHz).
//   en_latch          one cycle after en: ele_dat is sampled on this enable,
//                     1.5 sysclk after the chips change it on the falling edge
//                     of clk15.
// With sync rising 1.5 sysclk after a sysclk edge, en is high in the second
// cycle after the detected edge, and the phase outputs that change at the end
// of that cycle are latched by the chips 1.5 sysclk later, on the clk15
// rising edge. Until the first sync edge no enable is produced.
// The number of copies is not given and is this design's choice.
module enable_gen #(
  parameter int unsigned DIV      = 4,
  parameter int unsigned N_COPIES = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sync,
  output logic [N_COPIES-1:0] en,
  output logic                en_latch
);
  logic [DIV-1:0] ring, ring_nxt;
  logic           sync_q, sync_qq;
  logic           sync_rise;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sync_q  <= 1'b0;
      sync_qq <= 1'b0;
    end else begin
      sync_q  <= sync;
      sync_qq <= sync_q;
    end

  assign sync_rise = sync_q & ~sync_qq;

  always_comb begin
    if (sync_rise) ring_nxt = DIV'(1);
    else           ring_nxt = {ring[DIV-2:0], ring[DIV-1]};
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ring     <= '0;
      en       <= '0;
      en_latch <= 1'b0;
    end else begin
      ring     <= ring_nxt;
      en       <= {N_COPIES{ring_nxt[0] & ~ring[0]}};
      en_latch <= en[0];
    end

  // Every copy carries the same value, and the enable is one cycle wide.
  a_copies_equal: assert property (@(posedge clk) disable iff (!rst_n)
                                   (en == '0) || (en == '1));
  a_one_wide: assert property (@(posedge clk) disable iff (!rst_n)
                               en[0] |=> !en[0]);
endmodule
