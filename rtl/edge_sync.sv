// edge_sync: brings an asynchronous input level into the sysclk domain with
// a two-flop synchroniser and emits a one-cycle pulse on its rising edge.
// Used for rd_event and ll_accept, which the original schematic used as a
// clock or counted directly; sampling them keeps the whole slave on one clock
// (this implementation's choice). Latency: the pulse is high in the third
// sysclk cycle after the input rises.
module edge_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic rise
);
  logic [2:0] sh;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sh <= '0;
    else        sh <= {sh[1:0], din};

  assign rise = sh[1] & ~sh[2];
endmodule
