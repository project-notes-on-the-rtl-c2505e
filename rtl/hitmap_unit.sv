// hitmap_unit: holds the hitmap of the elefant being read out and decides
// which channel is read next.
//
// On `load` the hit pattern on ele_dat is stored; when dis_ele is high (the
// elefant is switched off) an empty hitmap is stored instead, so the chip is
// skipped. The "test hitmap" logic is a priority encoder: ch_num is the
// lowest-numbered channel whose bit is still set and more_channel says that
// one is left. A `next` pulse clears the bit of the channel just read.
// ch_num and more_channel are registered, valid one cycle after load or next;
// the state machine gives this path a whole clk15 phase (phases 2b and 9), as
// the original design did because the path was long. Reading channels from
// the lowest number upward is this design's choice.
module hitmap_unit #(
  parameter int unsigned N_CH = 8,
  localparam int unsigned CH_W = $clog2(N_CH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [N_CH-1:0] hit_in,
  input  logic            dis_ele,
  input  logic            next,
  output logic [N_CH-1:0] hitmap,
  output logic [CH_W-1:0] ch_num,
  output logic            more_channel
);
  logic [CH_W-1:0] first;

  always_comb begin
    first = '0;
    for (int i = N_CH - 1; i >= 0; i--)
      if (hitmap[i]) first = CH_W'(i);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      hitmap       <= '0;
      ch_num       <= '0;
      more_channel <= 1'b0;
    end else begin
      if (load)      hitmap <= dis_ele ? '0 : hit_in;
      else if (next) hitmap[ch_num] <= 1'b0;
      ch_num       <= first;
      more_channel <= |hitmap;
    end

  a_no_load_and_next: assert property (@(posedge clk) disable iff (!rst_n)
                                       !(load && next));
endmodule
