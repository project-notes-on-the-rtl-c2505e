// ele_select: steps through the elefant chips of one slave.
//
// ele_num counts the chip being read: `clr` sets it to 0 (phase 1), `inc`
// advances it (phase 10). chip_sel is its one-hot decode, gated by `active`
// so no chip is selected between readouts; it is registered, one cycle after
// ele_num. dis_ele is the eleoff_in bit of the current chip, also
// registered. last_ele marks the last chip. chip_sel and dis_ele are only
// used from phase 2 onward, several sysclk cycles after ele_num changes in
// phase 10, which is why the original design could treat these paths as
// multi-cycle. Active-high selects are this design's choice.
module ele_select #(
  parameter int unsigned N_ELE = 6,
  localparam int unsigned ELE_W = $clog2(N_ELE)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             inc,
  input  logic             active,
  input  logic [N_ELE-1:0] eleoff_in,
  output logic [ELE_W-1:0] ele_num,
  output logic [N_ELE-1:0] chip_sel,
  output logic             dis_ele,
  output logic             last_ele
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   ele_num <= '0;
    else if (clr) ele_num <= '0;
    else if (inc && ele_num != ELE_W'(N_ELE - 1)) ele_num <= ele_num + 1'b1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      chip_sel <= '0;
      dis_ele  <= 1'b0;
    end else begin
      chip_sel <= '0;
      if (active) chip_sel[ele_num] <= 1'b1;
      dis_ele  <= eleoff_in[ele_num];
    end

  assign last_ele = (ele_num == ELE_W'(N_ELE - 1));
endmodule
