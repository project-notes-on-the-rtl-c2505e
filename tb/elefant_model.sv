// elefant_model: behavioural model of the N_ELE elefant front-end chips on
// one slave, sharing the ele_dat bus. Not synthesizable logic.
//
// Timing as the chips behave:
//  - controls (chip_sel, ch_sel, ch_sel_num, sramenb, data_start, data_inc,
//    buf_rd, buf_wr)
//    are latched on the clk15 rising edge; a control that changed less than
//    TSU ns before that edge is counted in setup_errs;
//  - ch_sel asks for the hitmap. As soon as ch_sel rises the selected chip
//    drives its previous hitmap (a spurious word); the real one appears on the
//    clk15 rising edge that latches the request;
//  - sramenb: the SRAM2 word at address ch_sel_num appears just after the
//    latching edge (no clk15 latency);
//  - data_start: sample 0 of the channel appears on the next rising edge;
//  - data_inc: the pointer advances and the new sample appears on the falling
//    edge one clk15 period after the latching edge; after sample 31 it wraps to
//    sample 0. Each channel must see exactly 32 data_inc (inc_errs).
module elefant_model
  import elefant_tb_pkg::*;
#(
  parameter int unsigned N_ELE = 6,
  parameter realtime     TSU   = 4.0
) (
  input  logic             clk15,
  input  int               event_no,
  input  logic [N_ELE-1:0] chip_sel,
  input  logic             ch_sel,
  input  logic [2:0]       ch_sel_num,
  input  logic             sramenb,
  input  logic             data_start,
  input  logic             data_inc,
  input  logic [1:0]       buf_rd,
  input  logic [1:0]       buf_wr,
  output logic [7:0]       ele_dat,
  output int               setup_errs,
  output int               inc_errs,
  output int               spurious_served
);
  logic [7:0] last_hm [N_ELE];
  realtime    t_change;
  int         sel, ds_ele, ds_ch, ptr, n_inc;
  logic       ds_st1, inc_st1, inc_st2;

  function automatic int sel_idx(input logic [N_ELE-1:0] cs);
    for (int i = 0; i < int'(N_ELE); i++) if (cs[i]) return i;
    return -1;
  endfunction

  initial begin
    ele_dat = '0;
    setup_errs = 0; inc_errs = 0; spurious_served = 0;
    ds_st1 = 0; inc_st1 = 0; inc_st2 = 0;
    ptr = 0; n_inc = 32; ds_ele = 0; ds_ch = 0; t_change = 0;
    for (int i = 0; i < int'(N_ELE); i++) last_hm[i] = 8'h00;
  end

  always @(chip_sel or ch_sel or ch_sel_num or sramenb or data_start or data_inc or
           buf_rd or buf_wr)
    t_change = $realtime;

  // Spurious hitmap: the previous one, served before the clk15 edge.
  always @(posedge ch_sel) begin
    sel = sel_idx(chip_sel);
    if (sel >= 0) begin
      ele_dat = last_hm[sel];
      spurious_served++;
    end
  end

  always @(posedge clk15) begin
    if ($realtime - t_change < TSU && $realtime > 100.0) setup_errs++;
    sel = sel_idx(chip_sel);
    // data_start latched one edge ago: sample 0 now
    if (ds_st1) begin
      ptr = 0;
      ele_dat = sample_of(event_no, ds_ele, ds_ch, 0);
    end
    ds_st1  = data_start && (sel >= 0);
    inc_st2 = inc_st1;
    inc_st1 = data_inc && (sel >= 0);
    if (data_start && sel >= 0) begin
      if (n_inc != 32) inc_errs++;
      n_inc  = 0;
      ds_ele = sel;
      ds_ch  = int'(ch_sel_num);
    end
    if (data_inc && sel >= 0) n_inc++;
    if (ch_sel && sel >= 0) begin
      ele_dat = hitmap_of(event_no, sel);
      last_hm[sel] = ele_dat;
    end
    if (sramenb && sel >= 0) begin
      #2 ele_dat = sram2_of(event_no, sel, int'(ch_sel_num));
    end
  end

  always @(negedge clk15) begin
    if (inc_st2) begin
      ptr = (ptr + 1) % 32;
      ele_dat = sample_of(event_no, ds_ele, ds_ch, ptr);
      inc_st2 = 0;
    end
  end
endmodule
