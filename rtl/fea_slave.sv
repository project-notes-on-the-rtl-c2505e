// fea_slave: readout logic of one FEA slave FPGA.
//
// On a readout request (rd_event) the slave reads every elefant front-end chip
// in turn: it fetches the chip's 8-bit hitmap, and if any channel was hit it
// copies four header words from the chip's SRAM2 and then, for each hit
// channel, the 32-sample waveform from the chip's RO_RAM. Waveforms are half
// sampled (one sample of each pair is kept, chosen by the TDC hit flag) and
// every kept word goes to an external FIFO that the master board reads.
//
// Clocking: everything runs on sysclk (60 MHz). The chips run on clk15
// (15 MHz), seen here as `sync`; enable_gen turns it into a phase enable (en)
// and a data-sampling enable (en_latch, one sysclk later), so each readout
// phase is four sysclk cycles. All outputs are registered.
//
// Interface:
//   sync          clk15 as received; its rising edge aligns the enables
//   rd_event      readout request (level, edge-detected)
//   ll_accept     level-1 accept, advances buf_rd; clrout clears buf_rd/buf_wr
//   eleoff_in     one bit per chip: skip this chip
//   ele_dat       shared data bus from the chips: hitmap, SRAM2 word or
//                 sample (bit 7 of a sample = TDC hit)
//   chip_sel, ch_sel, ch_sel_num, sramenb, data_start, data_inc, buf_rd,
//   buf_wr        controls to the chips, latched by them on clk15 rising
//   fifo_dat, fifo_wr  FIFO write port: data held 4 cycles, strobe 2 cycles
//   ro_busy, ro_done   readout in progress / one-cycle end-of-readout pulse
//   phase, ele_num, hitmap  current phase, chip and remaining hit channels
// The phase structure, sizes and output timing follow the design; the
// synchronisers on rd_event and ll_accept and the bus encoding are this
// implementation's choices (see the individual modules).
module fea_slave
  import fea_pkg::*;
#(
  parameter int unsigned N_EN_COPIES = 2,
  parameter int unsigned BUF_W       = 2
) (
  input  logic             sysclk,
  input  logic             rst_n,
  input  logic             sync,
  input  logic             rd_event,
  input  logic             ll_accept,
  input  logic             clrout,
  input  logic [N_ELE-1:0] eleoff_in,
  input  logic [DAT_W-1:0] ele_dat,
  output logic [N_ELE-1:0] chip_sel,
  output logic             ch_sel,
  output logic [CH_W-1:0]  ch_sel_num,
  output logic             sramenb,
  output logic             data_start,
  output logic             data_inc,
  output logic [BUF_W-1:0] buf_rd,
  output logic [BUF_W-1:0] buf_wr,
  output logic [DAT_W-1:0] fifo_dat,
  output logic             fifo_wr,
  output logic             ro_busy,
  output logic             ro_done,
  // status, for monitoring
  output phase_t           phase,
  output logic [ELE_W-1:0] ele_num,
  output logic [N_CH-1:0]  hitmap
);
  logic [N_EN_COPIES-1:0] en;
  logic                   en_latch;
  logic                   rd_rise, lla_rise, start;
  logic                   start_clr, ele_clr, ele_inc, ele_active;
  logic                   next_ch, smp_clr, hitmap_load, hdr_wr;
  logic                   smp_valid, smp_odd, keep;
  logic                   more_channel, dis_ele, last_ele;
  logic [CH_W-1:0]        ch_num;

  enable_gen #(.DIV(CLK_DIV), .N_COPIES(N_EN_COPIES)) u_en (
    .clk(sysclk), .rst_n, .sync, .en, .en_latch
  );

  edge_sync u_rd_sync  (.clk(sysclk), .rst_n, .din(rd_event),  .rise(rd_rise));
  edge_sync u_lla_sync (.clk(sysclk), .rst_n, .din(ll_accept), .rise(lla_rise));

  myrs u_start (.clk(sysclk), .rst_n, .set(rd_rise), .clr(start_clr), .q(start));

  readout_fsm u_fsm (
    .clk(sysclk), .rst_n, .en_state(en[0]), .en_out(en[N_EN_COPIES-1]), .en_latch, .start, .more_channel,
    .last_ele, .ch_num, .data_start, .data_inc, .ch_sel, .sramenb,
    .ch_sel_num, .ele_active, .start_clr, .ele_clr, .ele_inc, .next_ch,
    .smp_clr, .ro_done, .hitmap_load, .hdr_wr, .smp_valid, .smp_odd, .phase,
    .ro_busy
  );

  ele_select #(.N_ELE(N_ELE)) u_ele (
    .clk(sysclk), .rst_n, .clr(ele_clr), .inc(ele_inc), .active(ele_active),
    .eleoff_in, .ele_num, .chip_sel, .dis_ele, .last_ele
  );

  hitmap_unit #(.N_CH(N_CH)) u_hit (
    .clk(sysclk), .rst_n, .load(hitmap_load), .hit_in(ele_dat[N_CH-1:0]),
    .dis_ele, .next(next_ch), .hitmap, .ch_num, .more_channel
  );

  half_sampler u_half (
    .clk(sysclk), .rst_n, .clr(smp_clr), .valid(smp_valid), .odd(smp_odd),
    .tdc_hit(ele_dat[TDC_BIT]), .keep
  );

  fifo_out #(.DAT_W(DAT_W), .WR_CYC(2), .HOLD(CLK_DIV)) u_fifo (
    .clk(sysclk), .rst_n, .wr_req(hdr_wr | keep), .din(ele_dat),
    .fifo_dat, .fifo_wr
  );

  buf_counters #(.BUF_W(BUF_W)) u_buf (
    .clk(sysclk), .rst_n, .en(en[0]), .clrout, .ll_accept(lla_rise), .rd_done(ro_done),
    .buf_rd, .buf_wr
  );
endmodule
