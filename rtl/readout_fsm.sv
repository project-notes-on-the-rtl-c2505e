// readout_fsm: the phase sequencer of the slave readout.
//
// The machine moves one phase per clk15 period, on the phase enable. It takes
// two copies of that enable, en_state for the phase register and en_out for
// the output registers, so that neither net fans out to all of them. Each
// phase sets the registered control outputs to the chips (chip select via
// ele_active, ch_sel, ch_sel_num, sramenb, data_start, data_inc) at the start
// of the period; the chips latch them on the clk15 rising edge 1.5 sysclk
// later. What the chips return is sampled one period later, on `en_latch`
// (one sysclk after the next phase enable), and the strobes hitmap_load, hdr_wr and
// smp_valid say what the sampled ele_dat word is.
//
// Sequence per event (one line per clk15 period):
//   IDLE  wait for the readout request `start` (rd_event)
//   1     clear the request and the elefant counter
//   2     ch_sel: ask the selected chip for its hitmap
//   2a    latch the hitmap (hitmap_load)
//   2b    delay for the hitmap test; no hit -> 10
//   3..6  sramenb, ch_sel_num = 0..3: four SRAM2 header words, each written
//         to the FIFO in the following period (hdr_wr)
//   7     data_start for channel ch_num
//   8d    first data_inc; covers the 2-period RO_RAM latency
//   8     31 periods: sample k (0..30) is latched, data_inc in all but the
//         last, so 31 data_inc read samples 1..31
//   9a    latch sample 31 and give the 32nd data_inc, which points the chip
//         back at the first sample of the channel
//   9     next_ch clears the channel just read; more_channel -> 7, else -> 10
//   10    next elefant (ele_inc) -> 2, or after the last one -> 11
//   11    ro_done, back to IDLE
// The phases and what each does follow the design. The exact period in
// which each sample is latched, the header word addresses 0..3 on
// ch_sel_num, and skipping a chip with an empty hitmap are this design's
// reading of the chip timing.
module readout_fsm
  import fea_pkg::*;
#(
  parameter int unsigned N_SAMP = N_SAMPLES,
  parameter int unsigned NCH    = N_CH,
  localparam int unsigned CHW   = $clog2(NCH),
  localparam int unsigned SW    = $clog2(N_SAMP)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en_state,
  input  logic           en_out,
  input  logic           en_latch,
  input  logic           start,
  input  logic           more_channel,
  input  logic           last_ele,
  input  logic [CHW-1:0] ch_num,
  // control outputs to the chips, registered
  output logic           data_start,
  output logic           data_inc,
  output logic           ch_sel,
  output logic           sramenb,
  output logic [CHW-1:0] ch_sel_num,
  output logic           ele_active,
  // one-cycle pulses to the other blocks
  output logic           start_clr,
  output logic           ele_clr,
  output logic           ele_inc,
  output logic           next_ch,
  output logic           smp_clr,
  output logic           ro_done,
  // strobes qualifying ele_dat on en_latch
  output logic           hitmap_load,
  output logic           hdr_wr,
  output logic           smp_valid,
  output logic           smp_odd,
  // status
  output phase_t         phase,
  output logic           ro_busy
);
  phase_t          phase_nxt, prev_phase;
  logic            last_flag;
  logic [SW-1:0]   smp_cnt;
  logic            smp_tc;

  // Phases 3..6 are the header: the package's header length must match.
  if (N_HDR != 4) begin : g_hdr_check
    $error("readout_fsm: phases 3..6 read exactly four header words");
  end

  // Samples latched so far in the current channel.
  cascaded_counter #(.WIDTH(SW), .STAGE(4)) u_smp_cnt (
    .clk, .rst_n, .clr(smp_clr), .inc(smp_valid), .count(smp_cnt), .tc(smp_tc),
    .co()
  );

  always_comb begin
    phase_nxt = phase;
    unique case (phase)
      PH_IDLE: if (start) phase_nxt = PH_1;
      PH_1:    phase_nxt = PH_2;
      PH_2:    phase_nxt = PH_2A;
      PH_2A:   phase_nxt = PH_2B;
      PH_2B:   phase_nxt = more_channel ? PH_3 : PH_10;
      PH_3:    phase_nxt = PH_4;
      PH_4:    phase_nxt = PH_5;
      PH_5:    phase_nxt = PH_6;
      PH_6:    phase_nxt = PH_7;
      PH_7:    phase_nxt = PH_8D;
      PH_8D:   phase_nxt = PH_8;
      PH_8:    if (smp_tc) phase_nxt = PH_9A;  // samples 0..30 latched
      PH_9A:   phase_nxt = PH_9;
      PH_9:    phase_nxt = more_channel ? PH_7 : PH_10;
      PH_10:   phase_nxt = last_flag ? PH_11 : PH_2;
      PH_11:   phase_nxt = PH_IDLE;
      default: phase_nxt = PH_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      phase      <= PH_IDLE;
      prev_phase <= PH_IDLE;
      last_flag  <= 1'b0;
      data_start <= 1'b0;
      data_inc   <= 1'b0;
      ch_sel     <= 1'b0;
      sramenb    <= 1'b0;
      ch_sel_num <= '0;
      ele_active <= 1'b0;
      start_clr  <= 1'b0;
      ele_clr    <= 1'b0;
      ele_inc    <= 1'b0;
      next_ch    <= 1'b0;
      smp_clr    <= 1'b0;
      ro_done    <= 1'b0;
    end else begin
      start_clr <= 1'b0;
      ele_clr   <= 1'b0;
      ele_inc   <= 1'b0;
      next_ch   <= 1'b0;
      smp_clr   <= 1'b0;
      ro_done   <= 1'b0;
      if (en_state) begin
        phase      <= phase_nxt;
        prev_phase <= phase;
        if (phase_nxt == PH_10) last_flag <= last_ele;
      end
      if (en_out) begin
        data_start <= (phase_nxt == PH_7);
        // In phase 8 the counter holds the index of the sample this period
        // latches; the last one (N_SAMP-2) gives no data_inc.
        data_inc   <= (phase_nxt == PH_8D) || (phase_nxt == PH_9A) ||
                      (phase_nxt == PH_8 && phase == PH_8D) ||
                      (phase_nxt == PH_8 && phase == PH_8 &&
                       smp_cnt != SW'(N_SAMP - 2));
        ch_sel     <= (phase_nxt == PH_2);
        sramenb    <= (phase_nxt inside {PH_3, PH_4, PH_5, PH_6});
        unique case (phase_nxt)
          PH_3:    ch_sel_num <= CHW'(0);
          PH_4:    ch_sel_num <= CHW'(1);
          PH_5:    ch_sel_num <= CHW'(2);
          PH_6:    ch_sel_num <= CHW'(3);
          default: ch_sel_num <= ch_num;
        endcase
        ele_active <= !(phase_nxt inside {PH_IDLE, PH_11});
        start_clr  <= (phase_nxt == PH_1);
        ele_clr    <= (phase_nxt == PH_1);
        smp_clr    <= (phase_nxt == PH_7);
        next_ch    <= (phase_nxt == PH_9);
        ro_done    <= (phase_nxt == PH_11);
        ele_inc    <= (phase_nxt == PH_10) && !last_ele;
      end
    end

  assign hitmap_load = en_latch && (phase == PH_2A);
  assign hdr_wr      = en_latch && (prev_phase inside {PH_3, PH_4, PH_5, PH_6});
  assign smp_valid   = en_latch && (phase inside {PH_8, PH_9A});
  assign smp_odd     = smp_cnt[0];
  assign ro_busy     = (phase != PH_IDLE);

  a_start_inc_excl: assert property (@(posedge clk) disable iff (!rst_n)
                                     !(data_start && data_inc));
  a_en_latch_apart: assert property (@(posedge clk) disable iff (!rst_n)
                                     !(en_state && en_latch));
  a_last_sample:    assert property (@(posedge clk) disable iff (!rst_n)
                                     (smp_valid && phase == PH_9A) |-> smp_tc);
endmodule
