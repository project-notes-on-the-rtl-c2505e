// fea_pkg: sizes and the phase encoding shared by the FEA slave readout.
//
// The slave FPGA reads N_ELE front-end "elefant" chips, each with N_CH
// channels of N_SAMPLES waveform samples, and writes the half-sampled
// waveforms into an external FIFO. The logic runs on the 60 MHz sysclk; the
// chips run on a 15 MHz clk15, so every readout phase lasts CLK_DIV sysclk
// cycles. The numbers (6 chip selects, 8-bit hitmap, 3-bit channel number,
// 32 samples, 60/15 MHz) are those of the design; the binary phase encoding
// is this implementation's own.
package fea_pkg;

  localparam int unsigned N_ELE      = 6;   // chip_sel(0:5)
  localparam int unsigned N_CH       = 8;   // hitmap(0:7), ch_sel_num(0:2)
  localparam int unsigned N_SAMPLES  = 32;  // samples 0..31 per channel
  localparam int unsigned DAT_W      = 8;   // ele_dat / fifo_dat width
  localparam int unsigned CLK_DIV    = 4;   // sysclk cycles per clk15 cycle
  localparam int unsigned N_HDR      = 4;   // phases 3..6: SRAM2 header words
  localparam int unsigned TDC_BIT    = DAT_W - 1; // TDC hit flag in a sample

  localparam int unsigned ELE_W = $clog2(N_ELE);
  localparam int unsigned CH_W  = $clog2(N_CH);

  // Readout phases, named after the phase numbers of the state machine.
  typedef enum logic [3:0] {
    PH_IDLE = 4'd0,   // waiting for rd_event
    PH_1    = 4'd1,   // initialise on rd_event
    PH_2    = 4'd2,   // request the hitmap
    PH_2A   = 4'd3,   // latch the hitmap
    PH_2B   = 4'd4,   // delay: let more_channel settle
    PH_3    = 4'd5,   // header word 0: elefant address
    PH_4    = 4'd6,   // header word 1: tag bits
    PH_5    = 4'd7,   // header word 2: sysclk count
    PH_6    = 4'd8,   // header word 3: trigger tag bits
    PH_7    = 4'd9,   // data_start: point at the first sample of a channel
    PH_8D   = 4'd10,  // RO_RAM latency delay, first data_inc
    PH_8    = 4'd11,  // read samples 0..30
    PH_9A   = 4'd12,  // read sample 31, point back to the first sample
    PH_9    = 4'd13,  // next channel or next elefant
    PH_10   = 4'd14,  // next elefant or end
    PH_11   = 4'd15   // end of readout
  } phase_t;

endpackage
