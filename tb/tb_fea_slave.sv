// tb_fea_slave: end-to-end test of the slave readout at its default sizes
// (6 chips, 8 channels, 32 samples, 60 MHz sysclk, 15 MHz clk15).
//
// The chips and the FIFO are behavioural models. clk15 is generated with an
// edge-to-edge phase that wanders between -8 ns and +4 ns of nominal. For
// every readout the testbench recomputes the FIFO stream (header words, then
// the half-sampled waveform of each hit channel, chips and channels in
// ascending order) and the readout length in clk15 periods, and compares.
// It also checks the chips' setup window, the 32 data_inc per channel, the
// FIFO strobe width / setup / hold, the buffer counters, and that each
// mechanism (empty chip, switched-off chip, several channels per chip, even
// and odd sample kept, spurious hitmap, request queued during a readout,
// ll_accept, clrout, a readout with every channel hit) happened at least once.
module tb_fea_slave;
  import fea_pkg::*;
  import elefant_tb_pkg::*;

  localparam realtime T      = 16.666;   // 60 MHz
  localparam int      NREAD  = 7;        // readouts; the last one hits every channel
  localparam int      WATCHDOG_CYCLES = 400_000;

  logic             sysclk = 1'b0, clk15 = 1'b0;
  logic             rst_n = 1'b0, rd_event = 1'b0, ll_accept = 1'b0, clrout = 1'b0;
  logic [N_ELE-1:0] eleoff_in = '0;
  logic [DAT_W-1:0] ele_dat;
  logic [N_ELE-1:0] chip_sel;
  logic             ch_sel, sramenb, data_start, data_inc, fifo_wr, ro_busy, ro_done;
  logic [CH_W-1:0]  ch_sel_num;
  logic [1:0]       buf_rd, buf_wr;
  logic [DAT_W-1:0] fifo_dat;
  phase_t           phase;
  logic [ELE_W-1:0] ele_num;
  logic [N_CH-1:0]  hitmap;

  int event_no = -1;
  int setup_errs, inc_errs, spurious_served, fifo_errs;
  int checks = 0, failures = 0;

  fea_slave dut (
    .sysclk, .rst_n, .sync(clk15), .rd_event, .ll_accept, .clrout, .eleoff_in,
    .ele_dat, .chip_sel, .ch_sel, .ch_sel_num, .sramenb, .data_start, .data_inc,
    .buf_rd, .buf_wr, .fifo_dat, .fifo_wr, .ro_busy, .ro_done, .phase, .ele_num,
    .hitmap
  );

  elefant_model #(.N_ELE(N_ELE)) chips (
    .clk15, .event_no, .chip_sel, .ch_sel, .ch_sel_num, .sramenb, .data_start,
    .data_inc, .buf_rd, .buf_wr, .ele_dat, .setup_errs, .inc_errs, .spurious_served
  );

  fifo_model fifo (.rst_n, .fifo_wr, .fifo_dat, .timing_errs(fifo_errs));

  always #(T / 2) sysclk = ~sysclk;

  // clk15: rises at sysclk falling edges, every fourth one, with phase wander.
  initial begin
    realtime nom, j;
    nom = 4 * T;
    forever begin
      j = (($urandom % 3) == 0) ? -8.0 : ((($urandom % 2) == 0) ? 4.0 : 0.0);
      #(nom + j - $realtime) clk15 = 1'b1;
      j = (($urandom % 3) == 0) ? -8.0 : ((($urandom % 2) == 0) ? 4.0 : 0.0);
      #(nom + 2 * T + j - $realtime) clk15 = 1'b0;
      nom += 4 * T;
    end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Readout counter: the chips serve the data of readout number event_no.
  always @(posedge ro_busy) event_no++;

  // Length of the current readout, and snapshots taken at its end.
  int busy_cycles = 0, done_cycles = 0, done_event = -1, done_words = 0;
  always @(posedge sysclk) begin
    if (phase != PH_IDLE) busy_cycles++;
    if (ro_done) begin
      done_cycles = busy_cycles;
      done_event  = event_no;
      done_words  = fifo.words.size();
    end
  end
  always @(posedge ro_busy) busy_cycles = 0;

  // mechanism counters
  int n_empty = 0, n_off = 0, n_multi_ch = 0, n_even = 0, n_odd = 0;
  int n_queued = 0, n_llacc = 0, n_clrout = 0, n_wrinc = 0, n_full = 0;

  initial begin
    #(WATCHDOG_CYCLES * T);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_rd_event();
    @(posedge sysclk) rd_event <= 1'b1;
    repeat (3) @(posedge sysclk);
    rd_event <= 1'b0;
  endtask

  initial begin
    logic [7:0]  expw[$];
    logic [7:0]  hm;
    logic [7:0]  s0, s1;
    int          periods, first_word, nmiss, nchk;
    logic [1:0]  brd_exp, bwr_exp;
    logic [N_ELE-1:0] offs [NREAD];
    offs = '{6'b000000, 6'b000100, 6'b100001, 6'b000000, 6'b010010, 6'b000000, 6'b000000};
    brd_exp = '0; bwr_exp = '0;

    repeat (10) @(posedge sysclk);
    rst_n <= 1'b1;
    repeat (20) @(posedge sysclk);

    for (int r = 0; r < NREAD; r++) begin
      eleoff_in <= offs[r];
      // a level-1 accept before each readout advances buf_rd
      @(posedge sysclk) ll_accept <= 1'b1;
      repeat (3) @(posedge sysclk);
      ll_accept <= 1'b0;
      brd_exp++;
      n_llacc++;
      repeat (12) @(posedge sysclk);
      check(buf_rd == brd_exp, "buf_rd counts ll_accept");

      first_word = done_words;
      // readout 2 is requested while readout 1 is still running: the request
      // is held and starts readout 2 as soon as readout 1 ends.
      if (r != 2) pulse_rd_event();
      if (r == 1) begin
        repeat (200) @(posedge sysclk);
        check(ro_busy, "readout 1 still busy when the next request arrives");
        pulse_rd_event();
        n_queued++;
      end
      @(posedge ro_done);
      @(posedge sysclk);
      repeat (12) @(posedge sysclk);
      bwr_exp++;
      n_wrinc++;
      check(buf_wr == bwr_exp, "buf_wr counts readouts");

      // expected stream and length
      expw.delete();
      periods = 2;                                   // phases 1 and 11
      for (int e = 0; e < int'(N_ELE); e++) begin
        hm = offs[r][e] ? 8'h00 : hitmap_of(r, e);
        if (offs[r][e]) n_off++;
        else if (hm == 0) n_empty++;
        periods += 4;                                // 2, 2a, 2b, 10
        if (hm != 0) begin
          periods += 4;                              // 3..6
          for (int a = 0; a < 4; a++) expw.push_back(sram2_of(r, e, a));
          if ($countones(hm) > 1) n_multi_ch++;
          for (int c = 0; c < int'(N_CH); c++) if (hm[c]) begin
            periods += 35;                           // 7, 8d, 31 x 8, 9a, 9
            for (int p = 0; p < int'(N_SAMPLES) / 2; p++) begin
              s0 = sample_of(r, e, c, 2 * p);
              s1 = sample_of(r, e, c, 2 * p + 1);
              if (s0[7]) n_even++; else n_odd++;
              expw.push_back(half_pick(s0, s1));
            end
          end
        end
      end
      check(done_event == r, "readout number");
      // phase 11 is counted up to the ro_done cycle: 3 cycles short
      check(done_cycles == periods * int'(CLK_DIV) - 3, $sformatf(
            "readout %0d length %0d cycles, expected %0d", r, done_cycles + 3,
            periods * int'(CLK_DIV)));
      check(done_words - first_word == expw.size(), $sformatf(
            "readout %0d wrote %0d words, expected %0d", r,
            done_words - first_word, expw.size()));
      nmiss = 0; nchk = 0;
      for (int i = 0; i < expw.size() && first_word + i < done_words; i++) begin
        nchk++;
        if (fifo.words[first_word + i] !== expw[i]) begin
          if (nmiss < 5) $display("  word %0d: got %h expected %h", i,
                                  fifo.words[first_word + i], expw[i]);
          nmiss++;
        end
      end
      checks += nchk;
      failures += nmiss;
      $display("readout %0d: %0d words, %0d clk15 periods", r, expw.size(), periods);
      if (r == 6) begin
        // longest readout: 6 chips x (4 header + 8 channels x 16 words), and
        // 1 + 6 x (3 + 4 + 8 x 35 + 1) + 1 clk15 periods = 115.3 us at 15 MHz
        check(done_words - first_word == 6 * (4 + 8 * 16), "full readout word count");
        check(done_cycles + 3 == 4 * (2 + 6 * (4 + 4 + 8 * 35)), "full readout length");
        n_full++;
      end
      if (r == 1) check(ro_busy, "queued request started the next readout");
    end

    // clrout clears both buffer counters
    @(posedge sysclk) clrout <= 1'b1;
    @(posedge sysclk) clrout <= 1'b0;
    @(posedge sysclk);
    n_clrout++;
    check(buf_rd == 0 && buf_wr == 0, "clrout clears buf_rd and buf_wr");

    check(setup_errs == 0, $sformatf("chip setup violations: %0d", setup_errs));
    check(inc_errs == 0 && chips.n_inc == 32, "32 data_inc per channel");
    check(fifo_errs == 0, $sformatf("FIFO strobe/setup/hold violations: %0d", fifo_errs));

    // every mechanism must have happened
    check(n_empty > 0,         "chip with an empty hitmap skipped");
    check(n_off > 0,           "switched-off chip skipped");
    check(n_multi_ch > 0,      "several channels read from one chip");
    check(n_even > 0,          "even sample kept on a TDC hit");
    check(n_odd > 0,           "odd sample kept");
    check(spurious_served > 0, "spurious hitmap served before the real one");
    check(n_queued > 0,        "request queued during a readout");
    check(n_full > 0,          "readout with every channel hit");
    check(n_llacc > 0 && n_wrinc > 0 && n_clrout > 0, "buffer counter events");
    $display("mechanisms: empty=%0d off=%0d multi=%0d even=%0d odd=%0d spurious=%0d queued=%0d",
             n_empty, n_off, n_multi_ch, n_even, n_odd, spurious_served, n_queued);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
