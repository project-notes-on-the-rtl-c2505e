// tb_readout_fsm: runs the phase sequencer alone. The testbench makes the
// enables (one en per 4 cycles, en_latch one cycle later) and plays the parts
// of the hitmap and chip-counter blocks with a few lines of behavioural code.
// For each event it builds the expected list of phases from the hitmaps and
// compares it period by period, and it counts, per channel, data_start,
// data_inc (32) and latched samples (32, odd/even alternating), per chip the
// four header words on ch_sel_num 0..3 with sramenb, and one ro_done.
module tb_readout_fsm;
  import fea_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0, en_latch = 1'b0, start = 1'b0;
  logic       more_channel, last_ele;
  logic [2:0] ch_num;
  logic       data_start, data_inc, ch_sel, sramenb, ele_active;
  logic [2:0] ch_sel_num;
  logic       start_clr, ele_clr, ele_inc, next_ch, smp_clr, ro_done;
  logic       hitmap_load, hdr_wr, smp_valid, smp_odd, ro_busy;
  phase_t     phase;

  readout_fsm dut (
    .clk, .rst_n, .en_state(en), .en_out(en), .en_latch, .start, .more_channel,
    .last_ele, .ch_num, .data_start, .data_inc, .ch_sel, .sramenb, .ch_sel_num,
    .ele_active, .start_clr, .ele_clr, .ele_inc, .next_ch, .smp_clr, .ro_done,
    .hitmap_load, .hdr_wr, .smp_valid, .smp_odd, .phase, .ro_busy
  );

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    en <= ((cyc + 1) % 4) == 0;
    en_latch <= ((cyc + 1) % 4) == 1;
  end

  // behavioural hitmap / chip counter
  logic [7:0] hm_tab [6];
  logic [7:0] hm = '0;
  int         ele = 0;
  always @(posedge clk) begin
    if (ele_clr) ele <= 0;
    else if (ele_inc) ele <= ele + 1;
    if (hitmap_load) hm <= hm_tab[ele];
    else if (next_ch) hm[ch_num] <= 1'b0;
    if (start_clr) start <= 1'b0;
  end
  assign last_ele = (ele == 5);
  assign more_channel = (hm != 0);
  always_comb begin
    ch_num = 0;
    for (int i = 7; i >= 0; i--) if (hm[i]) ch_num = 3'(i);
  end

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // per-event counters
  int n_ds = 0, n_inc = 0, n_smp = 0, n_hdr = 0, n_done = 0, bad_odd = 0, bad_hdr = 0;
  int inc_this_ch = 0, smp_this_ch = 0, bad_ch = 0;
  always @(posedge clk) if (rst_n) begin
    if (en && data_start) begin
      n_ds++;
      if (n_ds > 1 && (inc_this_ch != 32 || smp_this_ch != 32)) bad_ch++;
      inc_this_ch = 0; smp_this_ch = 0;
    end
    if (en && data_inc) begin n_inc++; inc_this_ch++; end
    if (smp_valid) begin
      if (smp_odd != smp_this_ch[0]) bad_odd++;
      n_smp++; smp_this_ch++;
    end
    if (hdr_wr) n_hdr++;
    if (en && sramenb && ch_sel_num != 3'((n_hdr) % 4)) bad_hdr++;
    if (ro_done) n_done++;
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phase_t exp_ph[$];
    int nch, nchips;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int ev = 0; ev < 6; ev++) begin
      nch = 0; nchips = 0;
      for (int e = 0; e < 6; e++) begin
        hm_tab[e] = (ev == 0) ? ((e == 2) ? 8'h81 : 8'h00) : 8'($urandom);
        if ((ev + e) % 5 == 0) hm_tab[e] = 8'h00;
      end
      // expected phase sequence
      exp_ph.delete();
      exp_ph.push_back(PH_1);
      for (int e = 0; e < 6; e++) begin
        exp_ph.push_back(PH_2); exp_ph.push_back(PH_2A); exp_ph.push_back(PH_2B);
        if (hm_tab[e] != 0) begin
          nchips++;
          exp_ph.push_back(PH_3); exp_ph.push_back(PH_4);
          exp_ph.push_back(PH_5); exp_ph.push_back(PH_6);
          for (int c = 0; c < 8; c++) if (hm_tab[e][c]) begin
            nch++;
            exp_ph.push_back(PH_7); exp_ph.push_back(PH_8D);
            repeat (31) exp_ph.push_back(PH_8);
            exp_ph.push_back(PH_9A); exp_ph.push_back(PH_9);
          end
        end
        exp_ph.push_back(PH_10);
      end
      exp_ph.push_back(PH_11);
      exp_ph.push_back(PH_IDLE);

      n_ds = 0; n_inc = 0; n_smp = 0; n_hdr = 0; n_done = 0;
      bad_odd = 0; bad_hdr = 0; bad_ch = 0;
      @(negedge clk) start = 1'b1;
      // wait for phase 1, then one phase per 4 cycles
      while (phase != PH_1) @(negedge clk);
      for (int i = 0; i < exp_ph.size(); i++) begin
        checks++;
        if (phase != exp_ph[i]) begin
          failures++;
          $display("FAIL ev %0d period %0d: phase %s expected %s", ev, i,
                   phase.name(), exp_ph[i].name());
          break;
        end
        repeat (4) @(negedge clk);
      end
      if (inc_this_ch != 32 || smp_this_ch != 32) bad_ch++;
      check(n_ds == nch, $sformatf("data_start %0d, channels %0d", n_ds, nch));
      check(n_inc == 32 * nch, "32 data_inc per channel");
      check(n_smp == 32 * nch, "32 samples latched per channel");
      check(bad_ch == 0 && bad_odd == 0, "per-channel counts and sample parity");
      check(n_hdr == 4 * nchips && bad_hdr == 0, "4 header words per chip with hits");
      check(n_done == 1, "one ro_done");
      check(!ro_busy, "idle after readout");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
