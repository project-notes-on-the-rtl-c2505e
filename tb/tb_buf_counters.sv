// tb_buf_counters: random ll_accept / rd_done / clrout pulses with the phase
// enable every 4 cycles. A reference model counts pulses (2 bits, wrapping,
// clrout first) and the counters must equal it right after every enable and
// must not change between enables.
module tb_buf_counters;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clrout = 1'b0, lla = 1'b0, done = 1'b0;
  logic [1:0] buf_rd, buf_wr, hold_rd, hold_wr;
  int rrd = 0, rwr = 0;
  int checks = 0, failures = 0, n_clr = 0, n_pend2 = 0, since_en = 0;

  buf_counters #(.BUF_W(2)) dut (.clk, .rst_n, .en, .clrout, .ll_accept(lla), .rd_done(done),
                                 .buf_rd, .buf_wr);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_lla_period;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    n_lla_period = 0;
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      en = (i % 4) == 3;
      lla = ($urandom % 3) == 0;
      done = ($urandom % 4) == 0;
      clrout = ($urandom % 40) == 0;
      hold_rd = buf_rd; hold_wr = buf_wr;
      @(posedge clk);
      if (clrout) begin rrd = 0; rwr = 0; n_clr++; n_lla_period = 0; end
      else begin
        if (lla) begin rrd = (rrd + 1) % 4; n_lla_period++; end
        if (done) rwr = (rwr + 1) % 4;
      end
      #1;
      if (en || clrout) begin
        if (n_lla_period > 1) n_pend2++;
        n_lla_period = 0;
        check(buf_rd == 2'(rrd) && buf_wr == 2'(rwr),
              $sformatf("after enable: rd=%0d/%0d wr=%0d/%0d", buf_rd, rrd, buf_wr, rwr));
      end else begin
        check(buf_rd == hold_rd && buf_wr == hold_wr, "no change between enables");
      end
    end
    check(n_clr > 0 && n_pend2 > 0, "clrout and several pulses per period seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
