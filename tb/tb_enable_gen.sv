// tb_enable_gen: drives `sync` as a 1:4 clock whose rising edge falls between
// sysclk edges, then shifts its phase by one sysclk cycle. Checks that en
// (all copies) and en_latch are one cycle wide, every 4 cycles, en_latch one
// cycle after en, en in the second cycle after the sync edge is sampled, and
// that the generator re-locks in one clk15 period after the shift.
module tb_enable_gen;
  logic       clk = 1'b0, rst_n = 1'b0, sync = 1'b0;
  logic [1:0] en;
  logic       en_latch;
  int checks = 0, failures = 0;
  int cyc = 0, shift = 0;

  enable_gen #(.DIV(4), .N_COPIES(2)) dut (.clk, .rst_n, .sync, .en, .en_latch);

  always #5 clk = ~clk;
  // cyc counts posedges; sync rises 3 ns after posedge 2, 6, 10, ... (+shift)
  always @(posedge clk) begin
    cyc++;
    if (((cyc - shift) % 4) == 2) #3 sync = 1'b1;
    if (((cyc - shift) % 4) == 0) #3 sync = 1'b0;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s cyc=%0d", what, cyc); end
  endtask

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_en;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // no enable before the first sync edge is seen
    check(en == 2'b00 && !en_latch, "idle before sync");
    repeat (12) @(posedge clk);
    for (int k = 0; k < 2; k++) begin
      n_en = 0;
      for (int i = 0; i < 40; i++) begin
        @(negedge clk);
        check(en == 2'b00 || en == 2'b11, "copies equal");
        // sync rose in cycle c (sampled at the end of it); en high in c+2
        check(en[0] == (((cyc - shift) % 4) == 0), "en position");
        check(en_latch == (((cyc - shift) % 4) == 1), "en_latch position");
        if (en[0]) n_en++;
      end
      check(n_en == 10, "one en per 4 cycles");
      // shift the clk15 phase by one cycle, allow one period to re-lock
      shift++;
      repeat (12) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
