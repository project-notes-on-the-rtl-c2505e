// tb_cascaded_counter: a 5-bit counter of 4-bit stages (the sample counter)
// and a 10-bit one of 3 stages, driven with random inc/clr and compared with
// a plain integer count; tc and co are checked at every step.
module tb_cascaded_counter;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, inc = 1'b0;
  logic [4:0] c5;
  logic [9:0] c10;
  logic tc5, co5, tc10, co10;
  int ref5 = 0, ref10 = 0;
  int checks = 0, failures = 0, wraps = 0;

  cascaded_counter #(.WIDTH(5),  .STAGE(4)) u5  (.clk, .rst_n, .clr, .inc, .count(c5),  .tc(tc5),  .co(co5));
  cascaded_counter #(.WIDTH(10), .STAGE(4)) u10 (.clk, .rst_n, .clr, .inc, .count(c10), .tc(tc10), .co(co10));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clr = (i % 1500) == 1499;
      inc = ($urandom % 8) != 0;
      #1;
      check(tc5 == (ref5 == 31) && co5 == (ref5 == 31 && inc), "5-bit tc/co");
      check(tc10 == (ref10 == 1023) && co10 == (ref10 == 1023 && inc), "10-bit tc/co");
      @(posedge clk);
      if (clr) begin ref5 = 0; ref10 = 0; end
      else if (inc) begin
        if (ref10 == 1023) wraps++;
        ref5 = (ref5 + 1) % 32;
        ref10 = (ref10 + 1) % 1024;
      end
      #1;
      check(c5 == 5'(ref5), $sformatf("5-bit count %0d expected %0d", c5, ref5));
      check(c10 == 10'(ref10), $sformatf("10-bit count %0d expected %0d", c10, ref10));
    end
    check(wraps > 0, "10-bit counter wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
