// tb_ele_select: steps the chip counter through all chips several times with
// random eleoff_in patterns, checking ele_num, the one-hot chip_sel (all zero
// when not active), dis_ele and last_ele against a reference counter.
module tb_ele_select;
  logic       clk = 1'b0, rst_n = 1'b0, clr = 1'b0, inc = 1'b0, active = 1'b0;
  logic [5:0] eleoff = '0, chip_sel;
  logic [2:0] ele_num;
  logic       dis, last;
  int         r = 0;
  int checks = 0, failures = 0, n_last = 0;

  ele_select #(.N_ELE(6)) dut (.clk, .rst_n, .clr, .inc, .active, .eleoff_in(eleoff),
                               .ele_num, .chip_sel, .dis_ele(dis), .last_ele(last));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (r=%0d)", what, r); end
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
    for (int rep = 0; rep < 10; rep++) begin
      eleoff = 6'($urandom);
      @(negedge clk) begin clr = 1'b1; active = 1'b1; end
      @(negedge clk) clr = 1'b0;
      r = 0;
      for (int k = 0; k < 8; k++) begin
        repeat (2) @(negedge clk);
        check(ele_num == 3'(r), "ele_num");
        check(chip_sel == 6'(1 << r), "chip_sel one-hot");
        check(dis == eleoff[r], "dis_ele");
        check(last == (r == 5), "last_ele");
        if (last) n_last++;
        inc = 1'b1;
        @(negedge clk) inc = 1'b0;
        if (r < 5) r++;              // saturates at the last chip
      end
      active = 1'b0;
      repeat (2) @(negedge clk);
      check(chip_sel == '0, "no chip selected when idle");
    end
    check(n_last > 0, "last chip reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
