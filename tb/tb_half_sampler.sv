// tb_half_sampler: feeds 32-sample channels with random TDC flags and checks
// that exactly the sample chosen by the rule is kept in every pair: the even
// one when it is a TDC hit, otherwise the odd one.
module tb_half_sampler;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, valid = 1'b0, odd = 1'b0, tdc = 1'b0;
  logic keep;
  logic tdc_even;
  int checks = 0, failures = 0, n_even = 0, n_odd = 0;

  half_sampler dut (.clk, .rst_n, .clr, .valid, .odd, .tdc_hit(tdc), .keep);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int ch = 0; ch < 40; ch++) begin
      @(negedge clk) clr = 1'b1;
      @(negedge clk) clr = 1'b0;
      for (int s = 0; s < 32; s++) begin
        // idle cycles in between, with the TDC input toggling
        repeat (3) begin
          @(negedge clk);
          valid = 1'b0;
          tdc = $urandom % 2;
          odd = $urandom % 2;
          #1;
          checks++;
          if (keep) begin failures++; $display("FAIL keep without valid"); end
        end
        @(negedge clk);
        valid = 1'b1;
        odd = s[0];
        tdc = $urandom % 2;
        if (!odd) tdc_even = tdc;
        #1;
        checks++;
        if (keep !== (odd ? !tdc_even : tdc)) begin
          failures++;
          $display("FAIL ch %0d sample %0d tdc=%b keep=%b", ch, s, tdc, keep);
        end
        if (keep && !odd) n_even++;
        if (keep && odd) n_odd++;
      end
      @(negedge clk) valid = 1'b0;
    end
    checks++;
    if (n_even + n_odd != 40 * 16 || n_even == 0 || n_odd == 0) begin
      failures++;
      $display("FAIL kept %0d even + %0d odd", n_even, n_odd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
