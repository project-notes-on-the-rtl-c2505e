// tb_myrs: random set/clr sequences against a reference flip-flop in which
// set wins over clr.
module tb_myrs;
  logic clk = 1'b0, rst_n = 1'b0, set = 1'b0, clr = 1'b0, q;
  logic ref_q = 1'b0;
  int checks = 0, failures = 0;
  int n_both = 0;

  myrs dut (.clk, .rst_n, .set, .clr, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      set = ($urandom % 4) == 0;
      clr = ($urandom % 3) == 0;
      if (set && clr && ref_q == 1'b0) n_both++;
      @(posedge clk);
      ref_q = set ? 1'b1 : (clr ? 1'b0 : ref_q);
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL i=%0d set=%b clr=%b q=%b expected %b", i, set, clr, q, ref_q);
      end
    end
    if (n_both == 0) begin failures++; $display("FAIL set and clr never together"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
