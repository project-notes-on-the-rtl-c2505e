// tb_fifo_out: write requests at the full rate (one per 4 cycles) and at
// random slower rates. Checks that fifo_dat takes the word on the edge after
// the request and holds it until the next one, and that fifo_wr rises on the
// same edge and stays high exactly 2 cycles.
module tb_fifo_out;
  logic       clk = 1'b0, rst_n = 1'b0, wr_req = 1'b0;
  logic [7:0] din = '0, fifo_dat, last;
  logic       fifo_wr;
  int         since = 100;
  int checks = 0, failures = 0, n_full_rate = 0;

  fifo_out #(.DAT_W(8), .WR_CYC(2), .HOLD(4)) dut (.clk, .rst_n, .wr_req, .din, .fifo_dat, .fifo_wr);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gap;
    last = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      gap = (i < 100) ? 4 : 4 + ($urandom % 5);
      if (gap == 4) n_full_rate++;
      @(negedge clk);
      wr_req = 1'b1;
      din = 8'($urandom);
      @(negedge clk);
      wr_req = 1'b0;
      last = din;
      din = 8'($urandom);
      for (int c = 0; c < gap - 1; c++) begin
        check(fifo_dat == last, "fifo_dat held");
        check(fifo_wr == (c < 2), $sformatf("fifo_wr in cycle %0d", c));
        if (c < gap - 2) @(negedge clk);
      end
    end
    check(n_full_rate > 0, "full-rate writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
