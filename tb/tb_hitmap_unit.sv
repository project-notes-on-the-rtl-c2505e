// tb_hitmap_unit: loads random hitmaps (some with dis_ele set) and walks
// through them with `next`, checking that channels come out lowest first,
// each hit channel exactly once, more_channel drops after the last, and a
// disabled chip yields no channel at all.
module tb_hitmap_unit;
  logic       clk = 1'b0, rst_n = 1'b0, load = 1'b0, dis = 1'b0, next = 1'b0;
  logic [7:0] hit_in = '0, hitmap;
  logic [2:0] ch_num;
  logic       more;
  logic [7:0] ref_hm;
  int checks = 0, failures = 0, n_dis = 0, n_multi = 0;

  hitmap_unit #(.N_CH(8)) dut (.clk, .rst_n, .load, .hit_in, .dis_ele(dis), .next,
                               .hitmap, .ch_num, .more_channel(more));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int lowest(input logic [7:0] v);
    for (int i = 0; i < 8; i++) if (v[i]) return i;
    return 0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, n_exp;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      hit_in = (t % 17 == 0) ? 8'h00 : 8'($urandom);
      dis = (t % 7 == 3);
      load = 1'b1;
      ref_hm = dis ? 8'h00 : hit_in;
      if (dis && hit_in != 0) n_dis++;
      if ($countones(ref_hm) > 1) n_multi++;
      n_exp = $countones(ref_hm);
      @(negedge clk);
      load = 1'b0;
      hit_in = 8'($urandom);          // the bus moves on; must not matter
      n = 0;
      forever begin
        @(negedge clk);                 // one cycle for the test to settle
        check(more == (ref_hm != 0), "more_channel");
        if (ref_hm == 0) break;
        check(ch_num == 3'(lowest(ref_hm)), $sformatf("ch_num %0d expected %0d", ch_num, lowest(ref_hm)));
        check(hitmap == ref_hm, "hitmap register");
        next = 1'b1;
        ref_hm[lowest(ref_hm)] = 1'b0;
        @(negedge clk) next = 1'b0;
        n++;
      end
      check(n == n_exp, "each hit channel exactly once");
    end
    check(n_dis > 0 && n_multi > 0, "disabled chips and multi-channel maps seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
