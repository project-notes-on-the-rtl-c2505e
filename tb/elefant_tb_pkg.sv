// elefant_tb_pkg: test data for the readout testbenches. Every value the
// chip model serves (hitmaps, SRAM2 header words, waveform samples) is a
// hash of (event, chip, channel, index), so a testbench can recompute the
// FIFO stream it expects without looking inside the design.
package elefant_tb_pkg;

  function automatic logic [31:0] mix(input logic [31:0] a);
    logic [31:0] x;
    x = a * 32'h9E37_79B1;
    x = x ^ (x >> 15);
    x = x * 32'h85EB_CA77;
    x = x ^ (x >> 13);
    return x;
  endfunction

  // Roughly one chip in five has no hit channel. Every eighth event, from
  // event 6 on, hits every channel of every chip (the longest readout).
  function automatic logic [7:0] hitmap_of(input int ev, input int ele);
    logic [31:0] h;
    if (ev % 8 == 6) return 8'hFF;
    h = mix(32'(ev * 64 + ele + 1));
    if (h[15:8] < 8'd52) return 8'h00;
    return h[7:0];
  endfunction

  function automatic logic [7:0] sram2_of(input int ev, input int ele, input int addr);
    return mix(32'(32'h1000_0000 + ev * 256 + ele * 16 + addr))[7:0];
  endfunction

  // Bit 7 of a sample is its TDC hit flag.
  function automatic logic [7:0] sample_of(input int ev, input int ele, input int ch,
                                           input int s);
    return mix(32'(32'h2000_0000 + ev * 65536 + ele * 2048 + ch * 64 + s))[7:0];
  endfunction

  // Half sampling, recomputed: one word per pair.
  function automatic logic [7:0] half_pick(input logic [7:0] even_s, input logic [7:0] odd_s);
    return even_s[7] ? even_s : odd_s;
  endfunction

endpackage
