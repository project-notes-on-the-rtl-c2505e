// cascaded_counter: synchronous up-counter built as a chain of STAGE-bit
// counters. Each stage counts when `inc` is high and every stage below it is
// at its all-ones value (its carry). The original synthesis tool could not
// build counters wider than 4 bits, so wide counters were split this way; the
// split is kept here with STAGE as a parameter. `clr` is a synchronous clear
// and has priority over `inc`. `count` changes one cycle after inc/clr;
// `tc` (terminal count) is high while count is all ones; `co` (carry out)
// is tc and inc together, to chain a further counter.
module cascaded_counter #(
  parameter int unsigned WIDTH = 5,
  parameter int unsigned STAGE = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             inc,
  output logic [WIDTH-1:0] count,
  output logic             tc,
  output logic             co
);
  localparam int unsigned NST = (WIDTH + STAGE - 1) / STAGE;

  logic [NST:0] carry;
  assign carry[0] = inc;

  for (genvar s = 0; s < NST; s++) begin : g_stage
    localparam int unsigned LO = s * STAGE;
    localparam int unsigned W  = (WIDTH - LO < STAGE) ? (WIDTH - LO) : STAGE;
    logic [W-1:0] cnt;

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)        cnt <= '0;
      else if (clr)      cnt <= '0;
      else if (carry[s]) cnt <= cnt + 1'b1;

    assign carry[s+1]     = carry[s] & (&cnt);
    assign count[LO+:W]   = cnt;
  end

  assign tc = &count;
  assign co = carry[NST];
endmodule
