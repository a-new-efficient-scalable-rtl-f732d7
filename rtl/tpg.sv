// Test pattern generator: one flip-flop.
//
// The two test vectors V4 = 00100 and V27 = 11011 ({a1,a0,b1,b0,cin}) are
// bitwise complements, so a single flip-flop q selects between them and the
// 5-bit vector is q routed to four bits and ~q to the fifth.
// q = 0 gives V4, q = 1 gives V27.
//
// Timing: clr (from the control unit) loads 0 at the next clock edge, en
// toggles q at the next edge; clr wins. Asynchronous active-low reset to 0.
// The control inputs are this design's choice.
module tpg
  import pg_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr,
  input  logic    en,
  output logic    vec_sel,
  output fa2_in_t tv
);

  logic q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= 1'b0;
    else if (clr) q <= 1'b0;
    else if (en)  q <= ~q;
  end

  // q = 0: 00100, q = 1: 11011, i.e. tv = {q, q, ~q, q, q}
  assign vec_sel = q;
  assign tv      = q ? VEC_V27 : VEC_V4;

endmodule
