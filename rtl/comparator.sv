// Response comparator of one building block.
//
// An array of XOR gates compares the block's three outputs with the
// expected pattern from the reference ROM. diff shows which outputs differ;
// err is their OR, gated by en so that it is raised only during a test step
// (the OR and the enable are this design's choice). Combinational.
module comparator
  import pg_pkg::*;
(
  input  logic     en,
  input  fa2_out_t act,
  input  fa2_out_t exp,
  output fa2_out_t diff,
  output logic     err
);

  assign diff = act ^ exp;
  assign err  = en & (|diff);

endmodule
