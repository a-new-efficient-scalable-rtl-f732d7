// Input multiplexer of one building block.
//
// In normal mode (test_mode = 0) the block receives its primary inputs,
// whose carry-in is the carry from the block below (or the adder's carry
// in for the lowest block). In test mode it receives the test vector shared
// by all blocks, so every block is tested at the same time.
// Five 2:1 multiplexers, combinational.
module mux_block
  import pg_pkg::*;
(
  input  logic    test_mode,
  input  fa2_in_t pi,
  input  fa2_in_t tv,
  output fa2_in_t y
);

  assign y = test_mode ? tv : pi;

endmodule
