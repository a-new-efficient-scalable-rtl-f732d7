// Polymorphic AND/OR/XOR gate.
//
// A two-input gate whose function is chosen by its mode: AND, OR or XOR.
// In silicon the mode is an external control voltage; here it is the code
// pg_pkg::aox_mode_e. The unused code 3 behaves as AND (this design's
// choice). Purely combinational, no clock.
module pg_aox
  import pg_pkg::*;
(
  input  aox_mode_e mode,
  input  logic      a,
  input  logic      b,
  output logic      y
);

  always_comb begin
    case (mode)
      AOX_OR:  y = a | b;
      AOX_XOR: y = a ^ b;
      default: y = a & b;
    endcase
  end

endmodule
