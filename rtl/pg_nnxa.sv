// Polymorphic NAND/NOR/XNOR/AND gate.
//
// A two-input gate whose function is chosen by its mode: NAND, NOR, XNOR
// or AND. In silicon the mode is an external control voltage; here it is
// the code pg_pkg::nnxa_mode_e, which uses all four values. Purely
// combinational, no clock.
module pg_nnxa
  import pg_pkg::*;
(
  input  nnxa_mode_e mode,
  input  logic       a,
  input  logic       b,
  output logic       y
);

  always_comb begin
    case (mode)
      NNXA_NAND: y = ~(a & b);
      NNXA_NOR:  y = ~(a | b);
      NNXA_XNOR: y = ~(a ^ b);
      default:   y = a & b;
    endcase
  end

endmodule
