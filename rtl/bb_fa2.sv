// 2-bit full-adder building block with five polymorphic gates.
//
// Bit 0: G0 combines a0 and b0 (the propagate term in the standard
// configuration); G2 combines that with cin to give S0. The internal carry
// is G1 of NAND(G0 out, cin) and NAND(a0, b0). Bit 1 repeats the pattern
// with a fixed XOR of a1 and b1 in place of G0: G4 gives S1, and G3 of
// NAND(a1^b1, carry) and NAND(a1, b1) gives cout.
//
// With cfg = CFG_STD (G0, G2, G4 = XOR; G1, G3 = NAND) the block is an
// ordinary 2-bit ripple adder: {cout, s} = a + b + cin. The test
// configurations CFG_T1..CFG_T3 change the gate functions so that the two
// test vectors V4 and V27 expose the block's stuck-at faults.
//
// The gate arrangement and the configurations are those of the published
// block; the types of the fixed gates (four NANDs and one XOR) are inferred
// as the only ones that make the standard configuration an adder.
// Purely combinational.
module bb_fa2
  import pg_pkg::*;
(
  input  pg_config_t cfg,
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  output logic [1:0] s,
  output logic       cout
);

  logic p0, n1, n2, c1;  // bit 0
  logic p1, n3, n4;      // bit 1

  // bit 0
  pg_aox  u_g0 (.mode(cfg.g0), .a(a[0]), .b(b[0]), .y(p0));
  pg_aox  u_g2 (.mode(cfg.g2), .a(p0),   .b(cin),  .y(s[0]));
  assign n1 = ~(p0 & cin);
  assign n2 = ~(a[0] & b[0]);
  pg_nnxa u_g1 (.mode(cfg.g1), .a(n1),   .b(n2),   .y(c1));

  // bit 1
  assign p1 = a[1] ^ b[1];
  pg_aox  u_g4 (.mode(cfg.g4), .a(p1),   .b(c1),   .y(s[1]));
  assign n3 = ~(p1 & c1);
  assign n4 = ~(a[1] & b[1]);
  pg_nnxa u_g3 (.mode(cfg.g3), .a(n3),   .b(n4),   .y(cout));

endmodule
