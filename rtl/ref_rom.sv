// Reference ROM: the fault-free responses of a building block.
//
// Six words of three bits (18 bits): {S1, S0, cout} for test vectors V4
// and V27 in each of the three test configurations. Addressed by the test
// configuration number cfg_sel (1..3) and the vector select vec_sel
// (0 = V4, 1 = V27); configuration 0 reads as 0. Combinational read.
//
// The contents are the responses of the block netlist (see bb_fa2) under
// CFG_T1..CFG_T3; the word organisation is this design's choice.
module ref_rom
  import pg_pkg::*;
(
  input  logic [1:0] cfg_sel,
  input  logic       vec_sel,
  output fa2_out_t   exp
);

  // index {cfg_sel - 1, vec_sel}; each word is {s[1:0], cout}
  localparam fa2_out_t ROM [0:5] = '{
    3'b100,   // config 1, V4
    3'b000,   // config 1, V27
    3'b100,   // config 2, V4
    3'b011,   // config 2, V27
    3'b101,   // config 3, V4
    3'b110    // config 3, V27
  };

  always_comb begin
    if (cfg_sel == 2'd0) exp = '0;
    else                 exp = ROM[{cfg_sel - 2'd1, vec_sel}];
  end

endmodule
