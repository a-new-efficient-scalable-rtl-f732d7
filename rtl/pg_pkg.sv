// Shared types and constants of the self-testing adder built from 2-bit
// polymorphic full-adder blocks.
//
// A polymorphic gate changes its logic function with an external control
// (a voltage in the physical gate). Here that control is a small digital
// mode code. Two gate kinds exist: an AND/OR/XOR gate (G0, G2, G4 of a
// block) and a NAND/NOR/XNOR/AND gate (G1, G3). The code values follow the
// order in which the gate's modes are usually listed (rising control
// voltage for the four-mode gate); that numbering is this design's choice.
//
// A block configuration sets the mode of all five gates. The standard
// configuration makes the block an ordinary 2-bit adder; the three test
// configurations and the two test vectors V4 and V27 together expose the
// block's stuck-at faults. Test vectors are numbered as the 5-bit word
// {a1, a0, b1, b0, cin}, MSB first, so V4 = 00100 and V27 = 11011 are each
// other's complement, which is why one flip-flop can generate both.
package pg_pkg;

  typedef enum logic [1:0] {
    AOX_AND = 2'd0,
    AOX_OR  = 2'd1,
    AOX_XOR = 2'd2
  } aox_mode_e;

  typedef enum logic [1:0] {
    NNXA_NAND = 2'd0,
    NNXA_NOR  = 2'd1,
    NNXA_XNOR = 2'd2,
    NNXA_AND  = 2'd3
  } nnxa_mode_e;

  // Modes of the five polymorphic gates of one building block.
  typedef struct packed {
    aox_mode_e  g0;  // a0 op b0
    nnxa_mode_e g1;  // internal carry
    aox_mode_e  g2;  // S0
    nnxa_mode_e g3;  // carry out
    aox_mode_e  g4;  // S1
  } pg_config_t;

  localparam pg_config_t CFG_STD = '{g0: AOX_XOR, g1: NNXA_NAND, g2: AOX_XOR, g3: NNXA_NAND, g4: AOX_XOR};
  localparam pg_config_t CFG_T1  = '{g0: AOX_XOR, g1: NNXA_AND,  g2: AOX_AND, g3: NNXA_NOR,  g4: AOX_AND};
  localparam pg_config_t CFG_T2  = '{g0: AOX_XOR, g1: NNXA_XNOR, g2: AOX_OR,  g3: NNXA_AND,  g4: AOX_AND};
  localparam pg_config_t CFG_T3  = '{g0: AOX_OR,  g1: NNXA_NOR,  g2: AOX_OR,  g3: NNXA_AND,  g4: AOX_OR};

  localparam int unsigned NUM_TEST_CFG = 3;
  localparam int unsigned NUM_TEST_VEC = 2;
  localparam int unsigned TEST_CLOCKS  = NUM_TEST_CFG * NUM_TEST_VEC;

  // Test configuration number 1..3 to gate modes; 0 is the standard one.
  function automatic pg_config_t test_cfg(input logic [1:0] sel);
    case (sel)
      2'd1:    return CFG_T1;
      2'd2:    return CFG_T2;
      2'd3:    return CFG_T3;
      default: return CFG_STD;
    endcase
  endfunction

  // Inputs of one building block.
  typedef struct packed {
    logic [1:0] a;
    logic [1:0] b;
    logic       cin;
  } fa2_in_t;

  // Outputs of one building block, in the order the reference ROM stores them.
  typedef struct packed {
    logic [1:0] s;
    logic       cout;
  } fa2_out_t;

  localparam fa2_in_t VEC_V4  = 5'b00100;  // a=00, b=10, cin=0
  localparam fa2_in_t VEC_V27 = 5'b11011;  // a=11, b=01, cin=1

endpackage
