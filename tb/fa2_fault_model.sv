// Behavioural model of a 2-bit building block carrying one stuck-at fault,
// for fault-coverage simulation. Same ports as bb_fa2. The block's
// configuration is recognised among the adder and the three test
// configurations and the block is evaluated by the gate-level reference
// model with net FAULT_NET (numbering of tb_ref_pkg) stuck at FAULT_VAL;
// FAULT_NET = -1 gives a fault-free block.
module fa2_fault_model
  import pg_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int FAULT_NET = -1,
  parameter bit FAULT_VAL = 1'b0
) (
  input  pg_config_t cfg,
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  output logic [1:0] s,
  output logic       cout
);

  function automatic int cfg_index(input pg_config_t c);
    if (c == CFG_T1) return 1;
    if (c == CFG_T2) return 2;
    if (c == CFG_T3) return 3;
    return 0;
  endfunction

  always @* begin
    {s, cout} = block(cfg_index(cfg), {a[1], a[0], b[1], b[0], cin}, FAULT_NET, FAULT_VAL);
  end

endmodule
