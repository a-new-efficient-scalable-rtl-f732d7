// Reference models used by the testbenches.
//
// Written from truth tables, independent of the RTL: a polymorphic gate
// is looked up by the name of its function, and the 2-bit block is
// evaluated gate by gate with an optional stuck-at fault on any of its
// fifteen nets. Mode names are passed as strings so that a wrong code
// table in the RTL package shows up as a mismatch.
package tb_ref_pkg;

  function automatic bit gate(input string fn, input bit a, input bit b);
    case (fn)
      "AND":  return a & b;
      "OR":   return a | b;
      "XOR":  return a ^ b;
      "NAND": return !(a & b);
      "NOR":  return !(a | b);
      "XNOR": return !(a ^ b);
      default: begin
        $fatal(1, "unknown gate function %s", fn);
        return 0;
      end
    endcase
  endfunction

  // Gate functions of G0..G4 for configuration 0 (adder) and 1..3 (test).
  function automatic void cfg_names(input int c, output string g[5]);
    case (c)
      1:       g = '{"XOR", "AND",  "AND", "NOR",  "AND"};
      2:       g = '{"XOR", "XNOR", "OR",  "AND",  "AND"};
      3:       g = '{"OR",  "NOR",  "OR",  "AND",  "OR"};
      default: g = '{"XOR", "NAND", "XOR", "NAND", "XOR"};
    endcase
  endfunction

  // Net numbers for fault injection.
  localparam int NET_A0 = 0, NET_B0 = 1, NET_CIN = 2, NET_A1 = 3, NET_B1 = 4,
                 NET_P0 = 5, NET_N1 = 6, NET_N2 = 7, NET_C1 = 8, NET_P1 = 9,
                 NET_N3 = 10, NET_N4 = 11, NET_S0 = 12, NET_S1 = 13, NET_COUT = 14;
  localparam int NUM_NETS = 15;

  // Block model. in = {a1,a0,b1,b0,cin}; returns {s1,s0,cout}.
  // fault_net < 0 means fault free; otherwise net fault_net is stuck at fault_val.
  function automatic bit [2:0] block(input int c, input bit [4:0] in,
                                     input int fault_net = -1, input bit fault_val = 0);
    string g[5];
    bit n[NUM_NETS];
    cfg_names(c, g);
    n[NET_A1] = in[4]; n[NET_A0] = in[3]; n[NET_B1] = in[2]; n[NET_B0] = in[1]; n[NET_CIN] = in[0];
    for (int i = 0; i < 5; i++) if (fault_net == i) n[i] = fault_val;
    n[NET_P0] = gate(g[0], n[NET_A0], n[NET_B0]);          if (fault_net == NET_P0) n[NET_P0] = fault_val;
    n[NET_S0] = gate(g[2], n[NET_P0], n[NET_CIN]);         if (fault_net == NET_S0) n[NET_S0] = fault_val;
    n[NET_N1] = gate("NAND", n[NET_P0], n[NET_CIN]);       if (fault_net == NET_N1) n[NET_N1] = fault_val;
    n[NET_N2] = gate("NAND", n[NET_A0], n[NET_B0]);        if (fault_net == NET_N2) n[NET_N2] = fault_val;
    n[NET_C1] = gate(g[1], n[NET_N1], n[NET_N2]);          if (fault_net == NET_C1) n[NET_C1] = fault_val;
    n[NET_P1] = gate("XOR", n[NET_A1], n[NET_B1]);         if (fault_net == NET_P1) n[NET_P1] = fault_val;
    n[NET_S1] = gate(g[4], n[NET_P1], n[NET_C1]);          if (fault_net == NET_S1) n[NET_S1] = fault_val;
    n[NET_N3] = gate("NAND", n[NET_P1], n[NET_C1]);        if (fault_net == NET_N3) n[NET_N3] = fault_val;
    n[NET_N4] = gate("NAND", n[NET_A1], n[NET_B1]);        if (fault_net == NET_N4) n[NET_N4] = fault_val;
    n[NET_COUT] = gate(g[3], n[NET_N3], n[NET_N4]);        if (fault_net == NET_COUT) n[NET_COUT] = fault_val;
    return {n[NET_S1], n[NET_S0], n[NET_COUT]};
  endfunction

endpackage
