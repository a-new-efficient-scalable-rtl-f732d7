// Testbench for bb_fa2.
// Standard configuration: all 32 input combinations against a + b + cin.
// Test configurations 1..3: all 32 inputs against the gate-level reference
// model built from the configuration table.
module tb_bb_fa2;
  import pg_pkg::*;
  import tb_ref_pkg::*;

  pg_config_t cfg;
  logic [1:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  bb_fa2 dut (.cfg(cfg), .a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [2:0] want;
    // adder configuration
    cfg = CFG_STD;
    for (int v = 0; v < 32; v++) begin
      {a, b, cin} = 5'(v);
      #1;
      checks++;
      if ({cout, s} !== 3'(a + b + cin)) begin
        failures++;
        $display("FAIL add a=%0d b=%0d cin=%0d -> cout=%0b s=%0d", a, b, cin, cout, s);
      end
    end
    // every configuration against the reference netlist
    for (int c = 0; c < 4; c++) begin
      cfg = test_cfg(2'(c));
      for (int v = 0; v < 32; v++) begin
        {a, b, cin} = 5'(v);
        #1;
        want = block(c, 5'(v));
        checks++;
        if ({s, cout} !== want) begin
          failures++;
          $display("FAIL cfg%0d vec=%0d got s=%02b cout=%0b want %03b", c, v, s, cout, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
