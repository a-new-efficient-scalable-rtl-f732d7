// Testbench for mux_block: random primary inputs and test vectors, both
// select values, output compared field by field.
module tb_mux_block;
  import pg_pkg::*;

  logic    test_mode;
  fa2_in_t pi, tv, y;
  int checks = 0, failures = 0;

  mux_block dut (.test_mode(test_mode), .pi(pi), .tv(tv), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      pi = 5'($urandom); tv = 5'($urandom); test_mode = 1'($urandom);
      #1;
      checks++;
      if (test_mode ? (y.a !== tv.a || y.b !== tv.b || y.cin !== tv.cin)
                    : (y.a !== pi.a || y.b !== pi.b || y.cin !== pi.cin)) begin
        failures++;
        $display("FAIL mode=%0b pi=%05b tv=%05b y=%05b", test_mode, pi, tv, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
