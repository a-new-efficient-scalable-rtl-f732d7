// Testbench for pg_aox: every mode with every input pair, compared with
// the truth table of the named function.
module tb_pg_aox;
  import pg_pkg::*;
  import tb_ref_pkg::*;

  aox_mode_e mode;
  logic a, b, y;
  int checks = 0, failures = 0;

  pg_aox dut (.mode(mode), .a(a), .b(b), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_mode(input aox_mode_e m, input string fn);
    for (int i = 0; i < 4; i++) begin
      mode = m; a = i[1]; b = i[0];
      #1;
      checks++;
      if (y !== gate(fn, a, b)) begin
        failures++;
        $display("FAIL %s a=%0b b=%0b y=%0b", fn, a, b, y);
      end
    end
  endtask

  initial begin
    check_mode(AOX_AND, "AND");
    check_mode(AOX_OR,  "OR");
    check_mode(AOX_XOR, "XOR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
