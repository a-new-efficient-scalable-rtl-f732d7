// Testbench for comparator: all 128 combinations of enable, actual and
// expected pattern; diff must be the bitwise difference and err must flag
// any difference while enabled.
module tb_comparator;
  import pg_pkg::*;

  logic     en, err;
  fa2_out_t act, exp, diff;
  int checks = 0, failures = 0;

  comparator dut (.en(en), .act(act), .exp(exp), .diff(diff), .err(err));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      {en, act, exp} = 7'(i);
      #1;
      checks++;
      if (err !== (en && act != exp)) begin
        failures++;
        $display("FAIL en=%0b act=%03b exp=%03b err=%0b", en, act, exp, err);
      end
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (diff[k] !== (act[k] != exp[k])) begin
          failures++;
          $display("FAIL diff[%0d] act=%03b exp=%03b diff=%03b", k, act, exp, diff);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
