// Testbench for ref_rom: every word against the response of the reference
// block model to V4 (4) and V27 (27) in that configuration; configuration
// 0 must read 0.
module tb_ref_rom;
  import pg_pkg::*;
  import tb_ref_pkg::*;

  logic [1:0] cfg_sel;
  logic       vec_sel;
  fa2_out_t   exp;
  int checks = 0, failures = 0;

  ref_rom dut (.cfg_sel(cfg_sel), .vec_sel(vec_sel), .exp(exp));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [2:0] want;
    for (int c = 0; c < 4; c++) begin
      for (int v = 0; v < 2; v++) begin
        cfg_sel = 2'(c); vec_sel = 1'(v);
        #1;
        want = (c == 0) ? 3'b000 : block(c, v ? 5'd27 : 5'd4);
        checks++;
        if (exp !== want) begin
          failures++;
          $display("FAIL cfg=%0d vec=%0d got %03b want %03b", c, v, exp, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
