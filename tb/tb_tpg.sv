// Testbench for tpg: clear gives V4 = 00100, each enabled clock toggles to
// the other vector (V27 = 11011), a disabled clock holds, clear wins over
// enable. Vectors are {a1,a0,b1,b0,cin}.
module tb_tpg;
  import pg_pkg::*;

  logic    clk = 0, rst_n = 1, clr = 0, en = 0;
  logic    vec_sel;
  fa2_in_t tv;
  int checks = 0, failures = 0;

  tpg dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .vec_sel(vec_sel), .tv(tv));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_vec(input bit sel);
    bit [4:0] want = sel ? 5'd27 : 5'd4;
    checks++;
    if (vec_sel !== sel || tv !== want) begin
      failures++;
      $display("FAIL t=%0t vec_sel=%0b tv=%05b want sel=%0b tv=%05b", $time, vec_sel, tv, sel, want);
    end
  endtask

  initial begin
    #1 rst_n = 0;          // asynchronous reset needs a falling edge
    #1 expect_vec(0);      // reset value
    rst_n = 1;
    @(negedge clk) en = 1;
    @(negedge clk) expect_vec(1);
    @(negedge clk) expect_vec(0);
    @(negedge clk) expect_vec(1);
    en = 0;
    @(negedge clk) expect_vec(1);  // hold
    @(negedge clk) expect_vec(1);
    clr = 1; en = 1;
    @(negedge clk) expect_vec(0);  // clear wins
    @(negedge clk) expect_vec(0);
    clr = 0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk) expect_vec(1'(~i[0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
