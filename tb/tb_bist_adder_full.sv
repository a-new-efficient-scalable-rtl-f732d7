// Full-size testbench: bist_adder with its default parameters (a 16-bit
// adder of eight blocks). One complete self-test between two runs of
// random additions; checks the six-clock test time, every block's
// response in every test clock, the pass result and the return to
// addition.
module tb_bist_adder_full;
  import tb_ref_pkg::*;

  localparam int N  = 16;  // default width of bist_adder
  localparam int NB = N / 2;

  logic          clk = 0, rst_n = 1;
  logic [N-1:0]  a = '0, b = '0, sum;
  logic          cin = 0, cout, test_start = 0, test_busy, test_done, test_pass;
  logic [NB-1:0] fail_map;
  int checks = 0, failures = 0;

  bist_adder dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout),
    .test_start(test_start), .test_busy(test_busy), .test_done(test_done),
    .test_pass(test_pass), .fail_map(fail_map));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  task automatic adds(input int n);
    logic [N:0] want;
    for (int i = 0; i < n; i++) begin
      a = N'($urandom); b = N'($urandom); cin = 1'($urandom);
      #1;
      want = {1'b0, a} + {1'b0, b} + {{N{1'b0}}, cin};
      chk({cout, sum} == want, $sformatf("add %h+%h+%0b = %0b_%h", a, b, cin, cout, sum));
    end
  endtask

  initial begin
    int clocks = 0;
    #1 rst_n = 0;
    #1;
    @(negedge clk) rst_n = 1;
    adds(500);
    @(negedge clk) test_start = 1;
    @(negedge clk) test_start = 0;
    for (int s = 0; s < 6; s++) begin
      bit [2:0] want;
      bit ok;
      want = block(s / 2 + 1, s % 2 ? 5'd27 : 5'd4);
      ok = test_busy && cout == want[0];
      for (int k = 0; k < NB; k++) ok &= (sum[2*k +: 2] == want[2:1]);
      chk(ok, $sformatf("step %0d: sum=%b cout=%0b, each block should give %03b", s, sum, cout, want));
      if (test_busy) clocks++;
      @(negedge clk);
    end
    chk(clocks == 6 && !test_busy && test_done, $sformatf("test took %0d clocks", clocks));
    chk(test_pass && fail_map == '0, $sformatf("pass=%0b fail_map=%b", test_pass, fail_map));
    adds(500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
