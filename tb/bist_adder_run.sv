// End-to-end test sequence for one bist_adder of width N, used by the
// testbenches. Drives its own copy of the adder from the shared clock:
// random additions and carry-chain additions in normal mode, self-tests
// (one with start held high throughout), additions again after each test.
// During every test clock it checks that each block's outputs on sum/cout
// are the reference response for that configuration and vector, and it
// counts the test clocks. Only the adder's ports are observed: in a test
// clock every block's two sum bits, and the top block's carry out. It reports its check and failure counts and how
// often each mechanism of the design was exercised; finished goes high at
// the end.
module bist_adder_run #(
  parameter int N = 4,
  parameter int NUM_ADDS = 200
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   n_add,        // normal-mode additions checked
  output int   n_ripple,     // additions whose carry ran through every block
  output int   n_tests,      // self-tests completed with test_done
  output int   n_pass,       // self-tests reporting pass
  output int   n_cfg [1:3],  // test clocks spent in each test configuration
  output int   n_vec [0:1],  // test clocks applying V4 / V27
  output int   n_ignored,    // starts ignored because a test was running
  output int   n_resume,     // additions checked right after a test
  output logic finished
);
  import tb_ref_pkg::*;

  localparam int NB = N / 2;

  logic           rst_n = 1;
  logic [N-1:0]   a = '0, b = '0, sum;
  logic           cin = 0, cout, test_start = 0, test_busy, test_done, test_pass;
  logic [NB-1:0]  fail_map;

  bist_adder #(.N_BITS(N)) dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout),
    .test_start(test_start), .test_busy(test_busy), .test_done(test_done),
    .test_pass(test_pass), .fail_map(fail_map));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL N=%0d t=%0t %s", N, $time, what);
    end
  endtask

  task automatic add_check(input logic [N-1:0] x, input logic [N-1:0] y, input logic c);
    logic [N:0] want;
    a = x; b = y; cin = c;
    #1;
    want = {1'b0, x} + {1'b0, y} + {{N{1'b0}}, c};
    chk({cout, sum} == want, $sformatf("add %h+%h+%0b = %0b_%h, want %h", x, y, c, cout, sum, want));
    n_add++;
  endtask

  task automatic self_test(input bit hold_start);
    int clocks = 0;
    @(negedge clk);
    a = N'($urandom); b = N'($urandom); cin = 1'($urandom);  // ignored while testing
    test_start = 1;
    @(negedge clk);
    test_start = hold_start;
    for (int s = 0; s < 6; s++) begin
      int c = s / 2 + 1, v = s % 2;
      bit [2:0] want = block(c, v ? 5'd27 : 5'd4);
      bit ok;
      chk(test_busy, $sformatf("busy in step %0d", s));
      if (test_busy) clocks++;
      ok = test_busy && cout == want[0];
      for (int k = 0; k < NB; k++) ok &= (sum[2*k +: 2] == want[2:1]);
      chk(ok, $sformatf("block responses in step %0d: sum=%b cout=%0b want %03b per block", s, sum, cout, want));
      // a configuration or vector counts as applied when every block answered as expected
      if (ok) begin
        n_cfg[c]++;
        n_vec[v]++;
      end
      if (hold_start && s > 0 && test_start) n_ignored++;
      @(negedge clk);
      a = N'($urandom); b = N'($urandom);
    end
    test_start = 0;
    chk(clocks == 6, $sformatf("test took %0d clocks", clocks));
    chk(test_done && !test_busy, "done after six clocks");
    if (test_done) n_tests++;
    chk(test_pass && fail_map == '0, $sformatf("pass=%0b fail_map=%b", test_pass, fail_map));
    if (test_pass) n_pass++;
    add_check(N'($urandom), N'($urandom), 1'($urandom));
    n_resume++;
    @(negedge clk);
    chk(!test_done && test_pass, "done is a pulse, pass is held");
  endtask

  initial begin
    checks = 0; failures = 0; n_add = 0; n_ripple = 0; n_tests = 0; n_pass = 0;
    n_cfg = '{0, 0, 0}; n_vec = '{0, 0}; n_ignored = 0; n_resume = 0; finished = 0;
    #1 rst_n = 0;
    #1;
    chk(!test_busy && !test_pass, "reset state");
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < NUM_ADDS; i++) add_check(N'($urandom), N'($urandom), 1'($urandom));
    add_check('1, '0, 1'b1); n_ripple++;
    add_check('1, '1, 1'b1); n_ripple++;
    self_test(0);
    for (int i = 0; i < NUM_ADDS / 2; i++) add_check(N'($urandom), N'($urandom), 1'($urandom));
    self_test(1);
    add_check('1, N'(1), 1'b0); n_ripple++;
    self_test(0);
    finished = 1;
  end
endmodule
