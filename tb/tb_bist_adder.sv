// End-to-end testbench of bist_adder at the four sizes 2, 4, 8 and 16 bits.
// Each size runs additions, three self-tests and additions after them.
// Every mechanism of the design must have happened at least once at every
// size: normal addition, a carry rippling through all blocks, each of the
// three test configurations, both test vectors, a completed and passing
// test in exactly six clocks, a start ignored during a test, and the
// return to addition after a test.
module tb_bist_adder;

  localparam int NSIZE = 4;

  logic clk = 0;
  always #5 clk = ~clk;

  int   checks = 0, failures = 0;
  int   c_[NSIZE], f_[NSIZE], add_[NSIZE], rip_[NSIZE], tst_[NSIZE], pas_[NSIZE], ign_[NSIZE], res_[NSIZE];
  int   cfg_[NSIZE][1:3], vec_[NSIZE][0:1];
  logic fin_[NSIZE];

  for (genvar i = 0; i < NSIZE; i++) begin : g_size
    bist_adder_run #(.N(2 << i)) u_run (
      .clk(clk), .checks(c_[i]), .failures(f_[i]), .n_add(add_[i]), .n_ripple(rip_[i]),
      .n_tests(tst_[i]), .n_pass(pas_[i]), .n_cfg(cfg_[i]), .n_vec(vec_[i]),
      .n_ignored(ign_[i]), .n_resume(res_[i]), .finished(fin_[i]));
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(input int count, input string what, input int size);
    checks++;
    $display("N=%0d %-28s %0d", size, what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL N=%0d: %s never happened", size, what);
    end
  endtask

  initial begin
    #2;  // let every run clear its finished flag first
    wait (fin_[0] && fin_[1] && fin_[2] && fin_[3]);
    for (int i = 0; i < NSIZE; i++) begin
      checks   += c_[i];
      failures += f_[i];
      need(add_[i],   "normal addition",          2 << i);
      need(rip_[i],   "carry through all blocks", 2 << i);
      need(cfg_[i][1], "test configuration 1",    2 << i);
      need(cfg_[i][2], "test configuration 2",    2 << i);
      need(cfg_[i][3], "test configuration 3",    2 << i);
      need(vec_[i][0], "vector V4 applied",       2 << i);
      need(vec_[i][1], "vector V27 applied",      2 << i);
      need(tst_[i],   "self-test completed",      2 << i);
      need(pas_[i],   "self-test passed",         2 << i);
      need(ign_[i],   "start ignored while busy", 2 << i);
      need(res_[i],   "addition after a test",    2 << i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
