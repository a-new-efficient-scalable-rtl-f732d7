// Testbench for bcu (N_BLK = 4).
// Checks the six-clock test sequence (configurations 1,1,2,2,3,3 with
// vectors V4,V27 alternating, gate modes by name), the control strobes,
// that busy lasts exactly six clocks, that an error raised by one block in
// one step lands in fail_map and clears pass, that a fault-free run passes,
// and that start is ignored while a test is running.
module tb_bcu;
  import pg_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 4;

  logic clk = 0, rst_n = 1, start = 0;
  logic [N-1:0] err = '0, fail_map;
  logic test_mode, vec_sel, tpg_clr, tpg_en, cmp_en, busy, done, pass;
  logic [1:0] cfg_sel;
  pg_config_t cfg;
  int checks = 0, failures = 0;

  bcu #(.N_BLK(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .err(err), .test_mode(test_mode),
    .cfg(cfg), .cfg_sel(cfg_sel), .vec_sel(vec_sel), .tpg_clr(tpg_clr),
    .tpg_en(tpg_en), .cmp_en(cmp_en), .busy(busy), .done(done), .pass(pass),
    .fail_map(fail_map));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
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

  function automatic bit cfg_is(input int c);
    string g[5];
    cfg_names(c, g);
    return cfg.g0.name() == {"AOX_", g[0]} && cfg.g1.name() == {"NNXA_", g[1]} &&
           cfg.g2.name() == {"AOX_", g[2]} && cfg.g3.name() == {"NNXA_", g[3]} &&
           cfg.g4.name() == {"AOX_", g[4]};
  endfunction

  // One self-test; err_blk/err_step inject one error (err_blk < 0: none).
  task automatic run_test(input int err_blk, input int err_step, input bit extra_start);
    int busy_clocks = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = extra_start;
    for (int s = 0; s < 6; s++) begin
      chk(busy && test_mode && cmp_en && tpg_en && !tpg_clr && !done, $sformatf("strobes in step %0d", s));
      chk(cfg_sel == 2'(s / 2 + 1) && vec_sel == 1'(s % 2), $sformatf("address in step %0d: cfg_sel=%0d vec_sel=%0d", s, cfg_sel, vec_sel));
      chk(cfg_is(s / 2 + 1), $sformatf("gate modes in step %0d", s));
      err = (s == err_step && err_blk >= 0) ? N'(1) << err_blk : '0;
      if (busy) busy_clocks++;
      @(negedge clk);
      err = '0;
      start = 0;
    end
    chk(busy_clocks == TEST_CLOCKS, $sformatf("busy for %0d clocks", busy_clocks));
    chk(!busy && done && !test_mode, "done after six clocks");
    chk(cfg_is(0) && tpg_clr && !tpg_en && !cmp_en, "back in adder configuration");
    if (err_blk < 0) chk(pass && fail_map == '0, "fault-free run passes");
    else chk(!pass && fail_map == N'(1) << err_blk, $sformatf("error caught, fail_map=%b", fail_map));
    @(negedge clk);
    chk(!done && !busy, "done is one clock long");
    if (err_blk < 0) chk(pass, "result held");
    else chk(!pass && fail_map == N'(1) << err_blk, "result held");
  endtask

  initial begin
    #1 rst_n = 0;   // asynchronous reset needs a falling edge
    #1;
    chk(!busy && !test_mode && !pass && fail_map == '0 && cfg_is(0), "reset state");
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    chk(!busy && cfg_is(0), "idle without start");
    run_test(-1, 0, 0);
    run_test(2, 4, 0);
    run_test(0, 5, 1);   // start held during the test is ignored
    run_test(3, 0, 0);
    run_test(-1, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
