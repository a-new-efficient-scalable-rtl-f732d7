// Fault-coverage run of the self-test.
//
// Builds the BIST structure from the real control unit, pattern generator,
// reference ROM, input multiplexers and comparators, with 31 blocks: block
// 0 is fault free and blocks 1..30 each carry one of the 30 single stuck-at
// faults on the block's fifteen nets (inputs a0 b0 cin a1 b1, internal nets
// p0 n1 n2 c1 p1 n3 n4, outputs s0 s1 cout). One six-clock self-test runs
// on all of them at once. Expected: a block fails exactly when the
// reference model says its fault changes some output for V4 or V27 in one
// of the three test configurations, and the fault-free block passes. The
// run prints the coverage it measured.
module tb_fault_coverage;
  import pg_pkg::*;
  import tb_ref_pkg::*;

  localparam int NF = 2 * NUM_NETS;
  localparam int NB = NF + 1;

  logic          clk = 0, rst_n = 1, start = 0;
  logic          test_mode, vec_sel_bcu, vec_sel, tpg_clr, tpg_en, cmp_en, busy, done, pass;
  logic [1:0]    cfg_sel;
  pg_config_t    cfg;
  fa2_in_t       tv;
  fa2_out_t      exp;
  logic [NB-1:0] err, fail_map;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bcu #(.N_BLK(NB)) u_bcu (
    .clk(clk), .rst_n(rst_n), .start(start), .err(err), .test_mode(test_mode),
    .cfg(cfg), .cfg_sel(cfg_sel), .vec_sel(vec_sel_bcu), .tpg_clr(tpg_clr),
    .tpg_en(tpg_en), .cmp_en(cmp_en), .busy(busy), .done(done), .pass(pass),
    .fail_map(fail_map));

  tpg u_tpg (.clk(clk), .rst_n(rst_n), .clr(tpg_clr), .en(tpg_en), .vec_sel(vec_sel), .tv(tv));

  ref_rom u_rom (.cfg_sel(cfg_sel), .vec_sel(vec_sel), .exp(exp));

  for (genvar i = 0; i < NB; i++) begin : g_blk
    fa2_in_t  pi, bin;
    fa2_out_t bout;
    assign pi = '0;  // primary inputs are not exercised here
    mux_block u_mux (.test_mode(test_mode), .pi(pi), .tv(tv), .y(bin));
    fa2_fault_model #(.FAULT_NET(i == 0 ? -1 : (i - 1) / 2), .FAULT_VAL(i == 0 ? 1'b0 : 1'((i - 1) % 2))) u_fa (
      .cfg(cfg), .a(bin.a), .b(bin.b), .cin(bin.cin), .s(bout.s), .cout(bout.cout));
    comparator u_cmp (.en(cmp_en), .act(bout), .exp(exp), .diff(), .err(err[i]));
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A fault is detectable when some test step shows a different response.
  function automatic bit detectable(input int net, input bit val);
    for (int c = 1; c <= 3; c++)
      foreach (VECS[v])
        if (block(c, VECS[v], net, val) != block(c, VECS[v])) return 1;
    return 0;
  endfunction
  localparam bit [4:0] VECS [2] = '{5'd4, 5'd27};

  initial begin
    string names [NUM_NETS] = '{"a0", "b0", "cin", "a1", "b1", "p0", "n1", "n2", "c1",
                                "p1", "n3", "n4", "s0", "s1", "cout"};
    int found = 0, clocks = 0;
    #1 rst_n = 0;
    #1;
    @(negedge clk) rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (busy) begin
      clocks++;
      @(negedge clk);
    end
    checks++;
    if (clocks != TEST_CLOCKS || !done) begin
      failures++;
      $display("FAIL test took %0d clocks", clocks);
    end
    checks++;
    if (fail_map[0]) begin
      failures++;
      $display("FAIL fault-free block reported as failing");
    end
    for (int f = 0; f < NF; f++) begin
      bit want;
      want = detectable(f / 2, 1'(f % 2));
      checks++;
      if (fail_map[f + 1] != want) begin
        failures++;
        $display("FAIL %s stuck-at-%0d: detected=%0b, reference says %0b", names[f / 2], f % 2, fail_map[f + 1], want);
      end
      if (fail_map[f + 1]) found++;
      else $display("not detected: %s stuck-at-%0d", names[f / 2], f % 2);
    end
    checks++;
    if (pass) begin
      failures++;
      $display("FAIL pass flag set although faults were present");
    end
    $display("stuck-at faults detected by the self-test: %0d of %0d", found, NF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
