// Self-testable N_BITS-bit adder built from 2-bit polymorphic blocks.
//
// Normal mode: N_BITS/2 building blocks (bb_fa2, standard configuration)
// form a carry-propagate adder, {cout, sum} = a + b + cin, combinational
// from the inputs.
//
// Self-test: a pulse on test_start makes the control unit switch every
// block's input multiplexer to the shared one-flip-flop pattern generator
// and step all blocks through the three test configurations with the two
// test vectors, six clocks in all whatever N_BITS is. One comparator per
// block checks the block's three outputs against the shared 18-bit
// reference ROM. test_done pulses for one clock at the end; test_pass and
// fail_map (one bit per block, bit i covers sum bits 2i+1:2i) then hold the
// result until the next test. While test_busy is high, sum and cout carry
// the blocks' test responses, not a sum.
//
// The pattern generator, ROM and control unit are shared, so only the
// multiplexers and comparators grow with N_BITS. N_BITS must be even.
module bist_adder
  import pg_pkg::*;
#(
  parameter int unsigned N_BITS = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_BITS-1:0]   a,
  input  logic [N_BITS-1:0]   b,
  input  logic                cin,
  output logic [N_BITS-1:0]   sum,
  output logic                cout,
  input  logic                test_start,
  output logic                test_busy,
  output logic                test_done,
  output logic                test_pass,
  output logic [N_BITS/2-1:0] fail_map
);

  localparam int unsigned N_BLK = N_BITS / 2;

  // synthesis-time check of the size
  if (N_BITS < 2 || (N_BITS % 2) != 0) begin : g_bad_size
    $error("bist_adder: N_BITS must be even and at least 2");
  end

  logic             test_mode;
  pg_config_t       cfg;
  logic [1:0]       cfg_sel;
  logic             vec_sel_bcu;
  logic             vec_sel_tpg;
  logic             tpg_clr, tpg_en, cmp_en;
  fa2_in_t          tv;
  fa2_out_t         exp;
  logic [N_BLK-1:0] err;
  logic [N_BLK:0]   carry;

  bcu #(.N_BLK(N_BLK)) u_bcu (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (test_start),
    .err      (err),
    .test_mode(test_mode),
    .cfg      (cfg),
    .cfg_sel  (cfg_sel),
    .vec_sel  (vec_sel_bcu),
    .tpg_clr  (tpg_clr),
    .tpg_en   (tpg_en),
    .cmp_en   (cmp_en),
    .busy     (test_busy),
    .done     (test_done),
    .pass     (test_pass),
    .fail_map (fail_map)
  );

  tpg u_tpg (
    .clk    (clk),
    .rst_n  (rst_n),
    .clr    (tpg_clr),
    .en     (tpg_en),
    .vec_sel(vec_sel_tpg),
    .tv     (tv)
  );

  // The ROM is addressed with the vector the generator is actually
  // applying, so a generator that falls out of step shows up as errors.
  ref_rom u_rom (
    .cfg_sel(cfg_sel),
    .vec_sel(vec_sel_tpg),
    .exp    (exp)
  );

  assign carry[0] = cin;

  for (genvar i = 0; i < N_BLK; i++) begin : g_blk
    fa2_in_t  pi, bin;
    fa2_out_t bout;

    assign pi.a   = a[2*i +: 2];
    assign pi.b   = b[2*i +: 2];
    assign pi.cin = carry[i];

    mux_block u_mux (
      .test_mode(test_mode),
      .pi       (pi),
      .tv       (tv),
      .y        (bin)
    );

    bb_fa2 u_fa (
      .cfg (cfg),
      .a   (bin.a),
      .b   (bin.b),
      .cin (bin.cin),
      .s   (bout.s),
      .cout(bout.cout)
    );

    comparator u_cmp (
      .en  (cmp_en),
      .act (bout),
      .exp (exp),
      .diff(),
      .err (err[i])
    );

    assign sum[2*i +: 2] = bout.s;
    assign carry[i+1]    = bout.cout;
  end

  assign cout = carry[N_BLK];

  // The generator and the control unit agree on which vector is applied.
  a_vec_in_step : assert property (@(posedge clk) disable iff (!rst_n) test_mode |-> vec_sel_tpg == vec_sel_bcu);

endmodule
