// BIST control unit.
//
// Keeps the adder in normal mode until start is seen in the idle state.
// It then runs the self-test: six clocks, one per (configuration, vector)
// pair, configurations 1, 2, 3 in turn with V4 then V27 in each. During
// these clocks it holds the input multiplexers in test mode, drives the
// polymorphic gates of every block with the test configuration, toggles
// the one-flip-flop pattern generator, addresses the reference ROM and
// enables the comparators. The comparator error of each block is sampled
// at the end of every step into a sticky per-block fail flag.
//
// Timing: start high on clock edge k (while idle) -> busy high for edges
// k+1 .. k+6 -> done high for one clock after that, with pass and fail_map
// valid from then until the next start. The test time is six clocks for
// any number of blocks. The step order, the start/done handshake and the
// result flags are this design's choices. Asynchronous active-low reset
// to normal mode with pass = 0 and no failed blocks.
module bcu
  import pg_pkg::*;
#(
  parameter int unsigned N_BLK = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [N_BLK-1:0] err,
  output logic             test_mode,
  output pg_config_t       cfg,
  output logic [1:0]       cfg_sel,
  output logic             vec_sel,
  output logic             tpg_clr,
  output logic             tpg_en,
  output logic             cmp_en,
  output logic             busy,
  output logic             done,
  output logic             pass,
  output logic [N_BLK-1:0] fail_map
);

  typedef enum logic [1:0] {
    S_IDLE = 2'd0,
    S_TEST = 2'd1,
    S_DONE = 2'd2
  } state_e;

  localparam logic [2:0] LAST_STEP = 3'(TEST_CLOCKS - 1);

  state_e     state;
  logic [2:0] step;  // {configuration - 1, vector}

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      step     <= '0;
      pass     <= 1'b0;
      fail_map <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          if (start) begin
            state    <= S_TEST;
            step     <= '0;
            pass     <= 1'b0;
            fail_map <= '0;
          end
        end
        S_TEST: begin
          fail_map <= fail_map | err;
          if (step == LAST_STEP) begin
            state <= S_DONE;
            pass  <= ~|(fail_map | err);
          end else begin
            step <= step + 3'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign test_mode = (state == S_TEST);
  assign busy      = test_mode;
  assign cmp_en    = test_mode;
  assign tpg_en    = test_mode;
  assign tpg_clr   = (state != S_TEST);
  assign done      = (state == S_DONE);
  assign cfg_sel   = test_mode ? step[2:1] + 2'd1 : 2'd0;
  assign vec_sel   = step[0];
  assign cfg       = test_cfg(cfg_sel);

  // The step counter never passes the last of the six test steps.
  a_step_range : assert property (@(posedge clk) disable iff (!rst_n) step <= LAST_STEP);
  // Outside a test the blocks are always in the adder configuration.
  a_std_when_idle : assert property (@(posedge clk) disable iff (!rst_n) !test_mode |-> cfg == CFG_STD);

endmodule
