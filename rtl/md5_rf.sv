// md5_rf: one RFx functional block, four unrolled MD5 steps of one round.
//
// The 64 steps of MD5 are split into four rounds of sixteen (functions F, G,
// H, I). The core holds one md5_rf per round; each is used for four
// consecutive clock cycles and performs four chained steps per cycle, so a
// block takes 4 x 4 = 16 cycles. Because the block is specific to its round,
// its nonlinear function and its four rotation amounts are fixed (MD5's
// rotations repeat with period four inside a round), and only the message
// word and constant of each step change from cycle to cycle. Those are picked
// by quarter_i, the cycle within the round: each step position chooses one
// of four message words and one of four constants from small tables that are
// computed at elaboration from the MD5 definitions.
//
// The split into four round-specific blocks of four steps follows the
// described architecture; the table form of the word and constant selection
// is this design's choice.
//
// Purely combinational: state_i is the state at the start of the cycle and
// state_o the state after steps 16*ROUND + 4*quarter_i + (0..3).
module md5_rf
  import md5_pkg::*;
#(
  parameter int unsigned ROUND = 0   // 0: F, 1: G, 2: H, 3: I
) (
  input  md5_state_t state_i,
  input  logic [1:0] quarter_i,  // which group of four steps within the round
  input  md5_block_t block_i,    // the sixteen message words X[0..15]
  output md5_state_t state_o
);

  localparam md5_fn_e FN = md5_fn_e'(ROUND[1:0]);

  md5_state_t chain [STEPS_PER_CYCLE+1];

  assign chain[0] = state_i;

  for (genvar j = 0; j < STEPS_PER_CYCLE; j++) begin : g_step
    // Message-word index and constant of step position j in each quarter.
    localparam logic [3:0] KTAB [4] = '{
      4'(md5_word_index(ROUND, 0 * STEPS_PER_CYCLE + j)),
      4'(md5_word_index(ROUND, 1 * STEPS_PER_CYCLE + j)),
      4'(md5_word_index(ROUND, 2 * STEPS_PER_CYCLE + j)),
      4'(md5_word_index(ROUND, 3 * STEPS_PER_CYCLE + j))
    };
    localparam word_t TTAB [4] = '{
      MD5_T[ROUND * STEPS_PER_ROUND + 0 * STEPS_PER_CYCLE + j],
      MD5_T[ROUND * STEPS_PER_ROUND + 1 * STEPS_PER_CYCLE + j],
      MD5_T[ROUND * STEPS_PER_ROUND + 2 * STEPS_PER_CYCLE + j],
      MD5_T[ROUND * STEPS_PER_ROUND + 3 * STEPS_PER_CYCLE + j]
    };

    word_t x, t;
    assign x = block_i[KTAB[quarter_i]];
    assign t = TTAB[quarter_i];

    md5_step #(
      .FN   (FN),
      .SHIFT(md5_shift(ROUND, j))
    ) u_step (
      .state_i(chain[j]),
      .x_i    (x),
      .t_i    (t),
      .state_o(chain[j+1])
    );
  end

  assign state_o = chain[STEPS_PER_CYCLE];

endmodule
