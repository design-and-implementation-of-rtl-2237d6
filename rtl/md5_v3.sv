// md5_v3: non-pipelined MD5 core, 16 clock cycles per 512-bit block.
//
// MD5 compresses each 512-bit block in 64 dependent steps. Instead of one
// generic step circuit used 64 times, this core holds four round-specific
// functional blocks (RFx, module md5_rf), one per round F, G, H, I. Each
// contains four chained steps with its function and rotations hard-wired.
// RF1 is used in cycles 0-3, RF2 in cycles 4-7, RF3 in 8-11 and RF4 in 12-15;
// a 4:1 multiplexer feeds the active block's result back into the state
// buffer. A block thus takes 16 cycles, and a new block may start in the
// cycle after the previous one ends, for 512 bits every 16 cycles.
//
// Interface:
//   start_i / ready_o  start a hash of block_i; accepted when ready_o is high.
//   init_i             with start_i: first block of a message (chaining value
//                      = MD5 initial value); low: continue from digest_o.
//   block_i            padded message block, block_i[k] = word X[k], i.e.
//                      bytes 4k..4k+3 of the block, little-endian.
//   done_o             one-cycle pulse, 16 cycles after start was accepted;
//                      digest_o then holds the chaining value. The MD5 digest
//                      bytes are a, b, c, d, each little-endian. digest_o
//                      stays valid until the next start with init_i.
// Message padding is done outside the core.
//
// The four round blocks used four times each and the 16-cycle latency and
// rate follow the described architecture; the handshake, the bypass that lets
// the first cycle compute directly from the inputs, and the port encoding are
// this design's choices.
module md5_v3
  import md5_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_i,
  input  logic       init_i,
  input  md5_block_t block_i,
  output logic       ready_o,
  output logic       done_o,
  output md5_state_t digest_o
);

  logic       active, load, last;
  logic [3:0] cycle;
  md5_block_t words;
  md5_state_t state, next;
  md5_state_t rf_out [ROUNDS];

  md5_ctrl u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start_i (start_i),
    .ready_o (ready_o),
    .active_o(active),
    .load_o  (load),
    .cycle_o (cycle),
    .last_o  (last),
    .done_o  (done_o)
  );

  md5_msg_buf u_msg (
    .clk    (clk),
    .rst_n  (rst_n),
    .load_i (load),
    .block_i(block_i),
    .words_o(words)
  );

  md5_state_buf u_state (
    .clk     (clk),
    .rst_n   (rst_n),
    .load_i  (load),
    .init_i  (init_i),
    .update_i(active),
    .last_i  (last),
    .next_i  (next),
    .state_o (state),
    .digest_o(digest_o)
  );

  for (genvar r = 0; r < ROUNDS; r++) begin : g_rf
    md5_rf #(.ROUND(r)) u_rf (
      .state_i  (state),
      .quarter_i(cycle[1:0]),
      .block_i  (words),
      .state_o  (rf_out[r])
    );
  end

  assign next = rf_out[cycle[3:2]];

endmodule
