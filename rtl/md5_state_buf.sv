// md5_state_buf: the 128-bit state buffer and chaining value of MD5.
//
// Two registers of four 32-bit words: the working state (A, B, C, D), which
// the round blocks update every compute cycle, and the chaining value H,
// which is the digest of the blocks hashed so far. In the load cycle the
// working state is not yet valid, so state_o is taken from H, or from the
// initial value when init_i starts a new message (H is then reset to the
// initial value at the same edge). In the last cycle of a block the state
// after 64 steps is added word by word to H, which then holds the new
// chaining value and is the digest output.
//
// Adding the initial and final state of a block is the MD5 definition; the
// bypass in the load cycle, which saves a cycle per block, is this design's.
//
// Timing: update_i writes next_i into the working state at the clock edge;
// last_i writes H + next_i into H at the same edge.
module md5_state_buf
  import md5_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,     // asynchronous, active low
  input  logic       load_i,    // first compute cycle of a block
  input  logic       init_i,    // with load_i: first block of a message
  input  logic       update_i,  // compute cycle: take next_i
  input  logic       last_i,    // last compute cycle: add into H
  input  md5_state_t next_i,    // state after this cycle's four steps
  output md5_state_t state_o,   // state at the start of this cycle
  output md5_state_t digest_o   // chaining value H
);

  md5_state_t work_q, h_q;

  assign state_o  = load_i ? (init_i ? MD5_IV : h_q) : work_q;
  assign digest_o = h_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      work_q <= MD5_IV;
      h_q    <= MD5_IV;
    end else begin
      if (update_i) work_q <= next_i;
      if (last_i) begin
        h_q.a <= h_q.a + next_i.a;
        h_q.b <= h_q.b + next_i.b;
        h_q.c <= h_q.c + next_i.c;
        h_q.d <= h_q.d + next_i.d;
      end else if (load_i && init_i) begin
        h_q <= MD5_IV;
      end
    end
  end

endmodule
