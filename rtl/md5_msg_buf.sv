// md5_msg_buf: message buffer holding the sixteen 32-bit words of a block.
//
// The round blocks read message words X[k] in a different order in every
// round, so the whole 512-bit block is kept for the 16 cycles of a hash. In
// the load cycle the block on block_i is captured and at the same time passed
// straight to words_o, because the first four steps already run in that
// cycle; afterwards words_o is the stored copy, so block_i need only be valid
// in the cycle start is accepted.
//
// Holding the block as sixteen words is the MD5 definition; the
// pass-through in the load cycle is this design's choice.
module md5_msg_buf
  import md5_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,    // asynchronous, active low
  input  logic       load_i,
  input  md5_block_t block_i,
  output md5_block_t words_o
);

  md5_block_t mem_q;

  assign words_o = load_i ? block_i : mem_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      mem_q <= '0;
    else if (load_i) mem_q <= block_i;
  end

endmodule
