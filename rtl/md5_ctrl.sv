// md5_ctrl: sequencer of the MD5 core.
//
// A block is hashed in CYCLES_PER_BLOCK = 16 consecutive clock cycles. The
// controller counts them: cycle n uses RFx number n/4 for the n%4-th time, so
// each round block is used four times before the next one takes over. The
// first compute cycle is the cycle in which start_i is accepted (load_o = 1);
// the core then reads the message block and the chaining value straight from
// their inputs. last_o marks the sixteenth cycle, in which the final addition
// happens, and done_o follows it by one cycle, when the digest register holds
// the result. A new start_i is accepted in any cycle with ready_o = 1, which
// includes the cycle of done_o, so blocks can follow each other every 16
// cycles. start_i while busy is ignored.
//
// The 16-cycle schedule and the order of use of the RFx blocks follow the
// described architecture; the start/ready/done handshake is this design's.
module md5_ctrl
  import md5_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,     // asynchronous, active low
  input  logic       start_i,
  output logic       ready_o,   // idle: start_i will be accepted
  output logic       active_o,  // a compute cycle: the state registers update
  output logic       load_o,    // first compute cycle of a block
  output logic [3:0] cycle_o,   // compute cycle 0..15: [3:2] RFx, [1:0] quarter
  output logic       last_o,    // sixteenth compute cycle
  output logic       done_o     // digest valid (one-cycle pulse)
);

  logic       busy_q;
  logic [3:0] cnt_q;

  assign ready_o  = !busy_q;
  assign load_o   = start_i && !busy_q;
  assign active_o = busy_q || load_o;
  assign cycle_o  = busy_q ? cnt_q : 4'd0;
  assign last_o   = active_o && (cycle_o == 4'(CYCLES_PER_BLOCK - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      cnt_q  <= '0;
      done_o <= 1'b0;
    end else begin
      done_o <= last_o;
      if (active_o && !last_o) begin
        busy_q <= 1'b1;
        cnt_q  <= cycle_o + 4'd1;
      end else begin
        busy_q <= 1'b0;
        cnt_q  <= '0;
      end
    end
  end

  // A block always ends with its digest one cycle after the last step.
  a_done_after_last : assert property (@(posedge clk) disable iff (!rst_n) last_o |=> done_o);
  // The counter only runs while busy.
  a_idle_counter : assert property (@(posedge clk) disable iff (!rst_n) !busy_q |-> cnt_q == 4'd0);

endmodule
