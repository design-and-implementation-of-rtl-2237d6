// md5_step: one MD5 operation, the basic computational structure of a round.
//
// From the state (A, B, C, D), message word X[k] and constant T[i] it forms
//   A' = B + ((A + f(B, C, D) + X[k] + T[i]) <<< S)
// and returns the state for the next step as (D, A', B, C), so that chaining
// steps needs no renaming logic. The nonlinear function f and the rotation S
// are parameters: inside an RFx block every step position has a fixed
// function and rotation, so the rotation is plain wiring and f is a single
// fixed gate network. The operation itself is the standard MD5 step; making
// f and S elaboration-time constants is the specialisation the architecture
// relies on to shorten its critical path.
//
// Purely combinational: four 32-bit additions in series with the function
// and a wire rotation between the third and the fourth. Three of the four
// output words are input words moved one place (the register rotation of
// MD5), so they are plain wires by intent.
module md5_step
  import md5_pkg::*;
#(
  parameter md5_fn_e     FN    = FN_F,
  parameter int unsigned SHIFT = 7
) (
  input  md5_state_t state_i,
  input  word_t      x_i,      // message word X[k]
  input  word_t      t_i,      // additive constant T[i]
  output md5_state_t state_o
);

  word_t f, sum;

  always_comb begin
    f   = md5_f(FN, state_i.b, state_i.c, state_i.d);
    sum = state_i.a + f + x_i + t_i;
    state_o.a = state_i.d;
    state_o.b = state_i.b + ((sum << SHIFT) | (sum >> (32 - SHIFT)));
    state_o.c = state_i.b;
    state_o.d = state_i.c;
  end

endmodule
