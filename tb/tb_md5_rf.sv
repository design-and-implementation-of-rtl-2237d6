// tb_md5_rf: checks the four round blocks against the reference model.
//
// One md5_rf per round, all fed the same random state and message block. For
// every quarter the output must equal four consecutive reference steps
// 16*round + 4*quarter + 0..3. This also checks the constant tables and
// word order that each block holds. Combinational; checks after a delay.
module tb_md5_rf;
  import md5_pkg::*;
  import md5_ref_pkg::*;

  int checks = 0, failures = 0;

  md5_state_t state_in;
  logic [1:0] quarter;
  md5_block_t blk;
  md5_state_t state_out [4];

  for (genvar r = 0; r < 4; r++) begin : g_dut
    md5_rf #(.ROUND(r)) u_dut (
      .state_i(state_in), .quarter_i(quarter), .block_i(blk), .state_o(state_out[r]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rstate_t s, e;
    rblock_t x;
    for (int v = 0; v < 200; v++) begin
      for (int w = 0; w < 4; w++) s[w] = $urandom;
      for (int k = 0; k < 16; k++) begin
        x[k] = $urandom;
        blk[k] = x[k];
      end
      state_in = '{a: s[0], b: s[1], c: s[2], d: s[3]};
      for (int q = 0; q < 4; q++) begin
        quarter = 2'(q);
        #1;
        for (int r = 0; r < 4; r++) begin
          e = s;
          for (int j = 0; j < 4; j++) e = ref_step(e, 16 * r + 4 * q + j, x);
          checks++;
          if (state_out[r] != {e[0], e[1], e[2], e[3]}) begin
            failures++;
            if (failures < 10)
              $display("round %0d quarter %0d mismatch: got %h", r, q, state_out[r]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
