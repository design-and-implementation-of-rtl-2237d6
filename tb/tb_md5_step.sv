// tb_md5_step: checks every function/rotation combination used by MD5.
//
// Sixteen md5_step instances cover the four rounds times the four rotation
// positions. Each gets random states and message words, with the constant of
// a matching step, and its output is compared with one step of the reference
// model. Purely combinational, so the checks are made after a delay.
module tb_md5_step;
  import md5_pkg::*;
  import md5_ref_pkg::*;

  int checks = 0, failures = 0;

  md5_state_t st_in  [16];
  md5_state_t st_out [16];
  word_t      x_in   [16];
  word_t      t_in   [16];

  localparam int SH [16] = '{7, 12, 17, 22, 5, 9, 14, 20, 4, 11, 16, 23, 6, 10, 15, 21};

  for (genvar n = 0; n < 16; n++) begin : g_dut
    md5_step #(.FN(md5_fn_e'(n / 4)), .SHIFT(SH[n])) u_dut (
      .state_i(st_in[n]), .x_i(x_in[n]), .t_i(t_in[n]), .state_o(st_out[n]));
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
    int      i;
    for (int v = 0; v < 300; v++) begin
      for (int n = 0; n < 16; n++) begin
        // step index i with round n/4 and rotation position n%4
        i = (n / 4) * 16 + 4 * (v % 4) + (n % 4);
        for (int w = 0; w < 4; w++) s[w] = $urandom;
        for (int k = 0; k < 16; k++) x[k] = $urandom;
        st_in[n] = '{a: s[0], b: s[1], c: s[2], d: s[3]};
        x_in[n]  = x[ref_k(i)];
        t_in[n]  = ref_t(i);
      end
      #1;
      for (int n = 0; n < 16; n++) begin
        i = (n / 4) * 16 + 4 * (v % 4) + (n % 4);
        s = '{st_in[n].a, st_in[n].b, st_in[n].c, st_in[n].d};
        x = '{default: 32'h0};
        x[ref_k(i)] = x_in[n];
        e = ref_step(s, i, x);
        checks++;
        if (st_out[n] != {e[0], e[1], e[2], e[3]}) begin
          failures++;
          if (failures < 10)
            $display("step %0d mismatch: got %h expected %h %h %h %h", i, st_out[n], e[0], e[1], e[2], e[3]);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
