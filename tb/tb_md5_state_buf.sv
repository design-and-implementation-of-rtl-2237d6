// tb_md5_state_buf: checks the state buffer and chaining-value register.
//
// Drives random sequences of load (with and without init), update and last,
// with random next-state values, and compares state_o and digest_o every
// cycle with a model: the load-cycle bypass of the initial value or chaining
// value, the working-register update, and the word-wise final addition.
module tb_md5_state_buf;
  import md5_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic load = 0, init = 0, update = 0, last = 0;
  md5_state_t next, state, digest;

  md5_state_buf u_dut (
    .clk(clk), .rst_n(rst_n), .load_i(load), .init_i(init), .update_i(update),
    .last_i(last), .next_i(next), .state_o(state), .digest_o(digest));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [127:0] IV = 128'h67452301_efcdab89_98badcfe_10325476;

  initial begin
    logic [127:0] m_work, m_h, exp_state;
    int n_init = 0, n_chain = 0, n_last = 0;
    m_work = IV; m_h = IV;
    next = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      load   = ($urandom % 5) == 0;
      init   = $urandom % 2;
      update = load || ($urandom % 4 != 0);
      last   = !load && ($urandom % 6 == 0);
      next   = {$urandom, $urandom, $urandom, $urandom};
      #1;
      exp_state = load ? (init ? IV : m_h) : m_work;
      checks += 2;
      if (state !== exp_state) begin
        failures++;
        if (failures < 10) $display("c=%0d state %h expected %h", c, state, exp_state);
      end
      if (digest !== m_h) begin
        failures++;
        if (failures < 10) $display("c=%0d digest %h expected %h", c, digest, m_h);
      end
      if (load && init) n_init++;
      if (load && !init) n_chain++;
      if (last) n_last++;
      // model update at the coming edge
      if (update) m_work = next;
      if (last)
        m_h = {m_h[127:96] + next[127:96], m_h[95:64] + next[95:64],
               m_h[63:32] + next[63:32], m_h[31:0] + next[31:0]};
      else if (load && init)
        m_h = IV;
    end
    $display("init loads %0d, chained loads %0d, final additions %0d", n_init, n_chain, n_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
