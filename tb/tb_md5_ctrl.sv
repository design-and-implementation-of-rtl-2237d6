// tb_md5_ctrl: checks the 16-cycle schedule of the sequencer.
//
// Starts blocks with random idle gaps, sometimes back to back, and holds
// start high while busy to see that it is ignored. A cycle-by-cycle model
// predicts ready, active, load, the cycle index, last and done; the number of
// cycles from an accepted start to done must be 16.
module tb_md5_ctrl;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  logic ready, active, load, last, done;
  logic [3:0] cycle;

  md5_ctrl u_dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .ready_o(ready), .active_o(active),
    .load_o(load), .cycle_o(cycle), .last_o(last), .done_o(done));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  bit m_busy = 0, m_done = 0;
  int m_cnt = 0;
  int start_cycle = 0, now = 0;
  int blocks = 0, back_to_back = 0, ignored = 0;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("t=%0d %s: got %b expected %b", now, what, got, exp);
    end
  endtask

  initial begin
    bit m_load, m_active, m_last;
    int m_cyc;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (blocks < 300) begin
      @(negedge clk);
      now++;
      // stimulus: random start, more likely while busy to test ignoring
      start = ($urandom % 4) != 0;
      #1;
      m_load   = start && !m_busy;
      m_active = m_busy || m_load;
      m_cyc    = m_busy ? m_cnt : 0;
      m_last   = m_active && (m_cyc == 15);
      check("ready", ready, !m_busy);
      check("load", load, m_load);
      check("active", active, m_active);
      check("last", last, m_last);
      check("done", done, m_done);
      checks++;
      if (m_active && cycle != 4'(m_cyc)) begin
        failures++;
        $display("t=%0d cycle: got %0d expected %0d", now, cycle, m_cyc);
      end
      if (start && m_busy) ignored++;
      if (done) begin
        checks++;
        if (now - start_cycle != 16) begin
          failures++;
          $display("latency %0d cycles, expected 16", now - start_cycle);
        end
        blocks++;
      end
      if (m_load) begin
        if (m_done) back_to_back++;
        start_cycle = now;
      end
      // advance model
      m_done = m_last;
      if (m_active && !m_last) begin m_busy = 1; m_cnt = m_cyc + 1; end
      else begin m_busy = 0; m_cnt = 0; end
    end
    checks++;
    if (back_to_back == 0 || ignored == 0) begin
      failures++;
      $display("back-to-back %0d, ignored starts %0d: a case never occurred", back_to_back, ignored);
    end
    $display("blocks=%0d back_to_back=%0d ignored_starts=%0d", blocks, back_to_back, ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
