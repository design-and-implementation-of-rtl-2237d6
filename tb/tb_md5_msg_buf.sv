// tb_md5_msg_buf: checks capture, load-cycle pass-through and hold.
//
// In a load cycle words_o must equal block_i; in later cycles it must keep
// the last loaded block while block_i changes randomly.
module tb_md5_msg_buf;
  import md5_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, load = 0;
  md5_block_t blk, words;

  md5_msg_buf u_dut (.clk(clk), .rst_n(rst_n), .load_i(load), .block_i(blk), .words_o(words));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    md5_block_t held, exp;
    held = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      load = ($urandom % 8) == 0;
      for (int k = 0; k < 16; k++) blk[k] = $urandom;
      #1;
      exp = load ? blk : held;
      checks++;
      if (words !== exp) begin
        failures++;
        if (failures < 10) $display("c=%0d words mismatch (load=%b)", c, load);
      end
      if (load) held = blk;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
