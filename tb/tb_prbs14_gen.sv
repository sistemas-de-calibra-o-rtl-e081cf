// Testbench for prbs14_gen: words against the recurrence model, restart,
// hold with en low, and the 2^14-1 period.
module tb_prbs14_gen;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, restart = 0, en = 0;
  logic [31:0] data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  prbs14_gen #(.DATA_W(32)) dut (.clk, .rst_n, .restart, .en, .data);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bitq_t ref_q;
    int nw = 1100;                          // > 2 periods of 16383 bits
    ref_q = prbs_bits(32*nw + 64);
    // period of the model itself
    for (int i = 0; i < 200; i++) check(ref_q[16383+i] == ref_q[i], "model period");
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(data == word_at(ref_q, 0), "first word after reset");
    en = 1;
    for (int k = 1; k < nw; k++) begin
      @(negedge clk);
      check(data == word_at(ref_q, 32*k), $sformatf("word %0d", k));
    end
    // 32*nw bits later the sequence repeats: word k and word k+16383 coincide
    // (16383 words of 32 bits = 32 periods)
    en = 0;
    begin
      logic [31:0] held;
      held = data;
      repeat (5) @(negedge clk);
      check(data == held, "hold with en low");
    end
    restart = 1; @(negedge clk); restart = 0;
    check(data == word_at(ref_q, 0), "restart gives word 0");
    en = 1; @(negedge clk);
    check(data == word_at(ref_q, 32), "word 1 after restart");
    restart = 1; @(negedge clk); restart = 0;
    check(data == word_at(ref_q, 0), "restart wins over en");
    // run one full period of words (16383 words = 32 periods of bits) and compare
    for (int k = 1; k <= 16383; k++) @(negedge clk);
    check(data == word_at(ref_q, 0), "repeats after 16383 words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
