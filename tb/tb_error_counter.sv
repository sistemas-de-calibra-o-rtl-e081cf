// Testbench for error_counter: windows of RES_WORDS compared words with
// random error patterns; totals, restart after each window, cmp_en gaps,
// and the two-cycle latency. A second, 8-bit instance sees every bit of
// every word in error and must saturate its error total at 255.
module tb_error_counter;
  import tb_ref_pkg::*;
  localparam int RES = 10;
  logic clk = 0, rst_n = 0, cmp_en = 0;
  logic [31:0] rx_word = 0, ref_word = 0, res_errors, res_words;
  logic res_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  error_counter #(.DATA_W(32), .CNT_W(32), .RES_WORDS(RES)) dut (
    .clk, .rst_n, .cmp_en, .rx_word, .ref_word, .res_valid, .res_errors, .res_words);

  // Narrow instance: 12 words of 32 errors each overflow an 8-bit total.
  logic [7:0] sat_errors, sat_words;
  logic sat_valid;
  int sat_seen = 0;
  error_counter #(.DATA_W(32), .CNT_W(8), .RES_WORDS(12)) dut_sat (
    .clk, .rst_n, .cmp_en, .rx_word(rx_word), .ref_word(~rx_word),
    .res_valid(sat_valid), .res_errors(sat_errors), .res_words(sat_words));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q[$];
  int cyc = 0, last_word_cyc = 0;
  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n && sat_valid) begin
    sat_seen++;
    check(sat_errors == 8'hFF && sat_words == 8'd12, $sformatf("saturated total %0d", sat_errors));
  end

  // result monitor
  initial begin
    forever begin
      @(negedge clk);
      if (res_valid) begin
        check(exp_q.size() > 0, "unexpected result");
        if (exp_q.size() > 0) begin
          int e;
          e = exp_q.pop_front();
          check(res_errors == 32'(e), $sformatf("errors %0d vs %0d", res_errors, e));
          check(res_words == RES, "words");
          check(cyc - last_word_cyc == 2, $sformatf("latency %0d", cyc - last_word_cyc));
        end
      end
    end
  end

  initial begin
    int acc = 0, n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 20*RES; w++) begin
      @(negedge clk);
      // random gaps
      while ($urandom_range(3) == 0) begin
        cmp_en = 0; rx_word = $urandom; ref_word = ~rx_word;   // ignored
        @(negedge clk);
      end
      cmp_en   = 1;
      ref_word = $urandom;
      rx_word  = ref_word ^ (($urandom_range(2) == 0) ? $urandom : 32'd0);
      acc += popcount32(rx_word ^ ref_word);
      n++;
      if (n == RES) begin exp_q.push_back(acc); acc = 0; n = 0; last_word_cyc = cyc; end
    end
    @(negedge clk); cmp_en = 0;
    repeat (5) @(negedge clk);
    check(exp_q.size() == 0, "all windows reported");
    check(sat_seen > 0, "saturating instance reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
