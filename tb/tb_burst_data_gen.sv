// Testbench for burst_data_gen: with a 100-word frame and 5 preamble words,
// each frame is preamble, delimiter, PRBS payload up to the burst length
// for the share in force at frame start, then zeros; checked for 0, 1, 37,
// 50 and 100 %, with burst_on and frame_start.
module tb_burst_data_gen;
  import bert_pkg::*;
  import tb_ref_pkg::*;
  localparam int FC = 100, PRE = 5;
  logic clk = 0, rst_n = 0, burst_on, frame_start;
  logic [6:0] pct = 50;
  logic [31:0] data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  burst_data_gen #(.DATA_W(32), .FRAME_CYCLES(FC), .PRE_WORDS(PRE)) dut (
    .clk, .rst_n, .burst_pct(pct), .data, .burst_on, .frame_start);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bitq_t bq;
    int pcts[6] = '{50, 0, 1, 37, 100, 50};
    bq = marked_bits(DELIM, 32, 32*FC);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // align to a frame start
    @(negedge clk);
    while (!frame_start) @(negedge clk);
    foreach (pcts[f]) begin
      int bw;
      bw = (pcts[f] == 0) ? 0 : (FC * pcts[f]) / 100;
      if (pcts[f] != 0 && bw < PRE + 2) bw = PRE + 2;
      for (int k = 0; k < FC; k++) begin
        logic [31:0] exp;
        if (k >= bw)      exp = 0;
        else if (k < PRE) exp = 32'hAAAAAAAA;
        else              exp = word_at(bq, 32*(k - PRE));
        check(data == exp, $sformatf("pct %0d word %0d: %h vs %h", pcts[f], k, data, exp));
        check(burst_on == (k < bw), "burst_on");
        check(frame_start == (k == 0), "frame_start");
        if (k == FC/2 && f + 1 < 6) pct = 7'(pcts[f+1]);   // applies at next frame
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
