// Burst-mode workloads at the real frame size: bert_burst with its default
// 125 us frame (39062 words), run at burst shares of 40, 80, 95 and 100 %.
// Two testers run side by side: one with the standard 160-bit preamble
// (5 words) and one with the 8000-bit preamble (250 words) that was also
// tried for burst mode. Both see the same share and a channel with a bit
// slip and injected errors. The testbench plays the part of the control
// logic: it gives the transmitter a new share during a frame, and the
// receiver the same share two clocks into the next frame, the first that
// carries the new length, so that no burst is measured with the wrong
// length.
//
// For every frame once a share has settled, the testbench checks:
//  * the transmitted burst length, floor(39062 * share / 100) words;
//  * the words compared in each burst, burst length - PRE_WORDS - 2.
// Every window report (100000 compared words, reduced from 2^26 to
// keep the run short) is checked against a model. The model counts the
// injected errors that fall inside compared words. It also counts injected
// errors in the silent part of the frame, which the testers must ignore.
module tb_burst_workloads;
  import bert_pkg::*;
  localparam int FC = 39062, RES = 100000;
  localparam int NPRE = 2;
  localparam int PRE_OF[NPRE] = '{5, 250};

  logic clk = 0, rst_n = 0;
  always #1.6 clk = ~clk;
  logic [6:0] pct = 7'd100, pct_rx = 7'd100;
  int checks = 0, failures = 0;
  int wc = 0;
  bit inject = 0, settled = 0;
  always @(posedge clk) wc <= wc + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20ms;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_frames_ok [NPRE], n_bursts_ok [NPRE], n_reports [NPRE], n_err_reports [NPRE], n_silent [NPRE];

  for (genvar g = 0; g < NPRE; g++) begin : g_t
    localparam int PRE = PRE_OF[g];
    logic [31:0] tx, rx;
    logic on, fstart, busy, cmp, done, rv, flip;
    bert_result_t res;

    bert_burst #(.FRAME_CYCLES(FC), .PRE_WORDS(PRE), .RES_WORDS(RES)) dut (
      .clk_tx(clk), .rst_tx_n(rst_n), .burst_pct_tx(pct), .tx_data(tx),
      .tx_burst_on(on), .tx_frame_start(fstart),
      .clk_rx(clk), .rst_rx_n(rst_n), .burst_pct_rx(pct_rx), .rx_data(rx),
      .busy(busy), .comparing(cmp), .burst_done(done), .res_valid(rv), .res(res));

    tb_channel #(.SLIP(19 + 6*g)) u_ch (.clk(clk), .tx(tx), .flip(flip), .rx(rx));
    assign flip = inject && (wc % 1009 == 37*g);

    bit fl[6];
    always @(posedge clk) begin
      fl[0] <= flip;
      for (int i = 1; i < 6; i++) fl[i] <= fl[i-1];
    end

    int on_cnt = 0, cmp_cnt = 0, w = 0, e = 0;
    int exp_q[$];
    always @(negedge clk) if (rst_n) begin
      int bw;
      bw = burst_words(int'(pct_rx), FC, PRE);
      if (flip && !on) n_silent[g]++;
      if (fstart) begin
        if (settled) begin
          check(on_cnt == bw, $sformatf("PRE %0d share %0d: burst %0d words, expected %0d", PRE, pct, on_cnt, bw));
          n_frames_ok[g]++;
        end
        on_cnt = 0;
      end
      if (on) on_cnt++;
      if (cmp) begin
        cmp_cnt++;
        w++; e += int'(fl[4]);
        if (w == RES) begin exp_q.push_back(e); w = 0; e = 0; end
      end
      if (done) begin
        if (settled) begin
          check(cmp_cnt == bw - PRE - 2, $sformatf("PRE %0d share %0d: compared %0d, expected %0d", PRE, pct, cmp_cnt, bw - PRE - 2));
          n_bursts_ok[g]++;
        end
        cmp_cnt = 0;
      end
      if (rv) begin
        int x;
        x = (exp_q.size() > 0) ? exp_q.pop_front() : -1;
        check(res.words == RES && res.errors == 32'(x),
              $sformatf("PRE %0d report: errors %0d words %0d, expected %0d", PRE, res.errors, res.words, x));
        n_reports[g]++;
        if (x > 0) n_err_reports[g]++;
      end
    end
  end

  localparam int SHARES[4] = '{40, 80, 95, 100};
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    inject = 1;
    foreach (SHARES[i]) begin
      @(posedge g_t[0].fstart);
      @(negedge clk);
      settled = 0;
      pct = 7'(SHARES[i]);
      @(posedge g_t[0].fstart);      // first frame with the new length
      repeat (2) @(negedge clk);
      pct_rx = pct;
      @(posedge g_t[0].fstart);      // that frame is complete
      repeat (2) @(negedge clk);
      settled = 1;
      repeat (4) @(posedge g_t[0].fstart);
      $display("INFO share %0d%%: frames checked %0d/%0d, bursts checked %0d/%0d",
               SHARES[i], n_frames_ok[0], n_frames_ok[1], n_bursts_ok[0], n_bursts_ok[1]);
    end
    for (int g = 0; g < NPRE; g++) begin
      $display("INFO preamble %0d words: reports %0d (with errors %0d), silent-period errors ignored %0d",
               PRE_OF[g], n_reports[g], n_err_reports[g], n_silent[g]);
      check(n_frames_ok[g] >= 4*3 && n_bursts_ok[g] >= 4*3, "frames and bursts checked");
      check(n_err_reports[g] > 0, "windows with errors reported");
      check(n_silent[g] > 0, "errors in the silent period");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
