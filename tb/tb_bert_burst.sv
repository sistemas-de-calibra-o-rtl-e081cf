// Testbench for bert_burst: three cores over channels with bit slips 0, 13
// and 31, a 120-word frame with 5 preamble words. The burst share steps
// through 50 %, 100 %, 20 % and 0 %. Checks: every burst is found and
// exactly (burst - preamble - 2) words are compared in it; a clean
// channel gives no errors; with bit errors injected everywhere (also in
// the preamble and the silent part) each window reports exactly the
// errors that fell on compared words; at 0 % nothing is compared.
module tb_bert_burst;
  localparam int FC = 120, PRE = 5, RES = 150, NS = 3;
  localparam int SLIPS[NS] = '{0, 13, 31};
  logic clk = 0, rst_n = 0;
  logic [6:0] pct = 50;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int n_cmp(int p);
    int bw;
    if (p == 0) return -1;
    bw = (FC * p) / 100;
    if (bw < PRE + 2) bw = PRE + 2;
    return bw - PRE - 2;
  endfunction

  int  cyc = 0;
  bit  inject = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int bursts[NS], windows[NS], err_windows[NS], cmp_words[NS];

  for (genvar g = 0; g < NS; g++) begin : g_slip
    logic [31:0] tx, rx;
    logic burst_on, fstart, busy, comparing, burst_done, res_valid, flip;
    bert_pkg::bert_result_t res;

    bert_burst #(.DATA_W(32), .FRAME_CYCLES(FC), .PRE_WORDS(PRE), .RES_WORDS(RES)) dut (
      .clk_tx(clk), .rst_tx_n(rst_n), .burst_pct_tx(pct), .tx_data(tx),
      .tx_burst_on(burst_on), .tx_frame_start(fstart),
      .clk_rx(clk), .rst_rx_n(rst_n), .burst_pct_rx(pct), .rx_data(rx),
      .busy, .comparing, .burst_done, .res_valid, .res);
    tb_channel #(.SLIP(SLIPS[g])) u_ch (.clk, .tx, .flip, .rx);

    assign flip = inject && ((cyc % (5 + g)) == 0);

    bit fl[6];
    int w_cnt = 0, e_cnt = 0, act = 0, n_exp = 0;
    bit busy_q = 0;
    int exp_q[$];
    always @(posedge clk) begin
      fl[0] <= flip;
      for (int i = 1; i < 6; i++) fl[i] <= fl[i-1];
    end
    always @(negedge clk) if (rst_n) begin
      if (comparing) begin
        act++; cmp_words[g]++;
        w_cnt++; e_cnt += int'(fl[4]);
        if (w_cnt == RES) begin exp_q.push_back(e_cnt); w_cnt = 0; e_cnt = 0; end
      end
      if (busy && !busy_q) n_exp = n_cmp(int'(pct));
      busy_q = busy;
      if (burst_done) begin
        bursts[g]++;
        check(act == n_exp, $sformatf("slip %0d burst %0d: %0d words compared, expected %0d", SLIPS[g], bursts[g], act, n_exp));
        act = 0;
      end
      if (res_valid) begin
        int e;
        windows[g]++;
        e = (exp_q.size() > 0) ? exp_q.pop_front() : -1;
        check(res.errors == 32'(e) && res.words == RES,
              $sformatf("slip %0d window %0d: %0d errors, expected %0d", SLIPS[g], windows[g], res.errors, e));
        if (e > 0) err_windows[g]++;
      end
    end
  end

  // change the share just after the burst in flight has been found
  task automatic set_pct(int p);
    @(posedge g_slip[0].busy);
    @(negedge clk);
    while (!(g_slip[1].busy && g_slip[2].busy)) @(negedge clk);
    @(negedge clk);
    pct = 7'(p);
  endtask

  initial begin
    int b0;
    foreach (bursts[i]) begin bursts[i] = 0; windows[i] = 0; err_windows[i] = 0; cmp_words[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    repeat (4*FC) @(negedge clk);             // clean, 50 %
    set_pct(100);
    repeat (4*FC) @(negedge clk);
    inject = 1;
    repeat (6*FC) @(negedge clk);             // errors at 100 %
    set_pct(20);
    repeat (8*FC) @(negedge clk);             // errors at 20 %
    set_pct(0);
    repeat (2*FC) @(negedge clk);
    b0 = bursts[0];
    repeat (3*FC) @(negedge clk);             // 0 %: no bursts
    check(bursts[0] == b0, "no burst at 0 %");
    for (int i = 0; i < NS; i++) begin
      check(bursts[i] >= 20, $sformatf("slip %0d: %0d bursts", SLIPS[i], bursts[i]));
      check(windows[i] >= 10, $sformatf("slip %0d: %0d windows", SLIPS[i], windows[i]));
      check(err_windows[i] >= 3, $sformatf("slip %0d: %0d windows with errors", SLIPS[i], err_windows[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
