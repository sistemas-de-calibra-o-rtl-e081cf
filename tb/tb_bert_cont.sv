// Testbench for bert_cont: four cores run over channel models with bit
// slips 0, 7, 16 and 31. Each must lock within one frame of the first
// pilot, begin comparing 5 cycles after the pilot window, report no
// errors on a clean channel, and afterwards report exactly the bit errors
// injected into the words it compared, in windows of RES words that come
// one every RES cycles (one 32-bit word per clock).
module tb_bert_cont;
  localparam int FW = 64, RES = 200, NS = 4;
  localparam int SLIPS[NS] = '{0, 7, 16, 31};
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  cyc = 0;
  bit  inject = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int results[NS];
  int lock_cyc[NS];
  int zero_windows[NS];

  for (genvar g = 0; g < NS; g++) begin : g_slip
    logic [31:0] tx, rx;
    logic locked, comparing, res_valid, flip;
    bert_pkg::bert_result_t res;

    bert_cont #(.DATA_W(32), .FRAME_WORDS(FW), .RES_WORDS(RES)) dut (
      .clk_tx(clk), .rst_tx_n(rst_n), .tx_data(tx),
      .clk_rx(clk), .rst_rx_n(rst_n), .rx_data(rx),
      .locked, .comparing, .res_valid, .res);
    tb_channel #(.SLIP(SLIPS[g])) u_ch (.clk, .tx, .flip, .rx);

    // one bit error every few words, different per slip
    assign flip = inject && ((cyc % (3 + g)) == 0);

    // model: flips travel with their word through the 5-stage input delay
    bit fl[6];
    int w_cnt = 0, e_cnt = 0, last_res = -1, first_cmp = -1, pilot_cyc = -1;
    int exp_q[$];
    always @(posedge clk) begin
      fl[0] <= flip;
      for (int i = 1; i < 6; i++) fl[i] <= fl[i-1];
    end
    always @(negedge clk) if (rst_n) begin
      if (comparing) begin
        if (first_cmp < 0) first_cmp = cyc;
        w_cnt++; e_cnt += int'(fl[4]);
        if (w_cnt == RES) begin exp_q.push_back(e_cnt); w_cnt = 0; e_cnt = 0; end
      end
      if (locked && lock_cyc[g] < 0) lock_cyc[g] = cyc;
      if (dut.u_sync.found && pilot_cyc < 0) pilot_cyc = cyc - 1;
      if (res_valid) begin
        int e;
        results[g]++;
        e = (exp_q.size() > 0) ? exp_q.pop_front() : -1;
        check(res.errors == 32'(e) && res.words == RES,
              $sformatf("slip %0d window %0d: %0d errors, expected %0d", SLIPS[g], results[g], res.errors, e));
        if (e == 0) zero_windows[g]++;
        if (last_res >= 0) check(cyc - last_res == RES, $sformatf("window period %0d", cyc - last_res));
        last_res = cyc;
      end
    end
    initial lock_cyc[g] = -1;
    final begin end
  end

  initial begin
    foreach (results[i]) begin results[i] = 0; zero_windows[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    repeat (FW + 2*RES + 50) @(negedge clk);
    inject = 1;
    repeat (6*RES) @(negedge clk);
    inject = 0;
    repeat (2*RES) @(negedge clk);
    for (int i = 0; i < NS; i++) begin
      check(lock_cyc[i] > 0 && lock_cyc[i] <= FW + 8, $sformatf("slip %0d locked at %0d", SLIPS[i], lock_cyc[i]));
      check(results[i] >= 9, $sformatf("slip %0d: %0d windows", SLIPS[i], results[i]));
      check(zero_windows[i] >= 2, $sformatf("slip %0d: clean windows %0d", SLIPS[i], zero_windows[i]));
    end
    check(g_slip[0].first_cmp - g_slip[0].pilot_cyc == 5, $sformatf("compare start %0d after pilot", g_slip[0].first_cmp - g_slip[0].pilot_cyc));
    check(g_slip[3].first_cmp - g_slip[3].pilot_cyc == 5, "compare start, slip 31");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
