// Testbench for bert_system_burst, through its serial link. The PC model
// sets the emphasis and moves the burst share from 100 % to 40 % and 80 %.
// Reports are checked against a model built from the `comparing` status
// line: exact error totals while errors are injected, zero on a clean
// channel, word count RES each time. The two reports after a share change
// are not compared, since a burst in flight during the change may be
// measured with the old length. Also checked: the words compared per burst
// at each share and the laser-enable duty at 40 %.
module tb_bert_system_burst;
  localparam int RES = 20000, FC = 400, PRE = 5, BITC = 64;
  logic clk_sys = 0, clk_w = 0, rst_n = 0;
  logic [31:0] tx, rx;
  logic [4:0] pre, post;
  logic urxd, utxd, busy, comparing, burst_done, burst_on, flip;
  int checks = 0, failures = 0;
  always #5   clk_sys = ~clk_sys;
  always #1.6 clk_w   = ~clk_w;

  bert_system_burst #(.CLK_FREQ(16*4*1_000_000), .BAUD(1_000_000), .FRAME_CYCLES(FC),
                      .PRE_WORDS(PRE), .RES_WORDS(RES)) dut (
    .clk_sys, .rst_sys_n(rst_n), .clk_tx(clk_w), .rst_tx_n(rst_n), .clk_rx(clk_w), .rst_rx_n(rst_n),
    .tx_data(tx), .tx_burst_on(burst_on), .rx_data(rx), .txprecursor(pre), .txpostcursor(post),
    .uart_rxd(urxd), .uart_txd(utxd), .busy, .comparing, .burst_done);
  tb_channel #(.SLIP(23)) u_ch (.clk(clk_w), .tx, .flip, .rx);
  tb_uart_host #(.BIT_CLKS(BITC)) u_pc (.clk(clk_sys), .rxd(utxd), .txd(urxd));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #6000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit inject = 0;
  int wc = 0;
  always @(posedge clk_w) wc <= wc + 1;
  assign flip = inject && (wc % 89 == 0);

  bit fl[6];
  int w_cnt = 0, e_cnt = 0, act = 0, last_burst_words = 0, on_cnt = 0;
  int exp_q[$];
  always @(posedge clk_w) begin
    fl[0] <= flip;
    for (int i = 1; i < 6; i++) fl[i] <= fl[i-1];
  end
  always @(negedge clk_w) if (rst_n) begin
    if (comparing) begin
      act++;
      w_cnt++; e_cnt += int'(fl[4]);
      if (w_cnt == RES) begin exp_q.push_back(e_cnt); w_cnt = 0; e_cnt = 0; end
    end
    if (burst_done) begin last_burst_words = act; act = 0; end
    if (burst_on) on_cnt++;
  end

  int reports = 0, skip_until = 0, err_reports = 0, zero_reports = 0;
  initial begin
    forever begin
      @(posedge clk_sys);
      if (u_pc.rx_q.size() >= 9) begin
        byte unsigned b[9];
        int e;
        foreach (b[i]) b[i] = u_pc.rx_q.pop_front();
        reports++;
        e = (exp_q.size() > 0) ? exp_q.pop_front() : -1;
        check(b[0] == 8'hA5 && {b[5], b[6], b[7], b[8]} == RES, "report header and word count");
        if (reports > skip_until) begin
          check({b[1], b[2], b[3], b[4]} == 32'(e), $sformatf("report %0d: %0d errors, expected %0d", reports, {b[1], b[2], b[3], b[4]}, e));
          if (e > 0) err_reports++; else zero_reports++;
        end
      end
    end
  end

  task automatic set_burst(int p);
    u_pc.send_byte(8'h03); u_pc.send_byte(8'(p));
    skip_until = reports + 2;
  endtask

  initial begin
    int on0;
    repeat (3) @(posedge clk_sys);
    rst_n = 1;
    u_pc.send_byte(8'h01); u_pc.send_byte(8'h04);
    u_pc.send_byte(8'h02); u_pc.send_byte(8'h1F);
    wait (reports >= 2);
    check(pre == 5'h04 && post == 5'h1F, "emphasis");
    check(last_burst_words == FC - PRE - 2, $sformatf("100 %%: %0d words per burst", last_burst_words));
    set_burst(40);
    wait (reports >= skip_until + 1);
    check(last_burst_words == (FC*40)/100 - PRE - 2, $sformatf("40 %%: %0d words per burst", last_burst_words));
    on0 = on_cnt;
    #(FC*3.2*10);
    check(on_cnt - on0 == 10*(FC*40)/100, $sformatf("40 %%: burst_on %0d of %0d", on_cnt - on0, 10*FC));
    inject = 1;
    wait (reports >= skip_until + 4);
    inject = 0;
    set_burst(80);
    wait (reports >= skip_until + 2);
    check(last_burst_words == (FC*80)/100 - PRE - 2, $sformatf("80 %%: %0d words per burst", last_burst_words));
    check(err_reports >= 2 && zero_reports >= 2, $sformatf("%0d error / %0d clean reports", err_reports, zero_reports));
    check(u_pc.frame_errs == 0, "UART framing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
