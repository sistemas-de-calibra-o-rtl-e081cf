// Testbench for bert_system_cont, through its serial link: the PC model
// sets pre- and post-cursor, then reads the 9-byte reports. The word
// clocks run at 312.5 MHz, the system clock at 100 MHz, the UART at 64
// system clocks per bit. Windows before the error burst report zero,
// windows during it report exactly the injected bit errors that fell on
// compared words (model: the `comparing` status line plus the core's
// five-cycle input delay), and the word count of every report is RES.
module tb_bert_system_cont;
  localparam int RES = 40000, FW = 64, BITC = 64;
  logic clk_sys = 0, clk_w = 0, rst_n = 0;
  logic [31:0] tx, rx;
  logic [4:0] pre, post;
  logic urxd, utxd, locked, comparing, flip;
  int checks = 0, failures = 0;
  always #5   clk_sys = ~clk_sys;
  always #1.6 clk_w   = ~clk_w;

  bert_system_cont #(.CLK_FREQ(16*4*1_000_000), .BAUD(1_000_000), .FRAME_WORDS(FW), .RES_WORDS(RES)) dut (
    .clk_sys, .rst_sys_n(rst_n), .clk_tx(clk_w), .rst_tx_n(rst_n), .clk_rx(clk_w), .rst_rx_n(rst_n),
    .tx_data(tx), .rx_data(rx), .txprecursor(pre), .txpostcursor(post),
    .uart_rxd(urxd), .uart_txd(utxd), .locked, .comparing);
  tb_channel #(.SLIP(11)) u_ch (.clk(clk_w), .tx, .flip, .rx);
  tb_uart_host #(.BIT_CLKS(BITC)) u_pc (.clk(clk_sys), .rxd(utxd), .txd(urxd));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #3000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit inject = 0;
  int wc = 0;
  always @(posedge clk_w) wc <= wc + 1;
  assign flip = inject && (wc % 97 == 0);

  bit fl[6];
  int w_cnt = 0, e_cnt = 0;
  int exp_q[$];
  always @(posedge clk_w) begin
    fl[0] <= flip;
    for (int i = 1; i < 6; i++) fl[i] <= fl[i-1];
  end
  always @(negedge clk_w) if (rst_n && comparing) begin
    w_cnt++; e_cnt += int'(fl[4]);
    if (w_cnt == RES) begin exp_q.push_back(e_cnt); w_cnt = 0; e_cnt = 0; end
  end

  int reports = 0, err_reports = 0;
  initial begin
    forever begin
      @(posedge clk_sys);
      if (u_pc.rx_q.size() >= 9) begin
        byte unsigned b[9];
        int e;
        foreach (b[i]) b[i] = u_pc.rx_q.pop_front();
        reports++;
        e = (exp_q.size() > 0) ? exp_q.pop_front() : -1;
        check(b[0] == 8'hA5, "report header");
        check({b[1], b[2], b[3], b[4]} == 32'(e), $sformatf("report %0d: %0d errors, expected %0d", reports, {b[1], b[2], b[3], b[4]}, e));
        check({b[5], b[6], b[7], b[8]} == RES, "report word count");
        if (e > 0) err_reports++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk_sys);
    rst_n = 1;
    u_pc.send_byte(8'h01); u_pc.send_byte(8'h13);
    u_pc.send_byte(8'h02); u_pc.send_byte(8'h07);
    repeat (4*BITC) @(posedge clk_sys);
    check(pre == 5'h13 && post == 5'h07, $sformatf("emphasis %h %h", pre, post));
    check(locked, "locked");
    wait (reports >= 2);
    inject = 1;
    wait (reports >= 5);
    inject = 0;
    wait (reports >= 7);
    check(err_reports >= 2, $sformatf("%0d reports with errors", err_reports));
    check(u_pc.frame_errs == 0, "UART framing");
    check(dut.u_rep.dropped == 0, "no report dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
