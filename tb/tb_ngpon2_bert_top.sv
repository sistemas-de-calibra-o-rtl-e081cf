// End-to-end testbench for ngpon2_bert_top at reduced sizes (64-word
// continuous frame, 400-word burst frame, 20000-word windows, fast UART).
// Both testers run over channel models with bit slips; two PC models drive
// the two serial links. The run sets the emphasis of both testers, moves
// the burst share 100 % -> 40 % -> 80 %, injects bit errors for a while and
// reads every report. It counts how often each mechanism happened and
// fails any that never did: pilot lock, delimiter synchronisation per
// burst, emphasis commands, burst-share changes, window reports on each
// link, windows with and without errors on each link, and injected errors
// that fell in the silent part of the burst frame and were not counted.
module tb_ngpon2_bert_top;
  import bert_pkg::*;
  localparam int RES = 20000, FW = 64, FC = 400, PRE = 5, BITC = 64;
  logic clk_sys = 0, clk_w = 0, rst_n = 0;
  always #5   clk_sys = ~clk_sys;
  always #1.6 clk_w   = ~clk_w;

  logic [31:0] c_tx, c_rx, b_tx, b_rx;
  logic [4:0]  c_pre, c_post, b_pre, b_post;
  logic c_urxd, c_utxd, b_urxd, b_utxd;
  logic c_locked, c_comparing, b_burst_on, b_busy, b_comparing, b_burst_done;
  logic c_flip, b_flip;
  int checks = 0, failures = 0;

  ngpon2_bert_top #(.CLK_FREQ(16*4*1_000_000), .BAUD(1_000_000), .FRAME_WORDS(FW),
                    .FRAME_CYCLES(FC), .PRE_WORDS(PRE), .RES_WORDS(RES)) dut (
    .clk_sys, .rst_sys_n(rst_n), .clk_tx(clk_w), .rst_tx_n(rst_n), .clk_rx(clk_w), .rst_rx_n(rst_n),
    .c_tx_data(c_tx), .c_rx_data(c_rx), .c_txprecursor(c_pre), .c_txpostcursor(c_post),
    .c_uart_rxd(c_urxd), .c_uart_txd(c_utxd), .c_locked, .c_comparing,
    .b_tx_data(b_tx), .b_tx_burst_on(b_burst_on), .b_rx_data(b_rx),
    .b_txprecursor(b_pre), .b_txpostcursor(b_post), .b_uart_rxd(b_urxd), .b_uart_txd(b_utxd),
    .b_busy, .b_comparing, .b_burst_done);

  tb_channel #(.SLIP(5))  u_ch_c (.clk(clk_w), .tx(c_tx), .flip(c_flip), .rx(c_rx));
  tb_channel #(.SLIP(29)) u_ch_b (.clk(clk_w), .tx(b_tx), .flip(b_flip), .rx(b_rx));
  tb_uart_host #(.BIT_CLKS(BITC)) u_pc_c (.clk(clk_sys), .rxd(c_utxd), .txd(c_urxd));
  tb_uart_host #(.BIT_CLKS(BITC)) u_pc_b (.clk(clk_sys), .rxd(b_utxd), .txd(b_urxd));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #8000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- error injection and reference models of the counted errors ----
  bit inject = 0;
  int wc = 0;
  always @(posedge clk_w) wc <= wc + 1;
  assign c_flip = inject && (wc % 101 == 0);
  assign b_flip = inject && (wc % 83 == 0);

  bit cfl[6], bfl[6], bon[6];
  int c_w = 0, c_e = 0, b_w = 0, b_e = 0;
  int c_exp[$], b_exp[$];
  int n_lock = 0, n_bursts = 0, n_silent_flips = 0;
  bit c_locked_q = 0;
  always @(posedge clk_w) begin
    cfl[0] <= c_flip; bfl[0] <= b_flip; bon[0] <= b_burst_on;
    for (int i = 1; i < 6; i++) begin cfl[i] <= cfl[i-1]; bfl[i] <= bfl[i-1]; bon[i] <= bon[i-1]; end
  end
  always @(negedge clk_w) if (rst_n) begin
    if (c_locked && !c_locked_q) n_lock++;
    c_locked_q = c_locked;
    if (c_comparing) begin
      c_w++; c_e += int'(cfl[4]);
      if (c_w == RES) begin c_exp.push_back(c_e); c_w = 0; c_e = 0; end
    end
    if (b_comparing) begin
      b_w++; b_e += int'(bfl[4]);
      if (b_w == RES) begin b_exp.push_back(b_e); b_w = 0; b_e = 0; end
    end
    if (b_flip && !b_burst_on) n_silent_flips++;
    if (b_burst_done) n_bursts++;
  end

  // ---- report readers ----
  int c_rep = 0, b_rep = 0, c_err_rep = 0, c_zero_rep = 0, b_err_rep = 0, b_zero_rep = 0, b_skip = 0;
  initial forever begin
    @(posedge clk_sys);
    if (u_pc_c.rx_q.size() >= 9) begin
      byte unsigned b[9];
      int e;
      foreach (b[i]) b[i] = u_pc_c.rx_q.pop_front();
      c_rep++;
      e = (c_exp.size() > 0) ? c_exp.pop_front() : -1;
      check(b[0] == REPORT_HDR && {b[5], b[6], b[7], b[8]} == RES, "continuous report format");
      check({b[1], b[2], b[3], b[4]} == 32'(e), $sformatf("continuous report %0d: %0d vs %0d", c_rep, {b[1], b[2], b[3], b[4]}, e));
      if (e > 0) c_err_rep++; else c_zero_rep++;
    end
    if (u_pc_b.rx_q.size() >= 9) begin
      byte unsigned b[9];
      int e;
      foreach (b[i]) b[i] = u_pc_b.rx_q.pop_front();
      b_rep++;
      e = (b_exp.size() > 0) ? b_exp.pop_front() : -1;
      check(b[0] == REPORT_HDR && {b[5], b[6], b[7], b[8]} == RES, "burst report format");
      if (b_rep > b_skip) begin
        check({b[1], b[2], b[3], b[4]} == 32'(e), $sformatf("burst report %0d: %0d vs %0d", b_rep, {b[1], b[2], b[3], b[4]}, e));
        if (e > 0) b_err_rep++; else b_zero_rep++;
      end
    end
  end

  int n_emph = 0, n_share = 0;
  task automatic set_burst(int p);
    u_pc_b.send_byte(CMD_BURST); u_pc_b.send_byte(8'(p));
    b_skip = b_rep + 2;
    n_share++;
  endtask

  initial begin
    repeat (3) @(posedge clk_sys);
    rst_n = 1;
    fork
      begin u_pc_c.send_byte(CMD_PRECURSOR); u_pc_c.send_byte(8'd3);
            u_pc_c.send_byte(CMD_POSTCURSOR); u_pc_c.send_byte(8'd9); end
      begin u_pc_b.send_byte(CMD_PRECURSOR); u_pc_b.send_byte(8'd12);
            u_pc_b.send_byte(CMD_POSTCURSOR); u_pc_b.send_byte(8'd30); end
    join
    repeat (4) @(posedge clk_sys);
    if (c_pre == 3)   n_emph++;
    if (c_post == 9)  n_emph++;
    if (b_pre == 12)  n_emph++;
    if (b_post == 30) n_emph++;
    wait (b_rep >= 2 && c_rep >= 2);
    set_burst(40);
    wait (b_rep >= b_skip + 1);
    inject = 1;
    wait (b_rep >= b_skip + 3);
    inject = 0;
    set_burst(80);
    wait (b_rep >= b_skip + 2);
    wait (c_rep >= 2 + c_err_rep + 2);
    $display("INFO locks=%0d bursts=%0d emphasis=%0d share_changes=%0d reports c/b=%0d/%0d err c/b=%0d/%0d clean c/b=%0d/%0d silent_flips=%0d",
             n_lock, n_bursts, n_emph, n_share, c_rep, b_rep, c_err_rep, b_err_rep, c_zero_rep, b_zero_rep, n_silent_flips);
    check(n_lock == 1, "pilot lock");
    check(n_bursts > 0, "burst delimiter synchronisation");
    check(n_emph == 4, "emphasis commands");
    check(n_share == 2, "burst share changes");
    check(c_rep > 0 && b_rep > 0, "window reports");
    check(c_err_rep > 0 && b_err_rep > 0, "windows with errors");
    check(c_zero_rep > 0 && b_zero_rep > 0, "clean windows");
    check(n_silent_flips > 0, "errors in the silent period ignored");
    check(u_pc_c.frame_errs == 0 && u_pc_b.frame_errs == 0, "UART framing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
