// Full-size testbench: ngpon2_bert_top with every parameter at its default
// (200 MHz system clock, 19200 baud, 312.5 MHz word clocks, 125 us burst
// frames, 2^26-word measurement windows). It sets the emphasis of both
// testers over their serial links, injects a few bit errors on each
// channel while the testers compare, and reads the first window report of
// each tester. The reported error and word counts are checked against a
// model that counts the injected errors the receiver must see.
module tb_ngpon2_bert_full;
  import bert_pkg::*;
  localparam int RES = 1 << 26;
  localparam int BITC = 10417;   // 200 MHz / 19200 baud
  logic clk_sys = 0, clk_w = 0, rst_n = 0;
  always #2.5 clk_sys = ~clk_sys;
  always #1.6 clk_w   = ~clk_w;

  logic [31:0] c_tx, c_rx, b_tx, b_rx;
  logic [4:0]  c_pre, c_post, b_pre, b_post;
  logic c_urxd, c_utxd, b_urxd, b_utxd;
  logic c_locked, c_comparing, b_burst_on, b_busy, b_comparing, b_burst_done;
  logic c_flip, b_flip;
  int checks = 0, failures = 0;

  ngpon2_bert_top dut (
    .clk_sys, .rst_sys_n(rst_n), .clk_tx(clk_w), .rst_tx_n(rst_n), .clk_rx(clk_w), .rst_rx_n(rst_n),
    .c_tx_data(c_tx), .c_rx_data(c_rx), .c_txprecursor(c_pre), .c_txpostcursor(c_post),
    .c_uart_rxd(c_urxd), .c_uart_txd(c_utxd), .c_locked, .c_comparing,
    .b_tx_data(b_tx), .b_tx_burst_on(b_burst_on), .b_rx_data(b_rx),
    .b_txprecursor(b_pre), .b_txpostcursor(b_post), .b_uart_rxd(b_urxd), .b_uart_txd(b_utxd),
    .b_busy, .b_comparing, .b_burst_done);

  tb_channel #(.SLIP(17)) u_ch_c (.clk(clk_w), .tx(c_tx), .flip(c_flip), .rx(c_rx));
  tb_channel #(.SLIP(3))  u_ch_b (.clk(clk_w), .tx(b_tx), .flip(b_flip), .rx(b_rx));
  tb_uart_host #(.BIT_CLKS(BITC)) u_pc_c (.clk(clk_sys), .rxd(c_utxd), .txd(c_urxd));
  tb_uart_host #(.BIT_CLKS(BITC)) u_pc_b (.clk(clk_sys), .rxd(b_utxd), .txd(b_urxd));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #400ms;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A flip every 1,000,003 word clocks on each channel, for the whole run.
  int wc = 0;
  always @(posedge clk_w) wc <= wc + 1;
  assign c_flip = rst_n && (wc % 1_000_003 == 500_000);
  assign b_flip = rst_n && (wc % 1_000_003 == 700_000);

  bit cfl[6], bfl[6];
  int c_w = 0, c_e = 0, b_w = 0, b_e = 0, c_exp = -1, b_exp = -1, b_silent = 0;
  always @(posedge clk_w) begin
    cfl[0] <= c_flip; bfl[0] <= b_flip;
    for (int i = 1; i < 6; i++) begin cfl[i] <= cfl[i-1]; bfl[i] <= bfl[i-1]; end
  end
  always @(negedge clk_w) if (rst_n) begin
    if (c_comparing && c_exp < 0) begin
      c_w++; c_e += int'(cfl[4]);
      if (c_w == RES) c_exp = c_e;
    end
    if (b_comparing && b_exp < 0) begin
      b_w++; b_e += int'(bfl[4]);
      if (b_w == RES) b_exp = b_e;
    end
    if (b_flip && !b_burst_on) b_silent++;
  end

  initial begin
    byte unsigned b[9];
    repeat (3) @(posedge clk_sys);
    rst_n = 1;
    fork
      begin u_pc_c.send_byte(CMD_PRECURSOR); u_pc_c.send_byte(8'd4);
            u_pc_c.send_byte(CMD_POSTCURSOR); u_pc_c.send_byte(8'd17); end
      begin u_pc_b.send_byte(CMD_PRECURSOR); u_pc_b.send_byte(8'd7);
            u_pc_b.send_byte(CMD_POSTCURSOR); u_pc_b.send_byte(8'd21); end
    join
    repeat (4) @(posedge clk_sys);
    check(c_pre == 4 && c_post == 17, "continuous tester emphasis");
    check(b_pre == 7 && b_post == 21, "burst tester emphasis");
    check(c_locked, "continuous tester locked on the pilot");
    wait (u_pc_c.rx_q.size() >= 9 && u_pc_b.rx_q.size() >= 9);
    foreach (b[i]) b[i] = u_pc_c.rx_q.pop_front();
    $display("INFO continuous report: errors=%0d words=%0d expected errors=%0d",
             {b[1], b[2], b[3], b[4]}, {b[5], b[6], b[7], b[8]}, c_exp);
    check(b[0] == REPORT_HDR, "continuous report header");
    check({b[5], b[6], b[7], b[8]} == RES, "continuous report words");
    check(c_exp > 0 && {b[1], b[2], b[3], b[4]} == 32'(c_exp), "continuous report errors");
    foreach (b[i]) b[i] = u_pc_b.rx_q.pop_front();
    $display("INFO burst report: errors=%0d words=%0d expected errors=%0d (flips in silence %0d)",
             {b[1], b[2], b[3], b[4]}, {b[5], b[6], b[7], b[8]}, b_exp, b_silent);
    check(b[0] == REPORT_HDR, "burst report header");
    check({b[5], b[6], b[7], b[8]} == RES, "burst report words");
    check(b_exp > 0 && {b[1], b[2], b[3], b[4]} == 32'(b_exp), "burst report errors");
    check(u_pc_c.frame_errs == 0 && u_pc_b.frame_errs == 0, "UART framing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
