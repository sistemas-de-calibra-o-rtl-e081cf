// Testbench for uart_tx: decodes the serial line against 8N1 at 16 ticks
// per bit (start bit low, LSB first, stop bit high), checks the bit
// duration, busy while sending and one tx_done per byte.
module tb_uart_tx;
  localparam int DIV = 4;
  localparam int BITC = 16*DIV;
  logic clk = 0, rst_n = 0, start = 0, txd, busy, tx_done, tick;
  logic [7:0] data = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  uart_baud_gen #(.CLK_FREQ(16*DIV*1000), .BAUD(1000)) u_baud (.clk, .rst_n, .tick);
  uart_tx dut (.clk, .rst_n, .tick, .start, .data, .txd, .busy, .tx_done);

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

  int dones = 0;
  always @(posedge clk) if (rst_n && tx_done) dones++;

  initial begin
    logic [7:0] b;
    int low_len;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    check(txd == 1, "idle high");
    for (int n = 0; n < 30; n++) begin
      b = 8'($urandom);
      @(negedge clk); data = b; start = 1;
      @(negedge clk); start = 0; data = ~b;
      check(busy, "busy after start");
      // find start edge
      while (txd) @(negedge clk);
      // measure start-bit length
      low_len = 0;
      while (!txd && low_len < 3*BITC) begin low_len++; @(negedge clk); end
      if (b[0] == 0) low_len = -1;          // start merges with bit 0
      // the start bit lasts 16 ticks counted from the next tick
      if (low_len >= 0) check(low_len > BITC - DIV && low_len <= BITC, $sformatf("start bit %0d clocks", low_len));
      while (!tx_done) @(negedge clk);
      @(negedge clk);
      check(!busy, "idle after done");
    end
    check(dones == 30, $sformatf("%0d tx_done", dones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // independent line decoder
  byte unsigned got[$];
  initial begin
    logic [7:0] v;
    forever begin
      @(negedge clk iff (rst_n && txd == 0));
      repeat (BITC/2) @(negedge clk);
      for (int i = 0; i < 8; i++) begin repeat (BITC) @(negedge clk); v[i] = txd; end
      repeat (BITC) @(negedge clk);
      checks++;
      if (txd != 1) begin failures++; $display("FAIL: stop bit"); end
      got.push_back(v);
    end
  end
  byte unsigned sent_q[$];
  always @(posedge clk) if (start && !busy) sent_q.push_back(data);
  always @(posedge clk) if (got.size() > 0 && sent_q.size() > 0) begin
    byte unsigned g, s;
    g = got.pop_front(); s = sent_q.pop_front();
    checks++;
    if (g != s) begin failures++; $display("FAIL: byte %h vs %h", g, s); end
  end
endmodule
