// Testbench for uart_baud_gen: tick period equals the rounded divisor
// CLK_FREQ / (16*BAUD), checked for two settings.
module tb_uart_baud_gen;
  logic clk = 0, rst_n = 0, tick_a, tick_b;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // 200 MHz / (16*19200) = 651.04 -> 651 ; 1 MHz / (16*9600) = 6.51 -> 7
  uart_baud_gen #(.CLK_FREQ(200_000_000), .BAUD(19200)) dut_a (.clk, .rst_n, .tick(tick_a));
  uart_baud_gen #(.CLK_FREQ(1_000_000),   .BAUD(9600))  dut_b (.clk, .rst_n, .tick(tick_b));

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

  int last_a = -1, last_b = -1, cyc = 0, na = 0, nb = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (tick_a) begin
      if (last_a >= 0) begin checks++; if (cyc - last_a != 651) begin failures++; $display("FAIL: a period %0d", cyc - last_a); end end
      last_a <= cyc; na <= na + 1;
    end
    if (tick_b) begin
      if (last_b >= 0) begin checks++; if (cyc - last_b != 7) begin failures++; $display("FAIL: b period %0d", cyc - last_b); end end
      last_b <= cyc; nb <= nb + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (7000) @(posedge clk);
    check(na >= 10 && nb >= 900, $sformatf("tick counts %0d %0d", na, nb));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
