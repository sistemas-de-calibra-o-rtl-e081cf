// Testbench for uart_rx: random bytes sent as 8N1 frames at 16 ticks per
// bit are received intact; a frame with a low stop bit and a short glitch
// on the idle line produce no byte.
module tb_uart_rx;
  localparam int DIV = 4;                 // clocks per tick
  localparam int BITC = 16*DIV;           // clocks per bit
  logic clk = 0, rst_n = 0, rxd = 1, rx_done;
  logic [7:0] data;
  logic tick;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  uart_baud_gen #(.CLK_FREQ(16*DIV*1000), .BAUD(1000)) u_baud (.clk, .rst_n, .tick);
  uart_rx dut (.clk, .rst_n, .tick, .rxd, .data, .rx_done);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(logic [7:0] b, logic stop);
    rxd = 0; repeat (BITC) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (BITC) @(posedge clk); end
    rxd = stop; repeat (BITC) @(posedge clk);
    rxd = 1; repeat (BITC) @(posedge clk);
  endtask

  byte unsigned got[$];
  int done_cnt = 0;
  always @(posedge clk) if (rst_n && rx_done) begin got.push_back(data); done_cnt++; end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned sent[$];
    logic [7:0] b;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (50) @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      b = (i == 0) ? 8'h00 : (i == 1) ? 8'hFF : 8'($urandom);
      sent.push_back(b);
      send(b, 1'b1);
    end
    send(8'h5A, 1'b0);                     // framing error: dropped
    rxd = 0; repeat (DIV*3) @(posedge clk); rxd = 1;   // glitch shorter than half a bit
    repeat (3*BITC) @(posedge clk);
    check(got.size() == sent.size(), $sformatf("%0d bytes for %0d", got.size(), sent.size()));
    foreach (sent[i]) if (i < got.size()) check(got[i] == sent[i], $sformatf("byte %0d %h vs %h", i, got[i], sent[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
