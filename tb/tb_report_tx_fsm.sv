// Testbench for report_tx_fsm: each result leaves as header, errors and
// words, MSB first, one byte per tx_done; a send during a report is
// dropped and counted.
module tb_report_tx_fsm;
  import bert_pkg::*;
  logic clk = 0, rst_n = 0, send = 0, tx_start, tx_done = 0, busy;
  logic [7:0] tx_byte, dropped;
  bert_result_t result;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  report_tx_fsm dut (.clk, .rst_n, .send, .result, .tx_start, .tx_byte, .tx_done, .busy, .dropped);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // fake UART transmitter: takes the byte on tx_start, done some cycles later
  byte unsigned got[$];
  initial begin
    forever begin
      @(posedge clk iff (rst_n && tx_start));
      got.push_back(tx_byte);
      repeat ($urandom_range(12, 2)) @(posedge clk);
      @(negedge clk); tx_done = 1; @(negedge clk); tx_done = 0;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      logic [31:0] e, w;
      e = $urandom; w = $urandom;
      got.delete();
      @(negedge clk); result.errors = e; result.words = w; send = 1;
      @(negedge clk); send = 0; result = '0;
      if (n == 5) begin @(negedge clk); send = 1; @(negedge clk); send = 0; end   // dropped
      while (busy) @(negedge clk);
      repeat (20) @(negedge clk);
      check(got.size() == 9, $sformatf("report %0d: %0d bytes", n, got.size()));
      if (got.size() == 9) begin
        check(got[0] == 8'hA5, "header");
        check({got[1], got[2], got[3], got[4]} == e, "errors");
        check({got[5], got[6], got[7], got[8]} == w, "words");
      end
    end
    check(dropped == 1, $sformatf("dropped %0d", dropped));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
