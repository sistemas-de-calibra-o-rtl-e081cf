// Testbench for cmd_rx_fsm: two-byte commands set pre/post cursor and burst
// share (clamped to 100); unknown codes are skipped; the variant without
// the burst command ignores it. A reference model tracks the expected
// parameter values.
module tb_cmd_rx_fsm;
  import bert_pkg::*;
  logic clk = 0, rst_n = 0, rx_done = 0;
  logic [7:0] rx_byte = 0;
  logic [4:0] pre, post, pre0, post0;
  logic [6:0] pct, pct0;
  logic upd, upd0;
  cmd_code_e lc, lc0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cmd_rx_fsm #(.HAS_BURST(1'b1)) dut (.clk, .rst_n, .rx_byte, .rx_done,
    .precursor(pre), .postcursor(post), .burst_pct(pct), .updated(upd), .last_cmd(lc));
  cmd_rx_fsm #(.HAS_BURST(1'b0)) dut0 (.clk, .rst_n, .rx_byte, .rx_done,
    .precursor(pre0), .postcursor(post0), .burst_pct(pct0), .updated(upd0), .last_cmd(lc0));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic put(logic [7:0] b);
    @(negedge clk); rx_byte = b; rx_done = 1;
    @(negedge clk); rx_done = 0;
    repeat ($urandom_range(3)) @(negedge clk);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int upd_cnt = 0;
  always @(posedge clk) if (rst_n && upd) upd_cnt++;

  initial begin
    int m_pre = 0, m_post = 0, m_pct = 100, m_pre0 = 0, m_post0 = 0, n_upd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(pre == 0 && post == 0 && pct == 100, "reset values");
    for (int i = 0; i < 300; i++) begin
      int c, v;
      c = $urandom_range(5);          // 0 and 4,5: junk codes
      v = $urandom_range(255);
      if (c == 1 || c == 2 || c == 3) begin
        put(8'(c)); put(8'(v));
        n_upd++;
        if (c == 1) begin m_pre = v & 31; m_pre0 = v & 31; end
        if (c == 2) begin m_post = v & 31; m_post0 = v & 31; end
        if (c == 3) m_pct = (v > 100) ? 100 : v;
        // dut0 skips code 3 and may then take the value byte as a code
        if (c == 3 && (v == 1 || v == 2)) begin
          put(8'h00);                   // value for dut0, junk code for dut
          if (v == 1) m_pre0 = 0; else m_post0 = 0;
        end
      end else begin
        put(8'(c == 0 ? 8'h00 : 8'hF0 + c));
      end
      check(pre == 5'(m_pre) && post == 5'(m_post) && pct == 7'(m_pct),
            $sformatf("step %0d: %0d %0d %0d vs %0d %0d %0d", i, pre, post, pct, m_pre, m_post, m_pct));
      check(pre0 == 5'(m_pre0) && post0 == 5'(m_post0) && pct0 == 7'd100, $sformatf("no-burst variant step %0d", i));
    end
    check(upd_cnt == n_upd, $sformatf("updated pulses %0d vs %0d", upd_cnt, n_upd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
