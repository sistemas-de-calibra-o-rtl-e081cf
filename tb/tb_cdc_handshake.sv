// Testbench for cdc_handshake: words sent from a 3.2 ns clock to a 10 ns
// clock and back arrive once each, unchanged, in order, within the stated
// latency; words offered while busy are dropped.
module tb_cdc_handshake;
  logic fclk = 0, sclk = 0, frst_n = 0, srst_n = 0;
  logic f_valid = 0, f_busy, s_dvalid;
  logic [63:0] f_data = 0, s_data;
  logic s_valid = 0, s_busy, f_dvalid;
  logic [6:0] s_data7 = 0, f_data7;
  int checks = 0, failures = 0;
  always #1.6 fclk = ~fclk;
  always #5 sclk = ~sclk;

  cdc_handshake #(.W(64)) dut_fs (
    .src_clk(fclk), .src_rst_n(frst_n), .src_valid(f_valid), .src_data(f_data), .src_busy(f_busy),
    .dst_clk(sclk), .dst_rst_n(srst_n), .dst_valid(s_dvalid), .dst_data(s_data));
  cdc_handshake #(.W(7)) dut_sf (
    .src_clk(sclk), .src_rst_n(srst_n), .src_valid(s_valid), .src_data(s_data7), .src_busy(s_busy),
    .dst_clk(fclk), .dst_rst_n(frst_n), .dst_valid(f_dvalid), .dst_data(f_data7));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] q64[$];
  logic [6:0]  q7[$];
  realtime t_sent;
  int got64 = 0, got7 = 0;
  always @(posedge sclk) if (srst_n && s_dvalid) begin
    checks++; got64++;
    if (q64.size() == 0 || s_data != q64.pop_front()) begin failures++; $display("FAIL: 64-bit word"); end
    checks++;
    if ($realtime - t_sent > 45.0) begin failures++; $display("FAIL: latency %0t", $realtime - t_sent); end
  end
  always @(posedge fclk) if (frst_n && f_dvalid) begin
    checks++; got7++;
    if (q7.size() == 0 || f_data7 != q7.pop_front()) begin failures++; $display("FAIL: 7-bit word"); end
  end

  initial begin
    int sent64 = 0, sent7 = 0;
    #20 frst_n = 1; srst_n = 1;
    fork
      for (int i = 0; i < 100; i++) begin
        @(negedge fclk);
        while (f_busy) @(negedge fclk);
        f_data = {$urandom, $urandom}; f_valid = 1; q64.push_back(f_data); t_sent = $realtime; sent64++;
        @(negedge fclk); f_valid = 0;
        // offered while busy: must be dropped
        f_data = ~f_data; f_valid = 1; @(negedge fclk); f_valid = 0;
        repeat ($urandom_range(5)) @(negedge fclk);
      end
      for (int i = 0; i < 60; i++) begin
        @(negedge sclk);
        while (s_busy) @(negedge sclk);
        s_data7 = 7'($urandom); s_valid = 1; q7.push_back(s_data7); sent7++;
        @(negedge sclk); s_valid = 0;
        repeat ($urandom_range(5)) @(negedge sclk);
      end
    join
    #200;
    check(got64 == sent64 && q64.size() == 0, $sformatf("64-bit words %0d of %0d", got64, sent64));
    check(got7 == sent7 && q7.size() == 0, $sformatf("7-bit words %0d of %0d", got7, sent7));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
