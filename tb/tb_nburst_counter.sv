// Testbench for nburst_counter: active for exactly n_words cycles after
// start, then one done pulse; n_words = 0 gives done only.
module tb_nburst_counter;
  logic clk = 0, rst_n = 0, start = 0, active, done;
  logic [15:0] n_words = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  nburst_counter #(.N_W(16)) dut (.clk, .rst_n, .start, .n_words, .active, .done);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 30; rep++) begin
      int n, act, dn, first_act;
      n = (rep == 0) ? 0 : (rep == 1) ? 1 : $urandom_range(200, 2);
      @(negedge clk); start = 1; n_words = 16'(n);
      @(negedge clk); start = 0; n_words = 16'hFFFF;   // latched at start
      act = 0; dn = 0; first_act = active;
      for (int c = 0; c < n + 5; c++) begin
        if (active) act++;
        if (done) begin
          dn++;
          check(act == n, $sformatf("done after %0d active cycles, n=%0d", act, n));
        end
        @(negedge clk);
      end
      check(act == n, $sformatf("active %0d of %0d", act, n));
      check(dn == 1, "one done pulse");
      if (n > 0) check(first_act == 1, "active the cycle after start");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
