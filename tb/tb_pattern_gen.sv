// Testbench for pattern_gen: continuous-mode frames (16-bit pilot then
// PRBS, repeating every FRAME_WORDS words), restart, and the burst form
// (32-bit delimiter then PRBS, no automatic repeat).
module tb_pattern_gen;
  import tb_ref_pkg::*;
  import bert_pkg::*;
  localparam int FW = 8;
  logic clk = 0, rst_n = 0, restart = 0, restart_b = 0;
  logic [31:0] data, data_b;
  logic fs, fs_b;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pattern_gen #(.DATA_W(32), .PAT_W(16), .MARKER(PILOT), .FRAME_WORDS(FW)) dut (
    .clk, .rst_n, .restart, .data, .frame_start(fs));
  pattern_gen #(.DATA_W(32), .PAT_W(32), .MARKER(DELIM), .FRAME_WORDS(0)) dut_b (
    .clk, .rst_n, .restart(restart_b), .data(data_b), .frame_start(fs_b));

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

  initial begin
    bitq_t fr, bq;
    fr = marked_bits({16'd0, PILOT}, 16, 32*FW - 16);
    bq = marked_bits(DELIM, 32, 32*200);
    repeat (3) @(negedge clk);
    check(data == 0, "zero in reset");
    rst_n = 1;
    check(data == 0, "zero the first clock after reset");
    @(negedge clk);
    for (int f = 0; f < 3; f++)
      for (int k = 0; k < FW; k++) begin
        check(data == word_at(fr, 32*k), $sformatf("frame %0d word %0d: %h", f, k, data));
        check(fs == (k == 0), "frame_start");
        @(negedge clk);
      end
    // restart in the middle of a frame
    repeat (3) @(negedge clk);
    restart = 1; @(negedge clk); restart = 0;
    check(data == word_at(fr, 0) && fs, "restart gives word 0");
    @(negedge clk);
    check(data == word_at(fr, 32), "word 1 after restart");
    // burst form
    restart_b = 1; @(negedge clk); restart_b = 0;
    for (int k = 0; k < 150; k++) begin
      check(data_b == word_at(bq, 32*k), $sformatf("burst word %0d", k));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
