// Testbench for ref_buffer: after three words are shifted in, the slice at
// every index 0..64 is the 32 bits starting that far into the oldest word.
module tb_ref_buffer;
  logic clk = 0, rst_n = 0;
  logic [31:0] ref_word, slice;
  logic [5:0]  index;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ref_buffer #(.DATA_W(32)) dut (.clk, .rst_n, .ref_word, .index, .slice);

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
    logic [31:0] w [3];
    bit s [96];
    logic [31:0] exp;
    index = 0; ref_word = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 40; rep++) begin
      for (int i = 0; i < 3; i++) begin
        @(negedge clk);
        w[i] = $urandom; ref_word = w[i];
      end
      @(negedge clk);
      // stream: w0 bits 31..0, w1, w2
      for (int i = 0; i < 96; i++) s[i] = w[i/32][31 - i%32];
      for (int idx = 0; idx < 64; idx++) begin
        index = 6'(idx);
        #0.05;
        for (int b = 0; b < 32; b++) exp[31-b] = s[idx + b];
        check(slice == exp, $sformatf("index %0d: %h vs %h", idx, slice, exp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
