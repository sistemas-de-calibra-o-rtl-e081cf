// Testbench for sync_block: marker placed at every offset of a random
// window, index = PAT_W + offset one clock later; no hit when search is
// low or the marker is absent.
module tb_sync_block;
  import bert_pkg::*;
  logic clk = 0, rst_n = 0, search = 0, search32 = 0;
  logic [63:0] window;
  logic found, found32;
  logic [5:0] index, index32;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sync_block #(.DATA_W(32), .PAT_W(16), .PATTERN(PILOT)) dut (
    .clk, .rst_n, .window, .search, .found, .index);
  sync_block #(.DATA_W(32), .PAT_W(32), .PATTERN(DELIM)) dut32 (
    .clk, .rst_n, .window, .search(search32), .found(found32), .index(index32));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // random 64 bits holding neither marker at any tested offset
  function automatic logic [63:0] clean_rand();
    logic [63:0] w;
    bit bad;
    do begin
      w = {$urandom, $urandom};
      bad = 0;
      for (int p = 0; p < 32; p++)
        if (w[p +: 16] == PILOT || w[p +: 32] == DELIM) bad = 1;
    end while (bad);
    return w;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] w;
    window = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 4; rep++)
      for (int p = 0; p < 32; p++) begin
        // 16-bit pilot at offset p
        w = clean_rand();
        w[p +: 16] = PILOT;
        @(negedge clk); window = w; search = 1; search32 = 0;
        @(negedge clk);
        check(found === 1'b1 && index == 6'(16 + p), $sformatf("pilot at %0d: found=%b index=%0d", p, found, index));
        // 32-bit delimiter at offset p
        w = clean_rand();
        w[p +: 32] = DELIM;
        window = w; search = 0; search32 = 1;
        @(negedge clk);
        check(found32 === 1'b1 && index32 == 6'(32 + p), $sformatf("delim at %0d: index=%0d", p, index32));
        check(found === 1'b0, "no pilot search, no found");
        // marker present but search low
        search32 = 0;
        @(negedge clk);
        check(found32 === 1'b0, "search low");
        // absent
        window = clean_rand(); search = 1; search32 = 1;
        @(negedge clk); @(negedge clk);
        check(!found && !found32, "absent marker");
        check(index32 == 6'(32 + p), "index held");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
