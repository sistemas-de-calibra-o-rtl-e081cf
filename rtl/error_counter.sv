// Error counter block.
//
// Compares each received word with its reference slice, counts the bits
// that differ, and counts the compared words. The word count is the
// resolution counter: when it reaches RES_WORDS the window is closed, its
// totals appear on res_errors/res_words with a one-cycle res_valid pulse,
// and both counters restart for the next window. The error total
// saturates at all ones. Counting errors against a resolution counter and
// restarting at the end of each window follows the source design; the
// window size and the saturation are this design's choices.
//
// Timing: two pipeline stages. The difference count of a word compared
// with cmp_en in cycle c is registered in c+1 and added in c+2; res_valid
// rises the cycle after the RES_WORDS-th word has been added.
module error_counter #(
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned CNT_W     = 32,
  parameter int unsigned RES_WORDS = 67108864
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmp_en,
  input  logic [DATA_W-1:0] rx_word,
  input  logic [DATA_W-1:0] ref_word,
  output logic              res_valid,
  output logic [CNT_W-1:0]  res_errors,
  output logic [CNT_W-1:0]  res_words
);

  localparam int unsigned PW = $clog2(DATA_W+1);

  logic [PW-1:0]    diff_q;
  logic             v_q;
  logic [CNT_W-1:0] err_q, words_q;

  function automatic logic [PW-1:0] popcount(input logic [DATA_W-1:0] v);
    logic [PW-1:0] n;
    n = '0;
    for (int i = 0; i < int'(DATA_W); i++) n += PW'(v[i]);
    return n;
  endfunction

  logic [CNT_W:0]   err_sum;
  logic [CNT_W-1:0] err_next, words_next;
  assign err_sum    = {1'b0, err_q} + (CNT_W+1)'(diff_q);
  assign err_next   = err_sum[CNT_W] ? '1 : err_sum[CNT_W-1:0];
  assign words_next = words_q + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      diff_q     <= '0;
      v_q        <= 1'b0;
      err_q      <= '0;
      words_q    <= '0;
      res_valid  <= 1'b0;
      res_errors <= '0;
      res_words  <= '0;
    end else begin
      diff_q    <= popcount(rx_word ^ ref_word);
      v_q       <= cmp_en;
      res_valid <= 1'b0;
      if (v_q) begin
        if (words_next == CNT_W'(RES_WORDS)) begin
          res_valid  <= 1'b1;
          res_errors <= err_next;
          res_words  <= words_next;
          err_q      <= '0;
          words_q    <= '0;
        end else begin
          err_q   <= err_next;
          words_q <= words_next;
        end
      end
    end
  end

endmodule
