// Continuous-mode BERT core.
//
// Transmit side (clk_tx): a pattern generator sends frames of FRAME_WORDS
// 32-bit words, each a 16-bit pilot followed by PRBS-14 data, without gaps.
//
// Receive side (clk_rx): received words pass through a short data buffer.
// The synchronism block searches the two latest words for the pilot at
// every bit offset; when found, it records the index (pilot length plus
// bit offset) and restarts an identical pattern generator as the
// reference. The reference words fill a 96-bit buffer from which the
// index cuts the 32-bit slice aligned with each received word; received
// words are delayed four cycles so that the reference is ready for the
// first word after the pilot. From then on the error counter compares
// every received word with its slice and reports totals once per
// RES_WORDS words. The core stays locked until reset.
//
// The block structure (generator, synchronism block with a shifting
// index, 96-bit reference buffer, error counter with resolution counter)
// follows the source design. The frame length, the pilot value, the fixed
// lock after the first pilot and the pipeline depths are this design's.
//
// Timing: with the pilot in the window at cycle t, `locked` rises at t+1
// and the first word after the pilot is compared at t+5.
module bert_cont
  import bert_pkg::*;
#(
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned FRAME_WORDS = 512,
  parameter int unsigned RES_WORDS   = 67108864
) (
  input  logic              clk_tx,
  input  logic              rst_tx_n,
  output logic [DATA_W-1:0] tx_data,

  input  logic              clk_rx,
  input  logic              rst_rx_n,
  input  logic [DATA_W-1:0] rx_data,
  output logic              locked,
  output logic              comparing,
  output logic              res_valid,
  output bert_result_t      res
);

  localparam int unsigned IDX_W = $clog2(2*DATA_W);

  // ---------------- transmit side ----------------
  logic tx_frame_start;
  pattern_gen #(.DATA_W(DATA_W), .PAT_W(16), .MARKER(PILOT), .FRAME_WORDS(FRAME_WORDS)) u_tx_gen (
    .clk(clk_tx), .rst_n(rst_tx_n), .restart(1'b0), .data(tx_data), .frame_start(tx_frame_start)
  );

  // ---------------- receive side -----------------
  logic [DATA_W-1:0] rx_q [5];       // received-data buffer, rx_q[0] newest
  always_ff @(posedge clk_rx or negedge rst_rx_n) begin
    if (!rst_rx_n) begin
      for (int i = 0; i < 5; i++) rx_q[i] <= '0;
    end else begin
      rx_q[0] <= rx_data;
      for (int i = 1; i < 5; i++) rx_q[i] <= rx_q[i-1];
    end
  end

  logic             found;
  logic [IDX_W-1:0] index;
  sync_block #(.DATA_W(DATA_W), .PAT_W(16), .PATTERN(PILOT)) u_sync (
    .clk(clk_rx), .rst_n(rst_rx_n), .window({rx_q[1], rx_q[0]}),
    .search(!locked && !found), .found(found), .index(index)
  );

  logic [DATA_W-1:0] ref_word, ref_slice;
  logic              ref_frame_start;
  pattern_gen #(.DATA_W(DATA_W), .PAT_W(16), .MARKER(PILOT), .FRAME_WORDS(FRAME_WORDS)) u_ref_gen (
    .clk(clk_rx), .rst_n(rst_rx_n), .restart(found), .data(ref_word), .frame_start(ref_frame_start)
  );

  ref_buffer #(.DATA_W(DATA_W)) u_ref_buf (
    .clk(clk_rx), .rst_n(rst_rx_n), .ref_word(ref_word), .index(index), .slice(ref_slice)
  );

  logic [2:0] found_d;
  always_ff @(posedge clk_rx or negedge rst_rx_n) begin
    if (!rst_rx_n) begin
      locked    <= 1'b0;
      found_d   <= '0;
      comparing <= 1'b0;
    end else begin
      found_d <= {found_d[1:0], found};
      if (found)      locked    <= 1'b1;
      if (found_d[2]) comparing <= 1'b1;
    end
  end

  error_counter #(.DATA_W(DATA_W), .CNT_W(32), .RES_WORDS(RES_WORDS)) u_cnt (
    .clk(clk_rx), .rst_n(rst_rx_n), .cmp_en(comparing),
    .rx_word(rx_q[4]), .ref_word(ref_slice),
    .res_valid(res_valid), .res_errors(res.errors), .res_words(res.words)
  );

endmodule
