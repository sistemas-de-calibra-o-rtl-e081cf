// Burst-mode BERT core.
//
// Transmit side (clk_tx): burst_data_gen sends one burst per 125 us frame
// (preamble, 32-bit delimiter, PRBS-14 payload, then zeros), its length
// set by burst_pct_tx.
//
// Receive side (clk_rx): as in the continuous core, received words go
// through a short buffer and the synchronism block searches the latest two
// words for the marker at every bit offset, here the 32-bit delimiter. Each
// burst is synchronised on its own: when the delimiter is found, the
// reference generator restarts (delimiter followed by the same PRBS) and
// fills the 96-bit reference buffer, and the Counter Nburst opens the error
// counter for the burst's payload. The number of words compared is the
// payload length minus one, since at a non-zero bit offset the last
// received word of the payload already carries zeros of the silent
// period. When the Counter Nburst ends, the count is frozen and the
// synchronism block searches for the next delimiter. The error counter
// reports once per RES_WORDS compared words, across bursts.
//
// The extension of the marker to 32 bits, the Counter Nburst and the
// freezing of the count between bursts follow the source design; the
// per-burst word count and the pipeline depths are this design's. The RX
// side takes the payload length from burst_pct_rx when it finds a
// delimiter; a change of the burst share reaches the transmitter at its
// next frame, so the one burst in flight may be measured with the old
// length.
//
// Timing: with the delimiter in the window at cycle t, the first payload
// word is compared at t+5; `comparing` is high while payload is compared.
module bert_burst
  import bert_pkg::*;
#(
  parameter int unsigned DATA_W       = 32,
  parameter int unsigned FRAME_CYCLES = 39062,
  parameter int unsigned PRE_WORDS    = 5,
  parameter int unsigned RES_WORDS    = 67108864
) (
  input  logic              clk_tx,
  input  logic              rst_tx_n,
  input  logic [6:0]        burst_pct_tx,
  output logic [DATA_W-1:0] tx_data,
  output logic              tx_burst_on,
  output logic              tx_frame_start,

  input  logic              clk_rx,
  input  logic              rst_rx_n,
  input  logic [6:0]        burst_pct_rx,
  input  logic [DATA_W-1:0] rx_data,
  output logic              busy,        // delimiter found, burst being checked
  output logic              comparing,
  output logic              burst_done,  // one pulse per checked burst
  output logic              res_valid,
  output bert_result_t      res
);

  localparam int unsigned IDX_W = $clog2(2*DATA_W);
  localparam int unsigned FW    = $clog2(FRAME_CYCLES + 1);

  // ---------------- transmit side ----------------
  burst_data_gen #(.DATA_W(DATA_W), .FRAME_CYCLES(FRAME_CYCLES), .PRE_WORDS(PRE_WORDS)) u_tx_gen (
    .clk(clk_tx), .rst_n(rst_tx_n), .burst_pct(burst_pct_tx),
    .data(tx_data), .burst_on(tx_burst_on), .frame_start(tx_frame_start)
  );

  // ---------------- receive side -----------------
  logic [DATA_W-1:0] rx_q [5];
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
  sync_block #(.DATA_W(DATA_W), .PAT_W(32), .PATTERN(DELIM)) u_sync (
    .clk(clk_rx), .rst_n(rst_rx_n), .window({rx_q[1], rx_q[0]}),
    .search(!busy && !found), .found(found), .index(index)
  );

  logic [DATA_W-1:0] ref_word, ref_slice;
  logic              ref_first;
  pattern_gen #(.DATA_W(DATA_W), .PAT_W(32), .MARKER(DELIM), .FRAME_WORDS(0)) u_ref_gen (
    .clk(clk_rx), .rst_n(rst_rx_n), .restart(found), .data(ref_word), .frame_start(ref_first)
  );

  ref_buffer #(.DATA_W(DATA_W)) u_ref_buf (
    .clk(clk_rx), .rst_n(rst_rx_n), .ref_word(ref_word), .index(index), .slice(ref_slice)
  );

  // Payload words to compare in this burst: burst - preamble - delimiter - 1.
  logic [FW-1:0] bw_rx, n_cmp;
  assign bw_rx = FW'(burst_words(burst_pct_rx, FRAME_CYCLES, PRE_WORDS));
  logic [FW-1:0] n_q;

  logic [2:0] found_d;
  always_ff @(posedge clk_rx or negedge rst_rx_n) begin
    if (!rst_rx_n) begin
      busy    <= 1'b0;
      found_d <= '0;
      n_q     <= '0;
    end else begin
      found_d <= {found_d[1:0], found};
      if (found) begin
        busy <= 1'b1;
        n_q  <= (bw_rx > FW'(PRE_WORDS + 2)) ? bw_rx - FW'(PRE_WORDS + 2) : '0;
      end else if (burst_done) begin
        busy <= 1'b0;
      end
    end
  end
  assign n_cmp = n_q;

  nburst_counter #(.N_W(FW)) u_nburst (
    .clk(clk_rx), .rst_n(rst_rx_n), .start(found_d[2]), .n_words(n_cmp),
    .active(comparing), .done(burst_done)
  );

  error_counter #(.DATA_W(DATA_W), .CNT_W(32), .RES_WORDS(RES_WORDS)) u_cnt (
    .clk(clk_rx), .rst_n(rst_rx_n), .cmp_en(comparing),
    .rx_word(rx_q[4]), .ref_word(ref_slice),
    .res_valid(res_valid), .res_errors(res.errors), .res_words(res.words)
  );

endmodule
