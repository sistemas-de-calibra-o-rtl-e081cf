// Burst-mode data generator (upstream PHY frame).
//
// Every FRAME_CYCLES words (125 us at 312.5 MHz) it sends one burst:
// PRE_WORDS words of preamble (160 bits by default), the 32-bit
// delimiter, then PRBS-14 payload up to the burst length, then zeros for
// the rest of the frame while the laser would be off. The burst length in
// words is bert_pkg::burst_words(burst_pct, FRAME_CYCLES, PRE_WORDS): the
// requested share of the frame, at least preamble + delimiter + one
// payload word, and no burst at all for 0 %. At 100 % the frame is filled
// and the stream is continuous apart from the preamble and delimiter at
// the start of each frame. A new burst_pct takes effect at the next frame.
//
// The frame layout (preamble, delimiter, payload, zeros over 125 us), the
// 160/32-bit preamble and delimiter sizes and the 0-100 % burst setting
// follow the source design. The preamble pattern (1010...), the delimiter
// value, the rounding of the burst length and the burst_on output (a
// laser-enable for the transmitter) are this design's.
//
// Timing: `data` and `burst_on` are registered; `frame_start` marks the
// cycle in which the first preamble word is on `data`.
module burst_data_gen
  import bert_pkg::*;
#(
  parameter int unsigned DATA_W       = 32,
  parameter int unsigned FRAME_CYCLES = 39062,
  parameter int unsigned PRE_WORDS    = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [6:0]        burst_pct,
  output logic [DATA_W-1:0] data,
  output logic              burst_on,
  output logic              frame_start
);

  localparam int unsigned FW = $clog2(FRAME_CYCLES + 1);

  logic [FW-1:0] fcnt;        // word position in the frame
  logic [FW-1:0] bw_q;        // burst length of the current frame
  logic [FW-1:0] bw_new;
  logic          last;

  assign bw_new = FW'(burst_words(burst_pct, FRAME_CYCLES, PRE_WORDS));
  assign last   = (fcnt == FW'(FRAME_CYCLES - 1));

  logic [DATA_W-1:0] pay_word;
  logic              pay_first;    // delimiter word on pay_word (not used)
  pattern_gen #(.DATA_W(DATA_W), .PAT_W(32), .MARKER(DELIM), .FRAME_WORDS(0)) u_pay (
    .clk(clk), .rst_n(rst_n), .restart(fcnt == FW'(PRE_WORDS - 1)),
    .data(pay_word), .frame_start(pay_first)
  );

  logic [DATA_W-1:0] word;
  logic              on;
  always_comb begin
    on = (fcnt < bw_q);
    if (!on)                        word = '0;
    else if (fcnt < FW'(PRE_WORDS)) word = DATA_W'(PREAMBLE);
    else                            word = pay_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fcnt        <= FW'(FRAME_CYCLES - 1);   // first frame starts next cycle
      bw_q        <= '0;
      data        <= '0;
      burst_on    <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      data        <= word;
      burst_on    <= on;
      frame_start <= (fcnt == '0);
      if (last) begin
        fcnt <= '0;
        bw_q <= bw_new;
      end else begin
        fcnt <= fcnt + 1'b1;
      end
    end
  end

endmodule
