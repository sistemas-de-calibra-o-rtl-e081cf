// Test-pattern generator: marker followed by PRBS-14 data.
//
// Produces the bit stream MARKER (PAT_W bits) followed by the PRBS-14
// sequence, DATA_W bits per clock, first bit in the MSB. The same module
// is the transmit pattern source and, restarted by the synchronism logic,
// the receive-side reference, so both sides hold identical patterns
// without a stored table. A PAT_W-bit residue register lets the marker sit
// in front of the PRBS without breaking the PRBS into word-aligned pieces:
// each output word is the residue followed by the top DATA_W-PAT_W bits of
// the next PRBS word.
//
// With FRAME_WORDS > 0 the pattern restarts by itself every FRAME_WORDS
// words (continuous mode: a 16-bit pilot once per frame). With
// FRAME_WORDS = 0 it restarts only on `restart` (burst mode: the 32-bit
// delimiter then the payload).
//
// Timing: `data` is valid every cycle. The cycle after `restart` it shows
// word 0, which begins with the marker. During reset and the first clock
// after it `data` is zero and word 0 follows, so a transmitter held in
// reset does not send a stream of markers. The marker sizes
// (16-bit pilot, 32-bit burst delimiter) follow the source design; the
// frame length and marker values are this design's choice.
module pattern_gen
  import bert_pkg::*;
#(
  parameter int unsigned   DATA_W      = 32,
  parameter int unsigned   PAT_W       = 16,
  parameter logic [PAT_W-1:0] MARKER   = bert_pkg::PILOT,
  parameter int unsigned   FRAME_WORDS = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              restart,
  output logic [DATA_W-1:0] data,
  output logic              frame_start   // data is word 0 of a frame
);

  localparam int unsigned CW = (FRAME_WORDS > 1) ? $clog2(FRAME_WORDS) : 1;

  logic [DATA_W-1:0] prbs_word;
  logic [PAT_W-1:0]  residue;
  logic [CW-1:0]     wcnt;
  logic              first;      // current word is word 0
  logic              run;        // low during reset and one clock after
  logic              wrap;

  assign wrap = (FRAME_WORDS > 0) && (32'(wcnt) == FRAME_WORDS - 1);

  prbs14_gen #(.DATA_W(DATA_W)) u_prbs (
    .clk     (clk),
    .rst_n   (rst_n),
    .restart (restart | wrap | !run),
    .en      (1'b1),
    .data    (prbs_word)
  );

  logic [PAT_W+DATA_W-1:0] cat;
  assign cat         = {(first ? MARKER : residue), prbs_word};
  assign data        = run ? cat[PAT_W+DATA_W-1 -: DATA_W] : '0;
  assign frame_start = first && run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      residue <= '0;
      wcnt    <= '0;
      first   <= 1'b0;
      run     <= 1'b0;
    end else begin
      run     <= 1'b1;
      residue <= prbs_word[PAT_W-1:0];
      if (restart || wrap || !run) begin
        wcnt  <= '0;
        first <= 1'b1;
      end else begin
        wcnt  <= wcnt + 1'b1;
        first <= 1'b0;
      end
    end
  end

endmodule
