// Synchronism block: finds the pattern marker in the received word stream.
//
// The receiver delivers DATA_W-bit words with an unknown bit offset, so the
// marker (16-bit pilot in continuous mode, 32-bit delimiter in burst mode)
// can start at any bit of a word. The block looks at a 2*DATA_W-bit window
// made of the previous and the current received word (older word in the
// upper half, first bit in the MSB) and compares the marker against every
// bit position p = 0..DATA_W-1 in parallel, p counting from the newest
// bit. Positions above DATA_W-1 need not be tested: a marker there was
// already fully inside the window one word earlier, at p-DATA_W.
//
// When `search` is high and the marker matches, `found` pulses for one
// cycle (registered, one clock after the window) and `index` gives
// PAT_W + p: the number of bits between the start of the marker and the
// start of the next received word. The reference buffer uses it to cut
// the reference slice that lines up with the received words. Searching
// over a shifting index follows the source design; the parallel compare
// and the index convention are this design's. If the marker matched at
// several positions the earliest in time (largest p) would be taken; the
// markers are chosen so that this does not happen.
module sync_block #(
  parameter int unsigned      DATA_W  = 32,
  parameter int unsigned      PAT_W   = 16,
  parameter logic [PAT_W-1:0] PATTERN = bert_pkg::PILOT,
  parameter int unsigned      IDX_W   = $clog2(2*DATA_W)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [2*DATA_W-1:0] window,
  input  logic                search,
  output logic                found,
  output logic [IDX_W-1:0]    index
);

  logic             hit;
  logic [IDX_W-1:0] hit_pos;

  always_comb begin
    hit     = 1'b0;
    hit_pos = '0;
    for (int p = 0; p < int'(DATA_W); p++) begin
      if (window[p +: PAT_W] == PATTERN) begin
        hit     = 1'b1;
        hit_pos = IDX_W'(p);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      found <= 1'b0;
      index <= '0;
    end else begin
      found <= search && hit;
      if (search && hit) index <= IDX_W'(PAT_W) + hit_pos;
    end
  end

endmodule
