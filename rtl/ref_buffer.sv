// Reference data buffer.
//
// Keeps the last three reference words (3*DATA_W = 96 bits, the oldest in
// the top bits, first bit in time in the MSB) and cuts from them the
// DATA_W-bit slice that starts `index` bits after the first bit of the
// oldest word. With `index` from the synchronism block this slice lines up
// bit for bit with the received word being checked. The 96-bit buffer with
// a 32-bit output selected by an index is the source design's; the bit
// numbering is this design's.
//
// Timing: the buffer shifts in `ref_word` every clock; `slice` is
// combinational from the buffer and `index`. index must stay within
// 0..2*DATA_W.
module ref_buffer #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned IDX_W  = $clog2(2*DATA_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] ref_word,
  input  logic [IDX_W-1:0]  index,
  output logic [DATA_W-1:0] slice
);

  logic [3*DATA_W-1:0] buf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) buf_q <= '0;
    else        buf_q <= {buf_q[2*DATA_W-1:0], ref_word};
  end

  // Stream bit s of the buffer sits at buf_q[3*DATA_W-1-s].
  logic [3*DATA_W-1:0] shifted;
  assign shifted = buf_q << index;
  assign slice   = shifted[3*DATA_W-1 -: DATA_W];

endmodule
