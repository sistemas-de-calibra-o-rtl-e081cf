// PRBS-14 word generator.
//
// A 14-stage linear-feedback shift register (x^14 + x^5 + x^3 + x + 1,
// maximal length, pattern period 2^14-1 = 16383 bits) advanced DATA_W steps
// per clock, so one clock yields DATA_W consecutive bits of the sequence.
// The first bit in time is placed in data[DATA_W-1] (MSB first, the order
// the serializer sends). The pattern length 2^14-1 is that of the source
// design; the polynomial, seed and bit order are this design's choice.
//
// Interface and timing: `data` is a register. One cycle after `restart`
// it holds the first DATA_W bits after the seed; every cycle with `en`
// high it moves to the next DATA_W bits. `restart` wins over `en`. Reset
// acts like `restart`.
module prbs14_gen
  import bert_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              restart,
  input  logic              en,
  output logic [DATA_W-1:0] data
);

  logic [PRBS_N-1:0] state;

  // Bits of one word starting at state s, and the state after them.
  function automatic logic [DATA_W+PRBS_N-1:0] run_word(input logic [PRBS_N-1:0] s);
    logic [DATA_W-1:0] w;
    logic [PRBS_N-1:0] t;
    t = s;
    for (int i = DATA_W-1; i >= 0; i--) begin
      w[i] = t[PRBS_N-1];
      t    = prbs_step(t);
    end
    return {w, t};
  endfunction

  logic [DATA_W+PRBS_N-1:0] from_seed, from_state;
  assign from_seed  = run_word(PRBS_SEED);
  assign from_state = run_word(state);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {data, state} <= from_seed;
    end else if (restart) begin
      {data, state} <= from_seed;
    end else if (en) begin
      {data, state} <= from_state;
    end
  end

endmodule
