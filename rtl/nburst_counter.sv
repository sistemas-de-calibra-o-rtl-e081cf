// Counter Nburst: limits error counting to the payload of one burst.
//
// In burst mode the transmitter is silent after each burst, so counting
// must stop when the burst's payload has been checked and wait for the
// next delimiter. `start` (one cycle) opens the comparison for `n_words`
// words: `active` is high for exactly n_words cycles, then `done` pulses
// once and the counter idles until the next `start`. With n_words = 0
// only `done` pulses. Freezing the count at the end of a burst follows the
// source design; the per-burst word count is this design's.
//
// Timing: `active` rises the cycle after `start`; `done` pulses the cycle
// after the last active cycle.
module nburst_counter #(
  parameter int unsigned N_W = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N_W-1:0] n_words,
  output logic           active,
  output logic           done
);

  logic [N_W-1:0] left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left   <= '0;
      active <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        left   <= n_words;
        active <= (n_words != '0);
        done   <= (n_words == '0);
      end else if (active) begin
        if (left == N_W'(1)) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
        left <= left - 1'b1;
      end
    end
  end

endmodule
