// Report sender (TX FSM).
//
// At the end of each measurement window the BERT result (32-bit error
// total and 32-bit count of compared words) must reach the PC over a
// byte-wide UART. On `send` this machine latches a REPORT_BYTES-byte
// message, REPORT_HDR then errors and words, each most significant byte
// first, and feeds it to the UART transmitter one byte at a time, waiting
// for tx_done after each. The PC derives the BER as errors / (32 * words).
// A `send` that arrives while a message is still going out is dropped and
// counted in `dropped`. Serialising multi-byte values through the 8-bit
// UART follows the source design; the message layout is this design's.
//
// Timing: tx_start pulses the clock after `send`, and again the clock
// after each tx_done until all bytes are out; `busy` covers the message.
module report_tx_fsm
  import bert_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         send,
  input  bert_result_t result,
  output logic         tx_start,
  output logic [7:0]   tx_byte,
  input  logic         tx_done,
  output logic         busy,
  output logic [7:0]   dropped
);

  localparam int unsigned MSG_W = 8*REPORT_BYTES;

  typedef enum logic [1:0] {IDLE, LOAD, WAIT_DONE} state_e;
  state_e          state;
  logic [MSG_W-1:0] msg;
  logic [3:0]       left;

  assign busy    = (state != IDLE);
  assign tx_byte = msg[MSG_W-1 -: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      msg      <= '0;
      left     <= '0;
      tx_start <= 1'b0;
      dropped  <= '0;
    end else begin
      tx_start <= 1'b0;
      if (send && state != IDLE && dropped != 8'hFF) dropped <= dropped + 1'b1;
      unique case (state)
        IDLE: if (send) begin
          msg   <= {REPORT_HDR, result.errors, result.words};
          left  <= 4'(REPORT_BYTES);
          state <= LOAD;
        end
        LOAD: begin
          tx_start <= 1'b1;
          state    <= WAIT_DONE;
        end
        WAIT_DONE: if (tx_done) begin
          msg  <= msg << 8;
          left <= left - 1'b1;
          state <= (left == 4'd1) ? IDLE : LOAD;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
