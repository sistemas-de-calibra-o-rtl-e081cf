// UART transmitter, 8 data bits, no parity, one stop bit, LSB first.
//
// A shift register loaded in parallel and shifted out one bit per 16
// ticks, driven by the same four states as the receiver (idle, start,
// data, stop). `start` with a byte on `data` is accepted in idle only;
// `busy` is high from the next clock until the stop bit has been sent, and
// `tx_done` then pulses for one clock. The line idles high. The structure
// follows the source design; the oversampled timing is this design's.
module uart_tx (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,      // 16x baud
  input  logic       start,
  input  logic [7:0] data,
  output logic       txd,
  output logic       busy,
  output logic       tx_done
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;
  state_e     state;
  logic [3:0] tcnt;
  logic [2:0] bcnt;
  logic [7:0] sh;

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      tcnt    <= '0;
      bcnt    <= '0;
      sh      <= '0;
      txd     <= 1'b1;
      tx_done <= 1'b0;
    end else begin
      tx_done <= 1'b0;
      unique case (state)
        IDLE: begin
          txd <= 1'b1;
          if (start) begin
            sh    <= data;
            state <= START;
            tcnt  <= '0;
            txd   <= 1'b0;
          end
        end
        START: if (tick) begin
          if (tcnt == 4'd15) begin
            tcnt  <= '0;
            bcnt  <= '0;
            state <= DATA;
            txd   <= sh[0];
          end else tcnt <= tcnt + 1'b1;
        end
        DATA: if (tick) begin
          if (tcnt == 4'd15) begin
            tcnt <= '0;
            bcnt <= bcnt + 1'b1;
            if (bcnt == 3'd7) begin
              state <= STOP;
              txd   <= 1'b1;
            end else begin
              txd <= sh[1];
              sh  <= {1'b0, sh[7:1]};
            end
          end else tcnt <= tcnt + 1'b1;
        end
        STOP: if (tick) begin
          if (tcnt == 4'd15) begin
            state   <= IDLE;
            tx_done <= 1'b1;
          end else tcnt <= tcnt + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
