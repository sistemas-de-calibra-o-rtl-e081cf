// UART receiver, 8 data bits, no parity, one stop bit, LSB first.
//
// A four-state machine (idle, start, data, stop) as in the source design.
// The serial input is first passed through two flip-flops against
// metastability. In idle a low level starts a byte; after 8 ticks (half a
// bit at 16x oversampling) the start bit is checked again in its middle,
// then each data bit is sampled 16 ticks after the previous one and
// shifted in, and the stop bit is sampled last. If the stop bit is high,
// `data` is updated and `rx_done` pulses for one clock; otherwise the byte
// is dropped. The oversampling, the synchroniser and the framing check are
// this design's choices.
module uart_rx (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,      // 16x baud
  input  logic       rxd,
  output logic [7:0] data,
  output logic       rx_done
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;
  state_e      state;
  logic [3:0]  tcnt;
  logic [2:0]  bcnt;
  logic [7:0]  sh;
  logic [1:0]  sync;
  logic        rx;

  assign rx = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync    <= 2'b11;
      state   <= IDLE;
      tcnt    <= '0;
      bcnt    <= '0;
      sh      <= '0;
      data    <= '0;
      rx_done <= 1'b0;
    end else begin
      sync    <= {sync[0], rxd};
      rx_done <= 1'b0;
      unique case (state)
        IDLE: if (!rx) begin
          state <= START;
          tcnt  <= '0;
        end
        START: if (tick) begin
          if (tcnt == 4'd7) begin
            tcnt  <= '0;
            bcnt  <= '0;
            state <= rx ? IDLE : DATA;     // glitch: back to idle
          end else tcnt <= tcnt + 1'b1;
        end
        DATA: if (tick) begin
          if (tcnt == 4'd15) begin
            tcnt <= '0;
            sh   <= {rx, sh[7:1]};
            if (bcnt == 3'd7) state <= STOP;
            bcnt <= bcnt + 1'b1;
          end else tcnt <= tcnt + 1'b1;
        end
        STOP: if (tick) begin
          if (tcnt == 4'd15) begin
            state <= IDLE;
            if (rx) begin
              data    <= sh;
              rx_done <= 1'b1;
            end
          end else tcnt <= tcnt + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
