// UART baud-rate block.
//
// Divides the system clock down to a tick at 16 times the baud rate; the
// receiver samples and the transmitter times its bits on these ticks. The
// divisor is CLK_FREQ / (16 * BAUD), rounded to the nearest integer, so the
// rate error is below 0.1 % at 200 MHz and 19200 baud. 19200 baud is the
// rate of the source design's PC link; the 16x oversampling and the
// 200 MHz default clock are this design's.
//
// Timing: `tick` is high for one clock every DIV clocks.
module uart_baud_gen #(
  parameter int unsigned CLK_FREQ = 200_000_000,
  parameter int unsigned BAUD     = 19200
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int unsigned DIV = (CLK_FREQ + 8*BAUD) / (16*BAUD);
  localparam int unsigned CW  = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

endmodule
