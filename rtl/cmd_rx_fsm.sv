// Command receiver (RX FSM).
//
// The UART carries single bytes, but the PC sets parameters that need a
// code and a value, so this state machine pairs bytes into commands and
// keeps the parameters: [CMD_PRECURSOR][v] sets the transmit pre-emphasis
// (v[4:0]), [CMD_POSTCURSOR][v] the post-emphasis (v[4:0]) and, when
// HAS_BURST is set, [CMD_BURST][v] the burst share in percent (clamped to
// 100). An unknown code byte is ignored and the machine keeps waiting for
// a code. After reset both cursors are 0 and the burst share is 100 %
// (continuous). The parameters themselves, pre/post-emphasis and Burst
// (0-100 %), are those of the source design; the byte format and reset
// values are this design's.
//
// Timing: a parameter changes, and `updated` pulses, the clock after the
// rx_done of its value byte.
module cmd_rx_fsm
  import bert_pkg::*;
#(
  parameter bit HAS_BURST = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] rx_byte,
  input  logic       rx_done,
  output logic [4:0] precursor,
  output logic [4:0] postcursor,
  output logic [6:0] burst_pct,
  output logic       updated,
  output cmd_code_e  last_cmd
);

  typedef enum logic {WAIT_CODE, WAIT_VALUE} state_e;
  state_e    state;
  cmd_code_e code;

  function automatic logic known(input logic [7:0] b);
    return (b == CMD_PRECURSOR) || (b == CMD_POSTCURSOR) ||
           (HAS_BURST && (b == CMD_BURST));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= WAIT_CODE;
      code       <= CMD_PRECURSOR;
      precursor  <= '0;
      postcursor <= '0;
      burst_pct  <= 7'd100;
      updated    <= 1'b0;
      last_cmd   <= CMD_PRECURSOR;
    end else begin
      updated <= 1'b0;
      if (rx_done) begin
        unique case (state)
          WAIT_CODE: if (known(rx_byte)) begin
            code  <= cmd_code_e'(rx_byte);
            state <= WAIT_VALUE;
          end
          WAIT_VALUE: begin
            state    <= WAIT_CODE;
            updated  <= 1'b1;
            last_cmd <= code;
            unique case (code)
              CMD_PRECURSOR:  precursor  <= rx_byte[4:0];
              CMD_POSTCURSOR: postcursor <= rx_byte[4:0];
              CMD_BURST:      burst_pct  <= (rx_byte > 8'd100) ? 7'd100 : rx_byte[6:0];
              default: ;
            endcase
          end
          default: state <= WAIT_CODE;
        endcase
      end
    end
  end

endmodule
