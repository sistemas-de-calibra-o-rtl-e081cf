// Clock-domain crossing for a word with a toggle handshake.
//
// The tester runs in three clock domains (transmit word clock, recovered
// receive word clock, system clock of the UART). A value that changes
// rarely, a window result or a new burst setting, is passed as follows:
// on src_valid the source latches the word and flips a request bit; the
// destination sees the flip through two flip-flops, takes the (by then
// stable) word and pulses dst_valid, and returns the flip as acknowledge
// through two flip-flops to the source. A src_valid while the previous
// word is still in flight is dropped and src_busy is high during that
// time. The source design names the clock domains but not how values
// cross them; this handshake is this design's.
//
// Timing: dst_valid comes 3 to 4 destination clocks after src_valid;
// src_busy falls 2 to 3 source clocks after that.
module cdc_handshake #(
  parameter int unsigned W = 64
) (
  input  logic         src_clk,
  input  logic         src_rst_n,
  input  logic         src_valid,
  input  logic [W-1:0] src_data,
  output logic         src_busy,

  input  logic         dst_clk,
  input  logic         dst_rst_n,
  output logic         dst_valid,
  output logic [W-1:0] dst_data
);

  logic         req_tgl, ack_tgl;
  logic [W-1:0] hold;
  logic [1:0]   ack_sync;
  logic [2:0]   req_sync;

  // source side
  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      req_tgl  <= 1'b0;
      hold     <= '0;
      ack_sync <= '0;
    end else begin
      ack_sync <= {ack_sync[0], ack_tgl};
      if (src_valid && !src_busy) begin
        hold    <= src_data;
        req_tgl <= ~req_tgl;
      end
    end
  end
  assign src_busy = (req_tgl != ack_sync[1]);

  // destination side
  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      req_sync  <= '0;
      ack_tgl   <= 1'b0;
      dst_valid <= 1'b0;
      dst_data  <= '0;
    end else begin
      req_sync  <= {req_sync[1:0], req_tgl};
      dst_valid <= 1'b0;
      if (req_sync[2] != req_sync[1]) begin
        dst_data  <= hold;
        dst_valid <= 1'b1;
        ack_tgl   <= req_sync[1];
      end
    end
  end

endmodule
