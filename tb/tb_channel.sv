// Behavioural model of the optical/electrical loop for the testbenches.
//
// Stands in for transceiver TX -> fibre -> transceiver RX: the received
// 32-bit words carry the transmitted stream delayed by SLIP bits (the
// unknown word alignment of a real receiver) plus one word of latency.
// While `flip` is high, bit 0 of the word handed out in that cycle is
// inverted, which models one bit error. Not synthesizable intent; it is a
// test fixture only.
module tb_channel #(
  parameter int SLIP = 0
) (
  input  logic        clk,
  input  logic [31:0] tx,
  input  logic        flip,
  output logic [31:0] rx
);
  logic [31:0] prev, cur;
  logic [63:0] win;
  initial begin prev = '0; cur = '0; end
  always @(posedge clk) begin
    prev <= cur;
    cur  <= tx;
  end
  assign win = {prev, cur};
  assign rx  = win[SLIP +: 32] ^ {31'd0, flip};
endmodule
