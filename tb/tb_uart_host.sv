// PC side of the UART link, for the system testbenches.
//
// send_byte() drives 8N1 frames, LSB first, on `txd` with BIT_CLKS clocks
// per bit. A receiver samples `rxd` in the middle of each bit and pushes
// every byte whose stop bit is high into `rx_q`; `frame_errs` counts the
// others.
module tb_uart_host #(
  parameter int BIT_CLKS = 64
) (
  input  logic clk,
  input  logic rxd,
  output logic txd
);
  byte unsigned rx_q[$];
  int           frame_errs = 0;

  initial txd = 1'b1;

  task automatic send_byte(byte unsigned b);
    txd = 1'b0;
    repeat (BIT_CLKS) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      txd = b[i];
      repeat (BIT_CLKS) @(posedge clk);
    end
    txd = 1'b1;
    repeat (BIT_CLKS) @(posedge clk);
  endtask

  initial begin
    byte unsigned b;
    forever begin
      @(posedge clk iff rxd === 1'b0);
      repeat (BIT_CLKS/2) @(posedge clk);
      if (rxd == 1'b0) begin
        for (int i = 0; i < 8; i++) begin
          repeat (BIT_CLKS) @(posedge clk);
          b[i] = rxd;
        end
        repeat (BIT_CLKS) @(posedge clk);
        if (rxd) rx_q.push_back(b);
        else     frame_errs++;
      end
    end
  end
endmodule
