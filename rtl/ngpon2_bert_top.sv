// NG-PON2 transceiver bit-error-rate tester, top level.
//
// Holds the two testers side by side: the continuous-mode tester (the
// downstream case: an uninterrupted 10 Gbit/s PRBS stream marked by a
// 16-bit pilot once per frame) and the burst-mode tester (the upstream
// case: one burst per 125 us frame with preamble, 32-bit delimiter and
// PRBS payload, its length set in percent from the PC). Each has its own
// UART link to the PC, its own transceiver data ports and its own
// pre/post-cursor emphasis outputs. The transceivers themselves (FPGA
// multi-gigabit SerDes with PLL and clock-data recovery) are not part of
// this RTL: the c_* and b_* data ports connect to their 32-bit parallel
// TX/RX interfaces, clocked by TXUSRCLK2 (clk_tx) and RXUSRCLK2 (clk_rx).
// All three clocks and their active-low resets are shared by the two
// testers. The pairing of the two testers in one top is this design's.
module ngpon2_bert_top
  import bert_pkg::*;
#(
  parameter int unsigned CLK_FREQ     = 200_000_000,  // clk_sys frequency
  parameter int unsigned BAUD         = 19200,        // PC link
  parameter int unsigned FRAME_WORDS  = 512,          // continuous-mode frame
  parameter int unsigned FRAME_CYCLES = 39062,        // 125 us burst frame
  parameter int unsigned PRE_WORDS    = 5,            // 160-bit preamble
  parameter int unsigned RES_WORDS    = 67108864      // words per BER window
) (
  input  logic        clk_sys,
  input  logic        rst_sys_n,
  input  logic        clk_tx,
  input  logic        rst_tx_n,
  input  logic        clk_rx,
  input  logic        rst_rx_n,

  // continuous-mode tester
  output logic [31:0] c_tx_data,
  input  logic [31:0] c_rx_data,
  output logic [4:0]  c_txprecursor,
  output logic [4:0]  c_txpostcursor,
  input  logic        c_uart_rxd,
  output logic        c_uart_txd,
  output logic        c_locked,
  output logic        c_comparing,

  // burst-mode tester
  output logic [31:0] b_tx_data,
  output logic        b_tx_burst_on,
  input  logic [31:0] b_rx_data,
  output logic [4:0]  b_txprecursor,
  output logic [4:0]  b_txpostcursor,
  input  logic        b_uart_rxd,
  output logic        b_uart_txd,
  output logic        b_busy,
  output logic        b_comparing,
  output logic        b_burst_done
);

  bert_system_cont #(.CLK_FREQ(CLK_FREQ), .BAUD(BAUD), .FRAME_WORDS(FRAME_WORDS),
                     .RES_WORDS(RES_WORDS)) u_cont (
    .clk_sys(clk_sys), .rst_sys_n(rst_sys_n), .clk_tx(clk_tx), .rst_tx_n(rst_tx_n),
    .clk_rx(clk_rx), .rst_rx_n(rst_rx_n),
    .tx_data(c_tx_data), .rx_data(c_rx_data),
    .txprecursor(c_txprecursor), .txpostcursor(c_txpostcursor),
    .uart_rxd(c_uart_rxd), .uart_txd(c_uart_txd),
    .locked(c_locked), .comparing(c_comparing)
  );

  bert_system_burst #(.CLK_FREQ(CLK_FREQ), .BAUD(BAUD), .FRAME_CYCLES(FRAME_CYCLES),
                      .PRE_WORDS(PRE_WORDS), .RES_WORDS(RES_WORDS)) u_burst (
    .clk_sys(clk_sys), .rst_sys_n(rst_sys_n), .clk_tx(clk_tx), .rst_tx_n(rst_tx_n),
    .clk_rx(clk_rx), .rst_rx_n(rst_rx_n),
    .tx_data(b_tx_data), .tx_burst_on(b_tx_burst_on), .rx_data(b_rx_data),
    .txprecursor(b_txprecursor), .txpostcursor(b_txpostcursor),
    .uart_rxd(b_uart_rxd), .uart_txd(b_uart_txd),
    .busy(b_busy), .comparing(b_comparing), .burst_done(b_burst_done)
  );

endmodule
