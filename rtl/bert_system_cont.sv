// Continuous-mode BERT system: tester core plus PC control link.
//
// Ties the continuous BERT core to the UART link to the PC. The core runs
// on the transceiver word clocks (clk_tx = TXUSRCLK2, clk_rx = RXUSRCLK2,
// 312.5 MHz for 32 bits at 10 Gbit/s); the link runs on clk_sys. Each
// window result crosses to clk_sys through a toggle handshake and is sent
// as a 9-byte report. Commands from the PC set the transmitter's pre- and
// post-cursor emphasis, which leave on txprecursor/txpostcursor for the
// transceiver's TXPRECURSOR/TXPOSTCURSOR pins (treated as static settings,
// so they are not resynchronised). `locked` and `comparing` are status
// lines for LEDs.
//
// The set of blocks (baud-rate block, UART receiver and transmitter, RX
// and TX state machines, BERT core, emphasis outputs) follows the source
// design; the clock-domain crossing and the message formats are this
// design's.
module bert_system_cont
  import bert_pkg::*;
#(
  parameter int unsigned CLK_FREQ    = 200_000_000,
  parameter int unsigned BAUD        = 19200,
  parameter int unsigned FRAME_WORDS = 512,
  parameter int unsigned RES_WORDS   = 67108864
) (
  input  logic        clk_sys,
  input  logic        rst_sys_n,
  input  logic        clk_tx,
  input  logic        rst_tx_n,
  input  logic        clk_rx,
  input  logic        rst_rx_n,

  output logic [31:0] tx_data,
  input  logic [31:0] rx_data,
  output logic [4:0]  txprecursor,
  output logic [4:0]  txpostcursor,

  input  logic        uart_rxd,
  output logic        uart_txd,

  output logic        locked,
  output logic        comparing
);

  // ---------------- BERT core ----------------
  logic         res_valid;
  bert_result_t res;
  bert_cont #(.DATA_W(32), .FRAME_WORDS(FRAME_WORDS), .RES_WORDS(RES_WORDS)) u_core (
    .clk_tx(clk_tx), .rst_tx_n(rst_tx_n), .tx_data(tx_data),
    .clk_rx(clk_rx), .rst_rx_n(rst_rx_n), .rx_data(rx_data),
    .locked(locked), .comparing(comparing), .res_valid(res_valid), .res(res)
  );

  // ---------------- result to system clock ----------------
  logic         res_sys_valid, res_busy;
  bert_result_t res_sys;
  cdc_handshake #(.W($bits(bert_result_t))) u_res_cdc (
    .src_clk(clk_rx), .src_rst_n(rst_rx_n), .src_valid(res_valid), .src_data(res),
    .src_busy(res_busy),
    .dst_clk(clk_sys), .dst_rst_n(rst_sys_n), .dst_valid(res_sys_valid), .dst_data(res_sys)
  );

  // ---------------- UART link ----------------
  logic       tick, rx_done, tx_start, tx_busy, tx_done, rep_busy, upd;
  logic [7:0] rx_byte, tx_byte, dropped;
  logic [6:0] burst_unused;
  cmd_code_e  last_cmd;

  uart_baud_gen #(.CLK_FREQ(CLK_FREQ), .BAUD(BAUD)) u_baud (
    .clk(clk_sys), .rst_n(rst_sys_n), .tick(tick)
  );
  uart_rx u_urx (
    .clk(clk_sys), .rst_n(rst_sys_n), .tick(tick), .rxd(uart_rxd),
    .data(rx_byte), .rx_done(rx_done)
  );
  cmd_rx_fsm #(.HAS_BURST(1'b0)) u_cmd (
    .clk(clk_sys), .rst_n(rst_sys_n), .rx_byte(rx_byte), .rx_done(rx_done),
    .precursor(txprecursor), .postcursor(txpostcursor), .burst_pct(burst_unused),
    .updated(upd), .last_cmd(last_cmd)
  );
  report_tx_fsm u_rep (
    .clk(clk_sys), .rst_n(rst_sys_n), .send(res_sys_valid), .result(res_sys),
    .tx_start(tx_start), .tx_byte(tx_byte), .tx_done(tx_done),
    .busy(rep_busy), .dropped(dropped)
  );
  uart_tx u_utx (
    .clk(clk_sys), .rst_n(rst_sys_n), .tick(tick), .start(tx_start), .data(tx_byte),
    .txd(uart_txd), .busy(tx_busy), .tx_done(tx_done)
  );

endmodule
