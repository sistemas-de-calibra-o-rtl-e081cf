// Burst-mode BERT system: burst tester core plus PC control link.
//
// Same arrangement as the continuous system, with the burst BERT core and
// the extra Burst (%) command. The burst share set from the PC lives in
// the clk_sys domain; whenever it differs from the value last sent to a
// word-clock domain it is sent again through a toggle handshake, once to
// the transmit side (burst length of the next frame) and once to the
// receive side (words to compare per burst). Both sides start at 100 %.
// tx_burst_on marks the words of a burst (a laser enable); `busy` and
// `comparing` show the state of the counter block, as LED status lines.
//
// The Burst parameter and its 0-100 % range follow the source design; the
// clock-domain crossing, reset values and message formats are this
// design's.
module bert_system_burst
  import bert_pkg::*;
#(
  parameter int unsigned CLK_FREQ     = 200_000_000,
  parameter int unsigned BAUD         = 19200,
  parameter int unsigned FRAME_CYCLES = 39062,
  parameter int unsigned PRE_WORDS    = 5,
  parameter int unsigned RES_WORDS    = 67108864
) (
  input  logic        clk_sys,
  input  logic        rst_sys_n,
  input  logic        clk_tx,
  input  logic        rst_tx_n,
  input  logic        clk_rx,
  input  logic        rst_rx_n,

  output logic [31:0] tx_data,
  output logic        tx_burst_on,
  input  logic [31:0] rx_data,
  output logic [4:0]  txprecursor,
  output logic [4:0]  txpostcursor,

  input  logic        uart_rxd,
  output logic        uart_txd,

  output logic        busy,
  output logic        comparing,
  output logic        burst_done
);

  // ---------------- UART link and parameters ----------------
  logic       tick, rx_done, tx_start, tx_busy, tx_done, rep_busy, upd;
  logic [7:0] rx_byte, tx_byte, dropped;
  logic [6:0] pct_sys;
  cmd_code_e  last_cmd;

  uart_baud_gen #(.CLK_FREQ(CLK_FREQ), .BAUD(BAUD)) u_baud (
    .clk(clk_sys), .rst_n(rst_sys_n), .tick(tick)
  );
  uart_rx u_urx (
    .clk(clk_sys), .rst_n(rst_sys_n), .tick(tick), .rxd(uart_rxd),
    .data(rx_byte), .rx_done(rx_done)
  );
  cmd_rx_fsm #(.HAS_BURST(1'b1)) u_cmd (
    .clk(clk_sys), .rst_n(rst_sys_n), .rx_byte(rx_byte), .rx_done(rx_done),
    .precursor(txprecursor), .postcursor(txpostcursor), .burst_pct(pct_sys),
    .updated(upd), .last_cmd(last_cmd)
  );

  // ---------------- burst share to the word-clock domains ----------------
  logic [6:0] sent_tx, sent_rx, pct_tx, pct_rx, pct_tx_new, pct_rx_new;
  logic       go_tx, go_rx, busy_tx, busy_rx, new_tx, new_rx;
  assign go_tx = (pct_sys != sent_tx) && !busy_tx;
  assign go_rx = (pct_sys != sent_rx) && !busy_rx;

  always_ff @(posedge clk_sys or negedge rst_sys_n) begin
    if (!rst_sys_n) begin
      sent_tx <= 7'd100;
      sent_rx <= 7'd100;
    end else begin
      if (go_tx) sent_tx <= pct_sys;
      if (go_rx) sent_rx <= pct_sys;
    end
  end

  cdc_handshake #(.W(7)) u_pct_tx_cdc (
    .src_clk(clk_sys), .src_rst_n(rst_sys_n), .src_valid(go_tx), .src_data(pct_sys),
    .src_busy(busy_tx),
    .dst_clk(clk_tx), .dst_rst_n(rst_tx_n), .dst_valid(new_tx), .dst_data(pct_tx_new)
  );
  cdc_handshake #(.W(7)) u_pct_rx_cdc (
    .src_clk(clk_sys), .src_rst_n(rst_sys_n), .src_valid(go_rx), .src_data(pct_sys),
    .src_busy(busy_rx),
    .dst_clk(clk_rx), .dst_rst_n(rst_rx_n), .dst_valid(new_rx), .dst_data(pct_rx_new)
  );

  always_ff @(posedge clk_tx or negedge rst_tx_n) begin
    if (!rst_tx_n)   pct_tx <= 7'd100;
    else if (new_tx) pct_tx <= pct_tx_new;
  end
  always_ff @(posedge clk_rx or negedge rst_rx_n) begin
    if (!rst_rx_n)   pct_rx <= 7'd100;
    else if (new_rx) pct_rx <= pct_rx_new;
  end

  // ---------------- BERT core ----------------
  logic         res_valid, tx_frame_start;
  bert_result_t res;
  bert_burst #(.DATA_W(32), .FRAME_CYCLES(FRAME_CYCLES), .PRE_WORDS(PRE_WORDS),
               .RES_WORDS(RES_WORDS)) u_core (
    .clk_tx(clk_tx), .rst_tx_n(rst_tx_n), .burst_pct_tx(pct_tx),
    .tx_data(tx_data), .tx_burst_on(tx_burst_on), .tx_frame_start(tx_frame_start),
    .clk_rx(clk_rx), .rst_rx_n(rst_rx_n), .burst_pct_rx(pct_rx), .rx_data(rx_data),
    .busy(busy), .comparing(comparing), .burst_done(burst_done),
    .res_valid(res_valid), .res(res)
  );

  // ---------------- result to system clock and PC ----------------
  logic         res_sys_valid, res_busy;
  bert_result_t res_sys;
  cdc_handshake #(.W($bits(bert_result_t))) u_res_cdc (
    .src_clk(clk_rx), .src_rst_n(rst_rx_n), .src_valid(res_valid), .src_data(res),
    .src_busy(res_busy),
    .dst_clk(clk_sys), .dst_rst_n(rst_sys_n), .dst_valid(res_sys_valid), .dst_data(res_sys)
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
