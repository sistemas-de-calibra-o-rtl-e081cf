// Shared constants and types of the NG-PON2 bit-error-rate tester.
//
// The tester sends a known 32-bit-wide pattern through a 10 Gbit/s
// transceiver (32 bits per 312.5 MHz word clock) and counts bit errors in
// what comes back. This package holds what both the continuous-mode and the
// burst-mode testers share: the word width, the PRBS-14 polynomial, the
// 16-bit pilot and 32-bit delimiter used to find the start of the pattern,
// the burst preamble word and the UART command and report codes.
//
// The word width, the 2^14-1 pattern length, the 16/32-bit pilot and
// delimiter sizes and the 160-bit preamble follow the source design; the
// actual polynomial, pilot, delimiter and preamble values and the byte
// codes are choices of this implementation. The pilot and delimiter were
// picked so that neither occurs at any other bit position of the stream
// they are embedded in.
package bert_pkg;


  // PRBS x^14 + x^5 + x^3 + x + 1, Fibonacci form, state bits 13..0.
  localparam int unsigned PRBS_N = 14;
  localparam logic [PRBS_N-1:0] PRBS_SEED = 14'h3FFF;

  localparam logic [15:0] PILOT     = 16'hF628;       // continuous-mode marker
  localparam logic [31:0] DELIM     = 32'hB2C50FA1;   // burst delimiter
  localparam logic [31:0] PREAMBLE  = 32'hAAAAAAAA;   // burst preamble word

  // UART command bytes (PC -> FPGA): [code][value]
  typedef enum logic [7:0] {
    CMD_PRECURSOR  = 8'h01,
    CMD_POSTCURSOR = 8'h02,
    CMD_BURST      = 8'h03
  } cmd_code_e;

  // UART report (FPGA -> PC): header, errors[31:0], words[31:0], MSB first
  localparam logic [7:0] REPORT_HDR   = 8'hA5;
  localparam int unsigned REPORT_BYTES = 9;

  // One measurement window as handed from the BERT core to the UART side.
  typedef struct packed {
    logic [31:0] errors;   // bit errors seen in the window
    logic [31:0] words;    // 32-bit words compared in the window
  } bert_result_t;

  // One step of the PRBS-14 LFSR: returns next state; output bit is s[13].
  function automatic logic [PRBS_N-1:0] prbs_step(input logic [PRBS_N-1:0] s);
    return {s[PRBS_N-2:0], s[13] ^ s[4] ^ s[2] ^ s[0]};
  endfunction

  // Length in words of the burst in a frame of frame_words words for a
  // burst share of pct percent: preamble, delimiter and at least one
  // payload word, or nothing at all for 0 %.
  function automatic int unsigned burst_words(input logic [6:0] pct,
                                              input int unsigned frame_words,
                                              input int unsigned pre_words);
    int unsigned p, bw;
    p  = (pct > 7'd100) ? 100 : int'(pct);
    bw = (frame_words * p) / 100;
    if (p == 0)              return 0;
    if (bw < pre_words + 2)  return pre_words + 2;
    return bw;
  endfunction

endpackage
