// hsio_pkg: constants shared by the LVDS and transceiver evaluation designs.
// The packet size (2048 bits), the alignment character K28.5 (byte BC, 10-bit
// running-disparity-negative code 17C) and the 50 MHz reference clock come from
// the evaluation set-up; the reset-sequencing and lock-time constants are this
// design's own choices.
package hsio_pkg;
  // Size of one counted packet, in bits.
  localparam int unsigned PACKET_BITS = 2048;
  // K28.5 comma: data byte and its two 10-bit codes (bit 0 = code bit 'a',
  // which is sent first on the line).
  localparam logic [7:0] K28_5      = 8'hBC;
  localparam logic [9:0] COMMA_RDN  = 10'h17C;
  localparam logic [9:0] COMMA_RDP  = 10'h283;
  // 10-bit code group and the status that travels with a decoded byte.
  typedef struct packed {
    logic [7:0] data;
    logic       k;        // control character
    logic       errdetect;// not a valid code group
    logic       disperr;  // running disparity violated
    logic       pattdet;  // the word was the alignment pattern
  } rx_byte_t;
  // Reset controller state.
  typedef enum logic [2:0] {
    RST_PLL_PD, RST_WAIT_LOCK, RST_TX_ANALOG, RST_TX_DIGITAL, RST_DONE
  } tx_rst_state_t;
  typedef enum logic [1:0] {
    RX_ANALOG, RX_WAIT_LTD, RX_DIGITAL_DONE
  } rx_rst_state_t;
  // Master send-data state: alignment characters or the count sequence.
  typedef enum logic {SEND_SYNC, SEND_COUNT} send_state_t;
endpackage
