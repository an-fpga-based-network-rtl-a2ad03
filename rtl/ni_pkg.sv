// ni_pkg: constants and types shared by the WDM network interface.
//
// The network interface (NI) connects a host to a two-level wavelength-division
// multiplexed network. Packets move through it as 32-bit words. The numbers that
// come from the design description are: two hierarchy levels, four wavelengths in
// total (a 4-wavelength laser array, C = 4), 8-bit node identifiers, 64-byte control
// packets carrying up to 32 bytes of payload, 8-Kbyte data packets, and the header
// layout {level[31:24], type[23:16], destination[15:8], sender[7:0]} with a second
// word {clock transmit time[31:16], propagation delay[15:0]} in clock packets.
// The packet type codes, the probe type and the sideband bits that travel with a
// word through the FIFOs are this design's own choices.
package ni_pkg;

  localparam int unsigned WORD_W     = 32;
  localparam int unsigned NUM_LEVELS = 2;
  localparam int unsigned NUM_LAMBDA = 4;
  localparam int unsigned LAMBDA_W   = $clog2(NUM_LAMBDA);
  localparam int unsigned ID_W       = 8;
  localparam int unsigned TIME_W     = 16;

  // Packet sizes in 32-bit words: 64-byte control packets, 8-Kbyte data packets.
  localparam int unsigned CTRL_PKT_WORDS     = 16;
  localparam int unsigned CTRL_PAYLOAD_WORDS = 8;
  localparam int unsigned DATA_PKT_WORDS     = 2048;

  // Packet type codes (own encoding; the field position is the documented one).
  typedef enum logic [7:0] {
    PT_CLOCK   = 8'h01,  // clock packet, first packet of every control cycle
    PT_CONTROL = 8'h02,  // control packet with a small payload for another node
    PT_RESV    = 8'h03,  // reservation of one data slot in the next data cycle
    PT_DATA    = 8'h04,  // data packet, sent in a data slot
    PT_PROBE   = 8'h05   // empty control packet sent only to measure the delay
  } pkt_type_e;

  typedef struct packed {
    logic [7:0]      level;
    logic [7:0]      ptype;
    logic [ID_W-1:0] dst;
    logic [ID_W-1:0] src;
  } pkt_hdr_t;

  typedef struct packed {
    logic [TIME_W-1:0] tx_time;     // clock node time at the start of the control cycle
    logic [TIME_W-1:0] prop_delay;  // delay from the clock node to the wavelength partitioner
  } clk_word_t;

  // Word in the host-side FIFOs: data plus end-of-packet flag.
  typedef struct packed {
    logic              last;
    logic [WORD_W-1:0] data;
  } host_word_t;

  // Word on the serial line side: frame delimiters plus data.
  typedef struct packed {
    logic              sof;
    logic              eof;
    logic [WORD_W-1:0] data;
  } line_word_t;

  // Word in a MARC-to-physical-interface FIFO. cmd = 1 is a receiver tuning command
  // whose wavelength index is in w.data[LAMBDA_W-1:0]; otherwise w is sent on the
  // wavelengths set in lambda.
  typedef struct packed {
    logic                  cmd;
    logic [NUM_LAMBDA-1:0] lambda;
    line_word_t            w;
  } phy_tx_word_t;

  function automatic pkt_hdr_t make_hdr(input logic [7:0] level, input pkt_type_e t,
                                        input logic [ID_W-1:0] dst,
                                        input logic [ID_W-1:0] src);
    pkt_hdr_t h;
    h.level = level;
    h.ptype = t;
    h.dst   = dst;
    h.src   = src;
    return h;
  endfunction

endpackage
