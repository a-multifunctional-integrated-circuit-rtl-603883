// router_pkg: types, MAC codes and checksum functions shared by the router IC.
//
// Frame format on a line (this design's own PHY choice): the line idles low,
// bits are NRZI coded (a '1' is a transition, a '0' holds the level), every
// frame starts with PRE_BITS ones (the preamble), then one '0' as start
// delimiter, then whole bytes MSB first, and ends with one extra transition
// if needed so the line is left low for the pull-down.
// The packet layout (type, length, ID-path, payload, CRC-8 with polynomial
// x^8+x^5+x^4+1 as in 1-Wire) and the RTS message kinds (RTSnn, RTSnd with a
// hop-count+CRC3 byte, TRQ) follow the document; the byte values of the
// codes, the CRC3 polynomial and the BN-to-SN path layout are this design's
// choices.
package router_pkg;

  localparam int NPORTS    = 4;
  localparam int PRE_BITS  = 8;     // preamble length in bits
  localparam int BUF_BYTES = 2048;  // internal memory, 2 kB
  localparam int NSEG      = 4;     // buffer segments
  localparam int SEG_BYTES = BUF_BYTES / NSEG;
  localparam int AW        = $clog2(BUF_BYTES);
  localparam int SEGW      = $clog2(NSEG);
  localparam int OFFW      = AW - SEGW;

  // MAC message codes (first byte of a frame)
  localparam logic [7:0] C_RTSNN = 8'hA5;
  localparam logic [7:0] C_RTSND = 8'h5A;
  localparam logic [7:0] C_TRQ   = 8'hC6;
  localparam logic [7:0] C_CTS   = 8'h3C;
  localparam logic [7:0] C_ACK   = 8'h96;
  localparam logic [7:0] C_WAIT  = 8'h69;

  // second byte of a TRQ frame
  localparam logic [7:0] TRQ_T1 = 8'h01;  // timing request
  localparam logic [7:0] TRQ_TS = 8'h02;  // reply, followed by 4 time bytes

  // packet types (first byte of a data frame)
  localparam logic [7:0] PT_BCAST = 8'd0;
  localparam logic [7:0] PT_SN2SN = 8'd1;
  localparam logic [7:0] PT_SN2BN = 8'd2;
  localparam logic [7:0] PT_BN2SN = 8'd3;

  typedef enum logic [2:0] {
    SEG_FREE  = 3'd0,  // empty
    SEG_RXING = 3'd1,  // being written by RX
    SEG_ROUTE = 3'd2,  // valid packet, router must serve it
    SEG_SEND  = 3'd3,  // waiting for TX on port
    SEG_TXING = 3'd4,  // TX is sending it
    SEG_HOST  = 3'd5,  // for the microcontroller
    SEG_FAIL  = 3'd6   // TX gave up
  } seg_state_e;

  typedef struct packed {
    seg_state_e st;
    logic [1:0] port;  // arrival port (ROUTE/HOST) or output port (SEND)
  } seg_status_t;

  typedef struct packed {
    logic          valid;
    logic [SEGW-1:0] seg;
    seg_status_t   val;
  } seg_upd_t;

  // buffer bus: hold req until gnt; rdata is valid the cycle after gnt
  typedef struct packed {
    logic          req;
    logic          we;
    logic [AW-1:0] addr;
    logic [7:0]    wdata;
  } buf_req_t;

  typedef enum logic [1:0] {OWN_NONE, OWN_RX, OWN_CSW, OWN_TS} owner_e;

  // CRC-8, 1-Wire (x^8+x^5+x^4+1, reflected, init 0): one byte, LSB first
  function automatic logic [7:0] crc8_byte(input logic [7:0] crc, input logic [7:0] d);
    logic [7:0] c;
    c = crc;
    for (int i = 0; i < 8; i++) begin
      if ((c[0] ^ d[i]) == 1'b1) c = (c >> 1) ^ 8'h8C;
      else                       c = c >> 1;
    end
    return c;
  endfunction

  // CRC3 (x^3+x+1, init 0, MSB first) over the 5-bit hop count
  function automatic logic [2:0] crc3(input logic [4:0] h);
    logic [2:0] c;
    c = 3'd0;
    for (int i = 4; i >= 0; i--) begin
      if ((c[2] ^ h[i]) == 1'b1) c = {c[1:0], 1'b0} ^ 3'b011;
      else                       c = {c[1:0], 1'b0};
    end
    return c;
  endfunction

  function automatic logic [7:0] hop_byte(input logic [4:0] h);
    return {h, crc3(h)};
  endfunction

  // number of stored bytes (everything but the CRC) from the first three/four
  // header bytes: type, length, ID-path. BN-to-SN path = [R, k, port x R].
  function automatic logic [9:0] pkt_bytes(input logic [7:0] ptype, input logic [7:0] len,
                                           input logic [7:0] r);
    if (ptype == PT_BN2SN) return 10'd2 + 10'(r) + 10'd2 + 10'(len);
    else                   return 10'd3 + 10'(len);
  endfunction

endpackage
