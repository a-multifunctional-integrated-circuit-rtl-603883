// rx_module: packet receiver (RX).
//
// Started by Receiver Sel for an RTSnn (or an RTSnd on the base node), or
// handed a port by the circuit switch in hybrid mode. It takes a free buffer
// segment, answers CTS on the port, and receives the data frame: the first
// header bytes give the number of bytes still to come, which is loaded into
// a down-counter; each byte is written to the segment and folded into the
// CRC-8. When the counter reaches zero the CRC is checked; on success RX
// answers ACK and sets the segment's status to ROUTE so the router serves
// it, otherwise the segment is freed and no ACK is sent (the sender will
// retry). The CRC byte is not stored.
// Timing: one buffer write per received byte (eight bit times apart); a
// frame that does not start within TIMEOUT_BITS bit times after CTS is
// abandoned. ce is the core clock enable from the clock controller.
// The counter, CRC check and status update follow the document; CTS/ACK
// framing, the timeout and the segment allocation are this design's choices.
module rx_module
  import router_pkg::*;
#(
  parameter int TIMEOUT_BITS = 256
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   ce,
  input  logic                   bit_tick,
  input  logic                   start,
  input  logic [1:0]             start_port,
  input  logic                   xfer,        // hybrid hand-over from CSW
  input  logic [1:0]             xfer_port,
  input  logic [NPORTS-1:0]      frame_start,
  input  logic [NPORTS-1:0]      byte_valid,
  input  logic [NPORTS-1:0][7:0] byte_i,
  // segment allocation
  input  logic                   free_avail,
  input  logic [SEGW-1:0]        free_seg,
  output seg_upd_t               upd,
  // buffer
  output buf_req_t               breq,
  input  logic                   bgnt,
  // line
  output logic                   busy,
  output logic [NPORTS-1:0]      ports,
  output logic [NPORTS-1:0]      rearm,
  output logic                   tx_active,
  output logic [1:0]             tx_port,
  output logic                   tx_o,
  output logic                   ev_ok,
  output logic                   ev_err
);
  typedef enum logic [3:0] {R_IDLE, R_GUARD, R_CTS, R_WAITF, R_RECV, R_ACK, R_ABORT, R_DONE} st_e;
  st_e st;
  logic [1:0]      port;
  logic [SEGW-1:0] seg;
  logic [9:0]      idx, total;
  logic [7:0]      crc, ptype, plen;
  logic [9:0]      tmo;
  logic            ser_valid, ser_ready, ser_busy, ser_started;
  logic [7:0]      ser_data;
  logic            bv;
  logic [7:0]      b;

  assign bv = byte_valid[port];
  assign b  = byte_i[port];

  assign ser_valid = ((st == R_CTS) || (st == R_ACK)) && !ser_started;
  assign ser_data  = (st == R_ACK) ? C_ACK : C_CTS;

  mac_serializer u_ser (
    .clk, .rst, .bit_tick(bit_tick && ce), .data_valid(ser_valid), .data(ser_data),
    .data_last(1'b1), .data_ready(ser_ready), .busy(ser_busy), .line_o(tx_o)
  );

  assign busy      = (st != R_IDLE);
  assign ports     = busy ? (NPORTS'(1) << port) : '0;
  assign tx_active = ser_busy;
  assign tx_port   = port;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= R_IDLE; port <= '0; seg <= '0; idx <= '0; total <= '0; crc <= '0;
      ptype <= '0; plen <= '0; tmo <= '0; ser_started <= 1'b0;
      breq <= '0; upd <= '0; rearm <= '0; ev_ok <= 1'b0; ev_err <= 1'b0;
    end else if (ce) begin
      upd.valid <= 1'b0; rearm <= '0; ev_ok <= 1'b0; ev_err <= 1'b0;
      if (bgnt) breq.req <= 1'b0;
      if (ser_ready) ser_started <= 1'b1;
      unique case (st)
        R_IDLE: if (start || xfer) begin
          port <= xfer ? xfer_port : start_port;
          if (free_avail) begin
            seg <= free_seg;
            upd <= '{valid: 1'b1, seg: free_seg, val: '{st: SEG_RXING, port: 2'd0}};
            st <= R_GUARD; ser_started <= 1'b0; tmo <= '0;
          end else st <= R_DONE;
        end
        R_GUARD: if (bit_tick) begin
          // guard time: let the sender's closing bit pass before answering
          tmo <= tmo + 1'b1;
          if (tmo == 10'd2) st <= R_CTS;
        end
        R_CTS: if (ser_started && !ser_busy) begin
          st <= R_WAITF; tmo <= '0; ser_started <= 1'b0;
        end
        R_WAITF: begin
          if (frame_start[port]) begin
            st <= R_RECV; idx <= '0; crc <= '0; total <= 10'h3FF;
          end else if (bit_tick) begin
            tmo <= tmo + 1'b1;
            if (tmo == 10'(TIMEOUT_BITS)) st <= R_ABORT;
          end
        end
        R_RECV: if (bv) begin
          crc <= crc8_byte(crc, b);
          if (idx == 10'd0) ptype <= b;
          if (idx == 10'd1) plen <= b;
          if (idx == 10'd2) total <= pkt_bytes(ptype, plen, b);
          if (idx == total) begin
            rearm[port] <= 1'b1;
            if (crc8_byte(crc, b) == 8'd0) begin
              st <= R_ACK; ser_started <= 1'b0;
            end else begin
              st <= R_ABORT; ev_err <= 1'b1;
            end
          end else begin
            breq <= '{req: 1'b1, we: 1'b1, addr: {seg, OFFW'(idx)}, wdata: b};
          end
          idx <= idx + 1'b1;
        end
        R_ACK: if (ser_started && !ser_busy) begin
          upd <= '{valid: 1'b1, seg: seg, val: '{st: SEG_ROUTE, port: port}};
          ev_ok <= 1'b1;
          st <= R_DONE;
        end
        R_ABORT: begin
          rearm[port] <= 1'b1;
          upd <= '{valid: 1'b1, seg: seg, val: '{st: SEG_FREE, port: 2'd0}};
          st <= R_DONE;
        end
        R_DONE: if (!breq.req) st <= R_IDLE;
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule
