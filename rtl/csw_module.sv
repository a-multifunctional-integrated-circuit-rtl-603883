// csw_module: circuit switching (Circuit SW): CSW Control, Packet Length
// Control and Switch in one module.
//
// On an RTSnd from port i the hop-count byte is checked (CRC3) and
// evaluated against the node's limits:
//   hop-count >= Maximum hop-count            -> get the packet (hybrid):
//                                                 port i is handed to RX;
//   near-node line busy, hop >= threshold     -> get the packet (hybrid);
//   near-node line busy, hop <  threshold     -> release (the sender retries);
//   otherwise                                 -> extend the circuit: RTSnd
//                                                 with hop+1 towards the
//                                                 near-node, WAIT back on i.
// While the circuit is built the Switch runs backwards (near-node line copied
// onto port i) so WAIT and CTS messages from further up reach the sender.
// When CTS passes, the switch turns forwards (port i copied onto the
// near-node line) for the data frame; Packet Length Control decodes the
// passing frame's header and counts its bytes to find its end; the switch
// then turns backwards again for the ACK, after which the path is released.
// Nothing is buffered. Every copy is retimed by one system clock. A step
// that gets no answer within RESP_BITS bit times releases the path.
// Behaviour after the document; the message codes, guard times of two bit
// times around each direction change and the timeouts are this design's.
module csw_module
  import router_pkg::*;
#(
  parameter int RESP_BITS = 160,
  parameter int DATA_BITS = 4096
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   ce,
  input  logic                   bit_tick,
  input  logic [4:0]             max_hop,
  input  logic [4:0]             hop_thr,
  input  logic [1:0]             near_port,
  input  logic                   rx_busy,
  input  logic                   start,
  input  logic [1:0]             start_port,
  input  logic [7:0]             hop_in,
  input  logic [NPORTS-1:0]      line_free,
  input  logic [NPORTS-1:0]      line_s,
  input  logic [NPORTS-1:0]      frame_start,
  input  logic [NPORTS-1:0]      byte_valid,
  input  logic [NPORTS-1:0][7:0] byte_i,
  output logic                   busy,
  output logic [NPORTS-1:0]      ports,
  output logic [NPORTS-1:0]      claim,
  output logic [NPORTS-1:0]      rearm,
  output logic [NPORTS-1:0]      xfer,
  output logic [NPORTS-1:0]      sw_o,
  output logic [NPORTS-1:0]      sw_oe,
  output logic                   ev_forward,
  output logic                   ev_hybrid,
  output logic                   ev_release,
  output logic                   ev_done
);
  typedef enum logic [3:0] {C_IDLE, C_EVAL, C_SEND, C_BACK, C_GAP1, C_FWD, C_GAP2,
                            C_BACK2, C_GAP3, C_HYB, C_END} st_e;
  st_e st;
  logic [1:0]  pi, pn;
  logic [7:0]  hop;
  logic [12:0] tmo;
  logic [9:0]  idx, total;
  logic [7:0]  ptype, plen;
  logic        f_started, b_started;
  logic        f_ready, b_ready, f_busy, b_busy, f_o, b_o;
  logic [4:0]  h;
  logic        f_second;  // forward RTSnd: code byte sent, hop byte next
  logic        handed;    // port i was handed to RX

  assign h = hop[7:3];

  mac_serializer u_fwd (
    .clk, .rst, .bit_tick(bit_tick && ce), .data_valid(st == C_SEND && !f_started),
    .data(f_second ? hop_byte(h + 5'd1) : C_RTSND), .data_last(f_second), .data_ready(f_ready),
    .busy(f_busy), .line_o(f_o)
  );
  mac_serializer u_back (
    .clk, .rst, .bit_tick(bit_tick && ce), .data_valid(st == C_SEND && !b_started),
    .data(C_WAIT), .data_last(1'b1), .data_ready(b_ready),
    .busy(b_busy), .line_o(b_o)
  );

  assign busy = (st != C_IDLE);

  always_comb begin
    ports = '0;
    if (st != C_IDLE && !handed) ports[pi] = 1'b1;
    if (st inside {C_SEND, C_BACK, C_GAP1, C_FWD, C_GAP2, C_BACK2, C_GAP3} ||
        (st == C_END && f_second)) ports[pn] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= C_IDLE; pi <= '0; pn <= '0; hop <= '0; tmo <= '0; idx <= '0; total <= '0;
      ptype <= '0; plen <= '0; f_started <= 1'b0; b_started <= 1'b0; f_second <= 1'b0; handed <= 1'b0;
      claim <= '0; rearm <= '0; xfer <= '0; sw_o <= '0; sw_oe <= '0;
      ev_forward <= 1'b0; ev_hybrid <= 1'b0; ev_release <= 1'b0; ev_done <= 1'b0;
    end else if (ce) begin
      claim <= '0; rearm <= '0; xfer <= '0;
      ev_forward <= 1'b0; ev_hybrid <= 1'b0; ev_release <= 1'b0; ev_done <= 1'b0;
      // switch and message drivers
      sw_o <= '0; sw_oe <= '0;
      unique case (st)
        C_SEND: begin
          sw_oe[pn] <= f_busy; sw_o[pn] <= f_o;
          sw_oe[pi] <= b_busy; sw_o[pi] <= b_o;
        end
        C_BACK, C_GAP1, C_BACK2, C_GAP3: begin sw_oe[pi] <= 1'b1; sw_o[pi] <= line_s[pn]; end
        C_FWD, C_GAP2:                   begin sw_oe[pn] <= 1'b1; sw_o[pn] <= line_s[pi]; end
        default: ;
      endcase

      if (bit_tick && st != C_IDLE && st != C_EVAL && st != C_SEND) tmo <= tmo + 1'b1;

      unique case (st)
        C_IDLE: if (start) begin
          pi <= start_port; hop <= hop_in; pn <= near_port; st <= C_EVAL; tmo <= '0; handed <= 1'b0; f_second <= 1'b0;
        end
        C_EVAL: if (tmo != 13'd2) begin
          // guard time: let the sender's closing bit pass before answering
          if (bit_tick) tmo <= tmo + 1'b1;
        end else begin
          tmo <= '0;
          if (crc3(h) != hop[2:0]) begin st <= C_END; ev_release <= 1'b1; end
          else if (h >= max_hop) st <= C_HYB;
          else if (!line_free[pn] || pn == pi) begin
            if (h >= hop_thr) st <= C_HYB;
            else begin st <= C_END; ev_release <= 1'b1; end
          end else begin
            claim[pn] <= 1'b1; st <= C_SEND; ev_forward <= 1'b1;
            f_started <= 1'b0; b_started <= 1'b0; f_second <= 1'b0;
          end
        end
        C_HYB: begin
          if (!rx_busy) begin xfer[pi] <= 1'b1; ev_hybrid <= 1'b1; handed <= 1'b1; end
          else ev_release <= 1'b1;
          st <= C_END;
        end
        C_SEND: begin
          if (f_ready) begin
            if (!f_second) f_second <= 1'b1;
            else f_started <= 1'b1;
          end
          if (b_ready) b_started <= 1'b1;
          if (f_started && b_started && !f_busy && !b_busy) begin st <= C_BACK; tmo <= '0; end
        end
        C_BACK: begin
          if (byte_valid[pn]) begin
            rearm[pn] <= 1'b1;
            if (byte_i[pn] == C_CTS) begin st <= C_GAP1; tmo <= '0; end
            else if (byte_i[pn] == C_WAIT) tmo <= '0;
          end else if (tmo == 13'(RESP_BITS)) begin st <= C_END; ev_release <= 1'b1; end
        end
        C_GAP1: if (tmo == 13'd2) begin st <= C_FWD; tmo <= '0; idx <= '0; total <= 10'h3FF; end
        C_FWD: begin
          if (frame_start[pi]) idx <= '0;
          if (byte_valid[pi]) begin
            if (idx == 10'd0) ptype <= byte_i[pi];
            if (idx == 10'd1) plen <= byte_i[pi];
            if (idx == 10'd2) total <= pkt_bytes(ptype, plen, byte_i[pi]);
            idx <= idx + 1'b1;
            if (idx == total) begin rearm[pi] <= 1'b1; st <= C_GAP2; tmo <= '0; end
          end else if (tmo == 13'(DATA_BITS)) begin st <= C_END; ev_release <= 1'b1; end
        end
        C_GAP2: if (tmo == 13'd2) begin st <= C_BACK2; tmo <= '0; end
        C_BACK2: begin
          if (byte_valid[pn]) begin
            rearm[pn] <= 1'b1;
            if (byte_i[pn] == C_ACK) begin st <= C_GAP3; tmo <= '0; end
          end else if (tmo == 13'(RESP_BITS)) begin st <= C_END; ev_release <= 1'b1; end
        end
        C_GAP3: if (tmo == 13'd2) begin st <= C_END; ev_done <= 1'b1; end
        C_END: begin
          if (!handed) rearm[pi] <= 1'b1;
          if (f_second) rearm[pn] <= 1'b1;
          st <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
