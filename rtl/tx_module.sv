// tx_module: transmitter (TX).
//
// It serves buffer segments whose status is SEND, lowest segment first. It
// reads the packet header to learn the frame length and chooses the switching
// mode: an SN-to-BN packet on a sensor node whose maximum hop-count is above
// one is sent by circuit switching (RTSnd with hop-count 1 and its CRC3),
// every other packet by packet switching (RTSnn). When the line is free it
// sends the RTS, then waits for the answer: CTS starts the data frame, WAIT
// (sent by intermediate nodes while a circuit is being built) restarts the
// wait, silence for RESP_BITS bit times or a missing ACK after the frame
// counts as a failed attempt. Failed attempts are retried after a back-off
// that grows with the attempt number and differs per node ID; after
// MAX_TRY attempts the segment is marked FAIL. The data frame is the stored
// packet followed by a CRC-8 computed on the fly, read from the buffer one
// byte ahead of the shift register.
// RTSnn/RTSnd generation, the CTS/ACK handshake and the CRC follow the
// document; the back-off, retry limit and timeouts are this design's choices.
module tx_module
  import router_pkg::*;
#(
  parameter int RESP_BITS = 160,
  parameter int MAX_TRY   = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   ce,
  input  logic                   bit_tick,
  input  logic                   is_bn,
  input  logic [4:0]             max_hop,
  input  logic [7:0]             node_id,
  input  seg_status_t [NSEG-1:0] seg_st,
  input  logic [NPORTS-1:0]      line_free,
  input  logic [NPORTS-1:0]      resp_valid,
  input  logic [NPORTS-1:0][7:0] resp_code,
  output seg_upd_t               upd,
  output buf_req_t               breq,
  input  logic                   bgnt,
  input  logic [7:0]             brdata,
  output logic                   busy,
  output logic                   tx_active,
  output logic [1:0]             tx_port,
  output logic                   tx_o,
  output logic                   ev_sent,
  output logic                   ev_fail,
  output logic                   ev_retry,
  output logic                   ev_wait,
  output logic                   ev_circuit
);
  typedef enum logic [3:0] {T_IDLE, T_H0, T_H1, T_H2, T_LINE, T_RTS, T_WRESP,
                            T_GAP, T_DATA, T_WACK, T_RETRY, T_BACKOFF} st_e;
  st_e st;
  logic [SEGW-1:0] seg;
  logic [1:0]      port;
  logic [7:0]      h0, h1;
  logic [9:0]      total, idx;
  logic            circ;
  logic [3:0]      tries;
  logic [9:0]      tmo;
  logic            rd_pend, rd_cap;
  logic [7:0]      nb;
  logic            nb_valid;
  logic [7:0]      crc;
  logic            rts_second, ser_started;
  logic            ser_valid, ser_ready, ser_busy, ser_last;
  logic [7:0]      ser_data;
  logic            found;
  logic [SEGW-1:0] fseg;

  always_comb begin
    found = 1'b0; fseg = '0;
    for (int s = NSEG - 1; s >= 0; s--)
      if (seg_st[s].st == SEG_SEND) begin found = 1'b1; fseg = SEGW'(s); end
  end

  always_comb begin
    ser_valid = 1'b0; ser_data = '0; ser_last = 1'b0;
    if (st == T_RTS && !ser_started) begin
      ser_valid = 1'b1;
      ser_data  = rts_second ? hop_byte(5'd1) : (circ ? C_RTSND : C_RTSNN);
      ser_last  = rts_second || !circ;
    end else if (st == T_DATA && !ser_started) begin
      if (idx < total) begin ser_valid = nb_valid; ser_data = nb; end
      else begin ser_valid = 1'b1; ser_data = crc; ser_last = 1'b1; end
    end
  end

  mac_serializer u_ser (
    .clk, .rst, .bit_tick(bit_tick && ce), .data_valid(ser_valid), .data(ser_data),
    .data_last(ser_last), .data_ready(ser_ready), .busy(ser_busy), .line_o(tx_o)
  );

  assign busy      = (st != T_IDLE) || found;
  assign tx_active = ser_busy;
  assign tx_port   = port;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= T_IDLE; seg <= '0; port <= '0; h0 <= '0; h1 <= '0; total <= '0; idx <= '0;
      circ <= 1'b0; tries <= '0; tmo <= '0; rd_pend <= 1'b0; rd_cap <= 1'b0; nb <= '0;
      nb_valid <= 1'b0; crc <= '0; rts_second <= 1'b0; ser_started <= 1'b0;
      upd <= '0; breq <= '0;
      ev_sent <= 1'b0; ev_fail <= 1'b0; ev_retry <= 1'b0; ev_wait <= 1'b0; ev_circuit <= 1'b0;
    end else if (ce) begin
      upd.valid <= 1'b0;
      ev_sent <= 1'b0; ev_fail <= 1'b0; ev_retry <= 1'b0; ev_wait <= 1'b0; ev_circuit <= 1'b0;
      rd_cap <= 1'b0;
      if (bgnt) begin breq.req <= 1'b0; rd_cap <= 1'b1; end
      unique case (st)
        T_IDLE: if (found) begin
          seg <= fseg; port <= seg_st[fseg].port; tries <= '0;
          upd <= '{valid: 1'b1, seg: fseg, val: '{st: SEG_TXING, port: seg_st[fseg].port}};
          breq <= '{req: 1'b1, we: 1'b0, addr: {fseg, OFFW'(0)}, wdata: 8'h00};
          st <= T_H0;
        end
        T_H0: if (rd_cap) begin
          h0 <= brdata;
          breq <= '{req: 1'b1, we: 1'b0, addr: {seg, OFFW'(1)}, wdata: 8'h00};
          st <= T_H1;
        end
        T_H1: if (rd_cap) begin
          h1 <= brdata;
          breq <= '{req: 1'b1, we: 1'b0, addr: {seg, OFFW'(2)}, wdata: 8'h00};
          st <= T_H2;
        end
        T_H2: if (rd_cap) begin
          total <= pkt_bytes(h0, h1, brdata);
          circ  <= (h0 == PT_SN2BN) && !is_bn && (max_hop > 5'd1);
          st <= T_LINE;
        end
        T_LINE: if (line_free[port]) begin
          st <= T_RTS; rts_second <= 1'b0; ser_started <= 1'b0;
          if (circ) ev_circuit <= 1'b1;
        end
        T_RTS: begin
          if (ser_ready) begin
            if (circ && !rts_second) rts_second <= 1'b1;
            else ser_started <= 1'b1;
          end
          if (ser_started && !ser_busy) begin st <= T_WRESP; tmo <= '0; end
        end
        T_WRESP: begin
          if (resp_valid[port] && resp_code[port] == C_CTS) begin
            st <= T_GAP; tmo <= '0;
          end else if (resp_valid[port] && resp_code[port] == C_WAIT) begin
            tmo <= '0; ev_wait <= 1'b1;
          end else if (bit_tick) begin
            tmo <= tmo + 1'b1;
            if (tmo == 10'(RESP_BITS)) st <= T_RETRY;
          end
        end
        T_GAP: if (bit_tick) begin
          tmo <= tmo + 1'b1;
          if (tmo == 10'd2) begin
            st <= T_DATA; idx <= '0; crc <= '0; nb_valid <= 1'b0; rd_pend <= 1'b0;
            ser_started <= 1'b0;
          end
        end
        T_DATA: begin
          // prefetch the next stored byte
          if (!nb_valid && !rd_pend && idx < total && !breq.req) begin
            breq <= '{req: 1'b1, we: 1'b0, addr: {seg, OFFW'(idx)}, wdata: 8'h00};
            rd_pend <= 1'b1;
          end
          if (rd_pend && rd_cap) begin nb <= brdata; nb_valid <= 1'b1; rd_pend <= 1'b0; end
          if (ser_ready) begin
            if (idx < total) begin
              crc <= crc8_byte(crc, nb); nb_valid <= 1'b0; idx <= idx + 1'b1;
            end else ser_started <= 1'b1;
          end
          if (ser_started && !ser_busy) begin st <= T_WACK; tmo <= '0; end
        end
        T_WACK: begin
          if (resp_valid[port] && resp_code[port] == C_ACK) begin
            upd <= '{valid: 1'b1, seg: seg, val: '{st: SEG_FREE, port: port}};
            ev_sent <= 1'b1; st <= T_IDLE;
          end else if (bit_tick) begin
            tmo <= tmo + 1'b1;
            if (tmo == 10'(RESP_BITS)) st <= T_RETRY;
          end
        end
        T_RETRY: begin
          tries <= tries + 1'b1; tmo <= '0;
          if (tries == 4'(MAX_TRY - 1)) begin
            upd <= '{valid: 1'b1, seg: seg, val: '{st: SEG_FAIL, port: port}};
            ev_fail <= 1'b1; st <= T_IDLE;
          end else begin
            ev_retry <= 1'b1; st <= T_BACKOFF;
          end
        end
        T_BACKOFF: if (bit_tick) begin
          tmo <= tmo + 1'b1;
          if (tmo == {tries, 6'd0} + {2'b00, node_id[3:0], 4'd0}) st <= T_LINE;
        end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
