// time_sync: time-stamp counter and one-way timing exchange (Time sync).
//
// A 32-bit counter advances on every CLK-TS enable; it keeps running while
// the rest of the chip sleeps. A node asks its near-node for the time with a
// TRQ frame (field T1); the near-node answers on the same port with a TRQ
// frame (field TS) carrying its counter value as four bytes, latched at the
// first preamble bit of the answer. The requester loads
// received value + the known frame time (57 bit times of DIV clocks, less a
// half bit to the sampling point) + PIPE_CLKS, so both counters agree; the
// document's time-sync circuit comes from elsewhere and is only named here,
// so the field encodings and the correction are this design's choices.
// Interface: cmd_sync starts a request on near_port; start/start_port/field
// come from Receiver Sel for an incoming TRQ; the streamed bytes of an owned
// port arrive on byte_valid/byte_i. ev_synced pulses when the counter was set.
module time_sync
  import router_pkg::*;
#(
  parameter int PIPE_CLKS = 5,
  parameter int RESP_BITS = 160
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   ts_ce,
  input  logic                   bit_tick,
  input  logic [7:0]             div,
  input  logic                   cmd_sync,
  input  logic [1:0]             near_port,
  input  logic                   start,
  input  logic [1:0]             start_port,
  input  logic [7:0]             field,
  input  logic [NPORTS-1:0]      byte_valid,
  input  logic [NPORTS-1:0][7:0] byte_i,
  input  logic [NPORTS-1:0]      line_free,
  output logic [31:0]            time_o,
  output logic                   busy,
  output logic [NPORTS-1:0]      ports,
  output logic [NPORTS-1:0]      claim,
  output logic [NPORTS-1:0]      rearm,
  output logic                   tx_active,
  output logic [1:0]             tx_port,
  output logic                   tx_o,
  output logic                   ev_synced,
  output logic                   ev_served
);
  typedef enum logic [2:0] {S_IDLE, S_REQ_LINE, S_REQ_SEND, S_REQ_WAIT, S_REPLY, S_END} st_e;
  st_e st;
  logic [1:0]  port;
  logic [31:0] t_lat, t_rx;
  logic [2:0]  bi;       // byte index of the frame being sent / received
  logic [9:0]  tmo;
  logic        ser_valid, ser_ready, ser_busy, ser_last, done_feed;
  logic [7:0]  ser_data;

  always_comb begin
    ser_valid = 1'b0; ser_data = '0; ser_last = 1'b0;
    if (st == S_REQ_SEND && !done_feed) begin
      ser_valid = 1'b1; ser_data = (bi == 3'd0) ? C_TRQ : TRQ_T1; ser_last = (bi == 3'd1);
    end else if (st == S_REPLY && !done_feed) begin
      ser_valid = 1'b1; ser_last = (bi == 3'd5);
      unique case (bi)
        3'd0: ser_data = C_TRQ;
        3'd1: ser_data = TRQ_TS;
        3'd2: ser_data = t_lat[31:24];
        3'd3: ser_data = t_lat[23:16];
        3'd4: ser_data = t_lat[15:8];
        default: ser_data = t_lat[7:0];
      endcase
    end
  end

  mac_serializer u_ser (
    .clk, .rst, .bit_tick, .data_valid(ser_valid), .data(ser_data), .data_last(ser_last),
    .data_ready(ser_ready), .busy(ser_busy), .line_o(tx_o)
  );

  assign busy      = (st != S_IDLE);
  assign ports     = busy ? (NPORTS'(1) << port) : '0;
  assign tx_active = ser_busy;
  assign tx_port   = port;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; port <= '0; t_lat <= '0; t_rx <= '0; bi <= '0; tmo <= '0;
      done_feed <= 1'b0; time_o <= '0; claim <= '0; rearm <= '0;
      ev_synced <= 1'b0; ev_served <= 1'b0;
    end else begin
      claim <= '0; rearm <= '0; ev_synced <= 1'b0; ev_served <= 1'b0;
      if (ts_ce) time_o <= time_o + 1'b1;
      if (ser_ready) begin
        if (ser_last) done_feed <= 1'b1;
        else bi <= bi + 1'b1;
      end
      unique case (st)
        S_IDLE: begin
          bi <= '0; done_feed <= 1'b0; tmo <= '0;
          if (start && field == TRQ_T1) begin
            port <= start_port; st <= S_REPLY;
          end else if (start) begin
            port <= start_port; st <= S_END;             // unsolicited reply
          end else if (cmd_sync) begin
            port <= near_port; st <= S_REQ_LINE;
          end
        end
        S_REQ_LINE: if (line_free[port]) begin claim[port] <= 1'b1; st <= S_REQ_SEND; end
        S_REQ_SEND: if (done_feed && !ser_busy) begin st <= S_REQ_WAIT; bi <= '0; tmo <= '0; end
        S_REQ_WAIT: begin
          if (byte_valid[port]) begin
            bi <= bi + 1'b1;
            t_rx <= {t_rx[23:0], byte_i[port]};
            if (bi == 3'd1 && byte_i[port] != TRQ_TS) st <= S_END;
            if (bi == 3'd5) begin
              // frame time from the first preamble bit to the last bit's sample point
              time_o <= {t_rx[23:0], byte_i[port]} + 32'(57) * 32'(div) - 32'(div >> 1)
                        + 32'(PIPE_CLKS);
              ev_synced <= 1'b1; st <= S_END;
            end
          end else if (bit_tick) begin
            tmo <= tmo + 1'b1;
            if (tmo == 10'(RESP_BITS)) st <= S_END;
          end
        end
        S_REPLY: begin
          if (bit_tick && !ser_busy && bi == 3'd0 && !done_feed) t_lat <= time_o;
          if (done_feed && !ser_busy) begin st <= S_END; ev_served <= 1'b1; end
        end
        S_END: begin rearm[port] <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
