// rts_detector: front end of one line port (RTS Detector).
//
// It contains the port's clock recovery (cdr) and the predecoder. While the
// port is masked (this node drives the line) it stays in hunt. In hunt it
// waits for at least two consecutive ones (two transitions), which raises
// `preamble` (the wake-up signal for the clock controller), then for the '0'
// start delimiter, and then assembles bytes.
// If no receiver owns the port, the first byte is classified:
//   RTSnn -> request to RX; RTSnd (+hop byte) -> request to the circuit
//   switch, or to RX on the base node; TRQ (+field byte) -> request to Time
//   sync; CTS/ACK/WAIT -> a one-cycle response strobe for whoever waits on
//   the port (TX, circuit switch, time sync); anything else is dropped.
// A request is held until Receiver Sel grants it (the port then belongs to
// that receiver) or rejects it. An owned port streams every byte of every
// frame to its owner; the owner pulses `rearm` at the end of each frame and
// the RST Signal gen pulse `release_i` frees the port.
// Function after the document; the states and the byte-level dispatch are
// this design's choices.
module rts_detector
  import router_pkg::*;
#(
  parameter int DIVW = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [DIVW-1:0] div,
  input  logic            is_bn,
  input  logic            line_i,
  input  logic            mask,       // line occupied by this node's drivers
  // receiver selection
  output logic            req_rx,
  output logic            req_csw,
  output logic            req_ts,
  output logic [7:0]      req_arg,    // hop byte (RTSnd) or field (TRQ)
  input  logic            gnt_rx,
  input  logic            gnt_csw,
  input  logic            gnt_ts,
  input  logic            reject,
  input  logic            claim_csw,  // circuit switch takes the port
  input  logic            claim_ts,   // time sync takes the port
  input  logic            xfer_rx,    // ownership handed from CSW to RX
  input  logic            rearm,
  input  logic            release_i,
  output owner_e          owner,
  // stream
  output logic            preamble,
  output logic            frame_start,
  output logic            byte_valid,
  output logic [7:0]      byte_o,
  output logic            resp_valid,
  output logic [7:0]      resp_code,
  // clock recovery outputs
  output logic            line_s,
  output logic            clkrx,
  output logic            rxdata,
  output logic            active
);
  typedef enum logic [2:0] {H_HUNT, H_PRE, H_BYTES, H_ARG, H_REQ} st_e;
  st_e st;
  logic edge_s, bit_stb, bit_val;
  logic [1:0] ones;
  logic [7:0] sh;
  logic [2:0] bcnt;
  logic [7:0] code;
  logic       first;
  logic       byte_done;
  logic [7:0] byte_now;

  cdr #(.DIVW(DIVW)) u_cdr (
    .clk, .rst, .div, .line_i, .line_s, .edge_o(edge_s),
    .bit_stb, .bit_val, .clkrx
  );

  assign rxdata   = bit_val;
  assign byte_now = {sh[6:0], bit_val};
  assign byte_done = bit_stb && (bcnt == 3'd7) && (st == H_BYTES || st == H_ARG);
  assign preamble = (st != H_HUNT) || (ones != 2'd0);
  assign active   = (st != H_HUNT) || (owner != OWN_NONE);

  assign req_rx  = (st == H_REQ) && (code == C_RTSNN || (code == C_RTSND && is_bn));
  assign req_csw = (st == H_REQ) && (code == C_RTSND) && !is_bn;
  assign req_ts  = (st == H_REQ) && (code == C_TRQ);

  always_comb begin
    byte_valid = 1'b0; resp_valid = 1'b0;
    if (byte_done && st == H_BYTES && owner != OWN_NONE) byte_valid = 1'b1;
    if (byte_done && st == H_BYTES && owner == OWN_NONE && first &&
        (byte_now == C_CTS || byte_now == C_ACK || byte_now == C_WAIT)) resp_valid = 1'b1;
  end
  assign byte_o    = byte_now;
  assign resp_code = byte_now;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= H_HUNT; ones <= '0; sh <= '0; bcnt <= '0; code <= '0; first <= 1'b0;
      req_arg <= '0; owner <= OWN_NONE; frame_start <= 1'b0;
    end else begin
      frame_start <= 1'b0;
      // ownership
      if (gnt_rx || xfer_rx) owner <= OWN_RX;
      else if (gnt_csw || claim_csw) owner <= OWN_CSW;
      else if (gnt_ts || claim_ts) owner <= OWN_TS;
      else if (release_i) owner <= OWN_NONE;

      if (mask || (release_i && !(gnt_rx || gnt_csw || gnt_ts))) begin
        st <= H_HUNT; ones <= '0;
      end else begin
        unique case (st)
          H_HUNT: if (bit_stb) begin
            if (bit_val) begin
              if (ones == 2'd1) st <= H_PRE;
              ones <= 2'd1;
            end else ones <= '0;
          end
          H_PRE: if (bit_stb && !bit_val) begin
            st <= H_BYTES; bcnt <= '0; first <= 1'b1; ones <= '0; frame_start <= 1'b1;
          end
          H_BYTES, H_ARG: if (bit_stb) begin
            sh <= byte_now;
            bcnt <= bcnt + 1'b1;
            if (bcnt == 3'd7) begin
              first <= 1'b0;
              if (st == H_ARG) begin
                req_arg <= byte_now; st <= H_REQ;
              end else if (owner == OWN_NONE && first) begin
                code <= byte_now;
                if (byte_now == C_RTSNN) st <= H_REQ;
                else if (byte_now == C_RTSND || byte_now == C_TRQ) st <= H_ARG;
                else st <= H_HUNT;
              end else if (owner == OWN_NONE) st <= H_HUNT;
            end
          end
          H_REQ: if (gnt_rx || gnt_csw || gnt_ts || reject) st <= H_HUNT;
          default: st <= H_HUNT;
        endcase
        if (rearm) begin st <= H_HUNT; ones <= '0; end
      end
    end
  end
endmodule
