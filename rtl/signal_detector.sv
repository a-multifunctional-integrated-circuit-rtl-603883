// signal_detector: the four RTS detectors, Receiver Sel and RST Signal gen.
//
// Each port has its own RTS detector so that tasks on different ports run
// concurrently (for example a packet reception on one port while a timing
// request arrives on another). Requests from the detectors are arbitrated by
// receiver_sel, which returns a start pulse and port number per receiver
// (RX, circuit switch, time sync). rst_signal_gen frees the ports a receiver
// used when its busy signal falls. The per-port byte streams, response
// strobes and recovered clocks are brought out as arrays; each receiver
// picks the port it is serving. Structure after the document (Fig. 8).
module signal_detector
  import router_pkg::*;
#(
  parameter int DIVW = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [DIVW-1:0]        div,
  input  logic                   is_bn,
  input  logic [NPORTS-1:0]      line_i,
  input  logic [NPORTS-1:0]      mask,
  // receivers
  input  logic                   rx_busy,
  input  logic                   csw_busy,
  input  logic                   ts_busy,
  input  logic [NPORTS-1:0]      rx_ports,
  input  logic [NPORTS-1:0]      csw_ports,
  input  logic [NPORTS-1:0]      ts_ports,
  output logic                   rx_start,
  output logic                   csw_start,
  output logic                   ts_start,
  output logic [2:0][1:0]        start_port,
  output logic [NPORTS-1:0][7:0] req_arg,
  input  logic [NPORTS-1:0]      claim_csw,
  input  logic [NPORTS-1:0]      claim_ts,
  input  logic [NPORTS-1:0]      xfer_rx,
  input  logic [NPORTS-1:0]      rearm,
  // streams
  output owner_e [NPORTS-1:0]    owner,
  output logic [NPORTS-1:0]      preamble,
  output logic [NPORTS-1:0]      frame_start,
  output logic [NPORTS-1:0]      byte_valid,
  output logic [NPORTS-1:0][7:0] byte_o,
  output logic [NPORTS-1:0]      resp_valid,
  output logic [NPORTS-1:0][7:0] resp_code,
  output logic [NPORTS-1:0]      line_s,
  output logic [NPORTS-1:0]      clkrx,
  output logic [NPORTS-1:0]      rxdata,
  output logic [NPORTS-1:0]      active
);
  logic [2:0][NPORTS-1:0] req, gnt, rej;
  logic [NPORTS-1:0] rx_rst, csw_rst, ts_rst;

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    rts_detector #(.DIVW(DIVW)) u_det (
      .clk, .rst, .div, .is_bn,
      .line_i(line_i[p]), .mask(mask[p]),
      .req_rx(req[0][p]), .req_csw(req[1][p]), .req_ts(req[2][p]),
      .req_arg(req_arg[p]),
      .gnt_rx(gnt[0][p]), .gnt_csw(gnt[1][p]), .gnt_ts(gnt[2][p]),
      .reject(rej[0][p] | rej[1][p] | rej[2][p]),
      .claim_csw(claim_csw[p]), .claim_ts(claim_ts[p]), .xfer_rx(xfer_rx[p]),
      .rearm(rearm[p]),
      .release_i(rx_rst[p] | csw_rst[p] | ts_rst[p]),
      .owner(owner[p]),
      .preamble(preamble[p]), .frame_start(frame_start[p]),
      .byte_valid(byte_valid[p]), .byte_o(byte_o[p]),
      .resp_valid(resp_valid[p]), .resp_code(resp_code[p]),
      .line_s(line_s[p]), .clkrx(clkrx[p]), .rxdata(rxdata[p]), .active(active[p])
    );
  end

  receiver_sel u_sel (
    .clk, .rst, .req, .busy({ts_busy, csw_busy, rx_busy}),
    .gnt, .rej, .gnt_port(start_port)
  );

  rst_signal_gen u_rstgen (
    .clk, .rst, .rx_busy, .csw_busy, .ts_busy, .rx_ports, .csw_ports, .ts_ports,
    .rx_rst, .csw_rst, .ts_rst
  );

  assign rx_start  = |gnt[0];
  assign csw_start = |gnt[1];
  assign ts_start  = |gnt[2];
endmodule
