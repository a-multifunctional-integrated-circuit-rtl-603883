// router_ic: the complete four-port router chip for a textile body-area
// network node (sensor node or base node).
//
// Each of the four ports is one bidirectional conductive-yarn line. The
// signal detector recovers the bit clock on every port and dispatches
// incoming RTS messages: RTSnn to the packet receiver (RX), RTSnd to the
// circuit switch (or to RX on the base node), TRQ to time sync. RX stores
// packets in the 2 kB buffer, the router decides where each one goes
// (near-node for SN-to-BN, the next port of the carried path for BN-to-SN,
// the microcontroller otherwise) and TX sends it on, by packet switching or
// by building a circuit. The circuit switch connects an input port to the
// near-node port without buffering. The microcontroller sees registers and
// the buffer through the SPI slave. The clock controller holds everything
// but time sync idle while nothing happens.
// Pads: the tri-state line drivers are outside this module: for line p,
// line_o[p] is the level, line_oe[p] (Line_sel) the driver enable and
// line_i[p] the received level. clkrx0/rxdata0 bring out the recovered clock
// and data of port 0, line_sel0 its driver enable (test pins).
// All logic runs on clk_pin; the bit rate is clk_pin / DIV (register 0x01).
module router_ic
  import router_pkg::*;
(
  input  logic              clk_pin,
  input  logic              rst_pin,
  input  logic [NPORTS-1:0] line_i,
  output logic [NPORTS-1:0] line_o,
  output logic [NPORTS-1:0] line_oe,
  input  logic              sck,
  input  logic              sdi,
  output logic              sdo,
  input  logic              ss_n,
  output logic              int_o,
  output logic              ledr,
  output logic              ledg,
  output logic              clkrx0,
  output logic              rxdata0,
  output logic              line_sel0
);
  logic clk, rst;
  assign clk = clk_pin;

  // configuration
  logic is_bn, ts_en, sleep_en, cmd_sync;
  logic [7:0] div, node_id, near_tmo;
  logic [1:0] near_port;
  logic [4:0] max_hop, hop_thr;

  // clocking
  logic clk_en, clk_ts_en, clk2tx, clkrx512, clk_led, asleep, wake;

  // signal detector
  logic rx_start, csw_start, ts_start;
  logic [2:0][1:0] start_port;
  logic [NPORTS-1:0][7:0] req_arg, byte_s, resp_code;
  logic [NPORTS-1:0] claim_csw, claim_ts, xfer_rx, rearm, rearm_rx, rearm_csw, rearm_ts;
  owner_e [NPORTS-1:0] owner;
  logic [NPORTS-1:0] preamble, frame_start, byte_valid, resp_valid, line_s, clkrx, rxdata, det_active;
  logic [NPORTS-1:0] mask, line_free;

  // engines
  logic rx_busy, csw_busy, ts_busy, tx_busy, rt_busy;
  logic [NPORTS-1:0] rx_ports, csw_ports, ts_ports;
  logic rx_act, tx_act, ts_act;
  logic [1:0] rx_port, tx_port, ts_port;
  logic rx_o, tx_o, ts_o;
  logic [NPORTS-1:0] csw_o, csw_oe;
  logic [1:0] xfer_port;

  // buffer
  buf_req_t [2:0] creq;
  logic [2:0] cgnt;
  logic [7:0] brdata;
  seg_upd_t [2:0] cupd;
  seg_status_t [NSEG-1:0] seg_st;
  logic free_avail;
  logic [SEGW-1:0] free_seg;

  // SPI
  logic ss_active, spi_valid, spi_first;
  logic [7:0] spi_rx, spi_tx;
  logic [31:0] ts_time;

  // events
  logic ev_rx_ok, ev_rx_err, ev_sent, ev_fail, ev_retry, ev_wait, ev_circ;
  logic ev_fwd, ev_hyb, ev_rel, ev_cdone, ev_synced, ev_served, ev_host, ev_rfwd, ev_path, near_lost;

  assign wake = (|preamble) || (|det_active) || rx_busy || tx_busy || csw_busy || ts_busy ||
                rt_busy || ss_active;

  clock_ctrl u_clock (
    .clk, .rst_pin, .rst, .div, .sleep_en, .ts_en, .wake,
    .clk_en, .clk_ts_en, .clk2tx, .clkrx512, .clk_led, .asleep
  );

  signal_detector u_sigdet (
    .clk, .rst, .div, .is_bn, .line_i, .mask,
    .rx_busy, .csw_busy, .ts_busy, .rx_ports, .csw_ports, .ts_ports,
    .rx_start, .csw_start, .ts_start, .start_port, .req_arg,
    .claim_csw, .claim_ts, .xfer_rx, .rearm,
    .owner, .preamble, .frame_start, .byte_valid, .byte_o(byte_s),
    .resp_valid, .resp_code, .line_s, .clkrx, .rxdata, .active(det_active)
  );
  assign rearm = rearm_rx | rearm_csw | rearm_ts;

  always_comb begin
    xfer_port = '0;
    for (int p = 0; p < NPORTS; p++) if (xfer_rx[p]) xfer_port = 2'(p);
  end

  rx_module u_rx (
    .clk, .rst, .ce(clk_en), .bit_tick(clk2tx),
    .start(rx_start), .start_port(start_port[0]), .xfer(|xfer_rx), .xfer_port,
    .frame_start, .byte_valid, .byte_i(byte_s),
    .free_avail, .free_seg, .upd(cupd[0]), .breq(creq[0]), .bgnt(cgnt[0]),
    .busy(rx_busy), .ports(rx_ports), .rearm(rearm_rx),
    .tx_active(rx_act), .tx_port(rx_port), .tx_o(rx_o), .ev_ok(ev_rx_ok), .ev_err(ev_rx_err)
  );

  tx_module u_tx (
    .clk, .rst, .ce(clk_en), .bit_tick(clk2tx), .is_bn, .max_hop, .node_id, .seg_st,
    .line_free, .resp_valid, .resp_code, .upd(cupd[1]), .breq(creq[1]), .bgnt(cgnt[1]),
    .brdata, .busy(tx_busy), .tx_active(tx_act), .tx_port, .tx_o,
    .ev_sent, .ev_fail, .ev_retry, .ev_wait, .ev_circuit(ev_circ)
  );

  csw_module u_csw (
    .clk, .rst, .ce(clk_en), .bit_tick(clk2tx), .max_hop, .hop_thr, .near_port, .rx_busy,
    .start(csw_start), .start_port(start_port[1]), .hop_in(req_arg[start_port[1]]),
    .line_free, .line_s, .frame_start, .byte_valid, .byte_i(byte_s),
    .busy(csw_busy), .ports(csw_ports), .claim(claim_csw), .rearm(rearm_csw), .xfer(xfer_rx),
    .sw_o(csw_o), .sw_oe(csw_oe),
    .ev_forward(ev_fwd), .ev_hybrid(ev_hyb), .ev_release(ev_rel), .ev_done(ev_cdone)
  );

  time_sync u_ts (
    .clk, .rst, .ts_ce(clk_ts_en), .bit_tick(clk2tx), .div, .cmd_sync, .near_port,
    .start(ts_start), .start_port(start_port[2]), .field(req_arg[start_port[2]]),
    .byte_valid, .byte_i(byte_s), .line_free, .time_o(ts_time),
    .busy(ts_busy), .ports(ts_ports), .claim(claim_ts), .rearm(rearm_ts),
    .tx_active(ts_act), .tx_port(ts_port), .tx_o(ts_o), .ev_synced, .ev_served
  );

  router_buffer u_rb (
    .clk, .rst, .ce(clk_en), .is_bn, .near_port, .near_tmo, .tick512(clkrx512),
    .port_activity(preamble), .creq, .cgnt, .rdata(brdata), .cupd,
    .seg_st, .free_avail, .free_seg, .busy(rt_busy),
    .ev_host, .ev_fwd(ev_rfwd), .ev_path, .near_lost
  );

  line_status u_ls (
    .clk, .rst, .tx_active(tx_act), .tx_port, .rx_active(rx_act), .rx_port,
    .ts_active(ts_act), .ts_port, .csw_oe, .det_active, .preamble, .mask, .line_free
  );

  tx_line_switch u_sw (
    .clk, .rst, .tx_active(tx_act), .tx_port, .tx_o, .rx_active(rx_act), .rx_port, .rx_o,
    .ts_active(ts_act), .ts_port, .ts_o, .csw_oe, .csw_o, .l_out(line_o), .line_sel(line_oe)
  );

  spi_slave u_spi (
    .clk, .rst, .sck, .ss_n, .sdi, .sdo, .ss_active, .rx_valid(spi_valid), .rx_byte(spi_rx),
    .first(spi_first), .tx_byte(spi_tx)
  );

  control u_ctl (
    .clk, .rst, .ss_active, .rx_valid(spi_valid), .rx_byte(spi_rx), .first(spi_first),
    .tx_byte(spi_tx), .breq(creq[2]), .bgnt(cgnt[2]), .brdata, .seg_st, .upd(cupd[2]),
    .ev({ev_rx_err, ev_synced, near_lost, ev_fail, ev_sent, ev_host}),
    .time_i(ts_time), .clk_led, .awake(clk_en),
    .is_bn, .ts_en, .sleep_en, .div, .near_port, .max_hop, .hop_thr, .node_id, .near_tmo,
    .cmd_sync, .int_o, .ledr, .ledg
  );

  assign clkrx0    = clkrx[0];
  assign rxdata0   = rxdata[0];
  assign line_sel0 = line_oe[0];
endmodule
