// router_buffer: the shared packet buffer and the router (Router & Buffer).
//
// Buffer: BUF_BYTES of single-port memory split into NSEG equal segments,
// one packet per segment, each with a status field (seg_status_t) held in
// registers. Clients (0 = RX, 1 = TX, 2 = microcontroller via SPI) and the
// router itself share the data bus; a request is held until granted, with
// fixed priority RX > TX > router > SPI, and read data appear the cycle after
// the grant. Status updates from the clients are applied in the same order.
// Router: it serves segments in status ROUTE (received by RX or written by
// the microcontroller) following SRMCF forwarding, without involving the
// microcontroller:
//   SN-to-BN  -> on a sensor node: SEND to the near-node port; on the base
//                node: HOST (for the microcontroller);
//   BN-to-SN  -> ID-path = [R, k, port_0 .. port_R-1]: while k < R the
//                packet is sent on port_k and k is incremented in the
//                buffer; when k = R it is for this node (HOST);
//   broadcast and SN-to-SN -> HOST.
// Near-node watchdog: with near_tmo non-zero, if the near-node port shows no
// activity for near_tmo periods of CLKRX512, near_lost pulses so the
// microcontroller can start the cost-request recovery.
// Routing rules from the document; the path layout, segment organisation and
// arbitration are this design's choices.
module router_buffer
  import router_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   ce,
  input  logic                   is_bn,
  input  logic [1:0]             near_port,
  input  logic [7:0]             near_tmo,
  input  logic                   tick512,
  input  logic [NPORTS-1:0]      port_activity,
  // clients
  input  buf_req_t [2:0]         creq,
  output logic [2:0]             cgnt,
  output logic [7:0]             rdata,
  input  seg_upd_t [2:0]         cupd,
  // status
  output seg_status_t [NSEG-1:0] seg_st,
  output logic                   free_avail,
  output logic [SEGW-1:0]        free_seg,
  output logic                   busy,
  output logic                   ev_host,
  output logic                   ev_fwd,
  output logic                   ev_path,
  output logic                   near_lost
);
  logic [7:0] mem [BUF_BYTES];
  buf_req_t   rreq;
  logic       rgnt;
  seg_upd_t   rupd;
  buf_req_t   sel;
  logic       any;

  // arbitration
  always_comb begin
    cgnt = '0; rgnt = 1'b0; sel = '0; any = 1'b1;
    if (creq[0].req)      begin cgnt[0] = 1'b1; sel = creq[0]; end
    else if (creq[1].req) begin cgnt[1] = 1'b1; sel = creq[1]; end
    else if (rreq.req)    begin rgnt    = 1'b1; sel = rreq;    end
    else if (creq[2].req) begin cgnt[2] = 1'b1; sel = creq[2]; end
    else any = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (any) begin
      if (sel.we) mem[sel.addr] <= sel.wdata;
      rdata <= mem[sel.addr];
    end
  end

  // segment status
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < NSEG; s++) seg_st[s] <= '{st: SEG_FREE, port: 2'd0};
    end else begin
      if (cupd[2].valid) seg_st[cupd[2].seg] <= cupd[2].val;
      if (rupd.valid)    seg_st[rupd.seg]    <= rupd.val;
      if (cupd[1].valid) seg_st[cupd[1].seg] <= cupd[1].val;
      if (cupd[0].valid) seg_st[cupd[0].seg] <= cupd[0].val;
    end
  end

  always_comb begin
    free_avail = 1'b0; free_seg = '0;
    for (int s = NSEG - 1; s >= 0; s--)
      if (seg_st[s].st == SEG_FREE) begin free_avail = 1'b1; free_seg = SEGW'(s); end
  end

  // router
  typedef enum logic [2:0] {Q_IDLE, Q_TYPE, Q_R, Q_K, Q_PORT, Q_WRK} st_e;
  st_e st;
  logic [SEGW-1:0] seg;
  logic [7:0] r, k;
  logic rd_cap;
  logic found;
  logic [SEGW-1:0] fseg;

  always_comb begin
    found = 1'b0; fseg = '0;
    for (int s = NSEG - 1; s >= 0; s--)
      if (seg_st[s].st == SEG_ROUTE) begin found = 1'b1; fseg = SEGW'(s); end
  end
  assign busy = found || (st != Q_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= Q_IDLE; seg <= '0; r <= '0; k <= '0; rd_cap <= 1'b0; rreq <= '0; rupd <= '0;
      ev_host <= 1'b0; ev_fwd <= 1'b0; ev_path <= 1'b0;
    end else if (ce) begin
      rupd.valid <= 1'b0; ev_host <= 1'b0; ev_fwd <= 1'b0; ev_path <= 1'b0;
      rd_cap <= rgnt && !rreq.we;
      if (rgnt) rreq.req <= 1'b0;
      unique case (st)
        Q_IDLE: if (found && !rupd.valid) begin
          seg <= fseg;
          rreq <= '{req: 1'b1, we: 1'b0, addr: {fseg, OFFW'(0)}, wdata: 8'h00};
          st <= Q_TYPE;
        end
        Q_TYPE: if (rd_cap) begin
          if (rdata == PT_SN2BN && !is_bn) begin
            rupd <= '{valid: 1'b1, seg: seg, val: '{st: SEG_SEND, port: near_port}};
            ev_fwd <= 1'b1; st <= Q_IDLE;
          end else if (rdata == PT_BN2SN) begin
            rreq <= '{req: 1'b1, we: 1'b0, addr: {seg, OFFW'(2)}, wdata: 8'h00};
            st <= Q_R;
          end else begin
            rupd <= '{valid: 1'b1, seg: seg, val: '{st: SEG_HOST, port: seg_st[seg].port}};
            ev_host <= 1'b1; st <= Q_IDLE;
          end
        end
        Q_R: if (rd_cap) begin
          r <= rdata;
          rreq <= '{req: 1'b1, we: 1'b0, addr: {seg, OFFW'(3)}, wdata: 8'h00};
          st <= Q_K;
        end
        Q_K: if (rd_cap) begin
          k <= rdata;
          if (rdata >= r) begin
            rupd <= '{valid: 1'b1, seg: seg, val: '{st: SEG_HOST, port: seg_st[seg].port}};
            ev_host <= 1'b1; st <= Q_IDLE;
          end else begin
            rreq <= '{req: 1'b1, we: 1'b0, addr: {seg, OFFW'(10'd4 + 10'(rdata))}, wdata: 8'h00};
            st <= Q_PORT;
          end
        end
        Q_PORT: if (rd_cap) begin
          rreq <= '{req: 1'b1, we: 1'b1, addr: {seg, OFFW'(3)}, wdata: k + 8'd1};
          rupd <= '{valid: 1'b1, seg: seg, val: '{st: SEG_SEND, port: rdata[1:0]}};
          ev_path <= 1'b1; st <= Q_WRK;
        end
        Q_WRK: if (!rreq.req) st <= Q_IDLE;
        default: st <= Q_IDLE;
      endcase
    end
  end

  // near-node watchdog
  logic [7:0] wd;
  logic       lost_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      wd <= '0; lost_q <= 1'b0; near_lost <= 1'b0;
    end else begin
      near_lost <= 1'b0;
      if (port_activity[near_port] || near_tmo == 8'd0) begin
        wd <= '0; lost_q <= 1'b0;
      end else if (tick512 && !lost_q) begin
        if (wd == near_tmo - 8'd1) begin near_lost <= 1'b1; lost_q <= 1'b1; end
        else wd <= wd + 1'b1;
      end
    end
  end
endmodule
