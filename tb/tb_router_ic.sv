// tb_router_ic: end-to-end test of four router chips wired as a chain
//   BN(p3) --- (p3)SN1(p1) --- (p2)SN2(p0) --- (p3)SN3
// over yarn lines modelled as wired-OR with pull-down. One SPI master plays
// the four microcontrollers (shared SCK/SDI, one SS per node).
// Scenarios: SN3->BN by packet switching, by circuit switching, hybrid
// (packet hop then circuit), circuit cut by the Maximum hop-count at SN1,
// BN->SN3 by source path, a time-sync exchange, and sleep/wake. Every
// received packet is read back over SPI and compared byte by byte with what
// was written at the source. Each mechanism is counted and must occur.
`timescale 1ns/1ps
module tb_router_ic;
  import router_pkg::*;

  localparam int N = 4;  // 0=BN 1=SN1 2=SN2 3=SN3
  logic clk = 1'b0;
  logic rst_pin;
  logic sck, sdi;
  logic [N-1:0] ss_n, sdo, int_o;
  logic [N-1:0][3:0] li, lo, loe;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // wired-OR lines with pull-down
  logic l0, l1, l2;
  assign l0 = (lo[0][3] & loe[0][3]) | (lo[1][3] & loe[1][3]);
  assign l1 = (lo[1][1] & loe[1][1]) | (lo[2][2] & loe[2][2]);
  assign l2 = (lo[2][0] & loe[2][0]) | (lo[3][3] & loe[3][3]);
  always_comb begin
    li = '0;
    li[0][3] = l0; li[1][3] = l0;
    li[1][1] = l1; li[2][2] = l1;
    li[2][0] = l2; li[3][3] = l2;
  end

  router_ic n0 (.clk_pin(clk), .rst_pin, .line_i(li[0]), .line_o(lo[0]), .line_oe(loe[0]),
    .sck, .sdi, .sdo(sdo[0]), .ss_n(ss_n[0]), .int_o(int_o[0]), .ledr(), .ledg(),
    .clkrx0(), .rxdata0(), .line_sel0());
  router_ic n1 (.clk_pin(clk), .rst_pin, .line_i(li[1]), .line_o(lo[1]), .line_oe(loe[1]),
    .sck, .sdi, .sdo(sdo[1]), .ss_n(ss_n[1]), .int_o(int_o[1]), .ledr(), .ledg(),
    .clkrx0(), .rxdata0(), .line_sel0());
  router_ic n2 (.clk_pin(clk), .rst_pin, .line_i(li[2]), .line_o(lo[2]), .line_oe(loe[2]),
    .sck, .sdi, .sdo(sdo[2]), .ss_n(ss_n[2]), .int_o(int_o[2]), .ledr(), .ledg(),
    .clkrx0(), .rxdata0(), .line_sel0());
  router_ic n3 (.clk_pin(clk), .rst_pin, .line_i(li[3]), .line_o(lo[3]), .line_oe(loe[3]),
    .sck, .sdi, .sdo(sdo[3]), .ss_n(ss_n[3]), .int_o(int_o[3]), .ledr(), .ledg(),
    .clkrx0(), .rxdata0(), .line_sel0());

  // ---------------- mechanism counters ----------------
  int c_rx[N], c_fwd[N], c_cfwd[N], c_cdone[N], c_hyb[N], c_wait[N], c_path[N], c_sync, c_wake, c_retry;
  initial begin
    for (int i = 0; i < N; i++) begin c_rx[i]=0; c_fwd[i]=0; c_cfwd[i]=0; c_cdone[i]=0; c_hyb[i]=0; c_wait[i]=0; c_path[i]=0; end
    c_sync = 0; c_wake = 0; c_retry = 0;
  end
  logic en1_q;
  always @(posedge clk) if (!rst_pin && !n0.rst) begin
    if (n0.u_rx.ev_ok) c_rx[0]++;  if (n1.u_rx.ev_ok) c_rx[1]++;
    if (n2.u_rx.ev_ok) c_rx[2]++;  if (n3.u_rx.ev_ok) c_rx[3]++;
    if (n1.u_rb.ev_fwd) c_fwd[1]++; if (n2.u_rb.ev_fwd) c_fwd[2]++; if (n3.u_rb.ev_fwd) c_fwd[3]++;
    if (n1.u_csw.ev_forward) c_cfwd[1]++; if (n2.u_csw.ev_forward) c_cfwd[2]++;
    if (n1.u_csw.ev_done) c_cdone[1]++;   if (n2.u_csw.ev_done) c_cdone[2]++;
    if (n1.u_csw.ev_hybrid) c_hyb[1]++;   if (n2.u_csw.ev_hybrid) c_hyb[2]++;
    if (n2.u_tx.ev_wait) c_wait[2]++;     if (n3.u_tx.ev_wait) c_wait[3]++;
    if (n0.u_rb.ev_path) c_path[0]++; if (n1.u_rb.ev_path) c_path[1]++; if (n2.u_rb.ev_path) c_path[2]++;
    if (n1.u_ts.ev_synced) c_sync++;
    if (n0.u_tx.ev_retry | n1.u_tx.ev_retry | n2.u_tx.ev_retry | n3.u_tx.ev_retry) c_retry++;
    en1_q <= n1.clk_en;
    if (n1.clk_en && !en1_q) c_wake++;
  end

  // ---------------- SPI master ----------------
  task automatic spi_byte(input logic [7:0] o, output logic [7:0] i);
    for (int b = 7; b >= 0; b--) begin
      sdi = o[b];
      repeat (4) @(posedge clk);
      sck = 1'b1;
      repeat (4) @(posedge clk);
      sck = 1'b0;
    end
    i = 8'h00;
  endtask

  // the read byte is sampled on the rising edges
  task automatic spi_byte_rd(input int n, input logic [7:0] o, output logic [7:0] i);
    for (int b = 7; b >= 0; b--) begin
      sdi = o[b];
      repeat (4) @(posedge clk);
      sck = 1'b1;
      i[b] = sdo[n];
      repeat (4) @(posedge clk);
      sck = 1'b0;
    end
  endtask

  task automatic sel(input int n);
    ss_n[n] = 1'b0; repeat (8) @(posedge clk);
  endtask
  task automatic desel(input int n);
    repeat (8) @(posedge clk); ss_n[n] = 1'b1; repeat (8) @(posedge clk);
  endtask

  task automatic wr_reg(input int n, input logic [5:0] a, input logic [7:0] d);
    logic [7:0] x;
    sel(n); spi_byte({2'b00, a}, x); spi_byte(d, x); desel(n);
  endtask

  task automatic rd_reg(input int n, input logic [5:0] a, output logic [7:0] d);
    logic [7:0] x;
    sel(n); spi_byte({2'b01, a}, x); spi_byte_rd(n, 8'h00, d); desel(n);
  endtask

  task automatic wr_buf(input int n, input logic [10:0] addr, input logic [7:0] data[], input int len);
    logic [7:0] x;
    sel(n); spi_byte(8'h80, x); spi_byte({5'd0, addr[10:8]}, x); spi_byte(addr[7:0], x);
    for (int k = 0; k < len; k++) spi_byte(data[k], x);
    desel(n);
  endtask

  task automatic rd_buf(input int n, input logic [10:0] addr, output logic [7:0] data[], input int len);
    logic [7:0] x;
    data = new[len];
    sel(n); spi_byte(8'hC0, x); spi_byte({5'd0, addr[10:8]}, x); spi_byte(addr[7:0], x);
    for (int k = 0; k < len; k++) spi_byte_rd(n, 8'h00, data[k]);
    desel(n);
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // wait until node n has a segment in HOST state; returns it
  task automatic wait_host(input int n, output int seg, input int max_cycles);
    logic [7:0] st;
    int t0;
    seg = -1; t0 = 0;
    while (seg < 0 && t0 < max_cycles) begin
      for (int s = 0; s < NSEG; s++) begin
        rd_reg(n, 6'(8 + s), st);
        if (st[4:2] == SEG_HOST && seg < 0) seg = s;
      end
      t0 += 2000;
    end
  endtask

  logic [7:0] pkt[];
  logic [7:0] got[];

  // build an SN-to-BN packet: type, length, ID, payload
  task automatic make_sn2bn(input logic [7:0] id, input int len);
    pkt = new[3 + len];
    pkt[0] = PT_SN2BN; pkt[1] = 8'(len); pkt[2] = id;
    for (int k = 0; k < len; k++) pkt[3 + k] = 8'($urandom);
  endtask

  // send pkt from node src (segment 0, status ROUTE), receive at dst, compare
  task automatic send_and_check(input int src, input int dst, input string name, output longint cyc);
    int seg;
    longint t0;
    logic [7:0] st;
    wr_buf(src, 11'd0, pkt, pkt.size());
    t0 = $time;
    wr_reg(src, 6'h08, {3'd0, SEG_ROUTE, 2'd0});
    wait_host(dst, seg, 400000);
    cyc = ($time - t0) / 10;
    check(seg >= 0, {name, ": packet arrived"});
    if (seg >= 0) begin
      rd_buf(dst, 11'(seg * SEG_BYTES), got, pkt.size());
      for (int k = 0; k < pkt.size(); k++)
        if (!(k == 3 && pkt[0] == PT_BN2SN))
          check(got[k] == pkt[k], $sformatf("%s: byte %0d %h vs %h", name, k, got[k], pkt[k]));
      wr_reg(dst, 6'(8 + seg), 8'h00);   // free it
    end
    rd_reg(src, 6'h08, st);
    check(st[4:2] == SEG_FREE, {name, ": source segment freed after ACK"});
  endtask

  longint t_pkt, t_circ, t_hyb;
  int r1, r2, r3, d1, d2;
  logic [7:0] v;

  initial begin
    sck = 1'b0; sdi = 1'b0; ss_n = '1; rst_pin = 1'b1;
    repeat (10) @(posedge clk);
    rst_pin = 1'b0;
    repeat (10) @(posedge clk);
    // configuration: DIV 4, near ports, BN flag, ids, sleep enabled
    for (int n = 0; n < N; n++) begin
      wr_reg(n, 6'h01, 8'd4);
      wr_reg(n, 6'h05, 8'(n));
      wr_reg(n, 6'h07, 8'h3F);
    end
    wr_reg(0, 6'h00, 8'h05);           // BN, sleep enabled
    wr_reg(1, 6'h00, 8'h04); wr_reg(1, 6'h02, 8'd3);
    wr_reg(2, 6'h00, 8'h04); wr_reg(2, 6'h02, 8'd2);
    wr_reg(3, 6'h00, 8'h04); wr_reg(3, 6'h02, 8'd3);
    rd_reg(2, 6'h02, v);
    check(v == 8'd2, "register read-back");

    // 1) packet switching: Maximum hop-count = threshold = 1 everywhere
    make_sn2bn(8'd3, 4);
    send_and_check(3, 0, "packet", t_pkt);
    check(c_rx[2] == 1 && c_rx[1] == 1 && c_rx[0] == 1, "packet: stored at every hop");
    check(c_fwd[2] == 1 && c_fwd[1] == 1, "packet: router forwarded at SN2 and SN1");

    // 2) circuit switching: limits raised on all sensor nodes
    for (int n = 1; n < N; n++) begin wr_reg(n, 6'h03, 8'd8); wr_reg(n, 6'h04, 8'd8); end
    r1 = c_rx[1]; r2 = c_rx[2];
    make_sn2bn(8'd3, 4);
    send_and_check(3, 0, "circuit", t_circ);
    check(c_rx[1] == r1 && c_rx[2] == r2, "circuit: intermediate nodes did not buffer");
    check(c_cdone[1] == 1 && c_cdone[2] == 1, "circuit: path built and released at SN2 and SN1");
    check(c_wait[3] >= 2, "circuit: WAIT messages reached SN3");
    check(t_circ < t_pkt, $sformatf("circuit faster than packet (%0d < %0d cycles)", t_circ, t_pkt));

    // 3) hybrid: SN3 in packet mode, SN2 forwards by circuit through SN1
    wr_reg(3, 6'h03, 8'd1);
    r2 = c_rx[2]; r1 = c_rx[1]; d1 = c_cdone[1];
    make_sn2bn(8'd3, 12);
    send_and_check(3, 0, "hybrid", t_hyb);
    check(c_rx[2] == r2 + 1 && c_rx[1] == r1, "hybrid: buffered at SN2 only");
    check(c_cdone[1] == d1 + 1, "hybrid: circuit through SN1");

    // 4) circuit cut by Maximum hop-count 2 at SN1: SN1 takes the packet
    wr_reg(3, 6'h03, 8'd8);
    wr_reg(1, 6'h03, 8'd2);
    r1 = c_rx[1];
    make_sn2bn(8'd3, 30);
    send_and_check(3, 0, "hop-limit", t_hyb);
    check(c_hyb[1] == 1 && c_rx[1] == r1 + 1, "hop-limit: SN1 got the packet (hybrid)");

    // 5) BN-to-SN by source path [R=3, k=0, ports 3,1,0]
    pkt = new[2 + 5 + 6];
    pkt[0] = PT_BN2SN; pkt[1] = 8'd6; pkt[2] = 8'd3; pkt[3] = 8'd0;
    pkt[4] = 8'd3; pkt[5] = 8'd1; pkt[6] = 8'd0;
    for (int k = 7; k < 13; k++) pkt[k] = 8'($urandom);
    send_and_check(0, 3, "bn2sn", t_hyb);
    check(got[3] == 8'd3, "bn2sn: hop index advanced to R");
    check(c_path[0] == 1 && c_path[1] == 1 && c_path[2] == 1, "bn2sn: routed by path at each node");

    // 6) time sync: BN counter started earlier than SN1's
    wr_reg(0, 6'h00, 8'h07);
    repeat (1234) @(posedge clk);
    wr_reg(1, 6'h00, 8'h06);
    d2 = int'(n0.ts_time - n1.ts_time);
    check(d2 > 1000, "time sync: counters differ before");
    wr_reg(1, 6'h0D, 8'h01);
    repeat (3000) @(posedge clk);
    d2 = int'(n0.ts_time - n1.ts_time);
    check(c_sync == 1, "time sync: exchange completed");
    check(d2 >= -1 && d2 <= 1, $sformatf("time sync: counters agree (diff %0d)", d2));

    // 7) sleep: SN1 was asleep between tasks and woke for them
    check(c_wake >= 3, $sformatf("sleep/wake cycles on SN1: %0d", c_wake));

    $display("mechanisms: store-forward %0d/%0d, circuit hops %0d/%0d, wait %0d, hybrid-limit %0d, path %0d, sync %0d, wake %0d, retry %0d",
             c_fwd[1], c_fwd[2], c_cdone[1], c_cdone[2], c_wait[3], c_hyb[1], c_path[1], c_sync, c_wake, c_retry);
    $display("end-to-end cycles: packet %0d, circuit %0d", t_pkt, t_circ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
