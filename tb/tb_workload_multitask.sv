// tb_workload_multitask: three concurrent tasks on one node, on the star
//          SN4
//           |(p1)
//   BN(p0)-(p0)SN2(p2)-SN3     (SN3, SN4, SN5 use their port 0)
//           |(p3)
//          SN5
// at 4 clocks per bit. SN4 sends a 250-byte packet to the BN by circuit
// switching through SN2. While that circuit is up, SN3 sends a packet to
// SN2 by packet switching, and SN5 asks SN2 for the time. The test checks
// that SN2's circuit switch, receiver and time sync were all busy in the
// same clock cycle, that both packets reach the BN intact (SN3's after the
// circuit releases the BN line) and that SN5's counter matches SN2's.
`timescale 1ns/1ps
module tb_workload_multitask;
  import router_pkg::*;

  localparam int N = 5;  // 0=BN 1=SN2 2=SN3 3=SN4 4=SN5
  logic clk = 1'b0;
  logic rst_pin;
  logic sck, sdi;
  logic [N-1:0] ss_n, sdo, int_o;
  logic [N-1:0][3:0] li, lo, loe;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // wired-OR lines with pull-down: SN2 port p <-> port 0 of its neighbour
  logic [3:0] ln;
  assign ln[0] = (lo[1][0] & loe[1][0]) | (lo[0][0] & loe[0][0]);
  assign ln[1] = (lo[1][1] & loe[1][1]) | (lo[3][0] & loe[3][0]);
  assign ln[2] = (lo[1][2] & loe[1][2]) | (lo[2][0] & loe[2][0]);
  assign ln[3] = (lo[1][3] & loe[1][3]) | (lo[4][0] & loe[4][0]);
  always_comb begin
    li = '0;
    li[1] = ln;
    li[0][0] = ln[0]; li[3][0] = ln[1]; li[2][0] = ln[2]; li[4][0] = ln[3];
  end

  for (genvar n = 0; n < N; n++) begin : g_node
    router_ic u (.clk_pin(clk), .rst_pin, .line_i(li[n]), .line_o(lo[n]), .line_oe(loe[n]),
      .sck, .sdi, .sdo(sdo[n]), .ss_n(ss_n[n]), .int_o(int_o[n]), .ledr(), .ledg(),
      .clkrx0(), .rxdata0(), .line_sel0());
  end

  int overlap = 0;
  always @(posedge clk)
    if (!rst_pin && !g_node[1].u.rst && g_node[1].u.csw_busy && g_node[1].u.rx_busy && g_node[1].u.ts_busy)
      overlap++;

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


  logic [7:0] p4[], p3[];
  logic [7:0] v;
  int seg, s2;
  logic [7:0] st;

  initial begin
    sck = 1'b0; sdi = 1'b0; ss_n = '1; rst_pin = 1'b1;
    repeat (10) @(posedge clk);
    rst_pin = 1'b0;
    repeat (10) @(posedge clk);
    for (int n = 0; n < N; n++) begin
      wr_reg(n, 6'h01, 8'd4);
      wr_reg(n, 6'h05, 8'(n));
      wr_reg(n, 6'h00, (n == 0) ? 8'h03 : 8'h02);   // time sync on, BN flag
      if (n >= 2) wr_reg(n, 6'h02, 8'd0);
    end
    wr_reg(1, 6'h02, 8'd0);
    wr_reg(3, 6'h03, 8'd8); wr_reg(1, 6'h03, 8'd8);   // SN4 and SN2 use circuits
    // SN3's packet is prepared, SN4's long packet is started
    make_sn2bn(8'd2, 20); p3 = pkt;
    wr_buf(2, 11'd0, p3, p3.size());
    make_sn2bn(8'd3, 250); p4 = pkt;
    wr_buf(3, 11'd0, p4, p4.size());
    wr_reg(3, 6'h08, {3'd0, SEG_ROUTE, 2'd0});
    wait (g_node[1].u.csw_busy && g_node[1].u.u_csw.st == 4'd5);   // circuit carrying data
    wr_reg(2, 6'h08, {3'd0, SEG_ROUTE, 2'd0});
    wr_reg(4, 6'h0D, 8'h01);
    // both packets at the BN
    seg = -1; s2 = -1;
    for (int t = 0; t < 200 && (seg < 0 || s2 < 0); t++) begin
      for (int s = 0; s < NSEG; s++) begin
        rd_reg(0, 6'(8 + s), st);
        if (st[4:2] == SEG_HOST) begin
          rd_buf(0, 11'(s * SEG_BYTES + 2), got, 1);
          if (got[0] == 8'd3 && seg < 0) seg = s;
          if (got[0] == 8'd2 && s2 < 0) s2 = s;
        end
      end
    end
    check(seg >= 0, "SN4 packet at BN");
    check(s2 >= 0, "SN3 packet at BN");
    if (seg >= 0) begin
      rd_buf(0, 11'(seg * SEG_BYTES), got, p4.size());
      for (int k = 0; k < p4.size(); k++) check(got[k] == p4[k], $sformatf("SN4 byte %0d", k));
    end
    if (s2 >= 0) begin
      rd_buf(0, 11'(s2 * SEG_BYTES), got, p3.size());
      for (int k = 0; k < p3.size(); k++) check(got[k] == p3[k], $sformatf("SN3 byte %0d", k));
    end
    check(overlap > 0, $sformatf("circuit, reception and time sync concurrent on SN2 (%0d cycles)", overlap));
    begin
      int d; d = int'(g_node[1].u.ts_time - g_node[4].u.ts_time);
      check(d >= -1 && d <= 1, $sformatf("SN5 time matches SN2 (diff %0d)", d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
