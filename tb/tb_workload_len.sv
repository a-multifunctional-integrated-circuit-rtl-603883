// tb_workload_len: packet-length workload on the four-node chain
//   BN(p3) --- (p3)SN1(p1) --- (p2)SN2(p0) --- (p3)SN3
// at the top data rate of 2 system clocks per bit (35 Mbps at 70 MHz).
// SN3 sends SN-to-BN packets with payloads of 1, 100, 250 and 255 bytes,
// once by packet switching (three store-and-forward hops) and once by
// circuit switching (one circuit through SN2 and SN1). Every packet is read
// back from the base node's buffer and compared byte by byte. The delay
// from SN3's router handing the packet to its transmitter to its good reception at the BN
// is measured; its growth with length must match the line time of the
// extra bytes: 8 bits x DIV clocks per byte, once per hop for packet
// switching and once in total for circuit switching (within 2%).
`timescale 1ns/1ps
module tb_workload_len;
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

  // time of the last good reception at the base node
  // and of the source router handing the packet to its transmitter
  longint t_bn, t_src;
  always @(posedge clk) if (!rst_pin && !n0.rst) begin
    if (n0.u_rx.ev_ok) t_bn = $time;
    if (n3.u_rb.ev_fwd) t_src = $time;
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


  longint dp[4], dc[4];
  int lens[4] = '{1, 100, 250, 255};
  logic [7:0] v;

  task automatic run(input int len, output longint d);
    make_sn2bn(8'd3, len);
    t_bn = 0; t_src = 0;
    send_and_check(3, 0, $sformatf("len %0d", len), d);
    d = (t_bn - t_src) / 10;
  endtask

  initial begin
    sck = 1'b0; sdi = 1'b0; ss_n = '1; rst_pin = 1'b1;
    repeat (10) @(posedge clk);
    rst_pin = 1'b0;
    repeat (10) @(posedge clk);
    for (int n = 0; n < N; n++) begin
      wr_reg(n, 6'h01, 8'd2);
      wr_reg(n, 6'h05, 8'(n));
    end
    wr_reg(0, 6'h00, 8'h01);
    wr_reg(1, 6'h02, 8'd3); wr_reg(2, 6'h02, 8'd2); wr_reg(3, 6'h02, 8'd3);
    // packet switching
    for (int i = 0; i < 4; i++) run(lens[i], dp[i]);
    // circuit switching
    for (int n = 1; n < N; n++) wr_reg(n, 6'h03, 8'd8);
    for (int i = 0; i < 4; i++) run(lens[i], dc[i]);
    for (int i = 0; i < 4; i++)
      $display("payload %0d B: packet switching %0d cycles, circuit switching %0d cycles", lens[i], dp[i], dc[i]);
    for (int i = 1; i < 4; i++) begin
      longint ep, ec, gp, gc;
      ec = longint'(lens[i] - lens[0]) * 8 * 2;
      ep = 3 * ec;
      gp = dp[i] - dp[0]; gc = dc[i] - dc[0];
      check(gp * 100 >= ep * 98 && gp * 100 <= ep * 102, $sformatf("packet-switching growth %0d vs %0d", gp, ep));
      check(gc * 100 >= ec * 98 && gc * 100 <= ec * 102, $sformatf("circuit-switching growth %0d vs %0d", gc, ec));
      check(dc[i] < dp[i], "circuit switching faster than packet switching");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
