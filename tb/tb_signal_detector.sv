// tb_signal_detector: RTSnn frames arrive on ports 1 and 2 at the same time.
// Exactly one RX start must follow, for one of the two ports, and the other
// request must be released. The chosen port becomes owned by RX and its data
// frame is streamed; when RX busy falls the port is freed by RX_RST. Then a
// TRQ on port 3 must start time sync for port 3 while port 0 carries a CTS.
module tb_signal_detector;
  import router_pkg::*;
  logic clk = 0, rst = 1;
  logic [3:0] line = 0, mask = 0;
  logic rx_busy = 0, csw_busy = 0, ts_busy = 0;
  logic [3:0] rx_ports = 0;
  logic rx_start, csw_start, ts_start;
  logic [2:0][1:0] sp;
  logic [3:0][7:0] arg, bo, rc;
  owner_e [3:0] owner;
  logic [3:0] pre, fs, bv, rv, ls, ck, rd, act;
  int checks = 0, failures = 0, nrx = 0, nts = 0, ncts = 0;
  int rxport = -1, tsport = -1;
  int nbytes[4];
  signal_detector dut (.clk, .rst, .div(8'd4), .is_bn(1'b0), .line_i(line), .mask,
    .rx_busy, .csw_busy, .ts_busy, .rx_ports, .csw_ports(4'd0), .ts_ports(4'd0),
    .rx_start, .csw_start, .ts_start, .start_port(sp), .req_arg(arg),
    .claim_csw(4'd0), .claim_ts(4'd0), .xfer_rx(4'd0), .rearm(4'd0),
    .owner, .preamble(pre), .frame_start(fs), .byte_valid(bv), .byte_o(bo),
    .resp_valid(rv), .resp_code(rc), .line_s(ls), .clkrx(ck), .rxdata(rd), .active(act));
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (!rst && rx_start) begin nrx++; rxport = sp[0]; end
    if (!rst && ts_start) begin nts++; tsport = sp[2]; end
    for (int p = 0; p < 4; p++) begin
      if (bv[p]) nbytes[p]++;
      if (rv[p] && rc[p] == C_CTS && p == 0) ncts++;
    end
  end
  task automatic sendbits(input logic [3:0] en, input logic [7:0] q[$], input logic [3:0] en2, input logic [7:0] q2[$]);
    bit b[$], b2[$];
    for (int i = 0; i < 8; i++) begin b.push_back(1); b2.push_back(1); end
    b.push_back(0); b2.push_back(0);
    foreach (q[k]) for (int i = 7; i >= 0; i--) b.push_back(q[k][i]);
    foreach (q2[k]) for (int i = 7; i >= 0; i--) b2.push_back(q2[k][i]);
    for (int i = 0; i < b.size() || i < b2.size(); i++) begin
      for (int p = 0; p < 4; p++) begin
        if (en[p] && i < b.size() && b[i]) line[p] = ~line[p];
        if (en2[p] && i < b2.size() && b2[i]) line[p] = ~line[p];
      end
      repeat (4) @(negedge clk);
    end
    for (int p = 0; p < 4; p++) if (line[p]) line[p] = 0;
    repeat (12) @(negedge clk);
  endtask
  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    for (int p = 0; p < 4; p++) nbytes[p] = 0;
    repeat (3) @(negedge clk); rst = 0; repeat (10) @(negedge clk);
    fork
      begin
        @(posedge clk iff rx_start); @(negedge clk); rx_busy = 1; rx_ports = 4'(1) << rxport;
      end
      sendbits(4'b0110, '{C_RTSNN}, 4'b0000, '{});
    join
    chk(nrx == 1 && (rxport == 1 || rxport == 2), $sformatf("one RX start, port %0d", rxport));
    chk(owner[rxport] == OWN_RX && owner[3 - rxport] == OWN_NONE, "winner owned, loser released");
    chk(!act[3 - rxport], "losing detector back to idle");
    sendbits(4'(1) << rxport, '{8'd2, 8'd1, 8'd7, 8'h42, 8'h99}, 4'b0000, '{});
    chk(nbytes[rxport] >= 5 && nbytes[3 - rxport] == 0, "data frame streamed to RX port only");
    @(negedge clk); rx_busy = 0; rx_ports = 0; repeat (3) @(negedge clk);
    chk(owner[rxport] == OWN_NONE, "RX_RST freed the port");
    sendbits(4'b1000, '{C_TRQ, TRQ_T1}, 4'b0001, '{C_CTS});
    chk(nts == 1 && tsport == 3, "TRQ started time sync on port 3");
    chk(ncts == 1, "CTS on port 0 seen concurrently");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
