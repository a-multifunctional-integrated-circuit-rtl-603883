// tb_tx_module: the transmitter is given a packet in a SEND segment of a
// modelled buffer. Its serial output is NRZI-decoded here and split into
// frames. Checks: packet mode sends RTSnn, then after CTS the stored bytes
// and a correct CRC-8, and frees the segment on ACK; circuit mode sends
// RTSnd with hop-count 1 and its CRC3, and WAIT keeps it waiting past the
// response timeout; an unanswered RTS is retried MAX_TRY times and the
// segment then ends in FAIL.
module tb_tx_module;
  import router_pkg::*;
  logic clk = 0, rst = 1, tick;
  logic is_bn = 0; logic [4:0] max_hop = 1;
  seg_status_t [NSEG-1:0] seg_st;
  logic [3:0] rv = 0; logic [3:0][7:0] rc = 0;
  seg_upd_t upd; buf_req_t breq; logic bgnt; logic [7:0] brdata;
  logic busy, txa, txo, ev_sent, ev_fail, ev_retry, ev_wait, ev_circuit;
  logic [1:0] txp;
  logic [7:0] mem [2048];
  int checks = 0, failures = 0, tc = 0, nret = 0, nwait = 0;
  tx_module #(.RESP_BITS(40), .MAX_TRY(3)) dut (.clk, .rst, .ce(1'b1), .bit_tick(tick), .is_bn,
    .max_hop, .node_id(8'd3), .seg_st, .line_free(4'hF), .resp_valid(rv), .resp_code(rc), .upd,
    .breq, .bgnt, .brdata, .busy, .tx_active(txa), .tx_port(txp), .tx_o(txo), .ev_sent,
    .ev_fail, .ev_retry, .ev_wait, .ev_circuit);
  always #5 clk = ~clk;
  always @(posedge clk) tc <= (tc == 3) ? 0 : tc + 1;
  assign tick = (tc == 3);
  assign bgnt = breq.req;
  always @(posedge clk) begin
    if (breq.req && !breq.we) brdata <= mem[breq.addr];
    if (rst) seg_st <= '0;
    else if (upd.valid) seg_st[upd.seg] <= upd.val;
    if (!rst && ev_retry) nret++;
    if (!rst && ev_wait) nwait++;
  end
  // NRZI decoder and frame splitter
  logic tick_d, txa_q, prev = 0;
  bit bits[$];
  logic [7:0] frame[$];
  int nframes = 0;
  always @(posedge clk) begin
    tick_d <= tick; txa_q <= txa;
    if (!rst && tick_d && (txa || txa_q)) begin bits.push_back(txo ^ prev); prev = txo; end
    if (!rst && txa_q && !txa) begin
      int k, ones; ones = 0; k = 0;
      while (k < bits.size() && !(ones >= 8 && bits[k] == 0)) begin ones = bits[k] ? ones + 1 : 0; k++; end
      k++;
      frame.delete();
      while (k + 8 <= bits.size()) begin
        logic [7:0] b; for (int i = 0; i < 8; i++) b[7 - i] = bits[k + i];
        frame.push_back(b); k += 8;
      end
      bits.delete(); nframes++;
    end
  end
  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic reply(input logic [7:0] code);
    repeat (20) @(negedge clk);
    rv[2] = 1; rc[2] = code; @(negedge clk); rv[2] = 0;
  endtask
  task automatic wait_frames(input int n);
    int t; t = 0;
    while (nframes < n && t < 20000) begin @(negedge clk); t++; end
    chk(nframes >= n, $sformatf("frame %0d sent", n));
  endtask
  initial begin
    logic [7:0] p[$]; logic [7:0] c;
    repeat (3) @(negedge clk); rst = 0; @(negedge clk);
    // packet mode
    p = '{PT_SN2BN, 8'd6, 8'd9};
    for (int i = 0; i < 6; i++) p.push_back(8'($urandom));
    foreach (p[k]) mem[SEG_BYTES + k] = p[k];
    seg_st[1] = '{st: SEG_SEND, port: 2'd2};
    wait_frames(1);
    chk(frame.size() >= 1 && frame[0] == C_RTSNN && txp == 2'd2, "RTSnn on port 2");
    reply(C_CTS);
    wait_frames(2);
    c = 0; foreach (p[k]) c = crc8_byte(c, p[k]);
    chk(frame.size() >= p.size() + 1, "data frame length");
    foreach (p[k]) chk(frame[k] == p[k], $sformatf("data byte %0d", k));
    chk(frame[p.size()] == c, "CRC-8 byte");
    chk(seg_st[1].st == SEG_TXING, "segment TXING while waiting for ACK");
    reply(C_ACK);
    repeat (5) @(negedge clk);
    chk(seg_st[1].st == SEG_FREE, "segment freed after ACK");
    // circuit mode with WAIT
    max_hop = 4;
    seg_st[0] = '{st: SEG_SEND, port: 2'd2};
    foreach (p[k]) mem[k] = p[k];
    wait_frames(3);
    chk(frame.size() >= 2 && frame[0] == C_RTSND && frame[1] == hop_byte(5'd1), "RTSnd with hop 1");
    for (int w = 0; w < 4; w++) begin repeat (120) @(negedge clk); rv[2] = 1; rc[2] = C_WAIT; @(negedge clk); rv[2] = 0; end
    repeat (3) @(negedge clk);
    chk(nret == 0 && nwait == 4, $sformatf("WAIT holds off the timeout (%0d %0d)", nret, nwait));
    reply(C_CTS);
    wait_frames(4);
    chk(frame.size() >= p.size() + 1 && frame[p.size()] == c, "circuit data frame");
    reply(C_ACK);
    repeat (5) @(negedge clk);
    chk(seg_st[0].st == SEG_FREE, "circuit segment freed");
    // unanswered: retries then FAIL
    max_hop = 1;
    seg_st[3] = '{st: SEG_SEND, port: 2'd2};
    foreach (p[k]) mem[3 * SEG_BYTES + k] = p[k];
    begin int t; t = 0; while (seg_st[3].st != SEG_FAIL && t < 100000) begin @(negedge clk); t++; end end
    chk(seg_st[3].st == SEG_FAIL, "segment FAIL after retries");
    chk(nret == 2, "two retries before failure");
    chk(nframes == 7, "three RTS attempts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (300000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
