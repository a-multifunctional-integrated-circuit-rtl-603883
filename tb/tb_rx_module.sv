// tb_rx_module: the receiver is started on port 1 and fed the byte stream
// the port detector would deliver. Checks: a CTS frame is sent on port 1,
// every stored byte lands at its offset in the allocated segment, the CRC-8
// (computed here bit by bit with the 1-Wire polynomial) is accepted, ACK is
// sent and the segment becomes ROUTE; a corrupted CRC frees the segment
// without ACK; with no free segment no CTS is sent; a BN-to-SN header sets
// the length from its path field.
module tb_rx_module;
  import router_pkg::*;
  logic clk = 0, rst = 1, tick;
  logic start = 0, xfer = 0, free_avail = 1;
  logic [3:0] fs = 0, bv = 0;
  logic [3:0][7:0] bi = 0;
  seg_upd_t upd; buf_req_t breq; logic bgnt;
  logic busy, txa, txo, ev_ok, ev_err;
  logic [3:0] ports, rearm; logic [1:0] txp;
  logic [7:0] mem [2048];
  int checks = 0, failures = 0, nframes = 0, tc = 0;
  seg_status_t last_upd; int nupd = 0;
  rx_module dut (.clk, .rst, .ce(1'b1), .bit_tick(tick), .start, .start_port(2'd1), .xfer,
    .xfer_port(2'd0), .frame_start(fs), .byte_valid(bv), .byte_i(bi), .free_avail,
    .free_seg(2'd2), .upd, .breq, .bgnt, .busy, .ports, .rearm, .tx_active(txa), .tx_port(txp),
    .tx_o(txo), .ev_ok, .ev_err);
  always #5 clk = ~clk;
  always @(posedge clk) tc <= (tc == 3) ? 0 : tc + 1;
  assign tick = (tc == 3);
  assign bgnt = breq.req;
  logic txa_q;
  always @(posedge clk) begin
    if (breq.req && breq.we) mem[breq.addr] <= breq.wdata;
    if (!rst && upd.valid) begin last_upd = upd.val; nupd++; end
    txa_q <= txa;
    if (!rst && txa && !txa_q) begin nframes++; if (txp != 2'd1) begin failures++; $display("FAIL frame on wrong port"); end end
  end
  function automatic logic [7:0] crc_ref(input logic [7:0] q[$]);
    logic [7:0] c; c = 0;
    foreach (q[k]) for (int i = 0; i < 8; i++) begin
      logic fb; fb = c[0] ^ q[k][i];
      c = c >> 1;
      if (fb) c = c ^ 8'h8C;
    end
    return c;
  endfunction
  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic rx_pkt(input logic [7:0] q[$], input bit bad, output bit ok);
    int n0;
    logic [7:0] c;
    n0 = nframes;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (200) @(negedge clk);
    chk(nframes == n0 + 1, "CTS sent");
    c = crc_ref(q) ^ (bad ? 8'h01 : 8'h00);
    q.push_back(c);
    @(negedge clk); fs[1] = 1; @(negedge clk); fs[1] = 0;
    foreach (q[k]) begin
      repeat (31) @(negedge clk);
      bi[1] = q[k]; bv[1] = 1; @(negedge clk); bv[1] = 0;
    end
    repeat (300) @(negedge clk);
    ok = (nframes == n0 + 2);
    chk(!busy, "receiver idle again");
  endtask
  initial begin
    logic [7:0] p[$]; bit ok;
    repeat (3) @(negedge clk); rst = 0; @(negedge clk);
    p = '{PT_SN2BN, 8'd5, 8'd7};
    for (int i = 0; i < 5; i++) p.push_back(8'($urandom));
    rx_pkt(p, 0, ok);
    chk(ok, "ACK sent for good CRC");
    chk(last_upd.st == SEG_ROUTE && last_upd.port == 2'd1, "segment set to ROUTE with arrival port");
    foreach (p[k]) chk(mem[2 * SEG_BYTES + k] == p[k], $sformatf("stored byte %0d", k));
    p[4] = p[4] ^ 8'h10;
    rx_pkt(p, 1, ok);
    chk(!ok, "no ACK for bad CRC");
    chk(last_upd.st == SEG_FREE, "segment freed after bad CRC");
    p = '{PT_BN2SN, 8'd2, 8'd2, 8'd0, 8'd1, 8'd3, 8'hAA, 8'hBB};
    rx_pkt(p, 0, ok);
    chk(ok && last_upd.st == SEG_ROUTE, "BN-to-SN length from path field");
    chk(mem[2 * SEG_BYTES + 7] == 8'hBB, "last payload byte stored");
    free_avail = 0;
    begin
      int n0; n0 = nframes;
      @(negedge clk); start = 1; @(negedge clk); start = 0; repeat (200) @(negedge clk);
      chk(nframes == n0 && !busy, "no CTS without a free segment");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
