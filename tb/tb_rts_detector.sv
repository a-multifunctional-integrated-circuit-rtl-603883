// tb_rts_detector: NRZI frames (8 preamble ones, '0', bytes MSB first) are
// generated here at 4 clocks per bit and fed to one port detector. Checks:
// RTSnn raises the RX request; after the grant the port is owned by RX and
// the bytes of the next frame are streamed; release frees the port; CTS
// gives a response strobe; RTSnd gives a circuit-switch request carrying the
// hop byte (an RX request on the base node); TRQ requests time sync; a
// masked line is ignored; preamble rises during the preamble.
module tb_rts_detector;
  import router_pkg::*;
  logic clk = 0, rst = 1, line = 0, mask = 0, is_bn = 0;
  logic [7:0] div = 8'd4;
  logic req_rx, req_csw, req_ts, gnt_rx = 0, gnt_csw = 0, gnt_ts = 0, reject = 0;
  logic claim_csw = 0, claim_ts = 0, xfer_rx = 0, rearm = 0, release_i = 0;
  logic [7:0] arg, bo, rc;
  owner_e owner;
  logic pre, fs, bv, rv, ls, ck, rd, act;
  int checks = 0, failures = 0;
  logic [7:0] got[$];
  int nresp = 0; logic [7:0] lastresp;
  int pre_seen = 0;

  rts_detector dut (.clk, .rst, .div, .is_bn, .line_i(line), .mask, .req_rx, .req_csw, .req_ts,
    .req_arg(arg), .gnt_rx, .gnt_csw, .gnt_ts, .reject, .claim_csw, .claim_ts, .xfer_rx, .rearm,
    .release_i, .owner, .preamble(pre), .frame_start(fs), .byte_valid(bv), .byte_o(bo),
    .resp_valid(rv), .resp_code(rc), .line_s(ls), .clkrx(ck), .rxdata(rd), .active(act));
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (bv) got.push_back(bo);
    if (!rst && rv) begin nresp++; lastresp = rc; end
    if (pre) pre_seen++;
  end

  task automatic sendbit(input bit b);
    if (b) line = ~line;
    repeat (4) @(negedge clk);
  endtask
  task automatic frame(input logic [7:0] q[$]);
    for (int i = 0; i < 8; i++) sendbit(1);
    sendbit(0);
    foreach (q[k]) for (int i = 7; i >= 0; i--) sendbit(q[k][i]);
    if (line) sendbit(1);
    repeat (12) @(negedge clk);
  endtask
  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0; @(negedge clk);
  endtask

  initial begin
    logic [7:0] pk[$];
    repeat (3) @(negedge clk); rst = 0; repeat (10) @(negedge clk);
    pre_seen = 0;
    frame('{C_RTSNN});
    chk(pre_seen > 20, "preamble signal during preamble");
    chk(req_rx && !req_csw && !req_ts, "RTSnn -> RX request");
    pulse(gnt_rx);
    chk(owner == OWN_RX && !req_rx, "owned by RX after grant");
    pk = '{8'd2, 8'd3, 8'h11, 8'hA5, 8'h00, 8'hFF, 8'h5C};
    got.delete();
    frame(pk);
    chk(got.size() >= pk.size(), $sformatf("bytes streamed %0d", got.size()));
    for (int i = 0; i < pk.size() && i < got.size(); i++) chk(got[i] == pk[i], $sformatf("stream byte %0d", i));
    pulse(release_i);
    chk(owner == OWN_NONE, "released");
    frame('{C_CTS});
    chk(nresp == 1 && lastresp == C_CTS, "CTS response strobe");
    frame('{C_RTSND, hop_byte(5'd3)});
    chk(req_csw && !req_rx && arg == hop_byte(5'd3), "RTSnd -> CSW request with hop byte");
    pulse(reject);
    chk(!req_csw && owner == OWN_NONE, "rejected request dropped");
    is_bn = 1;
    frame('{C_RTSND, hop_byte(5'd2)});
    chk(req_rx && !req_csw, "RTSnd on base node -> RX request");
    pulse(reject);
    is_bn = 0;
    frame('{C_TRQ, TRQ_T1});
    chk(req_ts && arg == TRQ_T1, "TRQ -> time sync request");
    pulse(reject);
    mask = 1; nresp = 0;
    frame('{C_CTS});
    frame('{C_RTSNN});
    chk(nresp == 0 && !req_rx, "masked line ignored");
    mask = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
