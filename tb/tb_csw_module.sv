// tb_csw_module: the circuit switch is started with RTSnd hop-count bytes
// arriving on port 0, near-node port 3. Checks each evaluation outcome
// (forward, hybrid hand-off at the hop limit, hybrid on a busy near-node
// line above the threshold, release below it, release on a bad CRC3), and
// for a forwarded circuit the switch direction in each phase: backwards
// until CTS, forwards while the data frame passes (its end found from the
// header), backwards for the ACK, then the path is released.
module tb_csw_module;
  import router_pkg::*;
  logic clk = 0, rst = 1, tick;
  logic start = 0, rx_busy = 0;
  logic [7:0] hop_in = 0;
  logic [3:0] lfree = 4'hF, line_s = 0, fs = 0, bv = 0;
  logic [3:0][7:0] bi = 0;
  logic busy, evf, evh, evr, evd;
  logic [3:0] ports, claim, rearm, xfer, sw_o, sw_oe;
  int checks = 0, failures = 0, tc = 0, nf = 0, nh = 0, nr = 0, nd = 0;
  csw_module #(.RESP_BITS(60), .DATA_BITS(400)) dut (.clk, .rst, .ce(1'b1), .bit_tick(tick),
    .max_hop(5'd4), .hop_thr(5'd2), .near_port(2'd3), .rx_busy, .start, .start_port(2'd0),
    .hop_in, .line_free(lfree), .line_s, .frame_start(fs), .byte_valid(bv), .byte_i(bi), .busy,
    .ports, .claim, .rearm, .xfer, .sw_o, .sw_oe, .ev_forward(evf), .ev_hybrid(evh),
    .ev_release(evr), .ev_done(evd));
  always #5 clk = ~clk;
  always @(posedge clk) tc <= (tc == 3) ? 0 : tc + 1;
  assign tick = (tc == 3);
  always @(posedge clk) if (!rst) begin nf += int'(evf); nh += int'(evh); nr += int'(evr); nd += int'(evd); end
  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic go(input logic [7:0] h);
    @(negedge clk); hop_in = h; start = 1; @(negedge clk); start = 0;
  endtask
  task automatic idle();
    int t; t = 0;
    while (busy && t < 5000) begin @(negedge clk); t++; end
    repeat (3) @(negedge clk);
    chk(!busy, "switch released");
  endtask
  task automatic byte_on(input int p, input logic [7:0] b);
    repeat (32) @(negedge clk); bi[p] = b; bv[p] = 1; @(negedge clk); bv[p] = 0;
  endtask
  initial begin
    int a, b;
    repeat (3) @(negedge clk); rst = 0; @(negedge clk);
    // hop-count at the limit: hand the packet to RX
    go(hop_byte(5'd4)); idle();
    chk(nh == 1 && nf == 0, "hybrid at maximum hop-count");
    // near-node line busy, hop-count above threshold: hybrid
    lfree[3] = 0; go(hop_byte(5'd2)); idle();
    chk(nh == 2, "hybrid on busy near-node line");
    // near-node line busy, below threshold: release
    go(hop_byte(5'd1)); idle();
    chk(nr == 1 && nh == 2, "release on busy line below threshold");
    // receiver busy at hand-off time: release
    rx_busy = 1; go(hop_byte(5'd3)); idle(); rx_busy = 0;
    chk(nr == 2, "release when the receiver is busy");
    lfree[3] = 1;
    // bad CRC3
    go(hop_byte(5'd2) ^ 8'h01); idle();
    chk(nr == 3 && nf == 0, "release on bad CRC3");
    // forward and carry a whole exchange
    go(hop_byte(5'd2));
    repeat (10) @(negedge clk);
    chk(nf == 1 && claim == 4'b0000, "circuit extended");
    chk(ports[3] && ports[0], "both ports held");
    while (dut.st == 4'd2) @(negedge clk);
    repeat (3) @(negedge clk);
    a = 0;
    for (int i = 0; i < 20; i++) begin
      line_s = 4'($urandom); repeat (2) @(negedge clk);
      a += int'(sw_oe[0] && !sw_oe[3] && sw_o[0] == line_s[3]);
    end
    chk(a == 20, "backward copy near-node to sender");
    byte_on(3, C_WAIT); byte_on(3, C_CTS);
    repeat (20) @(negedge clk);
    b = 0;
    for (int i = 0; i < 20; i++) begin
      line_s = 4'($urandom); repeat (2) @(negedge clk);
      b += int'(sw_oe[3] && !sw_oe[0] && sw_o[3] == line_s[0]);
    end
    chk(b == 20, "forward copy sender to near-node");
    @(negedge clk); fs[0] = 1; @(negedge clk); fs[0] = 0;
    byte_on(0, PT_SN2BN); byte_on(0, 8'd2); byte_on(0, 8'd7);
    chk(dut.st == 4'd5, "still forwarding inside the frame");
    byte_on(0, 8'h11); byte_on(0, 8'h22); byte_on(0, 8'h5E);
    repeat (20) @(negedge clk);
    chk(dut.st == 4'd7 && sw_oe[0] && !sw_oe[3], "backward again for ACK");
    byte_on(3, C_ACK);
    idle();
    chk(nd == 1 && nr == 3, "exchange completed");
    // forward but no answer: timeout releases
    go(hop_byte(5'd1)); idle();
    chk(nf == 2 && nr == 4, "release after no CTS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
