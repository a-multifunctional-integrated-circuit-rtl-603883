// tb_router_buffer: packets are written into segments through the
// microcontroller's bus port and handed to the router (status ROUTE).
// Expected outcomes, worked out here from the packet type and path: SN-to-BN
// on a sensor node -> SEND on the near-node port; on the base node -> HOST;
// BN-to-SN with k < R -> SEND on path port k and k incremented in memory;
// k = R -> HOST; broadcast -> HOST. Also checks free-segment search, bus
// priority (RX over SPI) and the near-node watchdog.
module tb_router_buffer;
  import router_pkg::*;
  logic clk = 0, rst = 1, is_bn = 0, tick = 0;
  logic [1:0] near_port = 2'd2;
  logic [7:0] near_tmo = 0;
  logic [3:0] act = 0;
  buf_req_t [2:0] creq; logic [2:0] cgnt; logic [7:0] rdata;
  seg_upd_t [2:0] cupd;
  seg_status_t [NSEG-1:0] seg_st;
  logic free_avail, busy, ev_host, ev_fwd, ev_path, near_lost;
  logic [SEGW-1:0] free_seg;
  int checks = 0, failures = 0, nlost = 0;
  router_buffer dut (.clk, .rst, .ce(1'b1), .is_bn, .near_port, .near_tmo, .tick512(tick),
    .port_activity(act), .creq, .cgnt, .rdata, .cupd, .seg_st, .free_avail, .free_seg, .busy,
    .ev_host, .ev_fwd, .ev_path, .near_lost);
  always #5 clk = ~clk;
  always @(posedge clk) if (near_lost && !rst) nlost++;
  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic wr(input int a, input logic [7:0] d);
    @(negedge clk); creq[2] = '{req: 1, we: 1, addr: 11'(a), wdata: d};
    @(posedge clk iff cgnt[2]); @(negedge clk); creq[2] = '0;
  endtask
  task automatic rd(input int a, output logic [7:0] d);
    @(negedge clk); creq[2] = '{req: 1, we: 0, addr: 11'(a), wdata: 0};
    @(posedge clk iff cgnt[2]); @(negedge clk); creq[2] = '0; d = rdata;
  endtask
  task automatic route(input int s, input logic [7:0] q[$]);
    foreach (q[k]) wr(s * SEG_BYTES + k, q[k]);
    @(negedge clk); cupd[2] = '{valid: 1, seg: SEGW'(s), val: '{st: SEG_ROUTE, port: 2'd1}};
    @(negedge clk); cupd[2] = '0;
    repeat (20) @(negedge clk);
  endtask
  initial begin
    logic [7:0] d;
    creq = '0; cupd = '0;
    repeat (3) @(negedge clk); rst = 0; @(negedge clk);
    chk(free_avail && free_seg == 0, "all segments free");
    route(0, '{PT_SN2BN, 8'd2, 8'd9, 8'h11, 8'h22});
    chk(seg_st[0].st == SEG_SEND && seg_st[0].port == 2'd2, "SN-to-BN -> near-node port");
    chk(free_seg == 1, "next free segment");
    route(1, '{PT_BN2SN, 8'd1, 8'd3, 8'd1, 8'd0, 8'd3, 8'd1, 8'h77});
    chk(seg_st[1].st == SEG_SEND && seg_st[1].port == 2'd3, "BN-to-SN -> path port k");
    rd(SEG_BYTES + 3, d); chk(d == 8'd2, "path index incremented");
    route(2, '{PT_BN2SN, 8'd1, 8'd2, 8'd2, 8'd0, 8'd1, 8'h55});
    chk(seg_st[2].st == SEG_HOST, "BN-to-SN at its end -> HOST");
    route(3, '{PT_BCAST, 8'd1, 8'd4, 8'h66});
    chk(seg_st[3].st == SEG_HOST, "broadcast -> HOST");
    chk(!free_avail, "no free segment left");
    is_bn = 1;
    @(negedge clk); cupd[1] = '{valid: 1, seg: 0, val: '{st: SEG_FREE, port: 0}}; @(negedge clk); cupd[1] = '0;
    route(0, '{PT_SN2BN, 8'd1, 8'd5, 8'h01});
    chk(seg_st[0].st == SEG_HOST, "SN-to-BN on base node -> HOST");
    // priority: RX and SPI request together, RX goes first
    @(negedge clk);
    creq[0] = '{req: 1, we: 1, addr: 11'd100, wdata: 8'hAB};
    creq[2] = '{req: 1, we: 1, addr: 11'd100, wdata: 8'hCD};
    #1; chk(cgnt[0] && !cgnt[2], "RX has priority over SPI");
    @(negedge clk); creq[0] = '0; #1; chk(cgnt[2], "SPI served next");
    @(negedge clk); creq[2] = '0;
    rd(100, d); chk(d == 8'hCD, "write order");
    // watchdog
    near_tmo = 8'd3; nlost = 0;
    for (int i = 0; i < 5; i++) begin @(negedge clk); tick = 1; @(negedge clk); tick = 0; end
    chk(nlost == 1, $sformatf("near-node loss after 3 silent periods (%0d)", nlost));
    act[2] = 1; @(negedge clk); act[2] = 0;
    for (int i = 0; i < 2; i++) begin @(negedge clk); tick = 1; @(negedge clk); tick = 0; end
    chk(nlost == 1, "activity restarts the watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
