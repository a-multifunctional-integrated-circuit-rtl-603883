// tb_control: byte-level SPI commands are fed to the register file (as the
// SPI slave would deliver them), with a small buffer memory model on its
// buffer port. Checks register writes and read-back, segment status writes,
// write-1-to-clear interrupt status and the INT pin, the time-sync command
// pulse, and buffer write then read with auto-increment.
module tb_control;
  import router_pkg::*;
  logic clk = 0, rst = 1;
  logic ss_active = 0, rx_valid = 0, first = 0;
  logic [7:0] rx_byte = 0, tx_byte;
  buf_req_t breq; logic bgnt; logic [7:0] brdata;
  seg_status_t [NSEG-1:0] seg_st;
  seg_upd_t upd;
  logic [5:0] ev = 0;
  logic is_bn, ts_en, sleep_en, cmd_sync, int_o, ledr, ledg;
  logic [7:0] div, node_id, near_tmo; logic [1:0] near_port; logic [4:0] max_hop, hop_thr;
  logic [7:0] mem [2048];
  int checks = 0, failures = 0, nsync = 0;
  control dut (.clk, .rst, .ss_active, .rx_valid, .rx_byte, .first, .tx_byte, .breq, .bgnt, .brdata,
    .seg_st, .upd, .ev, .time_i(32'h01020304), .clk_led(1'b0), .awake(1'b1),
    .is_bn, .ts_en, .sleep_en, .div, .near_port, .max_hop, .hop_thr, .node_id, .near_tmo,
    .cmd_sync, .int_o, .ledr, .ledg);
  always #5 clk = ~clk;
  // buffer model: grant after one cycle of request, data the cycle after
  always @(posedge clk) begin
    bgnt <= breq.req && !bgnt;
    if (bgnt) begin if (breq.we) mem[breq.addr] <= breq.wdata; brdata <= mem[breq.addr]; end
    if (upd.valid) seg_st[upd.seg] <= upd.val;
    if (!rst && cmd_sync) nsync++;
  end
  task automatic sb(input logic [7:0] b, input bit f, output logic [7:0] r);
    @(negedge clk); rx_byte = b; first = f; rx_valid = 1;
    @(negedge clk); rx_valid = 0;
    repeat (10) @(negedge clk);
    r = tx_byte;
  endtask
  task automatic txn(input logic [7:0] q[$], output logic [7:0] r[$]);
    logic [7:0] x;
    r.delete();
    ss_active = 1; repeat (2) @(negedge clk);
    foreach (q[k]) begin sb(q[k], k == 0, x); r.push_back(x); end
    ss_active = 0; repeat (2) @(negedge clk);
  endtask
  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    logic [7:0] r[$];
    seg_st = '0; bgnt = 0;
    repeat (3) @(negedge clk); rst = 0;
    chk(div == 8'd4 && max_hop == 5'd1 && hop_thr == 5'd1, "reset values");
    txn('{8'h00, 8'h07}, r); chk(is_bn && ts_en && sleep_en, "CONFIG write");
    txn('{8'h01, 8'd9}, r);  chk(div == 8'd9, "DIV write");
    txn('{8'h01, 8'd1}, r);  chk(div == 8'd2, "DIV clamps at 2");
    txn('{8'h02, 8'd3}, r);  chk(near_port == 2'd3, "NEAR_PORT");
    txn('{8'h03, 8'd6}, r);  chk(max_hop == 5'd6, "MAX_HOP");
    txn('{8'h04, 8'd5}, r);  chk(hop_thr == 5'd5, "HOP_THR");
    txn('{8'h45, 8'h00}, r); chk(r[0] == node_id, "read NODE_ID");
    txn('{8'h05, 8'hA7}, r); txn('{8'h45, 8'h00}, r); chk(r[0] == 8'hA7, "NODE_ID read-back");
    txn('{8'h43, 8'h00}, r); chk(r[0] == 8'd6, "MAX_HOP read-back");
    txn('{8'h0A, {3'd0, SEG_ROUTE, 2'd1}}, r); repeat (2) @(negedge clk);
    chk(seg_st[2].st == SEG_ROUTE && seg_st[2].port == 2'd1, "segment status write");
    txn('{8'h4A, 8'h00}, r); chk(r[0] == {3'd0, SEG_ROUTE, 2'd1}, "segment status read");
    txn('{8'h07, 8'h03}, r);
    @(negedge clk); ev = 6'b000100; @(negedge clk); ev = 0; @(negedge clk);
    chk(!int_o && ledr, "masked event: no INT, LEDR on fail");
    @(negedge clk); ev = 6'b000001; @(negedge clk); ev = 0; @(negedge clk);
    chk(int_o, "unmasked event raises INT");
    txn('{8'h46, 8'h00}, r); chk(r[0] == 8'h05, "INT_STATUS read");
    txn('{8'h06, 8'h01}, r); chk(!int_o, "write-1-to-clear");
    txn('{8'h0D, 8'h01}, r); chk(nsync == 1, "time-sync command pulse");
    txn('{8'h80, 8'h03, 8'hFE, 8'h11, 8'h22, 8'h33, 8'h44}, r);
    chk(mem[11'h3FE] == 8'h11 && mem[11'h3FF] == 8'h22 && mem[11'h400] == 8'h33 && mem[11'h401] == 8'h44,
        "buffer write with auto-increment");
    txn('{8'hC0, 8'h03, 8'hFE, 8'h00, 8'h00, 8'h00, 8'h00}, r);
    // r[k] is what the slave returns during byte k+1
    chk(r[2] == 8'h11 && r[3] == 8'h22 && r[4] == 8'h33 && r[5] == 8'h44,
        $sformatf("buffer read %h %h %h %h", r[2], r[3], r[4], r[5]));
    txn('{8'h50, 8'h00}, r); chk(r[0] == 8'h01, "time stamp high byte");
    txn('{8'h53, 8'h00}, r); chk(r[0] == 8'h04, "time stamp low byte (latched)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
