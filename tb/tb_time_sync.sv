// tb_time_sync: the time-sync block with a bit period of DIV=4 clocks.
// Its serial output is NRZI-decoded here. Checks: a sync command sends a
// TRQ/T1 request on the near-node port; a TRQ/TS answer fed back as bytes
// loads the counter with the received value plus the frame-time
// correction; an incoming TRQ/T1 is answered with TRQ/TS carrying the
// counter value taken at the start of the answer; an unanswered request
// times out and releases the port.
module tb_time_sync;
  import router_pkg::*;
  localparam int DIV = 4;
  logic clk = 0, rst = 1, tick;
  logic cmd = 0, start = 0;
  logic [7:0] field = 0;
  logic [3:0] bv = 0; logic [3:0][7:0] bi = 0;
  logic [31:0] t; logic busy, txa, txo, evs, evv;
  logic [3:0] ports, claim, rearm; logic [1:0] txp;
  int checks = 0, failures = 0, tc = 0;
  time_sync #(.PIPE_CLKS(5), .RESP_BITS(80)) dut (.clk, .rst, .ts_ce(1'b1), .bit_tick(tick),
    .div(8'(DIV)), .cmd_sync(cmd), .near_port(2'd1), .start, .start_port(2'd2), .field,
    .byte_valid(bv), .byte_i(bi), .line_free(4'hF), .time_o(t), .busy, .ports, .claim, .rearm,
    .tx_active(txa), .tx_port(txp), .tx_o(txo), .ev_synced(evs), .ev_served(evv));
  always #5 clk = ~clk;
  always @(posedge clk) tc <= (tc == DIV - 1) ? 0 : tc + 1;
  assign tick = (tc == DIV - 1);
  logic tick_d, txa_q, prev = 0;
  bit bits[$];
  logic [7:0] frame[$];
  int nframes = 0; logic [31:0] t_start; logic [1:0] fport;
  always @(posedge clk) begin
    tick_d <= tick; txa_q <= txa;
    if (!rst && txa && !txa_q) begin t_start = t; fport = txp; end
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
  task automatic byte_on(input int p, input logic [7:0] b);
    repeat (32) @(negedge clk); bi[p] = b; bv[p] = 1; @(negedge clk); bv[p] = 0;
  endtask
  task automatic wait_idle();
    int n; n = 0;
    while (busy && n < 20000) begin @(negedge clk); n++; end
    chk(!busy, "block idle");
  endtask
  initial begin
    logic [31:0] v, exp_t; int diff;
    repeat (3) @(negedge clk); rst = 0; @(negedge clk);
    // request and answer
    @(negedge clk); cmd = 1; @(negedge clk); cmd = 0;
    while (nframes < 1) @(negedge clk);
    chk(frame.size() == 2 && frame[0] == C_TRQ && frame[1] == TRQ_T1 && fport == 2'd1, "TRQ/T1 request on near-node port");
    v = $urandom;
    byte_on(1, C_TRQ); byte_on(1, TRQ_TS);
    byte_on(1, v[31:24]); byte_on(1, v[23:16]); byte_on(1, v[15:8]);
    repeat (32) @(negedge clk); bi[1] = v[7:0]; bv[1] = 1; @(negedge clk); bv[1] = 0;
    exp_t = v + 32'(57 * DIV - DIV / 2 + 5);
    diff = int'(t - exp_t);
    chk(diff >= 0 && diff <= 2, $sformatf("counter loaded with corrected time (off by %0d)", diff));
    wait_idle();
    // answer a request
    @(negedge clk); field = TRQ_T1; start = 1; @(negedge clk); start = 0;
    while (nframes < 2) @(negedge clk);
    chk(frame.size() == 6 && frame[0] == C_TRQ && frame[1] == TRQ_TS && fport == 2'd2, "TRQ/TS answer on request port");
    v = {frame[2], frame[3], frame[4], frame[5]};
    diff = int'(v - t_start);
    chk(diff >= -2 && diff <= DIV + 2, $sformatf("answer carries counter at frame start (off by %0d)", diff));
    wait_idle();
    // unanswered request
    @(negedge clk); cmd = 1; @(negedge clk); cmd = 0;
    while (nframes < 3) @(negedge clk);
    wait_idle();
    chk(ports == 0 && nframes == 3, "request port released after timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
