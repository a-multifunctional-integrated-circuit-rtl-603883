// tb_mac_serializer: sends frames of random bytes with a bit tick every 3
// clocks. The line is NRZI decoded here at each tick and must read: 8
// preamble ones, a '0', the bytes MSB first; the line must be low when busy
// falls, and the frame must last 8 + 1 + 8*n (+1 closing) bit times.
module tb_mac_serializer;
  import router_pkg::*;
  logic clk = 0, rst = 1, tick;
  logic dv, last, ready, busy, lo;
  logic [7:0] d;
  int checks = 0, failures = 0;
  mac_serializer dut (.clk, .rst, .bit_tick(tick), .data_valid(dv), .data(d), .data_last(last),
    .data_ready(ready), .busy, .line_o(lo));
  always #5 clk = ~clk;
  int tc = 0;
  always @(posedge clk) begin tc <= (tc == 2) ? 0 : tc + 1; end
  assign tick = (tc == 2);

  bit bits[$];
  logic prev = 0;
  logic tick_q;
  always @(posedge clk) begin
    tick_q <= tick;
    if (rst) prev <= 1'b0;
    else if (tick_q && (busy || lo != prev)) begin bits.push_back(lo ^ prev); prev <= lo; end
  end

  task automatic frame(input int n);
    logic [7:0] q[$];
    int k;
    for (int i = 0; i < n; i++) q.push_back(8'($urandom));
    bits.delete();
    k = 0;
    @(negedge clk);
    dv = 1; d = q[0]; last = (n == 1);
    while (k < n) begin
      @(posedge clk);
      if (ready) begin
        k++;
        #1;
        if (k < n) begin d = q[k]; last = (k == n - 1); end else dv = 0;
      end
    end
    wait (!busy);
    repeat (8) @(posedge clk);
    checks++;
    if (lo !== 1'b0) begin failures++; $display("FAIL line left high"); end
    checks++;
    if (bits.size() < 9 + 8 * n || bits.size() > 10 + 8 * n) begin
      failures++; $display("FAIL frame length %0d for %0d bytes", bits.size(), n);
    end else begin
      for (int i = 0; i < 8; i++) begin checks++; if (bits[i] !== 1) begin failures++; $display("FAIL preamble"); end end
      checks++; if (bits[8] !== 0) begin failures++; $display("FAIL delimiter"); end
      for (int b = 0; b < n; b++) begin
        logic [7:0] x;
        for (int i = 0; i < 8; i++) x[7 - i] = bits[9 + 8 * b + i];
        checks++;
        if (x !== q[b]) begin failures++; $display("FAIL byte %0d %h vs %h", b, x, q[b]); end
      end
    end
  endtask

  initial begin
    dv = 0; d = 0; last = 0;
    repeat (3) @(negedge clk); rst = 0;
    frame(1); frame(2); frame(7); frame(20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
