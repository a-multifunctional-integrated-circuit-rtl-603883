// tb_line_status: drives the driver-activity inputs at random and compares
// mask (drive or drive within the last HOLD=4 cycles) and line_free with a
// model kept here.
module tb_line_status;
  import router_pkg::*;
  logic clk = 0, rst = 1;
  logic txa, rxa, tsa; logic [1:0] txp, rxp, tsp;
  logic [3:0] csw_oe, act, pre, mask, free;
  int last[4];
  int checks = 0, failures = 0, cyc = 0;
  line_status dut (.clk, .rst, .tx_active(txa), .tx_port(txp), .rx_active(rxa), .rx_port(rxp),
    .ts_active(tsa), .ts_port(tsp), .csw_oe, .det_active(act), .preamble(pre), .mask, .line_free(free));
  always #5 clk = ~clk;
  initial begin
    {txa, rxa, tsa, txp, rxp, tsp, csw_oe, act, pre} = '0;
    for (int p = 0; p < 4; p++) last[p] = -100;
    repeat (2) @(posedge clk); rst = 0;
    for (int it = 0; it < 500; it++) begin
      @(negedge clk); cyc++;
      txa = ($urandom % 4 == 0); rxa = ($urandom % 6 == 0); tsa = ($urandom % 8 == 0);
      txp = 2'($urandom); rxp = 2'($urandom); tsp = 2'($urandom);
      csw_oe = ($urandom % 5 == 0) ? 4'($urandom) : 4'd0;
      act = ($urandom % 3 == 0) ? 4'($urandom) : 4'd0; pre = ($urandom % 3 == 0) ? 4'($urandom) : 4'd0;
      #1;
      for (int p = 0; p < 4; p++) begin
        logic d, em;
        d = csw_oe[p] | (txa && txp == p) | (rxa && rxp == p) | (tsa && tsp == p);
        em = d || (cyc - last[p] <= 4);
        if (d) last[p] = cyc;
        checks++;
        if (mask[p] !== em || free[p] !== (!em && !act[p] && !pre[p])) begin
          failures++; $display("FAIL port %0d mask %b/%b", p, mask[p], em);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
