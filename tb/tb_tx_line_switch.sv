// tb_tx_line_switch: random source activity; each line's registered level
// and enable must follow the priority circuit switch > RX > time sync > TX,
// one cycle later, computed here independently.
module tb_tx_line_switch;
  import router_pkg::*;
  logic clk = 0, rst = 1;
  logic txa, rxa, tsa, txo, rxo, tso; logic [1:0] txp, rxp, tsp;
  logic [3:0] csw_oe, csw_o, lo, ls, elo, els;
  int checks = 0, failures = 0;
  tx_line_switch dut (.clk, .rst, .tx_active(txa), .tx_port(txp), .tx_o(txo), .rx_active(rxa),
    .rx_port(rxp), .rx_o(rxo), .ts_active(tsa), .ts_port(tsp), .ts_o(tso), .csw_oe, .csw_o,
    .l_out(lo), .line_sel(ls));
  always #5 clk = ~clk;
  initial begin
    {txa, rxa, tsa, txo, rxo, tso, txp, rxp, tsp, csw_oe, csw_o} = '0;
    repeat (2) @(posedge clk); rst = 0;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      {txa, rxa, tsa, txo, rxo, tso} = 6'($urandom);
      {txp, rxp, tsp} = 6'($urandom); csw_oe = 4'($urandom) & 4'($urandom); csw_o = 4'($urandom);
      for (int p = 0; p < 4; p++) begin
        if (csw_oe[p]) begin elo[p] = csw_o[p]; els[p] = 1; end
        else if (rxa && rxp == p) begin elo[p] = rxo; els[p] = 1; end
        else if (tsa && tsp == p) begin elo[p] = tso; els[p] = 1; end
        else if (txa && txp == p) begin elo[p] = txo; els[p] = 1; end
        else begin elo[p] = 0; els[p] = 0; end
      end
      @(negedge clk);
      checks++;
      if (lo !== elo || ls !== els) begin failures++; $display("FAIL %b/%b %b/%b", lo, elo, ls, els); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
