// tb_rst_signal_gen: each receiver's busy signal is raised with a port mask
// and dropped; a release pulse must appear exactly once, on the ports the
// receiver used, in the cycle busy falls, and never otherwise.
module tb_rst_signal_gen;
  import router_pkg::*;
  logic clk = 0, rst = 1;
  logic rx_busy, csw_busy, ts_busy;
  logic [3:0] rxp, cswp, tsp, rxr, cswr, tsr;
  int checks = 0, failures = 0;
  rst_signal_gen dut (.clk, .rst, .rx_busy, .csw_busy, .ts_busy, .rx_ports(rxp), .csw_ports(cswp),
    .ts_ports(tsp), .rx_rst(rxr), .csw_rst(cswr), .ts_rst(tsr));
  always #5 clk = ~clk;
  task automatic run(input int which, input logic [3:0] m, input int len);
    logic [3:0] seen; seen = '0;
    @(negedge clk);
    case (which) 0: begin rx_busy = 1; rxp = m; end 1: begin csw_busy = 1; cswp = m; end default: begin ts_busy = 1; tsp = m; end endcase
    repeat (len) begin @(negedge clk); checks++; if ((rxr | cswr | tsr) != 0) begin failures++; $display("FAIL early pulse"); end end
    case (which) 0: rx_busy = 0; 1: csw_busy = 0; default: ts_busy = 0; endcase
    rxp = '0; cswp = '0; tsp = '0;
    #1;
    checks++;
    case (which)
      0: seen = rxr; 1: seen = cswr; default: seen = tsr;
    endcase
    if (seen !== m) begin failures++; $display("FAIL pulse %b vs %b", seen, m); end
    @(negedge clk); checks++;
    if ((rxr | cswr | tsr) != 0) begin failures++; $display("FAIL pulse too long"); end
  endtask
  initial begin
    rx_busy = 0; csw_busy = 0; ts_busy = 0; rxp = 0; cswp = 0; tsp = 0;
    repeat (2) @(posedge clk); rst = 0;
    for (int i = 0; i < 30; i++) run(i % 3, 4'($urandom_range(1, 15)), $urandom_range(1, 10));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
