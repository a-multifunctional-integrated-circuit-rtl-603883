// tb_cdr: a random NRZI bit stream at DIV=4 clocks per bit, with the bit
// edges jittered by one clock now and then, is fed to the recovery circuit.
// The decoded bits must equal the transmitted bits, one per bit period.
module tb_cdr;
  logic clk = 0, rst = 1, line = 0;
  logic [7:0] div = 8'd4;
  logic line_s, edge_o, stb, val, clkrx;
  int checks = 0, failures = 0;
  bit sent[$];
  int nrx = 0;
  cdr dut (.clk, .rst, .div, .line_i(line), .line_s, .edge_o, .bit_stb(stb), .bit_val(val), .clkrx);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && stb && sent.size() > 0 && nrx < 1000) begin
    bit e;
    e = sent.pop_front();
    checks++; nrx++;
    if (val !== e) begin failures++; $display("FAIL bit %0d: %b vs %b", nrx, val, e); end
  end
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    // let the recovery lock on idle: the line stays low, zeros are decoded
    repeat (8) begin sent.push_back(0); end
    repeat (32) @(negedge clk);
    sent.delete();
    repeat (2) @(negedge clk);
    // start: a first transition aligns the phase
    for (int i = 0; i < 1000; i++) begin
      bit b;
      int len;
      b = ($urandom % 2);
      if (i == 0) b = 1;
      if (b) line = ~line;
      sent.push_back(b);
      len = 4;
      if ($urandom % 10 == 0) len = ($urandom % 2) ? 5 : 3;
      if (!b) len = 4;
      repeat (len) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (nrx < 990) begin failures++; $display("FAIL only %0d bits recovered", nrx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
