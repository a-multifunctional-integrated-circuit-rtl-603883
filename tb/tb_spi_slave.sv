// tb_spi_slave: a mode-0 SPI master (SCK = clk/8) sends random bytes in
// transactions of random length. Each received byte and the first-byte flag
// are checked; the slave echoes (byte XOR 0x5A) of the byte just received,
// which the master must read back during the following byte.
module tb_spi_slave;
  logic clk = 0, rst = 1, sck = 0, ss_n = 1, sdi = 0;
  logic sdo, ss_active, rx_valid, first;
  logic [7:0] rx_byte, tx_byte;
  int checks = 0, failures = 0;
  logic [7:0] exp_q[$];
  bit exp_first[$];
  spi_slave dut (.clk, .rst, .sck, .ss_n, .sdi, .sdo, .ss_active, .rx_valid, .rx_byte, .first, .tx_byte);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && rx_valid) begin
    logic [7:0] e; bit f;
    e = exp_q.pop_front(); f = exp_first.pop_front();
    checks++;
    if (rx_byte !== e || first !== f) begin failures++; $display("FAIL rx %h/%h first %b/%b", rx_byte, e, first, f); end
    tx_byte <= rx_byte ^ 8'h5A;
  end
  task automatic xfer(input logic [7:0] o, output logic [7:0] i);
    for (int b = 7; b >= 0; b--) begin
      sdi = o[b]; repeat (4) @(negedge clk);
      sck = 1; i[b] = sdo; repeat (4) @(negedge clk); sck = 0;
    end
  endtask
  initial begin
    logic [7:0] prev, r;
    tx_byte = 0;
    repeat (3) @(negedge clk); rst = 0; repeat (4) @(negedge clk);
    for (int t = 0; t < 20; t++) begin
      int n; n = $urandom_range(1, 6);
      ss_n = 0; repeat (6) @(negedge clk);
      for (int k = 0; k < n; k++) begin
        logic [7:0] o; o = 8'($urandom);
        exp_q.push_back(o); exp_first.push_back(k == 0);
        xfer(o, r);
        if (k > 0) begin checks++; if (r !== (prev ^ 8'h5A)) begin failures++; $display("FAIL sdo %h", r); end end
        prev = o;
      end
      repeat (6) @(negedge clk); ss_n = 1; repeat (10) @(negedge clk);
    end
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL bytes missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
