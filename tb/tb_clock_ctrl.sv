// tb_clock_ctrl: checks the synchronous reset from a one-cycle RST pin
// pulse, that clk2tx ticks every `div` clocks while awake and stops while
// asleep, that a wake condition restores the core enable at once, and that
// clkrx512 ticks once per 512 bit ticks.
module tb_clock_ctrl;
  logic clk = 0, rst_pin = 1, rst;
  logic [7:0] div;
  logic sleep_en, ts_en, wake, clk_en, clk_ts_en, clk2tx, clkrx512, clk_led, asleep;
  int checks = 0, failures = 0;
  clock_ctrl #(.LEDW(8)) dut (.clk, .rst_pin, .rst, .div, .sleep_en, .ts_en, .wake, .clk_en,
    .clk_ts_en, .clk2tx, .clkrx512, .clk_led, .asleep);
  always #5 clk = ~clk;
  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    int n, t, t512;
    div = 8'd5; sleep_en = 0; ts_en = 1; wake = 0;
    @(negedge clk); rst_pin = 1; @(negedge clk); rst_pin = 0;
    @(negedge clk); chk(rst == 1, "reset asserted after one-cycle pin pulse");
    repeat (3) @(negedge clk); chk(rst == 0, "reset released");
    // tick period
    n = 0; t = -1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      if (clk2tx) begin if (t >= 0) chk(i - t == 5, "tick period = div"); t = i; n++; end
    end
    chk(n == 40, "tick count");
    chk(clk_ts_en == 1, "time-sync clock enabled");
    // sleep
    sleep_en = 1; #1;
    chk(clk_en == 0 && asleep == 1, "asleep");
    n = 0; repeat (50) begin @(negedge clk); if (clk2tx) n++; end
    chk(n == 0, "no ticks while asleep");
    wake = 1; #1; chk(clk_en == 1, "wake restores enable");
    n = 0; repeat (50) begin @(negedge clk); if (clk2tx) n++; end
    chk(n == 10, "ticks while woken");
    wake = 0; sleep_en = 0; div = 2;
    n = 0; t512 = 0;
    for (int i = 0; i < 4000; i++) begin @(negedge clk); if (clk2tx) n++; if (clkrx512) t512++; end
    chk(n == 2000 && (t512 == 3 || t512 == 4), $sformatf("512 divider %0d %0d", n, t512));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
