// clock_ctrl: the Clock module: reset, sleep/wake and data-rate clocks.
//
// Reset: RST-pin is sampled on two flip-flops, giving a synchronous internal
// reset; holding the pin high for one clock period is enough.
// Enable: the core enable (CLK-en) is on while sleep is disabled or while
// any wake condition holds: a preamble on a line, RX/TX/circuit/time-sync or
// router activity, or SS low. CLK-TS-en follows the time-sync enable and is
// independent of sleep. Generate gated clocks: in this design the gated
// clocks are clock enables on the single system clock: clk2tx is a one-cycle
// tick every `div` system clocks (the bit rate, at most half the clock)
// while CLK-en is on; clkrx512 ticks every 512 bit times; clk_led every
// 2^LEDW clocks. The document gates the clocks themselves; enables give the
// same sleep behaviour for simulation and FPGA and leave clock-gating cells
// to synthesis.
module clock_ctrl #(
  parameter int LEDW = 20
) (
  input  logic       clk,
  input  logic       rst_pin,
  output logic       rst,
  input  logic [7:0] div,
  input  logic       sleep_en,
  input  logic       ts_en,
  input  logic       wake,
  output logic       clk_en,
  output logic       clk_ts_en,
  output logic       clk2tx,
  output logic       clkrx512,
  output logic       clk_led,
  output logic       asleep
);
  logic r1, r2;
  logic [7:0] dcnt;
  logic [8:0] c512;
  logic [LEDW-1:0] lcnt;

  always_ff @(posedge clk) begin
    r1 <= rst_pin;
    r2 <= r1;
  end
  assign rst = r2;

  assign clk_en    = !sleep_en || wake;
  assign clk_ts_en = ts_en;
  assign asleep    = !clk_en;
  assign clk2tx    = clk_en && (dcnt == 8'd0);
  assign clkrx512  = clk2tx && (c512 == 9'd0);
  assign clk_led   = (lcnt == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      dcnt <= '0; c512 <= '0; lcnt <= '0;
    end else begin
      lcnt <= lcnt + 1'b1;
      if (clk_en) begin
        if (dcnt >= div - 8'd1) dcnt <= '0;
        else dcnt <= dcnt + 1'b1;
        if (clk2tx) c512 <= c512 + 1'b1;
      end
    end
  end
endmodule
