// cdr: clock and data recovery for one line port.
//
// The line is brought into the clock domain with two flip-flops. Every
// transition of the incoming signal restarts a phase counter, so the
// recovered bit clock is realigned to the data on each edge (open loop, no
// PLL); between edges it free-runs with the nominal bit period of DIV system
// clocks. The line is sampled in the middle of each bit (phase DIV/2), which
// keeps the sampling point within a quarter bit of the bit centre as long as
// the edges arrive on time. The sampled level is NRZI decoded: a bit is '1'
// when the level differs from the previous sample.
// The document's recovery circuit is an asynchronous gate-level design
// clocked from both edges of the local oscillator; this synchronous
// oversampling version does the same job (edge-aligned bit clock and
// decoded data) and is this design's own choice.
//
// Timing: bit_stb is a one-cycle strobe per recovered bit; bit_val is valid
// with it. clkrx is the recovered clock (high in the first half of a bit).
module cdr #(
  parameter int DIVW = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [DIVW-1:0] div,      // system clocks per bit, >= 2
  input  logic            line_i,   // asynchronous line input
  output logic            line_s,   // synchronised line level
  output logic            edge_o,   // a transition was seen this cycle
  output logic            bit_stb,
  output logic            bit_val,
  output logic            clkrx
);
  logic s1, s2, s_prev, last_smp;
  logic [DIVW-1:0] ph_q, pos;

  assign line_s = s2;
  assign edge_o = s2 ^ s_prev;

  always_comb begin
    if (edge_o)                 pos = '0;
    else if (ph_q >= div - 1'b1) pos = '0;
    else                        pos = ph_q + 1'b1;
  end

  assign bit_stb = (pos == (div >> 1));
  assign bit_val = s2 ^ last_smp;
  assign clkrx   = (pos < (div >> 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= 1'b0; s2 <= 1'b0; s_prev <= 1'b0; last_smp <= 1'b0; ph_q <= '0;
    end else begin
      s1 <= line_i;
      s2 <= s1;
      s_prev <= s2;
      ph_q <= pos;
      if (bit_stb) last_smp <= s2;
    end
  end
endmodule
