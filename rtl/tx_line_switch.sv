// tx_line_switch: selects the source that drives each line (TX Line Switch).
//
// Sources: the circuit switch (per-line data and enable), the RX serializer
// (CTS/ACK), the time-sync serializer and the TX serializer (each one line,
// chosen by its port number). When several want the same line, the circuit
// switch wins, then RX, time sync and TX. The outputs are registered: L_out
// is the level and Line_sel the output enable of the line's tri-state
// driver. Function from the document's block diagram; the priority order is
// this design's choice.
module tx_line_switch
  import router_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              tx_active,
  input  logic [1:0]        tx_port,
  input  logic              tx_o,
  input  logic              rx_active,
  input  logic [1:0]        rx_port,
  input  logic              rx_o,
  input  logic              ts_active,
  input  logic [1:0]        ts_port,
  input  logic              ts_o,
  input  logic [NPORTS-1:0] csw_oe,
  input  logic [NPORTS-1:0] csw_o,
  output logic [NPORTS-1:0] l_out,
  output logic [NPORTS-1:0] line_sel
);
  always_ff @(posedge clk) begin
    if (rst) begin
      l_out <= '0; line_sel <= '0;
    end else begin
      for (int p = 0; p < NPORTS; p++) begin
        if (csw_oe[p])                             begin l_out[p] <= csw_o[p]; line_sel[p] <= 1'b1; end
        else if (rx_active && rx_port == 2'(p))    begin l_out[p] <= rx_o;     line_sel[p] <= 1'b1; end
        else if (ts_active && ts_port == 2'(p))    begin l_out[p] <= ts_o;     line_sel[p] <= 1'b1; end
        else if (tx_active && tx_port == 2'(p))    begin l_out[p] <= tx_o;     line_sel[p] <= 1'b1; end
        else                                       begin l_out[p] <= 1'b0;     line_sel[p] <= 1'b0; end
      end
    end
  end
endmodule
