// line_status: occupancy of each line (Line Status).
//
// A line is driven by this node while the TX, RX (CTS/ACK), time-sync
// serializer or the circuit switch drives it; `mask` tells the line's RTS
// detector to ignore it, and is held HOLD cycles after the drive stops so
// the detector never sees the node's own closing edge. A line is free for a
// new transmission when it is not masked and its RTS detector is idle (no
// preamble, no frame, no owner). Function from the document's block diagram;
// the hold time is this design's choice.
module line_status
  import router_pkg::*;
#(
  parameter int HOLD = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              tx_active,
  input  logic [1:0]        tx_port,
  input  logic              rx_active,
  input  logic [1:0]        rx_port,
  input  logic              ts_active,
  input  logic [1:0]        ts_port,
  input  logic [NPORTS-1:0] csw_oe,
  input  logic [NPORTS-1:0] det_active,
  input  logic [NPORTS-1:0] preamble,
  output logic [NPORTS-1:0] mask,
  output logic [NPORTS-1:0] line_free
);
  logic [NPORTS-1:0] drive;
  logic [NPORTS-1:0][$clog2(HOLD+1)-1:0] hold;

  always_comb begin
    drive = csw_oe;
    if (tx_active) drive[tx_port] = 1'b1;
    if (rx_active) drive[rx_port] = 1'b1;
    if (ts_active) drive[ts_port] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) hold <= '0;
    else for (int p = 0; p < NPORTS; p++) begin
      if (drive[p]) hold[p] <= ($clog2(HOLD+1))'(HOLD);
      else if (hold[p] != '0) hold[p] <= hold[p] - 1'b1;
    end
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_p
    assign mask[p]      = drive[p] || (hold[p] != '0);
    assign line_free[p] = !mask[p] && !det_active[p] && !preamble[p];
  end
endmodule
