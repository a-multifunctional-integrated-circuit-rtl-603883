// rst_signal_gen: at the end of a task it releases the RTS detector that
// served it. When RX busy, CSW busy or TS busy falls, a one-cycle pulse is
// sent on RX_RST, CSW_RST or TS_RST to the port(s) that task used (the
// circuit switch holds two ports). Function from the document; the port
// masks used to address the pulse are this design's choice.
module rst_signal_gen
  import router_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              rx_busy,
  input  logic              csw_busy,
  input  logic              ts_busy,
  input  logic [NPORTS-1:0] rx_ports,
  input  logic [NPORTS-1:0] csw_ports,
  input  logic [NPORTS-1:0] ts_ports,
  output logic [NPORTS-1:0] rx_rst,
  output logic [NPORTS-1:0] csw_rst,
  output logic [NPORTS-1:0] ts_rst
);
  logic rx_q, csw_q, ts_q;
  logic [NPORTS-1:0] rx_pq, csw_pq, ts_pq;

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_q <= 1'b0; csw_q <= 1'b0; ts_q <= 1'b0;
      rx_pq <= '0; csw_pq <= '0; ts_pq <= '0;
    end else begin
      rx_q <= rx_busy; csw_q <= csw_busy; ts_q <= ts_busy;
      if (rx_busy)  rx_pq  <= rx_ports;
      if (csw_busy) csw_pq <= csw_ports;
      if (ts_busy)  ts_pq  <= ts_ports;
    end
  end

  assign rx_rst  = (rx_q  && !rx_busy)  ? rx_pq  : '0;
  assign csw_rst = (csw_q && !csw_busy) ? csw_pq : '0;
  assign ts_rst  = (ts_q  && !ts_busy)  ? ts_pq  : '0;
endmodule
