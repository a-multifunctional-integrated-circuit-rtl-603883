// control: register file and command decoder behind the SPI port (Control).
//
// SPI transaction = command byte [7:6] op, [5:0] register address:
//   00 write register: one data byte follows;
//   01 read register: the register is returned during the next byte;
//   10 write buffer: address high, address low, then data bytes (auto-inc);
//   11 read buffer: address high, address low, then each following byte
//      returns the next buffer byte.
// Registers: 0x00 CONFIG {sleep_en, ts_en, is_bn}, 0x01 DIV (system clocks
// per bit, >= 2), 0x02 NEAR_PORT, 0x03 MAX_HOP (Maximum hop-count; 1 means
// pure packet switching), 0x04 HOP_THR (hop-count threshold), 0x05 NODE_ID,
// 0x06 INT_STATUS (write 1 to clear): {crc_err, ts_done, near_lost, tx_fail,
// tx_sent, host_pkt}, 0x07 INT_MASK, 0x08+s segment s status {st, port}
// (writing it hands a segment to the router or TX), 0x0C NEAR_TMO, 0x0D CMD
// (bit 0 starts a time-sync request), 0x10-0x13 time stamp (big endian,
// latched when 0x10 is read).
// INT = any unmasked status bit. LEDR lights on tx_fail or crc_err; LEDG
// toggles on each CLK-LED tick while the core is awake.
// The register set, command encoding and LED use are this design's choices;
// the document names the Control block, INT, LEDR and LEDG.
module control
  import router_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   ss_active,
  input  logic                   rx_valid,
  input  logic [7:0]             rx_byte,
  input  logic                   first,
  output logic [7:0]             tx_byte,
  // buffer client
  output buf_req_t               breq,
  input  logic                   bgnt,
  input  logic [7:0]             brdata,
  input  seg_status_t [NSEG-1:0] seg_st,
  output seg_upd_t               upd,
  // events
  input  logic [5:0]             ev,
  input  logic [31:0]            time_i,
  input  logic                   clk_led,
  input  logic                   awake,
  // configuration
  output logic                   is_bn,
  output logic                   ts_en,
  output logic                   sleep_en,
  output logic [7:0]             div,
  output logic [1:0]             near_port,
  output logic [4:0]             max_hop,
  output logic [4:0]             hop_thr,
  output logic [7:0]             node_id,
  output logic [7:0]             near_tmo,
  output logic                   cmd_sync,
  output logic                   int_o,
  output logic                   ledr,
  output logic                   ledg
);
  typedef enum logic [2:0] {K_CMD, K_WDATA, K_RDATA, K_AH, K_AL, K_BUF} st_e;
  st_e st;
  logic [1:0]  op;
  logic [5:0]  ra;
  logic [AW-1:0] addr;
  logic [5:0]  int_st, int_mask;
  logic [31:0] t_lat;
  logic        rd_cap;
  logic [7:0]  rval;

  always_comb begin
    unique case (ra)
      6'h00: rval = {5'd0, sleep_en, ts_en, is_bn};
      6'h01: rval = div;
      6'h02: rval = {6'd0, near_port};
      6'h03: rval = {3'd0, max_hop};
      6'h04: rval = {3'd0, hop_thr};
      6'h05: rval = node_id;
      6'h06: rval = {2'd0, int_st};
      6'h07: rval = {2'd0, int_mask};
      6'h08, 6'h09, 6'h0A, 6'h0B: rval = {3'd0, seg_st[ra[SEGW-1:0]]};
      6'h0C: rval = near_tmo;
      6'h10: rval = time_i[31:24];
      6'h11: rval = t_lat[23:16];
      6'h12: rval = t_lat[15:8];
      6'h13: rval = t_lat[7:0];
      default: rval = 8'h00;
    endcase
  end

  assign int_o = |(int_st & int_mask);
  assign ledr  = int_st[2] || int_st[5];

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= K_CMD; op <= '0; ra <= '0; addr <= '0; tx_byte <= '0; breq <= '0; upd <= '0;
      is_bn <= 1'b0; ts_en <= 1'b0; sleep_en <= 1'b0; div <= 8'd4; near_port <= '0;
      max_hop <= 5'd1; hop_thr <= 5'd1; node_id <= '0; near_tmo <= '0; cmd_sync <= 1'b0;
      int_st <= '0; int_mask <= '0; t_lat <= '0; rd_cap <= 1'b0; ledg <= 1'b0;
    end else begin
      upd.valid <= 1'b0; cmd_sync <= 1'b0;
      int_st <= int_st | ev;
      if (clk_led && awake) ledg <= !ledg;
      rd_cap <= bgnt && !breq.we;
      if (bgnt) breq.req <= 1'b0;
      if (rd_cap) tx_byte <= brdata;
      if (!ss_active) st <= K_CMD;
      else if (rx_valid) begin
        if (first) st <= K_CMD;
        unique case ((first || st == K_CMD) ? K_CMD : st)
          K_CMD: begin
            op <= rx_byte[7:6]; ra <= rx_byte[5:0];
            unique case (rx_byte[7:6])
              2'b00: st <= K_WDATA;
              2'b01: begin
                st <= K_RDATA; ra <= rx_byte[5:0];
                if (rx_byte[5:0] == 6'h10) t_lat <= time_i;
              end
              default: st <= K_AH;
            endcase
          end
          K_WDATA: begin
            st <= K_CMD;
            unique case (ra)
              6'h00: begin is_bn <= rx_byte[0]; ts_en <= rx_byte[1]; sleep_en <= rx_byte[2]; end
              6'h01: div <= (rx_byte < 8'd2) ? 8'd2 : rx_byte;
              6'h02: near_port <= rx_byte[1:0];
              6'h03: max_hop <= rx_byte[4:0];
              6'h04: hop_thr <= rx_byte[4:0];
              6'h05: node_id <= rx_byte;
              6'h06: int_st <= (int_st | ev) & ~rx_byte[5:0];
              6'h07: int_mask <= rx_byte[5:0];
              6'h08, 6'h09, 6'h0A, 6'h0B:
                upd <= '{valid: 1'b1, seg: ra[SEGW-1:0], val: rx_byte[4:0]};
              6'h0C: near_tmo <= rx_byte;
              6'h0D: cmd_sync <= rx_byte[0];
              default: ;
            endcase
          end
          K_RDATA: st <= K_CMD;
          K_AH: begin addr[AW-1:8] <= rx_byte[AW-9:0]; st <= K_AL; end
          K_AL: begin
            addr[7:0] <= rx_byte;
            st <= K_BUF;
            if (op == 2'b11) breq <= '{req: 1'b1, we: 1'b0, addr: {addr[AW-1:8], rx_byte}, wdata: 8'h00};
          end
          K_BUF: begin
            if (op == 2'b10) begin
              breq <= '{req: 1'b1, we: 1'b1, addr: addr, wdata: rx_byte};
              addr <= addr + 1'b1;
            end else begin
              breq <= '{req: 1'b1, we: 1'b0, addr: addr + 1'b1, wdata: 8'h00};
              addr <= addr + 1'b1;
            end
          end
          default: st <= K_CMD;
        endcase
      end
      // register read data for the byte after a read command
      if (st == K_RDATA && !rd_cap) tx_byte <= rval;
    end
  end
endmodule
