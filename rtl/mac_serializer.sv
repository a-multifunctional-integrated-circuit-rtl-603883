// mac_serializer: parallel-to-serial shift register with NRZI coding that
// sends one MAC frame: PRE_BITS preamble ones, a '0' start delimiter, the
// bytes offered on the data port (MSB first), and a closing transition if
// the line would otherwise be left high.
//
// Interface: the client raises data_valid with the first byte to start a
// frame. data_ready pulses (one cycle, on a bit tick) when a byte is taken
// into the shift register; the client must then present the next byte (or
// drop data_valid after the byte flagged data_last) within eight bit times.
// A bit is emitted on each bit_tick (the CLK2TX enable). busy is high from
// the start of the frame until the line is back low; line_o is the level.
// NRZI coding and the shift register follow the document; the preamble
// length, start delimiter and closing transition are this design's choices.
module mac_serializer
  import router_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       bit_tick,
  input  logic       data_valid,
  input  logic [7:0] data,
  input  logic       data_last,
  output logic       data_ready,
  output logic       busy,
  output logic       line_o
);
  typedef enum logic [2:0] {S_IDLE, S_PRE, S_SFD, S_DATA, S_TAIL} st_e;
  st_e st;
  logic [7:0] sh;
  logic [3:0] cnt;
  logic       last_q;
  logic       level;

  assign line_o = level;
  assign busy   = (st != S_IDLE);
  // a byte is loaded at the tick that ends the delimiter or the last data bit
  assign data_ready = bit_tick && data_valid &&
                      ((st == S_SFD) || (st == S_DATA && cnt == 4'd7 && !last_q));

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; sh <= '0; cnt <= '0; last_q <= 1'b0; level <= 1'b0;
    end else if (bit_tick) begin
      unique case (st)
        S_IDLE: if (data_valid) begin
          st <= S_PRE; cnt <= 4'd1; level <= ~level;      // first preamble one
        end
        S_PRE: begin
          level <= ~level;
          if (cnt == 4'(PRE_BITS - 1)) st <= S_SFD;
          cnt <= cnt + 1'b1;
        end
        S_SFD: begin                                       // delimiter '0'
          st <= S_DATA; cnt <= '0; sh <= data; last_q <= data_last;
        end
        S_DATA: begin
          if (sh[7]) level <= ~level;
          sh <= {sh[6:0], 1'b0};
          if (cnt == 4'd7) begin
            cnt <= '0;
            if (last_q || !data_valid) st <= S_TAIL;
            else begin sh <= data; last_q <= data_last; end
          end else cnt <= cnt + 1'b1;
        end
        S_TAIL: begin
          if (level) level <= 1'b0;                         // closing transition
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
