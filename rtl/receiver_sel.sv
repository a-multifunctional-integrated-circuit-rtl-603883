// receiver_sel: chooses which port each receiver (RX, circuit switch, time
// sync) serves when RTS requests arrive.
//
// A free-running one-hot ring counter points at one port. For each receiver
// that is idle, the requesting port at or after the pointer is granted (one
// cycle pulse), and every other port requesting the same receiver in that
// cycle is rejected, so it releases its request. A receiver that is busy
// rejects all its requests. The ring counter follows the document; granting
// at the pointer and rejecting the losers at once is this design's choice.
// Interface: req/gnt/rej are [receiver][port]; receivers 0=RX, 1=CSW, 2=TS.
module receiver_sel
  import router_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic [2:0][NPORTS-1:0] req,
  input  logic [2:0]             busy,
  output logic [2:0][NPORTS-1:0] gnt,
  output logic [2:0][NPORTS-1:0] rej,
  output logic [2:0][1:0]        gnt_port
);
  logic [NPORTS-1:0] ring;

  always_ff @(posedge clk) begin
    if (rst) ring <= NPORTS'(1);
    else     ring <= {ring[NPORTS-2:0], ring[NPORTS-1]};
  end

  // position of the ring pointer
  logic [1:0] ptr;
  always_comb begin
    ptr = '0;
    for (int p = 0; p < NPORTS; p++) if (ring[p]) ptr = 2'(p);
  end

  always_comb begin
    gnt = '0;
    rej = '0;
    gnt_port = '0;
    for (int r = 0; r < 3; r++) begin
      logic found;
      logic [1:0] q;
      found = 1'b0;
      for (int k = 0; k < NPORTS; k++) begin
        q = ptr + 2'(k);          // k-th port after the pointer
        if (req[r][q]) begin
          if (!found && !busy[r]) begin
            gnt[r][q] = 1'b1; gnt_port[r] = q; found = 1'b1;
          end else rej[r][q] = 1'b1;
        end
      end
    end
  end
endmodule
