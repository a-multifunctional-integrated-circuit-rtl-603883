// tb_receiver_sel: random requests for the three receivers; checks that an
// idle receiver grants exactly one requesting port (the first at or after
// the ring pointer, tracked here by an independent model), rejects the
// other requesters, and that a busy receiver rejects every request.
module tb_receiver_sel;
  import router_pkg::*;
  logic clk = 0, rst = 1;
  logic [2:0][3:0] req, gnt, rej;
  logic [2:0] busy;
  logic [2:0][1:0] gp;
  int checks = 0, failures = 0;
  int ptr;
  receiver_sel dut (.clk, .rst, .req, .busy, .gnt, .rej, .gnt_port(gp));
  always #5 clk = ~clk;
  initial begin
    req = '0; busy = '0; ptr = 0;
    repeat (2) @(posedge clk);
    rst = 0; ptr = 1;  // the ring moves at the first edge after reset
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      req = 12'($urandom); busy = 3'($urandom);
      #1;
      for (int r = 0; r < 3; r++) begin
        logic [3:0] eg, er; int f;
        eg = '0; er = '0; f = 0;
        for (int k = 0; k < 4; k++) begin
          int q; q = (ptr + k) % 4;
          if (req[r][q]) begin
            if (!f && !busy[r]) begin eg[q] = 1; f = 1; end else er[q] = 1;
          end
        end
        checks++;
        if (gnt[r] !== eg || rej[r] !== er) begin
          failures++; $display("FAIL r%0d req %b busy %b gnt %b/%b rej %b/%b", r, req[r], busy[r], gnt[r], eg, rej[r], er);
        end
        if (eg != 0) begin
          checks++;
          if (eg[gp[r]] !== 1'b1) begin failures++; $display("FAIL gnt_port"); end
        end
      end
      @(posedge clk); ptr = (ptr + 1) % 4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
