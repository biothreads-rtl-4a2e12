// rr_arbiter: round-robin arbiter, used by each bank of the streaming memory.
//
// Grants at most one of N requesters per cycle (one-hot gnt, combinational
// from req). The requests are rotated so that the one after the last grant
// comes first and the lowest set bit of the rotated vector wins,
// so every requester that keeps asking is served within N grants. The pointer
// moves on the clock edge of a grant. Round robin is this design's choice of
// fair arbitration; the original design does not name the arbitration scheme.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;

  logic [PW-1:0] last;

  // requests rotated so that the one after the last grant comes first
  logic [N-1:0] rot_req, rot_gnt;
  always_comb begin
    for (int i = 0; i < int'(N); i++) rot_req[i] = req[(int'(last) + 1 + i) % int'(N)];
    rot_gnt = rot_req & ~(rot_req - N'(1));   // lowest set bit
    for (int i = 0; i < int'(N); i++) gnt[(int'(last) + 1 + i) % int'(N)] = rot_gnt[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= PW'(N - 1);
    else
      for (int i = 0; i < int'(N); i++)
        if (gnt[i]) last <= PW'(i);
  end
endmodule
