// smith_bp: Smith branch predictor, a table of 2-bit saturating counters.
//
// The instruction fetch engine looks a conditional branch up by the syllable
// address of its bundle; the counter's upper bit is the prediction (1 = taken).
// When the branch resolves in the execute stage, the counter at the branch's
// address counts up on taken and down on not taken, saturating at 3 and 0.
// The 2-bit saturating counter scheme is the original BioThreads design's; the table size, the
// index (low address bits, no tag, no history) and the reset value
// (1, weakly not taken) are this design's own choices.
//
// Timing: lookup is combinational from lookup_pc; an update is written at the
// clock edge and is seen by a lookup in the following cycle.
module smith_bp #(
  parameter int unsigned ENTRIES = 256,
  parameter int unsigned PCW     = 19
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [PCW-1:0] lookup_pc,
  output logic           predict_taken,
  input  logic           upd_valid,
  input  logic [PCW-1:0] upd_pc,
  input  logic           upd_taken
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [1:0] ctr [ENTRIES];

  logic [IW-1:0] li, ui;
  assign li = lookup_pc[IW-1:0];
  assign ui = upd_pc[IW-1:0];

  assign predict_taken = ctr[li][1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) ctr[i] <= 2'd1;
    end else if (upd_valid) begin
      if (upd_taken && ctr[ui] != 2'd3)       ctr[ui] <= ctr[ui] + 2'd1;
      else if (!upd_taken && ctr[ui] != 2'd0) ctr[ui] <= ctr[ui] - 2'd1;
    end
  end
endmodule
