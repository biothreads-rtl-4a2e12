// iram: closely-coupled instruction RAM of one LE1 core.
//
// Organised as lines of ISSUE_WIDTH 32-bit syllables so that one read per
// cycle returns a whole long-instruction-word's worth of syllables. The read
// is synchronous: the line addressed while rd_en is high appears on rd_line
// after the clock edge, and rd_line holds its value while rd_en is low. A
// separate write port, one syllable per cycle, lets the host (debug path) load
// the program. A private IRAM per CPU, read every cycle, is the original BioThreads design's;
// the 128 KB default is the size of the FPGA systems; the line organisation
// and the syllable-wide write port are this design's choices.
module iram #(
  parameter int unsigned ISSUE_WIDTH = 4,
  parameter int unsigned BYTES       = 131072,
  localparam int unsigned LINES = BYTES / (4 * ISSUE_WIDTH),
  localparam int unsigned LW    = $clog2(LINES),
  localparam int unsigned SW    = $clog2(BYTES / 4)
) (
  input  logic                          clk,
  input  logic                          rd_en,
  input  logic [LW-1:0]                 rd_addr,
  output logic [ISSUE_WIDTH-1:0][31:0]  rd_line,
  input  logic                          wr_en,
  input  logic [SW-1:0]                 wr_addr,   // syllable address
  input  logic [31:0]                   wr_data
);

  logic [ISSUE_WIDTH-1:0][31:0] mem [LINES];

  logic [SW-1:0] wr_quot, wr_rem;
  logic [LW-1:0] wr_line;
  int unsigned   wr_slot;
  assign wr_quot = wr_addr / SW'(ISSUE_WIDTH);
  assign wr_rem  = wr_addr % SW'(ISSUE_WIDTH);
  assign wr_line = wr_quot[LW-1:0];
  assign wr_slot = int'(wr_rem);

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_line][wr_slot] <= wr_data;
    if (rd_en) rd_line <= mem[rd_addr];
  end
endmodule
