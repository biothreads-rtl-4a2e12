// mem_bank: one bank of the shared data memory, a single-port synchronous
// RAM of 32-bit words with byte write enables.
//
// A read (en high, we low) returns the addressed word on rdata after the
// clock edge; rdata holds until the next read. A write (en and we high)
// updates the bytes selected by be. The single port is what makes two cores
// that reach the same bank in the same cycle conflict.
module mem_bank #(
  parameter int unsigned WORDS = 8192,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [3:0]    be,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int b = 0; b < 4; b++)
          if (be[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
      end else begin
        rdata <= mem[addr];
      end
    end
  end
endmodule
