// strmem: the shared streaming data memory of the chip multiprocessor, a
// multi-bank memory behind a crossbar.
//
// NCLIENTS memory clients (the LSU channel of every core, plus the host
// port) reach NBANKS single-port banks. Words are interleaved across the
// banks (bank = word address mod NBANKS), so cores walking through arrays
// spread over all banks. Each bank has a round-robin arbiter; in every cycle
// each bank serves at most one client, and a client that loses keeps its
// request up and waits: these bank-conflict stalls are what make the
// performance depend on the number of banks. A client has one request in
// flight at a time.
//
// Handshake per client: req with we, be, addr (word address) and wdata held
// until gnt (same cycle as the access). For a read, rvalid rises the cycle
// after gnt with the word on rdata. conflict_cycles counts client-cycles spent
// waiting for a bank. The multi-bank crossbar organisation and its use by up
// to 32 clients are the original BioThreads design's; interleaving, arbitration and the
// handshake are this design's own choices. The default size, 256 KB in 8
// banks, is the shared data memory of the FPGA systems and the largest bank
// count evaluated.
module strmem #(
  parameter int unsigned NCLIENTS = 9,
  parameter int unsigned NBANKS   = 8,
  parameter int unsigned BYTES    = 262144,
  localparam int unsigned AW = $clog2(BYTES / 4),
  localparam int unsigned BANK_WORDS = BYTES / 4 / NBANKS,
  localparam int unsigned RW = $clog2(BANK_WORDS),
  localparam int unsigned BW = (NBANKS > 1) ? $clog2(NBANKS) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [NCLIENTS-1:0]          req,
  input  logic [NCLIENTS-1:0]          we,
  input  logic [NCLIENTS-1:0][3:0]     be,
  input  logic [NCLIENTS-1:0][AW-1:0]  addr,
  input  logic [NCLIENTS-1:0][31:0]    wdata,
  output logic [NCLIENTS-1:0]          gnt,
  output logic [NCLIENTS-1:0]          rvalid,
  output logic [NCLIENTS-1:0][31:0]    rdata,
  output logic [31:0]                  conflict_cycles
);
  logic [NCLIENTS-1:0][BW-1:0] cbank;
  logic [NBANKS-1:0][NCLIENTS-1:0] breq, bgnt;
  logic [NBANKS-1:0]           ben, bwe;
  logic [NBANKS-1:0][3:0]      bbe;
  logic [NBANKS-1:0][RW-1:0]   baddr;
  logic [NBANKS-1:0][31:0]     bwdata, bq;

  always_comb begin
    for (int c = 0; c < int'(NCLIENTS); c++)
      cbank[c] = BW'(addr[c] % AW'(NBANKS));
    for (int b = 0; b < int'(NBANKS); b++)
      for (int c = 0; c < int'(NCLIENTS); c++)
        breq[b][c] = req[c] && (int'(cbank[c]) == b);
  end

  for (genvar b = 0; b < int'(NBANKS); b++) begin : g_bank
    rr_arbiter #(.N(NCLIENTS)) u_arb (.clk, .rst_n, .req(breq[b]), .gnt(bgnt[b]));

    // crossbar, client side to bank side
    always_comb begin
      ben[b]    = |bgnt[b];
      bwe[b]    = 1'b0;
      bbe[b]    = '0;
      baddr[b]  = '0;
      bwdata[b] = '0;
      for (int c = 0; c < int'(NCLIENTS); c++)
        if (bgnt[b][c]) begin
          bwe[b]    = we[c];
          bbe[b]    = be[c];
          baddr[b]  = RW'(addr[c] / AW'(NBANKS));
          bwdata[b] = wdata[c];
        end
    end

    mem_bank #(.WORDS(BANK_WORDS)) u_bank (
      .clk, .en(ben[b]), .we(bwe[b]), .be(bbe[b]), .addr(baddr[b]),
      .wdata(bwdata[b]), .rdata(bq[b])
    );
  end

  // crossbar, bank side back to clients
  logic [NCLIENTS-1:0][BW-1:0] rbank;

  always_comb begin
    for (int c = 0; c < int'(NCLIENTS); c++) begin
      gnt[c]   = 1'b0;
      for (int b = 0; b < int'(NBANKS); b++) gnt[c] = gnt[c] | bgnt[b][c];
      rdata[c] = bq[rbank[c]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid          <= '0;
      rbank           <= '0;
      conflict_cycles <= '0;
    end else begin
      for (int c = 0; c < int'(NCLIENTS); c++) begin
        rvalid[c] <= gnt[c] && !we[c];
        if (gnt[c]) rbank[c] <= cbank[c];
      end
      conflict_cycles <= conflict_cycles + 32'($countones(req & ~gnt));
    end
  end
endmodule
