// tb_strmem: five clients issue random reads and writes (with byte enables)
// to a four-bank streaming memory and hold each request until granted. The
// testbench keeps a model of the memory, updated in grant order, and checks
// every read word, that a bank serves at most one client per cycle, that no
// client waits longer than the round robin allows, that a read returns one
// cycle after its grant, and the conflict counter.
module tb_strmem;
  localparam int unsigned NC = 5, NB = 4, BYTES = 4096;
  localparam int unsigned AW = $clog2(BYTES / 4);

  logic clk = 0, rst_n = 0;
  logic [NC-1:0] req, we, gnt, rvalid;
  logic [NC-1:0][3:0] be;
  logic [NC-1:0][AW-1:0] addr;
  logic [NC-1:0][31:0] wdata, rdata;
  logic [31:0] conflict_cycles;

  strmem #(.NCLIENTS(NC), .NBANKS(NB), .BYTES(BYTES)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] model [BYTES/4];
  logic [31:0] expect_q [NC];
  bit          pend_rd [NC];
  int          wait_n [NC];
  bit          granted [NC];
  int          conflicts = 0, reads = 0, writes = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic new_req(int c);
    req[c]   = ($urandom_range(0, 3) != 0);
    we[c]    = ($urandom_range(0, 2) == 0);
    be[c]    = we[c] ? 4'($urandom_range(1, 15)) : 4'b0;
    // hot spot on a few words to force conflicts and read-after-write
    addr[c]  = ($urandom_range(0, 1) == 0) ? AW'($urandom_range(0, 15)) : AW'($urandom);
    wdata[c] = $urandom;
  endtask

  initial begin
    req = '0; we = '0; be = '0; addr = '0; wdata = '0;
    foreach (pend_rd[c]) begin pend_rd[c] = 0; wait_n[c] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // initialise through the clients themselves
    for (int i = 0; i < int'(BYTES / 4); i++) begin
      @(negedge clk);
      req = '0; req[0] = 1; we[0] = 1; be[0] = 4'hF; addr[0] = AW'(i); wdata[0] = i * 3 + 1;
      model[i] = i * 3 + 1;
      #1 chk(gnt[0], "lone client granted at once");
    end
    @(negedge clk);
    req = '0;
    for (int c = 0; c < int'(NC); c++) new_req(c);
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int per_bank [NB];
      #1;
      foreach (per_bank[b]) per_bank[b] = 0;
      // read data of last cycle's grants
      for (int c = 0; c < int'(NC); c++) begin
        chk(rvalid[c] == pend_rd[c], "rvalid one cycle after a read grant");
        if (pend_rd[c] && rvalid[c]) chk(rdata[c] == expect_q[c], $sformatf("read data client %0d", c));
        pend_rd[c] = 0;
      end
      for (int c = 0; c < int'(NC); c++) begin
        if (req[c] && !gnt[c]) conflicts++;
        granted[c] = gnt[c];
        if (gnt[c]) begin
          chk(req[c], "grant without request");
          per_bank[addr[c] % NB]++;
        end
      end
      foreach (per_bank[b]) chk(per_bank[b] <= 1, "one client per bank per cycle");
      // apply grants to the model
      for (int c = 0; c < int'(NC); c++)
        if (gnt[c]) begin
          if (we[c]) begin
            for (int k = 0; k < 4; k++) if (be[c][k]) model[addr[c]][8*k +: 8] = wdata[c][8*k +: 8];
            writes++;
          end else begin
            expect_q[c] = model[addr[c]];
            pend_rd[c] = 1;
            reads++;
          end
        end
      @(negedge clk);
      for (int c = 0; c < int'(NC); c++) begin
        if (req[c] && !granted[c]) begin
          wait_n[c]++;
          chk(wait_n[c] < int'(NC), "request starved");
        end else begin
          wait_n[c] = 0;
          new_req(c);
        end
      end
    end
    #1 chk(conflict_cycles == conflicts, $sformatf("conflict counter %0d vs %0d", conflict_cycles, conflicts));
    chk(conflicts > 100, "conflicts happened");
    $display("reads %0d writes %0d conflict cycles %0d", reads, writes, conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
