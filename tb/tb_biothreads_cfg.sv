// tb_biothreads_cfg: the imaging-photoplethysmography kernel on several
// smaller configurations of the chip multiprocessor, side by side, to check
// the trends of the original performance study on a scaled image (64 pixels,
// 64 frames) and the narrow configuration of the ASIC version.
//
// Configurations (issue width / cores / data banks / IRAM per core / data
// memory), each with its own host model (tb_ippg_host) and NCORES+1 work
// partitions so that one create is always refused:
//   0: 2 / 2 / 1 / 64 KB  / 128 KB   the ASIC-sized system
//   1: 4 / 2 / 2 / 128 KB / 256 KB
//   2: 4 / 4 / 1 / 128 KB / 256 KB   all cores on one bank
//   3: 4 / 4 / 4 / 128 KB / 256 KB
// Checks: every configuration computes the exact power map and finishes with
// all cores uncommitted; more cores make the kernel faster (1 against 3);
// more banks remove conflict cycles and make it faster (2 against 3); the
// 4-wide cores are faster than the 2-wide ones (1 against 0). The issue width
// and the memory sizes of the ASIC row are this testbench's reading of the
// original design; the program is split into 2-syllable bundles for it.
module tb_biothreads_cfg;
  import bt_pkg::*;

  localparam int NCFG = 4;
  localparam int CW [NCFG] = '{2, 4, 4, 4};
  localparam int CC [NCFG] = '{2, 2, 4, 4};
  localparam int CB [NCFG] = '{1, 2, 1, 4};
  localparam int CI [NCFG] = '{65536, 131072, 131072, 131072};
  localparam int CD [NCFG] = '{131072, 262144, 262144, 262144};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   [NCFG-1:0] fin;
  int     hc [NCFG], hf [NCFG];
  longint cyc [NCFG];
  int     confl [NCFG];
  int     idle [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned NC  = CC[g];
    localparam int unsigned PCW = $clog2(CI[g] / 4);
    localparam int unsigned DAW = $clog2(CD[g] / 4);

    logic host_iram_we, host_m_req, host_m_we, host_m_gnt, host_m_rvalid, host_start, host_done;
    logic [NC-1:0] host_iram_mask, busy;
    logic [PCW-1:0] host_iram_addr, host_pc;
    logic [31:0] host_iram_data, host_m_wdata, host_m_rdata, host_arg;
    logic [3:0] host_m_be;
    logic [DAW-1:0] host_m_addr;
    perf_t [NC-1:0] perf;
    logic [31:0] conflict_cycles, threads_created, threads_refused;
    logic finished;
    int checks, failures;
    longint run_cycles;

    biothreads_top #(
      .ISSUE_WIDTH(CW[g]), .NCORES(NC), .NBANKS(CB[g]),
      .IRAM_BYTES(CI[g]), .DMEM_BYTES(CD[g])
    ) dut (.*);

    tb_ippg_host #(
      .ISSUE_WIDTH(CW[g]), .NCORES(NC), .PCW(PCW), .DAW(DAW), .NT(NC + 1)
    ) host (.*);

    assign fin[g]   = finished;
    assign hc[g]    = checks;
    assign hf[g]    = failures;
    assign cyc[g]   = run_cycles;
    assign confl[g] = int'(conflict_cycles);
    assign idle[g]  = int'(busy == '0);
  end

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int sum_h(int a [NCFG]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + sum_h(hc), failures + sum_h(hf));
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&fin);
    for (int g = 0; g < NCFG; g++) begin
      $display("config %0d: width %0d, %0d cores, %0d banks: %0d cycles, %0d bank conflict cycles",
               g, CW[g], CC[g], CB[g], cyc[g], confl[g]);
      chk(idle[g] == 1, $sformatf("config %0d: all cores uncommitted at the end", g));
    end
    chk(cyc[1] > cyc[3], "4 cores faster than 2");
    chk(cyc[2] > cyc[3], "4 banks faster than 1 with 4 cores");
    chk(confl[2] > confl[3], "4 banks have fewer conflict cycles than 1");
    chk(cyc[0] > cyc[1], "4-wide cores faster than 2-wide");
    $display("TB_RESULT checks=%0d failures=%0d", checks + sum_h(hc), failures + sum_h(hf));
    $finish;
  end
endmodule
