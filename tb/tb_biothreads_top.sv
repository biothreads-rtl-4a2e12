// tb_biothreads_top: end-to-end run of the chip multiprocessor, at its
// default parameters, on the imaging-photoplethysmography kernel (see
// tb_ippg_host: 64-pixel image, 64 frames, 10 work partitions on 8 cores).
//
// The host model compares every pixel of the computed power map with its own
// reference. This testbench also counts the mechanisms of the design and fails
// if one never happened: thread creation, refusal and join waits, bank
// conflicts and memory stalls, line-crossing fetch stalls and branch
// mispredictions; and it checks that all cores are uncommitted at the end.
module tb_biothreads_top;
  import bt_pkg::*;

  localparam int NCORES = 8, NT = 10;
  localparam int unsigned PCW = 15, DAW = 16;

  logic clk = 0, rst_n = 0;
  logic host_iram_we, host_m_req, host_m_we, host_m_gnt, host_m_rvalid, host_start, host_done;
  logic [NCORES-1:0] host_iram_mask, busy;
  logic [PCW-1:0] host_iram_addr, host_pc;
  logic [31:0] host_iram_data, host_m_wdata, host_m_rdata, host_arg;
  logic [3:0] host_m_be;
  logic [DAW-1:0] host_m_addr;
  perf_t [NCORES-1:0] perf;
  logic [31:0] conflict_cycles, threads_created, threads_refused;
  logic finished;
  int h_checks, h_failures;
  longint run_cycles;

  biothreads_top dut (.*);

  tb_ippg_host #(.ISSUE_WIDTH(4), .NCORES(NCORES), .PCW(PCW), .DAW(DAW), .NT(NT)) host (
    .*, .checks(h_checks), .failures(h_failures)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + h_checks, failures + h_failures);
    $finish;
  end

  initial begin
    int mem_stalls, span_stalls, mispredicts, thr_stalls;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (finished);
    chk(busy == '0, "all cores uncommitted at the end");
    mem_stalls = 0; span_stalls = 0; mispredicts = 0; thr_stalls = 0;
    for (int c = 0; c < NCORES; c++) begin
      mem_stalls  += int'(perf[c].mem_stalls);
      span_stalls += int'(perf[c].span_stalls);
      mispredicts += int'(perf[c].mispredicts);
      thr_stalls  += int'(perf[c].thr_stalls);
    end
    $display("cycles %0d; threads created %0d refused %0d; bank conflict cycles %0d",
             run_cycles, threads_created, threads_refused, conflict_cycles);
    $display("memory stalls %0d, line-crossing stalls %0d, mispredictions %0d, thread waits %0d",
             mem_stalls, span_stalls, mispredicts, thr_stalls);
    for (int c = 0; c < NCORES; c++)
      $display("core %0d: %0d cycles, %0d bundles", c, perf[c].cycles, perf[c].bundles);
    chk(threads_created + threads_refused == NT, "one create per partition");
    chk(threads_created >= NCORES - 1, "a thread on every other core");
    chk(threads_refused > 0, "a create refused once the cores ran out");
    chk(conflict_cycles > 0, "bank conflicts happened");
    chk(mem_stalls > 0, "memory stalls happened");
    chk(span_stalls > 0, "line-crossing fetch stalls happened");
    chk(mispredicts > 0, "mispredictions happened");
    chk(thr_stalls > 0, "a join waited for a thread");
    $display("TB_RESULT checks=%0d failures=%0d", checks + h_checks, failures + h_failures);
    $finish;
  end
endmodule
