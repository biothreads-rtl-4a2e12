// biothreads_top: the BioThreads chip multiprocessor.
//
// NCORES LE1 VLIW cores, each with a private IRAM, share one multi-bank data
// memory through a crossbar (strmem) and one hardware thread controller
// (thread_ctrl) that starts software threads on uncommitted cores. The host
// (on the FPGA systems a soft processor on a system bus, outside this design)
// sees a plain port: it writes programs into the IRAMs (one IRAM or several
// at once through host_iram_mask), reads and writes the data memory as the
// last client of the crossbar, starts the main thread on core 0 and waits for
// host_done, the exit of that thread. The thread then spreads its work over
// the other cores with the create/join syllables.
//
// Defaults: ISSUE_WIDTH 4 (the configuration of the performance table),
// 8 cores with 8 data banks (its largest and fastest configuration), 128 KB
// of IRAM per core and 256 KB of shared data memory (the FPGA systems).
module biothreads_top
  import bt_pkg::*;
#(
  parameter int unsigned ISSUE_WIDTH = 4,
  parameter int unsigned NCORES      = 8,
  parameter int unsigned NBANKS      = 8,
  parameter int unsigned IRAM_BYTES  = 131072,
  parameter int unsigned DMEM_BYTES  = 262144,
  parameter int unsigned BP_ENTRIES  = 256,
  localparam int unsigned PCW = $clog2(IRAM_BYTES / 4),
  localparam int unsigned DAW = $clog2(DMEM_BYTES / 4)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // program load
  input  logic                  host_iram_we,
  input  logic [NCORES-1:0]     host_iram_mask,
  input  logic [PCW-1:0]        host_iram_addr,
  input  logic [31:0]           host_iram_data,
  // host data memory port
  input  logic                  host_m_req,
  input  logic                  host_m_we,
  input  logic [3:0]            host_m_be,
  input  logic [DAW-1:0]        host_m_addr,
  input  logic [31:0]           host_m_wdata,
  output logic                  host_m_gnt,
  output logic                  host_m_rvalid,
  output logic [31:0]           host_m_rdata,
  // thread start and completion
  input  logic                  host_start,
  input  logic [PCW-1:0]        host_pc,
  input  logic [31:0]           host_arg,
  output logic                  host_done,
  output logic [NCORES-1:0]     busy,
  // statistics
  output perf_t [NCORES-1:0]    perf,
  output logic [31:0]           conflict_cycles,
  output logic [31:0]           threads_created,
  output logic [31:0]           threads_refused
);
  localparam int unsigned NCL = NCORES + 1;

  // memory crossbar wiring
  logic [NCL-1:0]          c_req, c_we, c_gnt, c_rvalid;
  logic [NCL-1:0][3:0]     c_be;
  logic [NCL-1:0][DAW-1:0] c_addr;
  logic [NCL-1:0][31:0]    c_wdata, c_rdata;

  // thread controller wiring
  logic   [NCORES-1:0] tc_req, tc_ack, start, exit_pulse, running;
  throp_e [NCORES-1:0] tc_op;
  word_t  [NCORES-1:0] tc_a, tc_b;
  word_t               tc_result, start_arg;
  logic [PCW-1:0]      start_pc;

  for (genvar i = 0; i < int'(NCORES); i++) begin : g_core
    le1_cpu #(
      .ISSUE_WIDTH(ISSUE_WIDTH), .IRAM_BYTES(IRAM_BYTES),
      .BP_ENTRIES(BP_ENTRIES), .DAW(DAW)
    ) u_cpu (
      .clk, .rst_n, .core_id(8'(i)),
      .start(start[i]), .start_pc, .start_arg,
      .running(running[i]), .exit_pulse(exit_pulse[i]),
      .tc_req(tc_req[i]), .tc_op(tc_op[i]), .tc_a(tc_a[i]), .tc_b(tc_b[i]),
      .tc_ack(tc_ack[i]), .tc_result,
      .iram_we(host_iram_we && host_iram_mask[i]), .iram_waddr(host_iram_addr),
      .iram_wdata(host_iram_data),
      .m_req(c_req[i]), .m_we(c_we[i]), .m_be(c_be[i]), .m_addr(c_addr[i]),
      .m_wdata(c_wdata[i]), .m_gnt(c_gnt[i]), .m_rvalid(c_rvalid[i]), .m_rdata(c_rdata[i]),
      .perf(perf[i])
    );
  end

  // host is the last memory client
  assign c_req[NCORES]   = host_m_req;
  assign c_we[NCORES]    = host_m_we;
  assign c_be[NCORES]    = host_m_be;
  assign c_addr[NCORES]  = host_m_addr;
  assign c_wdata[NCORES] = host_m_wdata;
  assign host_m_gnt      = c_gnt[NCORES];
  assign host_m_rvalid   = c_rvalid[NCORES];
  assign host_m_rdata    = c_rdata[NCORES];

  strmem #(.NCLIENTS(NCL), .NBANKS(NBANKS), .BYTES(DMEM_BYTES)) u_strmem (
    .clk, .rst_n,
    .req(c_req), .we(c_we), .be(c_be), .addr(c_addr), .wdata(c_wdata),
    .gnt(c_gnt), .rvalid(c_rvalid), .rdata(c_rdata), .conflict_cycles
  );

  thread_ctrl #(.NCORES(NCORES), .PCW(PCW)) u_tc (
    .clk, .rst_n,
    .req(tc_req), .op(tc_op), .a(tc_a), .b(tc_b), .ack(tc_ack), .result(tc_result),
    .exit_pulse, .host_start, .host_pc, .host_arg,
    .start, .start_pc, .start_arg, .busy,
    .n_created(threads_created), .n_failed(threads_refused)
  );

  assign host_done = exit_pulse[0];

  // The controller's view of a core and the core's own state agree.
  a_busy_running: assert property (@(posedge clk) disable iff (!rst_n) running == busy);
endmodule
