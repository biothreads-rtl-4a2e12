// le1_cpu: one LE1 VLIW processor of the BioThreads chip multiprocessor.
//
// Joins the four parts the original LE1 design names: the instruction fetch engine
// (IFE, with the private IRAM and the branch predictor), the execution core
// (one integer cluster, score), the pipeline controller (pipe_ctrl) and the
// load/store unit (lsu, one channel into the shared streaming memory). Thread
// syllables go out to the shared thread controller.
//
// Pipeline: IRAM read, align (bundle assembly and next-address prediction in
// the IFE), execute (register read, all slots, branch resolution, memory and
// thread requests) with write-back at the end of execute. The bundle stays in
// the execute stage until its memory or thread operation finishes. The
// original BioThreads core has an 8-stage pipeline whose stages it does not describe;
// this shorter three-stage organisation, which needs no forwarding, is this
// design's own.
//
// Interface: start/start_pc/start_arg begin a thread (from the thread
// controller); exit_pulse reports the end of one. tc_* carry create and join
// requests (held until tc_ack). m_* is the memory client port. iram_* loads
// the program. perf holds the pipeline controller's counters.
module le1_cpu
  import bt_pkg::*;
#(
  parameter int unsigned ISSUE_WIDTH = 4,
  parameter int unsigned IRAM_BYTES  = 131072,
  parameter int unsigned BP_ENTRIES  = 256,
  parameter int unsigned DAW         = 16,   // word address width of the data memory
  localparam int unsigned PCW = $clog2(IRAM_BYTES / 4)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [7:0]      core_id,
  // thread control
  input  logic            start,
  input  logic [PCW-1:0]  start_pc,
  input  word_t           start_arg,
  output logic            running,
  output logic            exit_pulse,
  output logic            tc_req,
  output throp_e          tc_op,
  output word_t           tc_a,
  output word_t           tc_b,
  input  logic            tc_ack,
  input  word_t           tc_result,
  // program load
  input  logic            iram_we,
  input  logic [PCW-1:0]  iram_waddr,
  input  logic [31:0]     iram_wdata,
  // data memory client port
  output logic            m_req,
  output logic            m_we,
  output logic [3:0]      m_be,
  output logic [DAW-1:0]  m_addr,
  output word_t           m_wdata,
  input  logic            m_gnt,
  input  logic            m_rvalid,
  input  word_t           m_rdata,
  output perf_t           perf
);
  // fetch -> execute
  logic                   bnd_valid;
  syl_t [ISSUE_WIDTH-1:0] bnd_syl;
  logic [ISSUE_WIDTH-1:0] bnd_mask;
  logic [PCW-1:0]         bnd_pc, bnd_seq_next, bnd_pred_next;
  logic                   span_stall;

  // execute stage register
  logic                   ex_valid;
  syl_t [ISSUE_WIDTH-1:0] ex_syl;
  logic [ISSUE_WIDTH-1:0] ex_mask;
  logic [PCW-1:0]         ex_pc, ex_seq_next, ex_pred_next;

  // control
  logic           commit, ex_ready, redirect, halt;
  logic [PCW-1:0] redirect_pc;

  // cluster outputs
  logic           is_cond_branch, taken;
  logic [PCW-1:0] actual_next;
  memop_e         memop;
  word_t          mem_addr, mem_wdata, ld_data;
  throp_e         thop;
  logic           th_exit, lsu_done;

  ife #(.ISSUE_WIDTH(ISSUE_WIDTH), .IRAM_BYTES(IRAM_BYTES), .BP_ENTRIES(BP_ENTRIES)) u_ife (
    .clk, .rst_n,
    .redirect, .redirect_pc, .halt,
    .bnd_valid, .bnd_ready(ex_ready), .bnd_syl, .bnd_mask, .bnd_pc,
    .bnd_seq_next, .bnd_pred_next,
    .bp_upd_valid(commit && is_cond_branch), .bp_upd_pc(ex_pc), .bp_upd_taken(taken),
    .iram_we, .iram_waddr, .iram_wdata,
    .span_stall
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid     <= 1'b0;
      ex_syl       <= '0;
      ex_mask      <= '0;
      ex_pc        <= '0;
      ex_seq_next  <= '0;
      ex_pred_next <= '0;
    end else if (ex_ready) begin
      ex_valid     <= bnd_valid;
      ex_syl       <= bnd_syl;
      ex_mask      <= bnd_mask;
      ex_pc        <= bnd_pc;
      ex_seq_next  <= bnd_seq_next;
      ex_pred_next <= bnd_pred_next;
    end
  end

  score #(.ISSUE_WIDTH(ISSUE_WIDTH), .PCW(PCW)) u_score (
    .clk, .rst_n, .core_id,
    .syl(ex_syl), .mask(ex_valid ? ex_mask : '0), .seq_next(ex_seq_next), .commit,
    .is_cond_branch, .taken, .actual_next,
    .memop, .mem_addr, .mem_wdata, .mem_rdata(ld_data),
    .thop, .th_a(tc_a), .th_b(tc_b), .th_exit, .tc_result,
    .start_we(start), .start_arg
  );

  lsu #(.AW(DAW)) u_lsu (
    .clk, .rst_n,
    .active(ex_valid), .memop, .addr(mem_addr), .wdata(mem_wdata),
    .done(lsu_done), .rdata(ld_data),
    .m_req, .m_we, .m_be, .m_addr, .m_wdata, .m_gnt, .m_rvalid, .m_rdata
  );

  assign tc_req = ex_valid && (thop != TOP_NONE);
  assign tc_op  = thop;

  pipe_ctrl #(.PCW(PCW)) u_pctrl (
    .clk, .rst_n, .start, .start_pc,
    .ex_valid, .ex_mem(memop != MEM_NONE), .lsu_done,
    .ex_thr(thop != TOP_NONE), .tc_ack, .ex_exit(th_exit),
    .ex_pred_next, .actual_next, .span_stall,
    .running, .commit, .ex_ready, .redirect, .redirect_pc, .halt, .exit_pulse, .perf
  );
endmodule
