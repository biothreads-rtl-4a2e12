// pipe_ctrl: pipeline controller (PIPE_CTRL) of an LE1 core.
//
// Decides, cycle by cycle, what the pipeline does. The bundle in the execute
// stage commits unless it waits for the LSU (memory syllable not finished) or
// for the thread controller (create/join not acknowledged); while it waits the
// fetch engine is held. A committed bundle whose real next address differs
// from the one the fetch engine predicted redirects fetch and squashes the
// bundle being aligned. A start from the thread controller puts the core in
// the running state and redirects fetch to the thread's first bundle; a
// committed exit syllable returns the core to idle and tells the thread
// controller. The controller also keeps the core's performance registers.
// The original BioThreads design describes PIPE_CTRL as interlocked state machines scheduling
// the datapaths and keeping the control registers; this two-state controller
// with the stall, flush and counter rules above is this design's own reading.
//
// Timing: all control outputs are combinational in the current cycle; the
// running state and the counters change at the clock edge.
module pipe_ctrl
  import bt_pkg::*;
#(
  parameter int unsigned PCW = 15
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [PCW-1:0] start_pc,
  // execute stage status
  input  logic           ex_valid,
  input  logic           ex_mem,
  input  logic           lsu_done,
  input  logic           ex_thr,
  input  logic           tc_ack,
  input  logic           ex_exit,
  input  logic [PCW-1:0] ex_pred_next,
  input  logic [PCW-1:0] actual_next,
  input  logic           span_stall,
  // control
  output logic           running,
  output logic           commit,
  output logic           ex_ready,     // execute stage takes a new bundle
  output logic           redirect,
  output logic [PCW-1:0] redirect_pc,
  output logic           halt,
  output logic           exit_pulse,
  output perf_t          perf
);
  logic hold_mem, hold_thr, mispredict;

  assign hold_mem    = ex_valid && ex_mem && !lsu_done;
  assign hold_thr    = ex_valid && ex_thr && !tc_ack;
  assign commit      = ex_valid && !hold_mem && !hold_thr;
  assign exit_pulse  = commit && ex_exit;
  assign halt        = exit_pulse;
  assign mispredict  = commit && !ex_exit && (actual_next != ex_pred_next);
  assign redirect    = start || mispredict;
  assign redirect_pc = start ? start_pc : actual_next;
  assign ex_ready    = !ex_valid || commit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      perf    <= '0;
    end else begin
      if (start)           running <= 1'b1;
      else if (exit_pulse) running <= 1'b0;
      if (running) perf.cycles <= perf.cycles + 32'd1;
      if (commit)      perf.bundles     <= perf.bundles + 32'd1;
      if (hold_mem)    perf.mem_stalls  <= perf.mem_stalls + 32'd1;
      if (hold_thr)    perf.thr_stalls  <= perf.thr_stalls + 32'd1;
      if (span_stall)  perf.span_stalls <= perf.span_stalls + 32'd1;
      if (mispredict)  perf.mispredicts <= perf.mispredicts + 32'd1;
    end
  end

  // A start only reaches an idle core.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !running);
endmodule
