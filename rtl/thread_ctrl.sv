// thread_ctrl: hardware PThread primitives of the chip multiprocessor.
//
// Keeps the committed/uncommitted state of every core and serves the thread
// syllables the cores execute, so that software threads are created on, and
// mapped to, idle cores without an operating system:
//   create (pc, arg): picks the lowest-numbered uncommitted core, starts it at
//     syllable address pc with arg in its $r3, and returns its core number as
//     the thread id; with no core free it returns -1 at once (the caller then
//     runs the work itself). One create is served per cycle, chosen round
//     robin among the cores asking.
//   join (id): completes once core id is uncommitted (its thread has exited);
//     joining an invalid id or oneself completes at once. Any number of joins
//     are served in the same cycle.
//   exit: the core becomes uncommitted again (exit pulse from the core).
// The host starts the main thread on core 0 with host_start.
//
// Timing: ack, result and the start pulse are combinational in the cycle the
// request is served; busy is updated at the clock edge. That the primitives
// exist and allocate threads to uncommitted cores is the original BioThreads design's; the
// operations' exact semantics (lowest free core, failure code, $r3) are this
// design's own.
module thread_ctrl
  import bt_pkg::*;
#(
  parameter int unsigned NCORES = 8,
  parameter int unsigned PCW    = 15
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // requests from the cores' execute stages
  input  logic   [NCORES-1:0]      req,
  input  throp_e [NCORES-1:0]      op,
  input  word_t  [NCORES-1:0]      a,
  input  word_t  [NCORES-1:0]      b,
  output logic   [NCORES-1:0]      ack,
  output word_t                    result,
  input  logic   [NCORES-1:0]      exit_pulse,
  // host start of the main thread on core 0
  input  logic                     host_start,
  input  logic [PCW-1:0]           host_pc,
  input  word_t                    host_arg,
  // starts towards the cores
  output logic   [NCORES-1:0]      start,
  output logic [PCW-1:0]           start_pc,
  output word_t                    start_arg,
  output logic   [NCORES-1:0]      busy,
  output logic [31:0]              n_created,
  output logic [31:0]              n_failed
);
  logic [NCORES-1:0] creq, cgnt;
  logic              host_go;
  logic              found;
  int unsigned       free_id;

  // a host start takes the start bus; creates wait for the next cycle
  always_comb
    for (int i = 0; i < int'(NCORES); i++)
      creq[i] = req[i] && (op[i] == TOP_CREATE) && !host_go;

  rr_arbiter #(.N(NCORES)) u_arb (.clk, .rst_n, .req(creq), .gnt(cgnt));

  assign host_go = host_start && !busy[0];

  always_comb begin
    word_t cpc, carg;
    ack       = '0;
    start     = '0;
    result    = '1;
    start_pc  = host_pc;
    start_arg = host_arg;
    found     = 1'b0;
    free_id   = 0;
    cpc       = '0;
    carg      = '0;
    // joins
    for (int i = 0; i < int'(NCORES); i++)
      if (req[i] && op[i] == TOP_JOIN)
        if (a[i] >= word_t'(NCORES) || int'(a[i]) == i || !busy[a[i]]) ack[i] = 1'b1;
    // create: the lowest uncommitted core
    for (int j = 0; j < int'(NCORES); j++)
      if (!found && !busy[j]) begin
        found   = 1'b1;
        free_id = j;
      end
    for (int i = 0; i < int'(NCORES); i++)
      if (cgnt[i]) begin
        cpc  = a[i];
        carg = b[i];
        ack[i] = 1'b1;
      end
    if (host_go) start[0] = 1'b1;
    if (|cgnt && found) begin
      start[free_id] = 1'b1;
      result         = word_t'(free_id);
      start_pc       = cpc[PCW-1:0];
      start_arg      = carg;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= '0;
      n_created <= '0;
      n_failed  <= '0;
    end else begin
      busy <= (busy & ~exit_pulse) | start;
      if (|cgnt && found)  n_created <= n_created + 32'd1;
      if (|cgnt && !found) n_failed  <= n_failed + 32'd1;
    end
  end
endmodule
