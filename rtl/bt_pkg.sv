// bt_pkg: types and constants shared by the BioThreads chip multiprocessor.
//
// The cores execute long instruction words (bundles) made of 32-bit
// syllables, VEX style: a bundle is the run of syllables up to and including
// the one whose stop bit is set, at most ISSUE_WIDTH long, and the position of
// a syllable inside its bundle is the issue slot that executes it. The exact
// syllable encoding below is this design's own (a compact subset in the VEX
// spirit); the original design only says the cores are VEX-programmed VLIWs with
// partial predication (select) and hardware PThread primitives.
//
// Syllable fields:
//   [31]    stop bit, last syllable of the bundle
//   [30:25] opcode
//   [24:19] dst  (GPR, or branch register in [21:19], or store data GPR)
//   [18:13] src1 (GPR)
//   [12:0]  imm13 (sign-extended for arithmetic, zero-extended for logic)
//   [5:0]   src2 (GPR) for register forms; [8:6] branch register for SLCT
//   [18:0]  imm19: syllable address of GOTO/CALL/BR/BRF, upper bits of MOVHI
package bt_pkg;

  localparam int unsigned XLEN    = 32;
  localparam int unsigned NGPR    = 64;   // $r0..$r63, $r0 reads as zero
  localparam int unsigned NBR     = 8;    // 1-bit branch registers $b0..$b7
  localparam int unsigned LINK    = 63;   // link register of CALL/RET
  localparam int unsigned ARG_REG = 3;    // receives the argument of a new thread

  typedef logic [31:0] syl_t;
  typedef logic [XLEN-1:0] word_t;

  typedef enum logic [5:0] {
    OP_NOP     = 6'd0,
    OP_ADD     = 6'd1,
    OP_SUB     = 6'd2,
    OP_AND     = 6'd3,
    OP_OR      = 6'd4,
    OP_XOR     = 6'd5,
    OP_SHL     = 6'd6,
    OP_SHR     = 6'd7,
    OP_SRA     = 6'd8,
    OP_MIN     = 6'd9,
    OP_MAX     = 6'd10,
    OP_CMPEQ   = 6'd11,
    OP_CMPLT   = 6'd12,
    OP_CMPLTU  = 6'd13,
    OP_ADDI    = 6'd14,
    OP_ANDI    = 6'd15,
    OP_ORI     = 6'd16,
    OP_XORI    = 6'd17,
    OP_SHLI    = 6'd18,
    OP_SHRI    = 6'd19,
    OP_SRAI    = 6'd20,
    OP_MOVHI   = 6'd21,
    OP_BCMPEQ  = 6'd22,
    OP_BCMPNE  = 6'd23,
    OP_BCMPLT  = 6'd24,
    OP_BCMPLTU = 6'd25,
    OP_BCMPLTI = 6'd26,
    OP_BCMPNEI = 6'd27,
    OP_SLCT    = 6'd28,
    OP_MUL     = 6'd29,   // low 32 bits of the signed product, slot 1 only
    OP_MULH    = 6'd30,   // high 32 bits of the signed product, slot 1 only
    OP_LDW     = 6'd32,   // memory syllables: slot 0 only
    OP_LDHU    = 6'd33,
    OP_LDBU    = 6'd34,
    OP_STW     = 6'd35,
    OP_STH     = 6'd36,
    OP_STB     = 6'd37,
    OP_GOTO    = 6'd40,   // control syllables: slot 0 only
    OP_CALL    = 6'd41,
    OP_RET     = 6'd42,
    OP_BR      = 6'd43,
    OP_BRF     = 6'd44,
    OP_TCREATE = 6'd48,   // thread syllables: slot 0 only
    OP_TJOIN   = 6'd49,
    OP_TEXIT   = 6'd50,
    OP_TSELF   = 6'd51
  } opcode_e;

  // Slot that owns the single multiplier, and slot of branch/memory/thread units.
  localparam int unsigned MUL_SLOT = 1;

  // Memory operation kinds passed from the cluster to the LSU.
  typedef enum logic [2:0] {
    MEM_NONE = 3'd0,
    MEM_LW   = 3'd1,
    MEM_LHU  = 3'd2,
    MEM_LBU  = 3'd3,
    MEM_SW   = 3'd4,
    MEM_SH   = 3'd5,
    MEM_SB   = 3'd6
  } memop_e;

  // Thread primitive kinds passed from the cluster to the thread controller.
  typedef enum logic [1:0] {
    TOP_NONE   = 2'd0,
    TOP_CREATE = 2'd1,
    TOP_JOIN   = 2'd2
  } throp_e;

  // Performance registers kept by each core's pipeline controller.
  typedef struct packed {
    logic [31:0] cycles;       // cycles spent running a thread
    logic [31:0] bundles;      // bundles committed
    logic [31:0] mem_stalls;   // cycles the execute stage waited for the memory
    logic [31:0] thr_stalls;   // cycles it waited for the thread controller
    logic [31:0] span_stalls;  // fetch stalls on bundles crossing an IRAM line
    logic [31:0] mispredicts;  // control transfers whose next address was wrong
  } perf_t;

  function automatic opcode_e syl_op(syl_t s);
    return opcode_e'(s[30:25]);
  endfunction

  function automatic logic is_ctrl_op(opcode_e op);
    return op inside {OP_GOTO, OP_CALL, OP_RET, OP_BR, OP_BRF};
  endfunction

  // Assembler helpers, used by testbenches and handy for building programs.
  function automatic syl_t mk_r(opcode_e op, int unsigned d, int unsigned a, int unsigned b);
    return {1'b0, op, 6'(d), 6'(a), 7'd0, 6'(b)};
  endfunction

  function automatic syl_t mk_i(opcode_e op, int unsigned d, int unsigned a, int imm);
    return {1'b0, op, 6'(d), 6'(a), 13'(imm)};
  endfunction

  function automatic syl_t mk_j(opcode_e op, int unsigned d, int unsigned target);
    return {1'b0, op, 6'(d), 19'(target)};
  endfunction

  function automatic syl_t mk_slct(int unsigned d, int unsigned a, int unsigned b, int unsigned br);
    return {1'b0, OP_SLCT, 6'(d), 6'(a), 4'd0, 3'(br), 6'(b)};
  endfunction

  function automatic syl_t stop(syl_t s);
    return {1'b1, s[30:0]};
  endfunction

endpackage
