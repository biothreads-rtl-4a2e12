// score: integer cluster of the LE1 execution core (LE1_CORE / SCORE).
//
// Holds the cluster's register set (64 32-bit general registers, $r0 reads as
// zero, and 8 one-bit branch registers) and executes every syllable of the
// bundle in the execute stage at once: ISSUE_WIDTH ALUs, one in each slot, and
// a single multiplier owned by slot MUL_SLOT (the evaluated configurations
// have ISSUE_WIDTH ALUs and one multiplier). Slot 0 also evaluates branches,
// memory addresses and the thread primitives and hands them to the branch
// check, the LSU and the thread controller. All reads see the register values
// from before the bundle (VEX semantics); all writes happen together on the
// clock edge where commit is high. If two slots write the same register the
// higher slot wins. The register counts, the slot assignment and the
// single-cycle execution are this design's own choices; the original design gives the
// cluster structure, the ALU and multiplier counts and the select-based
// partial predication.
//
// Timing: all outputs are combinational from the bundle and the registers.
// The load result (mem_rdata) and the thread-create result (tc_result) are
// written together with the other results at the commit edge. start_we
// writes the argument of a newly started thread into $r3.
module score
  import bt_pkg::*;
#(
  parameter int unsigned ISSUE_WIDTH = 4,
  parameter int unsigned PCW         = 15
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [7:0]               core_id,
  // bundle in the execute stage
  input  syl_t [ISSUE_WIDTH-1:0]   syl,
  input  logic [ISSUE_WIDTH-1:0]   mask,
  input  logic [PCW-1:0]           seq_next,
  input  logic                     commit,
  // control flow resolution (slot 0)
  output logic                     is_cond_branch,
  output logic                     taken,
  output logic [PCW-1:0]           actual_next,
  // memory operation (slot 0)
  output memop_e                   memop,
  output word_t                    mem_addr,
  output word_t                    mem_wdata,
  input  word_t                    mem_rdata,
  // thread primitives (slot 0)
  output throp_e                   thop,
  output word_t                    th_a,
  output word_t                    th_b,
  output logic                     th_exit,
  input  word_t                    tc_result,
  // start of a new thread
  input  logic                     start_we,
  input  word_t                    start_arg
);
  word_t gpr [NGPR];
  logic  br  [NBR];

  function automatic word_t rd(logic [5:0] r);
    return (r == 6'd0) ? '0 : gpr[r];
  endfunction

  // per-slot decode and result
  word_t      res   [ISSUE_WIDTH];
  logic       gwe   [ISSUE_WIDTH];
  logic [5:0] gdst  [ISSUE_WIDTH];
  logic       bwe   [ISSUE_WIDTH];
  logic       bval  [ISSUE_WIDTH];

  always_comb begin
    for (int s = 0; s < int'(ISSUE_WIDTH); s++) begin
      opcode_e       op;
      word_t         a, b, imm_s, imm_z;
      logic signed [63:0] prod;
      op    = syl_op(syl[s]);
      a     = rd(syl[s][18:13]);
      b     = rd(syl[s][5:0]);
      imm_s = word_t'(signed'(syl[s][12:0]));
      imm_z = word_t'(syl[s][12:0]);
      prod  = signed'(a) * signed'(b);
      res[s]  = '0;
      gwe[s]  = 1'b0;
      gdst[s] = syl[s][24:19];
      bwe[s]  = 1'b0;
      bval[s] = 1'b0;
      if (mask[s]) begin
        gwe[s] = 1'b1;
        unique case (op)
          OP_ADD:    res[s] = a + b;
          OP_SUB:    res[s] = a - b;
          OP_AND:    res[s] = a & b;
          OP_OR:     res[s] = a | b;
          OP_XOR:    res[s] = a ^ b;
          OP_SHL:    res[s] = a << b[4:0];
          OP_SHR:    res[s] = a >> b[4:0];
          OP_SRA:    res[s] = word_t'(signed'(a) >>> b[4:0]);
          OP_MIN:    res[s] = (signed'(a) < signed'(b)) ? a : b;
          OP_MAX:    res[s] = (signed'(a) > signed'(b)) ? a : b;
          OP_CMPEQ:  res[s] = word_t'(a == b);
          OP_CMPLT:  res[s] = word_t'(signed'(a) < signed'(b));
          OP_CMPLTU: res[s] = word_t'(a < b);
          OP_ADDI:   res[s] = a + imm_s;
          OP_ANDI:   res[s] = a & imm_z;
          OP_ORI:    res[s] = a | imm_z;
          OP_XORI:   res[s] = a ^ imm_z;
          OP_SHLI:   res[s] = a << imm_z[4:0];
          OP_SHRI:   res[s] = a >> imm_z[4:0];
          OP_SRAI:   res[s] = word_t'(signed'(a) >>> imm_z[4:0]);
          OP_MOVHI:  res[s] = {syl[s][18:0], 13'd0};
          OP_SLCT:   res[s] = br[syl[s][8:6]] ? a : b;
          OP_MUL:    begin res[s] = prod[31:0];  gwe[s] = (s == int'(MUL_SLOT)); end
          OP_MULH:   begin res[s] = prod[63:32]; gwe[s] = (s == int'(MUL_SLOT)); end
          OP_BCMPEQ:  begin gwe[s] = 1'b0; bwe[s] = 1'b1; bval[s] = (a == b); end
          OP_BCMPNE:  begin gwe[s] = 1'b0; bwe[s] = 1'b1; bval[s] = (a != b); end
          OP_BCMPLT:  begin gwe[s] = 1'b0; bwe[s] = 1'b1; bval[s] = (signed'(a) < signed'(b)); end
          OP_BCMPLTU: begin gwe[s] = 1'b0; bwe[s] = 1'b1; bval[s] = (a < b); end
          OP_BCMPLTI: begin gwe[s] = 1'b0; bwe[s] = 1'b1; bval[s] = (signed'(a) < signed'(imm_s)); end
          OP_BCMPNEI: begin gwe[s] = 1'b0; bwe[s] = 1'b1; bval[s] = (a != imm_s); end
          OP_LDW, OP_LDHU, OP_LDBU: begin res[s] = mem_rdata; gwe[s] = (s == 0); end
          OP_CALL:    begin res[s] = word_t'(seq_next); gdst[s] = 6'(LINK); gwe[s] = (s == 0); end
          OP_TCREATE: begin res[s] = tc_result; gwe[s] = (s == 0); end
          OP_TSELF:   begin res[s] = word_t'(core_id); gwe[s] = (s == 0); end
          default:    gwe[s] = 1'b0;
        endcase
      end
    end
  end

  // slot 0: control flow, memory, threads
  opcode_e op0;
  word_t   a0, b0;
  logic [PCW-1:0] tgt0;
  assign op0  = mask[0] ? syl_op(syl[0]) : OP_NOP;
  assign a0   = rd(syl[0][18:13]);
  assign b0   = rd(syl[0][5:0]);
  assign tgt0 = syl[0][PCW-1:0];

  always_comb begin
    is_cond_branch = 1'b0;
    taken          = 1'b0;
    actual_next    = seq_next;
    unique case (op0)
      OP_GOTO, OP_CALL: begin taken = 1'b1; actual_next = tgt0; end
      OP_RET:           begin taken = 1'b1; actual_next = gpr[LINK][PCW-1:0]; end
      OP_BR:  begin
        is_cond_branch = 1'b1;
        taken          = br[syl[0][21:19]];
        actual_next    = taken ? tgt0 : seq_next;
      end
      OP_BRF: begin
        is_cond_branch = 1'b1;
        taken          = !br[syl[0][21:19]];
        actual_next    = taken ? tgt0 : seq_next;
      end
      default: ;
    endcase
  end

  always_comb begin
    mem_addr  = a0 + word_t'(signed'(syl[0][12:0]));
    mem_wdata = rd(syl[0][24:19]);
    unique case (op0)
      OP_LDW:  memop = MEM_LW;
      OP_LDHU: memop = MEM_LHU;
      OP_LDBU: memop = MEM_LBU;
      OP_STW:  memop = MEM_SW;
      OP_STH:  memop = MEM_SH;
      OP_STB:  memop = MEM_SB;
      default: memop = MEM_NONE;
    endcase
  end

  assign thop    = (op0 == OP_TCREATE) ? TOP_CREATE :
                   (op0 == OP_TJOIN)   ? TOP_JOIN   : TOP_NONE;
  assign th_a    = a0;   // create: start address; join: thread id
  assign th_b    = b0;   // create: argument
  assign th_exit = (op0 == OP_TEXIT);

  // register write-back
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(NGPR); r++) gpr[r] <= '0;
      for (int r = 0; r < int'(NBR); r++)  br[r]  <= 1'b0;
    end else begin
      if (start_we) gpr[ARG_REG] <= start_arg;
      if (commit) begin
        for (int s = 0; s < int'(ISSUE_WIDTH); s++) begin
          if (gwe[s] && gdst[s] != 6'd0) gpr[gdst[s]]    <= res[s];
          if (bwe[s])                    br[gdst[s][2:0]] <= bval[s];
        end
      end
    end
  end
endmodule
