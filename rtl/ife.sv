// ife: instruction fetch engine of an LE1 core.
//
// Holds the core's private IRAM and delivers one long instruction word
// (bundle) per cycle to the execute stage. A bundle is a run of syllables
// ending with the one whose stop bit is set (at most ISSUE_WIDTH), so bundles
// are packed in the IRAM without padding and a bundle may start anywhere in a
// line. When a bundle runs past the end of its line, the engine keeps the part
// it has, reads the next line and stalls one cycle: this line-crossing stall
// and the Smith branch predictor are the original BioThreads design's; the way they are built is
// this design's.
//
// Pipeline: the IRAM is read synchronously, so the line holding the bundle at
// pc_a is on the RAM output in the cycle the bundle is assembled (the align
// stage). In that same cycle the engine works out the next fetch address
// (sequential pc + length, the target of GOTO/CALL, or the target of BR/BRF
// when the predictor says taken) and addresses the IRAM with it, so a steady
// stream of bundles, including correctly predicted taken branches, flows with
// no bubble. RET is not predicted. A redirect (misprediction found in the
// execute stage, or a thread start) squashes the bundle being aligned and
// costs one cycle. halt stops fetching when the core goes idle.
//
// Interface: bnd_valid/bnd_ready is a valid/ready handshake; a bundle is
// taken when both are high. bnd_mask marks the slots that hold syllables.
module ife
  import bt_pkg::*;
#(
  parameter int unsigned ISSUE_WIDTH = 4,
  parameter int unsigned IRAM_BYTES  = 131072,
  parameter int unsigned BP_ENTRIES  = 256,
  localparam int unsigned PCW = $clog2(IRAM_BYTES / 4),
  localparam int unsigned OW  = (ISSUE_WIDTH > 1) ? $clog2(ISSUE_WIDTH) : 1,
  localparam int unsigned LW  = PCW - $clog2(ISSUE_WIDTH)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // control
  input  logic                          redirect,
  input  logic [PCW-1:0]                redirect_pc,
  input  logic                          halt,
  // bundle to the execute stage
  output logic                          bnd_valid,
  input  logic                          bnd_ready,
  output syl_t [ISSUE_WIDTH-1:0]        bnd_syl,
  output logic [ISSUE_WIDTH-1:0]        bnd_mask,
  output logic [PCW-1:0]                bnd_pc,
  output logic [PCW-1:0]                bnd_seq_next,
  output logic [PCW-1:0]                bnd_pred_next,
  // predictor training from the execute stage
  input  logic                          bp_upd_valid,
  input  logic [PCW-1:0]                bp_upd_pc,
  input  logic                          bp_upd_taken,
  // host / debug write port into the IRAM
  input  logic                          iram_we,
  input  logic [PCW-1:0]                iram_waddr,
  input  logic [31:0]                   iram_wdata,
  // status
  output logic                          span_stall
);
  // align-stage state
  logic [PCW-1:0]       pc_a;
  logic                 valid_a;
  logic                 span;
  syl_t [ISSUE_WIDTH-1:0] part;
  logic [OW:0]          part_n;

  // IRAM
  logic                         rd_en;
  logic [LW-1:0]                rd_addr;
  logic [ISSUE_WIDTH-1:0][31:0] line_q;

  iram #(.ISSUE_WIDTH(ISSUE_WIDTH), .BYTES(IRAM_BYTES)) u_iram (
    .clk, .rd_en, .rd_addr, .rd_line(line_q),
    .wr_en(iram_we), .wr_addr(iram_waddr), .wr_data(iram_wdata)
  );

  // bundle assembly
  logic [OW-1:0]        off;
  logic                 complete;
  logic [OW:0]          len;
  syl_t [ISSUE_WIDTH-1:0] syl;

  assign off = pc_a[OW-1:0];

  always_comb begin
    logic found;
    int   k;
    found = 1'b0;
    k     = 0;
    syl   = '0;
    if (!span) begin
      for (int i = 0; i < int'(ISSUE_WIDTH); i++)
        if (!found && i >= int'(off) && line_q[i][31]) begin
          found = 1'b1;
          k     = i;
        end
      // a line read from offset 0 without a stop bit is a full-width bundle
      complete = found || (off == '0);
      len      = found ? (OW+1)'(k - int'(off) + 1) : (OW+1)'(ISSUE_WIDTH);
      for (int i = 0; i < int'(ISSUE_WIDTH); i++)
        if (i + int'(off) < int'(ISSUE_WIDTH)) syl[i] = line_q[i + int'(off)];
    end else begin
      for (int j = 0; j < int'(ISSUE_WIDTH); j++)
        if (!found && j < int'(ISSUE_WIDTH) - int'(part_n) && line_q[j][31]) begin
          found = 1'b1;
          k     = j;
        end
      complete = 1'b1;
      len      = found ? (OW+1)'(int'(part_n) + k + 1) : (OW+1)'(ISSUE_WIDTH);
      for (int i = 0; i < int'(ISSUE_WIDTH); i++)
        syl[i] = (i < int'(part_n)) ? part[i] : line_q[i - int'(part_n)];
    end
  end

  // next-pc prediction
  logic           bp_taken;
  opcode_e        op0;
  logic [PCW-1:0] seq_next, target, pred_next;

  assign op0      = syl_op(syl[0]);
  assign seq_next = pc_a + PCW'(len);
  assign target   = syl[0][PCW-1:0];

  smith_bp #(.ENTRIES(BP_ENTRIES), .PCW(PCW)) u_bp (
    .clk, .rst_n,
    .lookup_pc(pc_a), .predict_taken(bp_taken),
    .upd_valid(bp_upd_valid), .upd_pc(bp_upd_pc), .upd_taken(bp_upd_taken)
  );

  always_comb begin
    unique case (op0)
      OP_GOTO, OP_CALL: pred_next = target;
      OP_BR, OP_BRF:    pred_next = bp_taken ? target : seq_next;
      default:          pred_next = seq_next;
    endcase
  end

  // outputs
  always_comb begin
    for (int i = 0; i < int'(ISSUE_WIDTH); i++) begin
      bnd_mask[i] = (i < int'(len));
      bnd_syl[i]  = bnd_mask[i] ? syl[i] : '0;
    end
  end
  assign bnd_valid     = valid_a && complete && !redirect && !halt;
  assign bnd_pc        = pc_a;
  assign bnd_seq_next  = seq_next;
  assign bnd_pred_next = pred_next;
  assign span_stall    = valid_a && !span && !complete && !redirect && !halt;

  // IRAM addressing
  always_comb begin
    rd_en   = 1'b0;
    rd_addr = pc_a[PCW-1:OW];
    if (redirect) begin
      rd_en   = 1'b1;
      rd_addr = redirect_pc[PCW-1:OW];
    end else if (valid_a && !halt) begin
      if (!complete) begin
        rd_en   = 1'b1;
        rd_addr = pc_a[PCW-1:OW] + LW'(1);
      end else if (bnd_ready) begin
        rd_en   = 1'b1;
        rd_addr = pred_next[PCW-1:OW];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_a <= 1'b0;
      span    <= 1'b0;
      pc_a    <= '0;
      part    <= '0;
      part_n  <= '0;
    end else if (redirect) begin
      valid_a <= 1'b1;
      span    <= 1'b0;
      pc_a    <= redirect_pc;
    end else if (halt) begin
      valid_a <= 1'b0;
      span    <= 1'b0;
    end else if (valid_a) begin
      if (!complete) begin
        span   <= 1'b1;
        part   <= syl;
        part_n <= (OW+1)'(ISSUE_WIDTH) - (OW+1)'(off);
      end else if (bnd_ready) begin
        span <= 1'b0;
        pc_a <= pred_next;
      end
    end
  end
endmodule
