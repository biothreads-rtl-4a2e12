// tb_le1_cpu: runs a small program on one core and checks what it leaves in
// memory against values the testbench computes itself: a 16-element dot
// product (loads, the multiplier in slot 1, a counted loop closed by a
// predicted BR), a CALL/RET subroutine, TSELF, SLCT on a branch register, a
// byte load and byte store, and a thread create answered by a stand-in thread
// controller after a delay. The memory stand-in grants after random delays.
// Also checks the committed bundle count, the mispredictions the Smith
// predictor must make on this loop (first iteration and exit) plus the
// unpredicted RET, and that the core goes idle on TEXIT.
module tb_le1_cpu;
  import bt_pkg::*;
  import tb_asm_pkg::*;
  localparam int unsigned W = 4, IRAM_BYTES = 4096, DAW = 10;
  localparam int unsigned PCW = $clog2(IRAM_BYTES / 4);

  logic clk = 0, rst_n = 0;
  logic start, running, exit_pulse, tc_req, tc_ack, iram_we;
  logic [PCW-1:0] start_pc, iram_waddr;
  word_t start_arg, tc_a, tc_b, tc_result;
  throp_e tc_op;
  logic [31:0] iram_wdata;
  logic m_req, m_we, m_gnt, m_rvalid;
  logic [3:0] m_be;
  logic [DAW-1:0] m_addr;
  word_t m_wdata, m_rdata;
  perf_t perf;

  le1_cpu #(.ISSUE_WIDTH(W), .IRAM_BYTES(IRAM_BYTES), .BP_ENTRIES(64), .DAW(DAW)) dut (
    .clk, .rst_n, .core_id(8'd3), .start, .start_pc, .start_arg, .running, .exit_pulse,
    .tc_req, .tc_op, .tc_a, .tc_b, .tc_ack, .tc_result,
    .iram_we, .iram_waddr, .iram_wdata,
    .m_req, .m_we, .m_be, .m_addr, .m_wdata, .m_gnt, .m_rvalid, .m_rdata, .perf
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] mem [1 << DAW];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // data memory stand-in
  always_ff @(posedge clk) begin
    m_rvalid <= 1'b0;
    if (m_req && m_gnt) begin
      if (m_we) begin
        for (int k = 0; k < 4; k++) if (m_be[k]) mem[m_addr][8*k +: 8] <= m_wdata[8*k +: 8];
      end else begin
        m_rvalid <= 1'b1;
        m_rdata  <= mem[m_addr];
      end
    end
  end
  always @(negedge clk) m_gnt = ($urandom_range(0, 1) == 0);

  // thread controller stand-in: answers a create in the third cycle with id 7
  int tc_wait = 0;
  always @(negedge clk) begin
    if (tc_req && !tc_ack) tc_wait++;
    else tc_wait = 0;
    tc_ack = tc_req && (tc_wait >= 3);
  end
  assign tc_result = 32'd7;

  initial begin
    prog_c p;
    int loop, call_at, sub;
    logic [31:0] x [16], y [16], dot;
    int exits = 0;
    start = 0; start_pc = 0; start_arg = 0; iram_we = 0; iram_waddr = 0; iram_wdata = 0;
    m_gnt = 0; m_rdata = 0; tc_ack = 0;
    foreach (mem[i]) mem[i] = 0;
    dot = 0;
    for (int i = 0; i < 16; i++) begin
      x[i] = $urandom; y[i] = $urandom_range(0, 1000) - 500;
      mem[32'h100 / 4 + i] = x[i];
      mem[32'h200 / 4 + i] = y[i];
      dot += x[i] * y[i];
    end
    p = new();
    void'(p.b('{mk_i(OP_ADDI, 1, 0, 'h100), mk_i(OP_ADDI, 2, 0, 'h200), mk_i(OP_ADDI, 4, 0, 16), mk_i(OP_ADDI, 5, 0, 0)}));
    void'(p.b('{mk_i(OP_ADDI, 6, 0, 0), mk_i(OP_ADDI, 7, 0, 0)}));
    loop = p.b('{mk_i(OP_LDW, 8, 1, 0)});
    void'(p.b('{mk_i(OP_LDW, 9, 2, 0), mk_i(OP_ADDI, 1, 1, 4)}));
    void'(p.b('{mk_i(OP_ADDI, 2, 2, 4), mk_r(OP_MUL, 10, 8, 9), mk_i(OP_ADDI, 5, 5, 1)}));
    void'(p.b('{mk_r(OP_ADD, 6, 6, 10), mk_r(OP_BCMPLT, 1, 5, 4)}));
    void'(p.b('{mk_j(OP_BR, 1, loop)}));
    void'(p.b('{mk_i(OP_STW, 6, 0, 'h300)}));
    call_at = p.b('{mk_j(OP_CALL, 0, 0)});
    void'(p.b('{mk_i(OP_STW, 11, 0, 'h304)}));
    void'(p.b('{mk_r(OP_TSELF, 12, 0, 0), mk_slct(15, 6, 5, 1)}));
    void'(p.b('{mk_i(OP_STW, 12, 0, 'h308)}));
    void'(p.b('{mk_i(OP_STW, 15, 0, 'h314)}));
    void'(p.b('{mk_i(OP_LDBU, 13, 0, 'h101)}));
    void'(p.b('{mk_i(OP_STB, 13, 0, 'h30E)}));
    void'(p.b('{mk_r(OP_TCREATE, 14, 5, 6)}));
    void'(p.b('{mk_i(OP_STW, 14, 0, 'h310)}));
    void'(p.b('{mk_r(OP_TEXIT, 0, 0, 0)}));
    sub = p.b('{mk_r(OP_ADD, 11, 6, 6)});
    void'(p.b('{mk_r(OP_RET, 0, 0, 0)}));
    p.patch(call_at, sub);

    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (p.code[i]) begin
      @(negedge clk);
      iram_we = 1; iram_waddr = PCW'(i); iram_wdata = p.code[i];
    end
    @(negedge clk);
    iram_we = 0;
    start = 1; start_pc = 0; start_arg = 32'd5;
    @(negedge clk);
    start = 0;
    #1 chk(running, "core running after start");
    while (running) begin
      if (exit_pulse) exits++;
      @(negedge clk);
    end
    chk(mem['h300 / 4] == dot, $sformatf("dot product %h want %h", mem['h300/4], dot));
    chk(mem['h304 / 4] == 2 * dot, "subroutine result");
    chk(mem['h308 / 4] == 3, "TSELF");
    chk(mem['h314 / 4] == 16, "SLCT on false branch register");
    chk(mem['h30C / 4] == {8'd0, x[0][15:8], 16'd0}, "byte load and store");
    chk(mem['h310 / 4] == 7, "create result");
    chk(perf.bundles == 95, $sformatf("committed bundles %0d", perf.bundles));
    chk(perf.mispredicts == 3, $sformatf("mispredictions %0d", perf.mispredicts));
    chk(perf.thr_stalls == 2, $sformatf("thread stalls %0d", perf.thr_stalls));
    chk(perf.mem_stalls > 0, "memory stalls happened");
    $display("cycles %0d bundles %0d mem stalls %0d span stalls %0d mispredicts %0d",
             perf.cycles, perf.bundles, perf.mem_stalls, perf.span_stalls, perf.mispredicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
