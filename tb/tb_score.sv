// tb_score: drives random bundles of ALU, compare, select and multiply
// syllables into the integer cluster and compares every register against a
// model kept by the testbench (registers are read back through slot 0's
// first source operand). Also checks branch resolution, the memory address
// and data handed to the LSU, load write-back, CALL/RET and TSELF.
module tb_score;
  import bt_pkg::*;
  localparam int unsigned W = 4;
  localparam int unsigned PCW = 15;

  logic clk = 0, rst_n = 0;
  logic [7:0] core_id = 8'd5;
  syl_t [W-1:0] syl;
  logic [W-1:0] mask;
  logic [PCW-1:0] seq_next, actual_next;
  logic commit, is_cond_branch, taken, th_exit, start_we;
  memop_e memop;
  word_t mem_addr, mem_wdata, mem_rdata, th_a, th_b, tc_result, start_arg;
  throp_e thop;

  score #(.ISSUE_WIDTH(W), .PCW(PCW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  word_t r [64];
  bit    bm [8];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // execute one bundle and commit it
  task automatic run(syl_t s0, syl_t s1, syl_t s2, syl_t s3, logic [W-1:0] m);
    syl = {s3, s2, s1, s0}; mask = m; commit = 1;
    @(negedge clk);
    commit = 0; mask = '0;
  endtask

  function automatic word_t readreg(int n);
    return (n == 0) ? 0 : r[n];
  endfunction

  task automatic check_reg(int n);
    syl = '0; syl[0] = mk_r(OP_ADD, 0, n, 0); mask = 4'b0001; commit = 0;
    #1 chk(th_a == readreg(n), $sformatf("r%0d = %h, model %h", n, th_a, readreg(n)));
    mask = '0;
  endtask

  function automatic word_t model(opcode_e op, word_t a, word_t b, syl_t s, int slot, output bit we);
    word_t is, iz;
    longint p;
    is = {{19{s[12]}}, s[12:0]};
    iz = {19'd0, s[12:0]};
    p  = longint'(signed'(a)) * longint'(signed'(b));
    we = 1;
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_AND: return a & b;
      OP_OR: return a | b;
      OP_XOR: return a ^ b;
      OP_SHL: return a << (b % 32);
      OP_SHR: return a >> (b % 32);
      OP_SRA: return word_t'(int'(a) >>> (b % 32));
      OP_MIN: return (int'(a) < int'(b)) ? a : b;
      OP_MAX: return (int'(a) > int'(b)) ? a : b;
      OP_CMPEQ: return (a == b) ? 1 : 0;
      OP_CMPLT: return (int'(a) < int'(b)) ? 1 : 0;
      OP_CMPLTU: return (a < b) ? 1 : 0;
      OP_ADDI: return a + is;
      OP_ANDI: return a & iz;
      OP_ORI: return a | iz;
      OP_XORI: return a ^ iz;
      OP_SHLI: return a << (iz % 32);
      OP_SHRI: return a >> (iz % 32);
      OP_SRAI: return word_t'(int'(a) >>> (iz % 32));
      OP_MOVHI: return {s[18:0], 13'd0};
      OP_SLCT: return bm[s[8:6]] ? a : b;
      OP_MUL: begin we = (slot == 1); return word_t'(p); end
      OP_MULH: begin we = (slot == 1); return word_t'(p >>> 32); end
      default: begin we = 0; return 0; end
    endcase
  endfunction

  initial begin
    opcode_e ops [] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR, OP_SRA, OP_MIN,
                        OP_MAX, OP_CMPEQ, OP_CMPLT, OP_CMPLTU, OP_ADDI, OP_ANDI, OP_ORI, OP_XORI,
                        OP_SHLI, OP_SHRI, OP_SRAI, OP_MOVHI, OP_SLCT, OP_MUL, OP_MULH,
                        OP_BCMPEQ, OP_BCMPNE, OP_BCMPLT, OP_BCMPLTU, OP_BCMPLTI, OP_BCMPNEI};
    syl = '0; mask = '0; commit = 0; seq_next = 15'd100; mem_rdata = 0; tc_result = 0;
    start_we = 0; start_arg = 0;
    foreach (r[i]) r[i] = 0;
    foreach (bm[i]) bm[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // random register contents through MOVHI + ORI
    for (int n = 1; n < 64; n++) begin
      word_t v;
      v = $urandom;
      if (n % 4 == 0) v = $urandom_range(0, 40);
      run(mk_j(OP_MOVHI, n, v[31:13]), 0, 0, 0, 4'b0001);
      run(mk_i(OP_ORI, n, n, int'(v[12:0])), 0, 0, 0, 4'b0001);
      r[n] = v;
    end
    for (int n = 0; n < 64; n++) check_reg(n);
    // random bundles
    for (int t = 0; t < 3000; t++) begin
      syl_t s [W];
      word_t nr [64];
      bit    nb [8];
      logic [W-1:0] m;
      nr = r; nb = bm;
      m = W'($urandom_range(1, 15));
      for (int k = 0; k < int'(W); k++) begin
        opcode_e op;
        int d, a, b;
        op = ops[$urandom_range(0, ops.size() - 1)];
        d = (k * 16) + $urandom_range(0, 15);   // slots write different registers
        a = $urandom_range(0, 63);
        b = $urandom_range(0, 63);
        if (op == OP_MOVHI) s[k] = mk_j(op, d, $urandom);
        else if (op inside {OP_ADDI, OP_ANDI, OP_ORI, OP_XORI, OP_SHLI, OP_SHRI, OP_SRAI, OP_BCMPLTI, OP_BCMPNEI})
          s[k] = mk_i(op, d, a, $urandom_range(0, 8191));
        else if (op == OP_SLCT) s[k] = mk_slct(d, a, b, $urandom_range(0, 7));
        else s[k] = mk_r(op, d, a, b);
        if (op inside {OP_BCMPEQ, OP_BCMPNE, OP_BCMPLT, OP_BCMPLTU, OP_BCMPLTI, OP_BCMPNEI}) begin
          // two slots may not write the same branch register
          s[k][21:19] = 3'(k * 2 + $urandom_range(0, 1));
        end
        if (m[k]) begin
          word_t va, vb, res;
          bit we;
          va = readreg(a); vb = readreg(b);
          case (op)
            OP_BCMPEQ:  nb[s[k][21:19]] = (va == vb);
            OP_BCMPNE:  nb[s[k][21:19]] = (va != vb);
            OP_BCMPLT:  nb[s[k][21:19]] = (int'(va) < int'(vb));
            OP_BCMPLTU: nb[s[k][21:19]] = (va < vb);
            OP_BCMPLTI: nb[s[k][21:19]] = (int'(va) < int'({{19{s[k][12]}}, s[k][12:0]}));
            OP_BCMPNEI: nb[s[k][21:19]] = (va != {{19{s[k][12]}}, s[k][12:0]});
            default: begin
              res = model(op, va, vb, s[k], k, we);
              if (we && d != 0) nr[d] = res;
            end
          endcase
        end
      end
      run(s[0], s[1], s[2], s[3], m);
      r = nr; bm = nb;
      if (t % 50 == 0) for (int n = 0; n < 64; n++) check_reg(n);
      else check_reg($urandom_range(0, 63));
    end
    for (int n = 0; n < 64; n++) check_reg(n);
    // branch resolution
    run(mk_r(OP_BCMPEQ, 2, 0, 0), 0, 0, 0, 4'b0001); // b2 = 1
    run(mk_r(OP_BCMPNE, 3, 0, 0), 0, 0, 0, 4'b0001); // b3 = 0
    syl = '0; mask = 4'b0001; seq_next = 15'd77;
    syl[0] = mk_j(OP_BR, 2, 300);
    #1 chk(is_cond_branch && taken && actual_next == 300, "BR taken");
    syl[0] = mk_j(OP_BR, 3, 300);
    #1 chk(is_cond_branch && !taken && actual_next == 77, "BR not taken");
    syl[0] = mk_j(OP_BRF, 3, 300);
    #1 chk(taken && actual_next == 300, "BRF taken");
    syl[0] = mk_j(OP_GOTO, 0, 123);
    #1 chk(!is_cond_branch && actual_next == 123, "GOTO");
    mask = 0;
    // CALL writes the link register, RET returns through it
    run(mk_j(OP_CALL, 0, 400), 0, 0, 0, 4'b0001);
    r[63] = 77;
    check_reg(63);
    syl = '0; mask = 4'b0001; syl[0] = mk_r(OP_RET, 0, 0, 0);
    #1 chk(actual_next == 77 && taken, "RET to link");
    // memory syllable: address, data, load write-back
    syl[0] = mk_i(OP_STW, 7, 9, -4);
    #1 chk(memop == MEM_SW && mem_addr == r[9] - 4 && mem_wdata == r[7], "store operands");
    mem_rdata = 32'hCAFE_F00D;
    run(mk_i(OP_LDW, 11, 9, 8), 0, 0, 0, 4'b0001);
    r[11] = 32'hCAFE_F00D;
    check_reg(11);
    // MUL in a slot other than 1 does not write
    run(mk_r(OP_MUL, 12, 1, 2), 0, 0, 0, 4'b0001);
    check_reg(12);
    // thread primitives
    run(mk_r(OP_TSELF, 13, 0, 0), 0, 0, 0, 4'b0001);
    r[13] = 5;
    check_reg(13);
    tc_result = 32'd6;
    syl = '0; mask = 4'b0001; syl[0] = mk_r(OP_TCREATE, 14, 1, 2);
    #1 chk(thop == TOP_CREATE && th_a == r[1] && th_b == r[2], "create operands");
    run(mk_r(OP_TCREATE, 14, 1, 2), 0, 0, 0, 4'b0001);
    r[14] = 6;
    check_reg(14);
    start_we = 1; start_arg = 32'h1234;
    @(negedge clk);
    start_we = 0; r[3] = 32'h1234;
    check_reg(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
