// tb_ippg_host: host model for the imaging-photoplethysmography kernel,
// shared by the system testbenches. It plays the role of the host processor:
// it loads one program into every IRAM, writes FRAMES 8-bit frames of an
// NPIX-pixel image (a synthetic pulsatile signal with noise) and a Q12
// cosine/sine table for frequency bin K into the shared memory, starts the
// main thread on core 0, waits for it to finish and compares the power map it
// reads back with a map it computes itself.
//
// The program: the main thread creates one worker thread per work partition
// (NT partitions, more than there are cores, so a create can be refused and
// the main thread then runs that partition itself; later creates reuse cores
// whose threads have exited) and joins them all. A worker computes, for every
// pixel of its partition, the real and imaginary parts of DFT bin K over the
// frames and stores (re>>12)^2 + (im>>12)^2, the spectral power at the pulse
// frequency that makes up the perfusion map. The program is assembled for
// the core's issue width.
module tb_ippg_host
  import bt_pkg::*;
  import tb_asm_pkg::*;
#(
  parameter int ISSUE_WIDTH = 4,
  parameter int NCORES = 8,
  parameter int PCW    = 15,
  parameter int DAW    = 16,
  parameter int NPIX   = 64,
  parameter int FRAMES = 64,
  parameter int K      = 3,
  parameter int NT     = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              host_iram_we,
  output logic [NCORES-1:0] host_iram_mask,
  output logic [PCW-1:0]    host_iram_addr,
  output logic [31:0]       host_iram_data,
  output logic              host_m_req,
  output logic              host_m_we,
  output logic [3:0]        host_m_be,
  output logic [DAW-1:0]    host_m_addr,
  output logic [31:0]       host_m_wdata,
  input  logic              host_m_gnt,
  input  logic              host_m_rvalid,
  input  logic [31:0]       host_m_rdata,
  output logic              host_start,
  output logic [PCW-1:0]    host_pc,
  output logic [31:0]       host_arg,
  input  logic              host_done,
  output logic              finished,
  output int                checks,
  output int                failures,
  output longint            run_cycles
);
  // data memory map (byte addresses)
  localparam int COS_BASE   = 'h000;
  localparam int SIN_BASE   = 'h100;
  localparam int POWER_BASE = 'h200;
  localparam int PARAM_BASE = 'h7F0;   // NPIX, NT
  localparam int FRAME_BASE = 'h800;

  longint cycle = 0;
  always @(posedge clk) cycle++;

  task automatic mem_write(int byte_addr, logic [31:0] data);
    host_m_req = 1; host_m_we = 1; host_m_be = 4'hF;
    host_m_addr = DAW'(byte_addr / 4); host_m_wdata = data;
    #1;
    while (!host_m_gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    host_m_req = 0;
  endtask

  task automatic mem_read(int byte_addr, output logic [31:0] data);
    host_m_req = 1; host_m_we = 0; host_m_be = 4'h0; host_m_addr = DAW'(byte_addr / 4);
    #1;
    while (!host_m_gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    host_m_req = 0;
    #1;
    data = host_m_rdata;
  endtask

  initial begin
    prog_c p;
    int wk, pix, inner, done_at, te, cloop, cdone, cnext, jloop;
    int brf_pix, brf_c, br_c, call1, call_te;
    logic [7:0]  frame [FRAMES][NPIX];
    int          cosq [FRAMES], sinq [FRAMES];
    logic [31:0] want [NPIX], got;
    longint      t_start;

    finished = 0; checks = 0; failures = 0; run_cycles = 0;
    host_iram_we = 0; host_iram_mask = '0; host_iram_addr = 0; host_iram_data = 0;
    host_m_req = 0; host_m_we = 0; host_m_be = 0; host_m_addr = 0; host_m_wdata = 0;
    host_start = 0; host_pc = 0; host_arg = 0;

    // ---- data and reference map
    for (int n = 0; n < FRAMES; n++) begin
      cosq[n] = int'($rtoi($floor(4096.0 * $cos(2.0 * 3.14159265358979 * K * n / FRAMES) + 0.5)));
      sinq[n] = -int'($rtoi($floor(4096.0 * $sin(2.0 * 3.14159265358979 * K * n / FRAMES) + 0.5)));
    end
    for (int q = 0; q < NPIX; q++) begin
      int base, amp;
      base = $urandom_range(60, 160);
      amp  = (q % 3 == 0) ? $urandom_range(10, 40) : $urandom_range(0, 3);
      for (int n = 0; n < FRAMES; n++) begin
        int v;
        v = base + int'($rtoi(amp * $sin(2.0 * 3.14159265358979 * K * n / FRAMES)))
            + $urandom_range(0, 6) - 3;
        frame[n][q] = 8'(v);
      end
    end
    for (int q = 0; q < NPIX; q++) begin
      int re, im;
      re = 0; im = 0;
      for (int n = 0; n < FRAMES; n++) begin
        re += int'(frame[n][q]) * cosq[n];
        im += int'(frame[n][q]) * sinq[n];
      end
      re = re >>> 12; im = im >>> 12;
      want[q] = re * re + im * im;
    end

    // ---- program
    p = new(ISSUE_WIDTH);
    // main thread
    void'(p.b('{mk_i(OP_LDW, 41, 0, PARAM_BASE + 4), mk_i(OP_ADDI, 42, 0, 0)}));
    te = p.b('{mk_i(OP_ADDI, 43, 0, 0)});              // patched: thread entry
    cloop = p.b('{mk_r(OP_BCMPLT, 3, 42, 41)});
    brf_c = p.b('{mk_j(OP_BRF, 3, 0)});
    void'(p.b('{mk_r(OP_TCREATE, 44, 43, 42)}));
    void'(p.b('{mk_i(OP_BCMPNEI, 4, 44, -1)}));
    br_c = p.b('{mk_j(OP_BR, 4, 0)});
    void'(p.b('{mk_i(OP_ADDI, 3, 42, 0)}));             // refused: run it here
    call1 = p.b('{mk_j(OP_CALL, 0, 0)});
    cnext = p.b('{mk_i(OP_ADDI, 42, 42, 1)});
    void'(p.b('{mk_j(OP_GOTO, 0, cloop)}));
    cdone = p.b('{mk_i(OP_ADDI, 45, 0, 1)});
    jloop = p.b('{mk_r(OP_TJOIN, 0, 45, 0), mk_i(OP_ADDI, 45, 45, 1)});
    void'(p.b('{mk_r(OP_BCMPLT, 5, 45, 41)}));
    void'(p.b('{mk_j(OP_BR, 5, jloop)}));
    void'(p.b('{mk_r(OP_TEXIT, 0, 0, 0)}));
    // thread entry
    call_te = p.b('{mk_j(OP_CALL, 0, 0)});
    void'(p.b('{mk_r(OP_TEXIT, 0, 0, 0)}));
    // worker: partition in r3
    wk = p.b('{mk_i(OP_LDW, 20, 0, PARAM_BASE), mk_i(OP_ADDI, 4, 3, 0)});
    void'(p.b('{mk_i(OP_LDW, 21, 0, PARAM_BASE + 4)}));
    pix = p.b('{mk_r(OP_BCMPLT, 1, 4, 20), mk_i(OP_ADDI, 6, 0, 0), mk_i(OP_ADDI, 7, 0, 0), mk_i(OP_ADDI, 8, 0, 0)});
    brf_pix = p.b('{mk_j(OP_BRF, 1, 0)});
    void'(p.b('{mk_i(OP_ADDI, 9, 4, FRAME_BASE), mk_i(OP_ADDI, 10, 0, COS_BASE), mk_i(OP_ADDI, 11, 0, SIN_BASE)}));
    inner = p.b('{mk_i(OP_LDBU, 12, 9, 0), mk_r(OP_ADD, 9, 9, 20)});
    void'(p.b('{mk_i(OP_LDW, 13, 10, 0), mk_i(OP_ADDI, 10, 10, 4), mk_i(OP_ADDI, 8, 8, 1)}));
    void'(p.b('{mk_i(OP_LDW, 14, 11, 0), mk_r(OP_MUL, 15, 12, 13), mk_i(OP_ADDI, 11, 11, 4)}));
    void'(p.b('{mk_r(OP_ADD, 6, 6, 15), mk_r(OP_MUL, 16, 12, 14), mk_i(OP_BCMPLTI, 2, 8, FRAMES)}));
    void'(p.b('{mk_j(OP_BR, 2, inner), mk_r(OP_ADD, 7, 7, 16)}));
    void'(p.b('{mk_i(OP_SRAI, 6, 6, 12), mk_i(OP_SRAI, 7, 7, 12)}));
    void'(p.b('{mk_r(OP_NOP, 0, 0, 0), mk_r(OP_MUL, 17, 6, 6)}));
    void'(p.b('{mk_i(OP_SHLI, 19, 4, 2), mk_r(OP_MUL, 18, 7, 7)}));
    void'(p.b('{mk_r(OP_ADD, 17, 17, 18)}));
    void'(p.b('{mk_i(OP_STW, 17, 19, POWER_BASE), mk_r(OP_ADD, 4, 4, 21)}));
    void'(p.b('{mk_j(OP_GOTO, 0, pix)}));
    done_at = p.b('{mk_r(OP_RET, 0, 0, 0)});
    p.code[te][12:0] = 13'(call_te);
    p.patch(brf_c, cdone);
    p.patch(br_c, cnext);
    p.patch(call1, wk);
    p.patch(call_te, wk);
    p.patch(brf_pix, done_at);

    // ---- load
    @(posedge rst_n);
    @(negedge clk);
    foreach (p.code[i]) begin
      host_iram_we = 1; host_iram_mask = '1; host_iram_addr = PCW'(i); host_iram_data = p.code[i];
      @(negedge clk);
    end
    host_iram_we = 0;
    for (int n = 0; n < FRAMES; n++) begin
      mem_write(COS_BASE + 4 * n, cosq[n]);
      mem_write(SIN_BASE + 4 * n, sinq[n]);
    end
    for (int n = 0; n < FRAMES; n++)
      for (int q = 0; q < NPIX; q += 4)
        mem_write(FRAME_BASE + n * NPIX + q, {frame[n][q+3], frame[n][q+2], frame[n][q+1], frame[n][q]});
    for (int q = 0; q < NPIX; q++) mem_write(POWER_BASE + 4 * q, 32'hDEAD_BEEF);
    mem_write(PARAM_BASE, NPIX);
    mem_write(PARAM_BASE + 4, NT);

    // ---- run
    host_start = 1; host_pc = 0; host_arg = 0;
    @(negedge clk);
    host_start = 0;
    t_start = cycle;
    while (!host_done) @(negedge clk);
    run_cycles = cycle - t_start;
    @(negedge clk);

    // ---- results
    for (int q = 0; q < NPIX; q++) begin
      mem_read(POWER_BASE + 4 * q, got);
      checks++;
      if (got != want[q]) begin
        failures++;
        if (failures < 10) $display("FAIL pixel %0d power %0d want %0d", q, got, want[q]);
      end
    end
    finished = 1;
  end
endmodule
