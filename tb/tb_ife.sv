// tb_ife: loads a packed stream of random-length bundles into the IRAM and
// checks that the fetch engine delivers every bundle with the right address,
// slot mask and syllables, under random back-pressure, and that each bundle
// crossing an IRAM line costs exactly one bubble. Then checks that GOTO is
// followed without a bubble, that a redirect squashes and restarts fetch, and
// that BR follows the predictor once it has been trained taken.
module tb_ife;
  import bt_pkg::*;
  localparam int unsigned W = 4;
  localparam int unsigned BYTES = 8192;
  localparam int unsigned PCW = $clog2(BYTES / 4);
  localparam int NB = 300;

  logic clk = 0, rst_n = 0;
  logic redirect, halt, bnd_valid, bnd_ready, bp_upd_valid, bp_upd_taken, iram_we, span_stall;
  logic [PCW-1:0] redirect_pc, bnd_pc, bnd_seq_next, bnd_pred_next, bp_upd_pc, iram_waddr;
  syl_t [W-1:0] bnd_syl;
  logic [W-1:0] bnd_mask;
  logic [31:0] iram_wdata;

  ife #(.ISSUE_WIDTH(W), .IRAM_BYTES(BYTES), .BP_ENTRIES(64)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  syl_t prog [BYTES/4];
  int   bstart [NB];
  int   blen [NB];
  int   nspan = 0;

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
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load();
    for (int i = 0; i < int'(BYTES / 4); i++) begin
      @(negedge clk);
      iram_we = 1; iram_waddr = PCW'(i); iram_wdata = prog[i];
    end
    @(negedge clk);
    iram_we = 0;
  endtask

  initial begin
    int a, k, bubbles, cyc;
    redirect = 0; halt = 0; bnd_ready = 0; bp_upd_valid = 0; bp_upd_taken = 0;
    redirect_pc = 0; bp_upd_pc = 0; iram_we = 0; iram_waddr = 0; iram_wdata = 0;
    foreach (prog[i]) prog[i] = mk_r(OP_ADD, 1, 1, 1);
    // packed random bundles from address 0
    a = 0;
    for (int b = 0; b < NB; b++) begin
      blen[b] = $urandom_range(1, W);
      bstart[b] = a;
      if ((a % W) + blen[b] > W) nspan++;
      for (int s = 0; s < blen[b]; s++)
        prog[a + s] = {1'b0, OP_ADD, 6'($urandom), 6'($urandom), 13'(b * 8 + s)};
      prog[a + blen[b] - 1][31] = 1'b1;
      a += blen[b];
    end
    // control flow region
    prog[1600] = stop(mk_j(OP_GOTO, 0, 1700));
    prog[1700] = stop(mk_i(OP_ADDI, 2, 2, 1));
    prog[1701] = stop(mk_i(OP_ADDI, 3, 3, 1));
    prog[1800] = stop(mk_j(OP_BR, 1, 1900));
    prog[1801] = stop(mk_i(OP_ADDI, 4, 4, 1));
    prog[1900] = stop(mk_i(OP_ADDI, 5, 5, 1));
    repeat (2) @(posedge clk);
    rst_n = 1;
    load();

    // phase 1: stream with random back-pressure
    @(negedge clk);
    redirect = 1; redirect_pc = 0;
    @(negedge clk);
    redirect = 0;
    k = 0; bubbles = 0; cyc = 0;
    while (k < NB && cyc < 5000) begin
      bnd_ready = ($urandom_range(0, 9) < 7);
      #1;
      if (!bnd_valid) bubbles++;
      if (bnd_valid && bnd_ready) begin
        chk(int'(bnd_pc) == bstart[k], "bundle address");
        chk($countones(bnd_mask) == blen[k], "bundle length");
        for (int s = 0; s < blen[k]; s++)
          chk(bnd_syl[s] == prog[bstart[k] + s], "syllable");
        chk(int'(bnd_pred_next) == bstart[k] + blen[k], "sequential next");
        k++;
      end
      @(negedge clk);
      cyc++;
    end
    chk(k == NB, "all bundles delivered");
    chk(bubbles == nspan, "one bubble per line-crossing bundle");
    $display("bundles %0d, crossing lines %0d, bubbles %0d", k, nspan, bubbles);

    // phase 2: GOTO is followed without a bubble
    bnd_ready = 1;
    redirect = 1; redirect_pc = 1600;
    @(negedge clk);
    redirect = 0;
    #1 chk(bnd_valid && bnd_pc == 1600 && bnd_pred_next == 1700, "GOTO bundle predicted to target");
    @(negedge clk);
    #1 chk(bnd_valid && bnd_pc == 1700, "GOTO target with no bubble");
    // a redirect squashes the bundle being aligned
    redirect = 1; redirect_pc = 1900;
    #1 chk(!bnd_valid, "bundle squashed by redirect");
    @(negedge clk);
    redirect = 0;
    #1 chk(bnd_valid && bnd_pc == 1900, "fetch restarts at redirect address");

    // phase 3: BR not predicted taken before training, taken after
    redirect = 1; redirect_pc = 1800;
    @(negedge clk);
    redirect = 0; bnd_ready = 0;
    #1 chk(bnd_valid && bnd_pred_next == 1801, "untrained BR predicted not taken");
    bp_upd_valid = 1; bp_upd_pc = 1800; bp_upd_taken = 1;
    @(negedge clk);
    bp_upd_valid = 0;
    #1 chk(bnd_pred_next == 1900, "trained BR predicted taken");
    bnd_ready = 1;
    @(negedge clk);
    #1 chk(bnd_valid && bnd_pc == 1900, "predicted target fetched with no bubble");
    // halt stops fetching
    halt = 1;
    @(negedge clk);
    halt = 0;
    #1 chk(!bnd_valid, "halt stops fetch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
