// tb_pipe_ctrl: drives the pipeline controller through start, memory and
// thread stalls, a misprediction, a correctly predicted bundle and an exit,
// checking commit, hold, redirect and halt in each case and the performance
// counters at the end.
module tb_pipe_ctrl;
  import bt_pkg::*;
  localparam int unsigned PCW = 15;

  logic clk = 0, rst_n = 0;
  logic start, ex_valid, ex_mem, lsu_done, ex_thr, tc_ack, ex_exit, span_stall;
  logic [PCW-1:0] start_pc, ex_pred_next, actual_next, redirect_pc;
  logic running, commit, ex_ready, redirect, halt, exit_pulse;
  perf_t perf;

  pipe_ctrl #(.PCW(PCW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; ex_valid = 0; ex_mem = 0; lsu_done = 0; ex_thr = 0; tc_ack = 0; ex_exit = 0;
    span_stall = 0; start_pc = 0; ex_pred_next = 0; actual_next = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!running && ex_ready && !commit, "idle after reset");
    start = 1; start_pc = 15'd321;
    #1 chk(redirect && redirect_pc == 15'd321, "start redirects fetch");
    @(negedge clk);
    start = 0;
    chk(running, "running after start");
    // plain bundle, predicted correctly
    ex_valid = 1; ex_pred_next = 15'd10; actual_next = 15'd10;
    #1 chk(commit && ex_ready && !redirect, "bundle commits");
    @(negedge clk);
    // memory stall for three cycles
    ex_mem = 1;
    for (int i = 0; i < 3; i++) begin
      #1 chk(!commit && !ex_ready, "held while memory busy");
      span_stall = (i == 0);
      @(negedge clk);
    end
    span_stall = 0;
    lsu_done = 1;
    #1 chk(commit && ex_ready, "commits when memory done");
    @(negedge clk);
    ex_mem = 0; lsu_done = 0;
    // thread stall
    ex_thr = 1;
    #1 chk(!commit, "held while thread op waits");
    @(negedge clk);
    tc_ack = 1;
    #1 chk(commit, "commits on thread ack");
    @(negedge clk);
    ex_thr = 0; tc_ack = 0;
    // misprediction
    ex_pred_next = 15'd11; actual_next = 15'd50;
    #1 chk(commit && redirect && redirect_pc == 15'd50, "misprediction redirects");
    @(negedge clk);
    // exit
    ex_exit = 1;
    #1 chk(commit && halt && exit_pulse && !redirect, "exit halts without redirect");
    @(negedge clk);
    ex_exit = 0; ex_valid = 0;
    chk(!running, "idle after exit");
    chk(perf.bundles == 5, $sformatf("bundles %0d", perf.bundles));
    chk(perf.mem_stalls == 3, "memory stall count");
    chk(perf.thr_stalls == 1, "thread stall count");
    chk(perf.mispredicts == 1, "mispredict count");
    chk(perf.span_stalls == 1, "span stall count");
    chk(perf.cycles == 9, $sformatf("running cycles %0d", perf.cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
