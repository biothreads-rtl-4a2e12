// tb_thread_ctrl: exercises the hardware thread primitives on four cores:
// host start of core 0, creates that fill the free cores in order and return
// their numbers, a create refused with -1 when no core is free, a join that
// waits for the exit of its thread, joins on invalid ids, two creates in the
// same cycle served one per cycle, and the counters.
module tb_thread_ctrl;
  import bt_pkg::*;
  localparam int unsigned N = 4, PCW = 15;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, ack, exit_pulse, start, busy;
  throp_e [N-1:0] op;
  word_t [N-1:0] a, b;
  word_t result, host_arg, start_arg;
  logic host_start;
  logic [PCW-1:0] host_pc, start_pc;
  logic [31:0] n_created, n_failed;

  thread_ctrl #(.NCORES(N), .PCW(PCW)) dut (.*);

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

  task automatic create(int c, int pc, int arg, int want);
    req = '0; req[c] = 1; op[c] = TOP_CREATE; a[c] = pc; b[c] = arg;
    #1;
    chk(ack[c], "create acknowledged");
    chk(result == word_t'(want), $sformatf("create result %0d want %0d", int'(result), want));
    if (want >= 0) begin
      chk(start == (N'(1) << want), "start pulse to the chosen core");
      chk(start_pc == PCW'(pc) && start_arg == word_t'(arg), "start address and argument");
    end else chk(start == '0, "no start when refused");
    @(negedge clk);
    req = '0;
  endtask

  initial begin
    req = '0; exit_pulse = '0; host_start = 0; host_pc = 0; host_arg = 0;
    foreach (op[i]) begin op[i] = TOP_NONE; a[i] = 0; b[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(busy == '0, "all cores uncommitted after reset");
    host_start = 1; host_pc = 15'd40; host_arg = 32'd99;
    #1 chk(start == 4'b0001 && start_pc == 15'd40 && start_arg == 32'd99, "host starts core 0");
    @(negedge clk);
    host_start = 0;
    chk(busy == 4'b0001, "core 0 committed");
    host_start = 1;
    #1 chk(start == '0, "host start ignored while core 0 runs");
    @(negedge clk);
    host_start = 0;
    create(0, 100, 11, 1);
    create(0, 101, 12, 2);
    create(0, 102, 13, 3);
    chk(busy == 4'b1111, "all cores committed");
    create(0, 103, 14, -1);
    // join waits for the exit of core 2
    req[0] = 1; op[0] = TOP_JOIN; a[0] = 2;
    for (int i = 0; i < 5; i++) begin
      #1 chk(!ack[0], "join waits while thread runs");
      @(negedge clk);
    end
    exit_pulse[2] = 1;
    @(negedge clk);
    exit_pulse[2] = 0;
    #1 chk(ack[0], "join completes after exit");
    chk(busy == 4'b1011, "core 2 uncommitted after exit");
    // join on invalid id and on itself complete at once
    a[0] = 7;
    #1 chk(ack[0], "join on invalid id");
    a[0] = 0;
    #1 chk(ack[0], "join on self");
    @(negedge clk);
    req = '0;
    // core 1 and core 3 create in the same cycle; one free core (2)
    exit_pulse = 4'b0000;
    req[1] = 1; op[1] = TOP_CREATE; a[1] = 200; b[1] = 1;
    req[3] = 1; op[3] = TOP_CREATE; a[3] = 300; b[3] = 3;
    #1;
    chk($countones(ack) == 1, "one create per cycle");
    chk($countones(start) == 1 && start[2], "free core 2 started");
    @(negedge clk);
    if (ack[1]) req[1] = 0; else req[3] = 0;
    #1 chk($countones(ack) == 1 && result == '1, "second create refused, no core left");
    @(negedge clk);
    req = '0;
    chk(n_created == 4 && n_failed == 2, $sformatf("counters %0d %0d", n_created, n_failed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
