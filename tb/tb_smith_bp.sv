// tb_smith_bp: checks the Smith predictor against a model of 2-bit
// saturating counters, under random updates on a few colliding addresses,
// and checks that an update is visible to a lookup in the next cycle.
module tb_smith_bp;
  localparam int unsigned ENTRIES = 256;
  localparam int unsigned PCW     = 15;

  logic clk = 0, rst_n = 0;
  logic [PCW-1:0] lookup_pc, upd_pc;
  logic predict_taken, upd_valid, upd_taken;
  int checks = 0, failures = 0;
  int model [ENTRIES];

  smith_bp #(.ENTRIES(ENTRIES), .PCW(PCW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    upd_valid = 0; upd_taken = 0; upd_pc = 0; lookup_pc = 0;
    foreach (model[i]) model[i] = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      logic [PCW-1:0] pc;
      // few hot addresses, some aliasing on the low bits
      pc = PCW'($urandom_range(0, 7) * 256 + $urandom_range(0, 5));
      upd_pc    = pc;
      upd_valid = ($urandom_range(0, 3) != 0);
      upd_taken = ($urandom_range(0, 99) < 70);
      lookup_pc = PCW'($urandom_range(0, 5));
      #1;
      checks++;
      if (predict_taken !== (model[lookup_pc % ENTRIES] >= 2)) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: pc %0d got %0b model %0d", n, lookup_pc, predict_taken, model[lookup_pc % ENTRIES]);
      end
      @(posedge clk);
      if (upd_valid) begin
        int e;
        e = int'(pc % ENTRIES);
        if (upd_taken && model[e] < 3) model[e]++;
        else if (!upd_taken && model[e] > 0) model[e]--;
      end
      @(negedge clk);
    end
    // saturation: four taken updates then one not-taken keeps it predicting taken
    upd_pc = 15'd9; lookup_pc = 15'd9; upd_taken = 1; upd_valid = 1;
    repeat (4) @(negedge clk);
    upd_taken = 0;
    @(negedge clk);
    upd_valid = 0;
    #1; checks++;
    if (!predict_taken) begin failures++; $display("saturation lost"); end
    upd_valid = 1;
    @(negedge clk);
    upd_valid = 0;
    #1; checks++;
    if (predict_taken) begin failures++; $display("counter did not fall below 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
