// tb_iram: writes random syllables through the write port and reads whole
// lines back, checking the one-cycle read latency and that the output line
// holds while reads are disabled.
module tb_iram;
  localparam int unsigned W = 4;
  localparam int unsigned BYTES = 4096;
  localparam int unsigned NSYL = BYTES / 4;

  logic clk = 0;
  logic rd_en, wr_en;
  logic [$clog2(NSYL/W)-1:0] rd_addr;
  logic [W-1:0][31:0] rd_line;
  logic [$clog2(NSYL)-1:0] wr_addr;
  logic [31:0] wr_data;
  logic [31:0] model [NSYL];
  int checks = 0, failures = 0;

  iram #(.ISSUE_WIDTH(W), .BYTES(BYTES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_data = 0;
    for (int i = 0; i < int'(NSYL); i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = i[$clog2(NSYL)-1:0]; wr_data = $urandom; model[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 600; n++) begin
      int l;
      l = $urandom_range(0, NSYL / W - 1);
      rd_en = 1; rd_addr = l[$clog2(NSYL/W)-1:0];
      @(negedge clk);
      rd_en = 0;
      for (int s = 0; s < int'(W); s++) begin
        checks++;
        if (rd_line[s] !== model[l * W + s]) begin
          failures++;
          if (failures < 10) $display("line %0d slot %0d got %h want %h", l, s, rd_line[s], model[l*W+s]);
        end
      end
      // no read: output must hold
      rd_addr = ~rd_addr;
      @(negedge clk);
      checks++;
      if (rd_line[0] !== model[l * W]) begin failures++; $display("output not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
