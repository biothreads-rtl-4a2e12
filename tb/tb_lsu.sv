// tb_lsu: runs random loads and stores of words, half-words and bytes
// through the load/store unit against a memory model that grants after a
// random delay and returns read data one cycle after the grant. Checks the
// byte enables and lane placement of stores, the extraction and zero
// extension of loads, and that done comes exactly on the grant of a store
// and on the returned data of a load.
module tb_lsu;
  import bt_pkg::*;
  localparam int unsigned AW = 10;

  logic clk = 0, rst_n = 0;
  logic active, done, m_req, m_we, m_gnt, m_rvalid;
  memop_e memop;
  word_t addr, wdata, rdata, m_wdata, m_rdata;
  logic [3:0] m_be;
  logic [AW-1:0] m_addr;

  lsu #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] mem [1 << AW];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model: random grant delay, data one cycle after a read grant
  logic pend;
  logic [AW-1:0] pend_addr;
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
  always @(negedge clk) m_gnt = ($urandom_range(0, 2) == 0);

  initial begin
    logic [31:0] ref_mem [1 << AW];
    active = 0; memop = MEM_NONE; addr = 0; wdata = 0; m_gnt = 0; m_rdata = 0;
    for (int i = 0; i < (1 << AW); i++) begin mem[i] = $urandom; ref_mem[i] = mem[i]; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      memop_e op;
      int w, cyc;
      bit seen_gnt;
      logic [31:0] want;
      op = memop_e'($urandom_range(1, 6));
      w = $urandom_range(0, (1 << AW) - 1);
      @(negedge clk);
      active = 1; memop = op; wdata = $urandom;
      case (op)
        MEM_LW, MEM_SW:   addr = w * 4;
        MEM_LHU, MEM_SH:  addr = w * 4 + 2 * $urandom_range(0, 1);
        default:          addr = w * 4 + $urandom_range(0, 3);
      endcase
      case (op)
        MEM_LW:  want = ref_mem[w];
        MEM_LHU: want = addr[1] ? {16'd0, ref_mem[w][31:16]} : {16'd0, ref_mem[w][15:0]};
        MEM_LBU: want = {24'd0, ref_mem[w][8*addr[1:0] +: 8]};
        MEM_SW:  ref_mem[w] = wdata;
        MEM_SH:  ref_mem[w][16*addr[1] +: 16] = wdata[15:0];
        MEM_SB:  ref_mem[w][8*addr[1:0] +: 8] = wdata[7:0];
        default: ;
      endcase
      cyc = 0; seen_gnt = 0;
      forever begin
        #2;
        if (done) break;
        chk(m_req == !seen_gnt, "request up until granted, down while data awaited");
        if (m_req && m_gnt) seen_gnt = 1;
        @(negedge clk);
        cyc++;
        if (cyc > 100) break;
      end
      if (op inside {MEM_SW, MEM_SH, MEM_SB}) chk(m_req && m_gnt, "store done on its grant");
      else begin
        chk(seen_gnt && m_rvalid, "load done on returned data");
        chk(rdata == want, $sformatf("load data %h want %h", rdata, want));
      end
      @(negedge clk);
      active = 0;
    end
    @(negedge clk);
    for (int i = 0; i < (1 << AW); i++) chk(mem[i] == ref_mem[i], "memory after stores");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
