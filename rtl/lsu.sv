// lsu: load/store unit of an LE1 core, its one channel to the shared
// streaming data memory (STRMEM).
//
// When the bundle in the execute stage holds a memory syllable, the unit
// raises req with the word address, byte enables and store data lined up to
// the byte lanes, and keeps them steady until the memory grants the request.
// A store is finished on the grant; a load is finished when the memory
// returns the word (rvalid, the cycle after the grant), and the unit then
// extracts and zero-extends the byte or half-word. done is high for one cycle
// when the operation finishes; the pipeline stalls until then. Addresses are
// byte addresses; words and half-words are assumed naturally aligned (the low
// address bits are ignored). One memory channel per core matches the
// evaluated configurations; the handshake and alignment rules are this
// design's own.
module lsu
  import bt_pkg::*;
#(
  parameter int unsigned AW = 16   // word address width of the data memory
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          active,      // a bundle is waiting in the execute stage
  input  memop_e        memop,
  input  word_t         addr,
  input  word_t         wdata,
  output logic          done,
  output word_t         rdata,
  // client port of the streaming memory
  output logic          m_req,
  output logic          m_we,
  output logic [3:0]    m_be,
  output logic [AW-1:0] m_addr,
  output word_t         m_wdata,
  input  logic          m_gnt,
  input  logic          m_rvalid,
  input  word_t         m_rdata
);
  logic waiting;   // load granted, data not yet back
  logic is_store;

  assign is_store = memop inside {MEM_SW, MEM_SH, MEM_SB};
  assign m_req    = active && (memop != MEM_NONE) && !waiting;
  assign m_we     = is_store;
  assign m_addr   = addr[AW+1:2];

  always_comb begin
    unique case (memop)
      MEM_SW:  begin m_be = 4'b1111;                 m_wdata = wdata; end
      MEM_SH:  begin m_be = addr[1] ? 4'b1100 : 4'b0011; m_wdata = {2{wdata[15:0]}}; end
      MEM_SB:  begin m_be = 4'b0001 << addr[1:0];    m_wdata = {4{wdata[7:0]}}; end
      default: begin m_be = 4'b0000;                 m_wdata = wdata; end
    endcase
  end

  always_comb begin
    unique case (memop)
      MEM_LHU: rdata = {16'd0, addr[1] ? m_rdata[31:16] : m_rdata[15:0]};
      MEM_LBU: rdata = word_t'(m_rdata[{addr[1:0], 3'b000} +: 8]);
      default: rdata = m_rdata;
    endcase
  end

  assign done = (m_req && m_gnt && is_store) || (waiting && m_rvalid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              waiting <= 1'b0;
    else if (m_req && m_gnt && !is_store)    waiting <= 1'b1;
    else if (waiting && m_rvalid)            waiting <= 1'b0;
  end

  // A request, once raised, stays up and unchanged until it is granted.
  property p_req_held;
    @(posedge clk) disable iff (!rst_n)
      (m_req && !m_gnt) |=> (m_req && $stable(m_addr) && $stable(m_we));
  endproperty
  a_req_held: assert property (p_req_held);
endmodule
