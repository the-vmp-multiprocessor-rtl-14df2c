// cdi: cache directory interface, the state machine that lets the cache
// controller handle a simple cache miss without trapping the processor.
//
// The cache management software keeps its cache directory in the board's
// local memory: one page record (SCBR) per virtual page that has blocks in
// the cache, found by hashing the virtual page number and asid, and a slot
// map (SetBankMap) with one word per cache slot pointing back to the record
// that owns the slot. The CDI reads and updates these structures on behalf
// of the cache controller, through a request/ack port on the local memory.
//
// Operations (op_valid pulses with op; done pulses when it is finished):
//   CDI_INVAL  slot (set, way) is about to be reused: if its slot-map word
//              is valid, clear the slot word in the owning record and the
//              slot-map word.
//   CDI_XLATE  translate (vaddr, asid): walk the hash chain, compare each
//              record's key; on a match answer ok=1 with the physical
//              address and the record's write permission; ok=0 when the
//              chain ends or is longer than MAX_CHAIN (software then takes
//              the trap and does the slow path).
//   CDI_UPDATE record that slot (set, way) now holds the block of vaddr
//              found by the last successful CDI_XLATE.
//
// Layout in local memory (word addresses; own choice, the software must use
// the same):
//   hash table  HT_BASE + h, h = (vpn ^ (asid << 2)) mod HT_ENTRIES, holds
//               the word address of the first record, 0 = empty.
//   record      +0 {asid[7:0], vpn[21:0]} with bit 31..30 zero
//               +1 {physical page[31:10], 9'b0, write permission}
//               +2 word address of the next record in the chain, 0 = end
//               +3 .. +3+BPP-1 one word per block of the page:
//                  {valid, 19'b0, set[7:0], way[3:0]} (0 = not cached)
//   slot map    SBM_BASE + set*WAYS + way: {valid, 12'b0, block[2:0], record[15:0]}
// Pages are 1 KB (PAGE_W = 10), so a page has BPP = 8 blocks of 128 bytes.
//
// Every local-memory access is a one-cycle request answered by ack one
// cycle later; an access therefore costs two cycles and a translation that
// hits the first record 8 cycles.
//
// The document gives the CDI's role, its three services (invalidate the
// slot-map entry, translate, update with the chosen set and bank) and that
// it reads the directory kept by software in local memory; the record
// layout, the hash function and the chain limit are this design's.
module cdi
  import vmp_pkg::*;
#(
  parameter int SETS       = 256,
  parameter int WAYS       = 4,
  parameter int LMA_W      = 16,       // local memory word address width
  parameter int PAGE_W     = 10,       // 1 KB virtual pages
  parameter int OFF_W      = 7,        // 128-byte blocks
  parameter int HT_ENTRIES = 1024,
  parameter logic [LMA_W-1:0] HT_BASE  = 16'h8000,
  parameter logic [LMA_W-1:0] SBM_BASE = 16'hC000,
  parameter int MAX_CHAIN  = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // command from the cache controller
  input  logic                     op_valid,
  input  cdi_op_e                  op,
  input  logic [$clog2(SETS)-1:0]  set,
  input  logic [$clog2(WAYS)-1:0]  way,
  input  logic [VA_W-1:0]          vaddr,
  input  logic [ASID_W-1:0]        asid,
  output logic                     busy,
  output logic                     done,
  output logic                     ok,
  output logic [PA_W-1:0]          paddr,
  output logic                     wperm,
  // local memory master port
  output logic                     m_req,
  output logic                     m_we,
  output logic [LMA_W-1:0]         m_addr,
  output logic [WORD_W-1:0]        m_wdata,
  input  logic                     m_ack,
  input  logic [WORD_W-1:0]        m_rdata,
  // statistics
  output logic [15:0]              n_xlate_ok,
  output logic [15:0]              n_xlate_fail
);
  localparam int SET_W = $clog2(SETS);
  localparam int WAY_W = $clog2(WAYS);
  localparam int BLK_W = PAGE_W - OFF_W;
  localparam int VPN_W = VA_W - PAGE_W;
  localparam int HT_W  = $clog2(HT_ENTRIES);

  typedef enum logic [3:0] {
    C_IDLE, C_SBM_RD, C_REC_CLR, C_SBM_CLR, C_HT_RD, C_KEY_RD, C_PPN_RD,
    C_LINK_RD, C_REC_SET, C_SBM_SET, C_DONE
  } cstate_e;
  cstate_e st;

  logic [SET_W-1:0]  r_set;
  logic [WAY_W-1:0]  r_way;
  logic [VA_W-1:0]   r_va;
  logic [ASID_W-1:0] r_asid;
  logic [LMA_W-1:0]  ptr;        // record being examined
  logic [LMA_W-1:0]  hit_ptr;    // record of the last successful translation
  logic [BLK_W-1:0]  sbm_blk;
  logic [$clog2(MAX_CHAIN+1)-1:0] hops;
  logic              waiting;    // a memory access is outstanding

  logic [VPN_W-1:0]  vpn;
  logic [BLK_W-1:0]  blk;
  logic [HT_W-1:0]   h;
  logic [LMA_W-1:0]  sbm_addr;
  assign vpn      = r_va[VA_W-1:PAGE_W];
  assign blk      = r_va[OFF_W +: BLK_W];
  assign h        = HT_W'(vpn) ^ HT_W'({r_asid, 2'b00});
  assign sbm_addr = SBM_BASE + LMA_W'(r_set) * LMA_W'(WAYS) + LMA_W'(r_way);
  assign busy     = (st != C_IDLE);

  // memory access issued in the first cycle of a state, answered by ack
  always_comb begin
    m_we    = 1'b0;
    m_addr  = '0;
    m_wdata = '0;
    unique case (st)
      C_SBM_RD:  m_addr = sbm_addr;
      C_REC_CLR: begin m_we = 1'b1; m_addr = ptr + LMA_W'(3) + LMA_W'(sbm_blk); end
      C_SBM_CLR: begin m_we = 1'b1; m_addr = sbm_addr; end
      C_HT_RD:   m_addr = HT_BASE + LMA_W'(h);
      C_KEY_RD:  m_addr = ptr;
      C_PPN_RD:  m_addr = ptr + LMA_W'(1);
      C_LINK_RD: m_addr = ptr + LMA_W'(2);
      C_REC_SET: begin
        m_we    = 1'b1;
        m_addr  = hit_ptr + LMA_W'(3) + LMA_W'(blk);
        m_wdata = {1'b1, 19'b0, 8'(r_set), 4'(r_way)};
      end
      C_SBM_SET: begin
        m_we    = 1'b1;
        m_addr  = sbm_addr;
        m_wdata = {1'b1, 12'b0, 3'(blk), 16'(hit_ptr)};
      end
      default: ;
    endcase
  end
  assign m_req = busy && st != C_DONE && !waiting;

  logic key_match;
  assign key_match = m_rdata[29:0] == {r_asid, 22'(vpn)} && m_rdata[31:30] == 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= C_IDLE;
      r_set        <= '0;
      r_way        <= '0;
      r_va         <= '0;
      r_asid       <= '0;
      ptr          <= '0;
      hit_ptr      <= '0;
      sbm_blk      <= '0;
      hops         <= '0;
      waiting      <= 1'b0;
      done         <= 1'b0;
      ok           <= 1'b0;
      paddr        <= '0;
      wperm        <= 1'b0;
      n_xlate_ok   <= '0;
      n_xlate_fail <= '0;
    end else begin
      done <= 1'b0;
      if (m_req) waiting <= 1'b1;
      if (m_ack) waiting <= 1'b0;
      unique case (st)
        C_IDLE: if (op_valid) begin
          r_set  <= set;
          r_way  <= way;
          r_va   <= vaddr;
          r_asid <= asid;
          hops   <= '0;
          unique case (op)
            CDI_INVAL:  st <= C_SBM_RD;
            CDI_XLATE:  st <= C_HT_RD;
            default:    st <= C_REC_SET;
          endcase
        end
        C_SBM_RD: if (m_ack) begin
          ptr     <= m_rdata[LMA_W-1:0];
          sbm_blk <= m_rdata[16 +: BLK_W];
          ok      <= 1'b1;
          st      <= m_rdata[31] ? C_REC_CLR : C_DONE;
        end
        C_REC_CLR: if (m_ack) st <= C_SBM_CLR;
        C_SBM_CLR: if (m_ack) begin
          st <= C_DONE;
          ok <= 1'b1;
        end
        C_HT_RD: if (m_ack) begin
          ptr <= m_rdata[LMA_W-1:0];
          if (m_rdata[LMA_W-1:0] == '0) begin
            ok <= 1'b0;
            n_xlate_fail <= n_xlate_fail + 1'b1;
            st <= C_DONE;
          end else begin
            st <= C_KEY_RD;
          end
        end
        C_KEY_RD: if (m_ack) begin
          hops <= hops + 1'b1;
          st   <= key_match ? C_PPN_RD : C_LINK_RD;
        end
        C_PPN_RD: if (m_ack) begin
          paddr      <= {m_rdata[31:PAGE_W], r_va[PAGE_W-1:0]};
          wperm      <= m_rdata[0];
          hit_ptr    <= ptr;
          ok         <= 1'b1;
          n_xlate_ok <= n_xlate_ok + 1'b1;
          st         <= C_DONE;
        end
        C_LINK_RD: if (m_ack) begin
          ptr <= m_rdata[LMA_W-1:0];
          if (m_rdata[LMA_W-1:0] == '0 || int'(hops) >= MAX_CHAIN) begin
            ok <= 1'b0;
            n_xlate_fail <= n_xlate_fail + 1'b1;
            st <= C_DONE;
          end else begin
            st <= C_KEY_RD;
          end
        end
        C_REC_SET: if (m_ack) st <= C_SBM_SET;
        C_SBM_SET: if (m_ack) begin
          ok <= 1'b1;
          st <= C_DONE;
        end
        C_DONE: begin
          done <= 1'b1;
          st   <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  // one memory access outstanding at a time
  a_one_access: assert property (@(posedge clk) disable iff (!rst_n) m_req |-> !waiting);

endmodule
