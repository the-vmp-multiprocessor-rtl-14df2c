// vmp_cache: the virtually addressed, set-associative cache of a VMP
// processor board.
//
// The cache is looked up by virtual address and address space identifier
// (asid), so on a hit it also acts as the address translation buffer. It has
// no hardware miss handling: a reference that misses, or a write to a slot
// not exclusively owned, returns a fault and the processor traps into the
// cache management software. That software reads and writes slot tags and
// flags through the sw_* port, asks for the replacement slot of a set
// (sw_lru_way), and has the block copier move data through the cp_* port.
// Because the LRU state only changes on processor hits and fills, asking
// again for the same set after an aborted transfer returns the same slot,
// which keeps miss handling idempotent.
//
// Geometry follows the prototype: 128 KB, 4-way, 128-byte blocks (256 sets
// of 4 slots, 32 words of 32 bits per block). Virtual address split:
// [31:15] tag, [14:7] set, [6:2] word, [1:0] byte.
//
// Timing: a processor request (p_req) is answered one cycle later by p_ack
// with either read data or a fault cause. Copier data reads are
// combinational. After reset the tag store is swept for SETS cycles
// (init_busy high): all slots become invalid and LRU ages are set.
// Flag set, replacement policy (invalid slot first, then true LRU), the
// tag/flag layout and the port split are this design's choices.
module vmp_cache
  import vmp_pkg::*;
#(
  parameter int SETS        = 256,
  parameter int WAYS        = 4,
  parameter int BLOCK_WORDS = 32,
  localparam int SET_W  = $clog2(SETS),
  localparam int WAY_W  = $clog2(WAYS),
  localparam int WRD_W  = $clog2(BLOCK_WORDS),
  localparam int OFF_W  = WRD_W + 2,
  localparam int VTAG_W = VA_W - SET_W - OFF_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 init_busy,
  // processor port
  input  logic                 p_req,
  input  logic                 p_we,
  input  logic [3:0]           p_be,
  input  logic [VA_W-1:0]      p_vaddr,
  input  logic [ASID_W-1:0]    p_asid,
  input  logic [WORD_W-1:0]    p_wdata,
  output logic                 p_ack,
  output fault_e               p_fault,
  output logic [WORD_W-1:0]    p_rdata,
  // software tag/flag port
  input  logic [SET_W-1:0]     sw_set,
  input  logic [WAY_W-1:0]     sw_way,
  input  logic                 sw_we,
  input  logic [VTAG_W-1:0]    sw_wvtag,
  input  logic [ASID_W-1:0]    sw_wasid,
  input  slot_flags_t          sw_wflags,
  output logic [VTAG_W-1:0]    sw_rvtag,
  output logic [ASID_W-1:0]    sw_rasid,
  output slot_flags_t          sw_rflags,
  output logic [WAY_W-1:0]     sw_lru_way,
  // block copier port
  input  logic [SET_W-1:0]     cp_set,
  input  logic [WAY_W-1:0]     cp_way,
  input  logic [WRD_W-1:0]     cp_word,
  input  logic                 cp_we,
  input  logic [WORD_W-1:0]    cp_wdata,
  output logic [WORD_W-1:0]    cp_rdata,
  input  logic                 cp_tag_we,
  input  logic [VTAG_W-1:0]    cp_vtag,
  input  logic [ASID_W-1:0]    cp_asid,
  input  logic                 cp_flags_we,
  input  slot_flags_t          cp_flags,
  output slot_flags_t          cp_rflags
);
  localparam int SLOTS = SETS * WAYS;
  localparam int SLT_W = $clog2(SLOTS);

  typedef struct packed {
    logic [VTAG_W-1:0] vtag;
    logic [ASID_W-1:0] asid;
    slot_flags_t       flags;
  } tag_t;

  tag_t              tags [SLOTS];
  logic [WAY_W-1:0]  age  [SLOTS];          // 0 = most recently used
  logic [WORD_W-1:0] data [SLOTS * BLOCK_WORDS];

  logic [SET_W-1:0]  init_set;

  function automatic logic [SLT_W-1:0] slot_of(logic [SET_W-1:0] s, logic [WAY_W-1:0] w);
    return {s, w};
  endfunction

  // ---------------- processor lookup ----------------
  logic [SET_W-1:0]  p_set;
  logic [WRD_W-1:0]  p_word;
  logic [VTAG_W-1:0] p_vtag;
  logic              p_hit;
  logic [WAY_W-1:0]  p_way;
  tag_t              p_tag;

  assign p_set  = p_vaddr[OFF_W +: SET_W];
  assign p_word = p_vaddr[2 +: WRD_W];
  assign p_vtag = p_vaddr[VA_W-1 -: VTAG_W];

  always_comb begin
    p_hit = 1'b0;
    p_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      tag_t t;
      t = tags[slot_of(p_set, WAY_W'(w))];
      if (!p_hit && t.flags.valid && t.vtag == p_vtag && t.asid == p_asid) begin
        p_hit = 1'b1;
        p_way = WAY_W'(w);
      end
    end
    p_tag = tags[slot_of(p_set, p_way)];
  end

  logic p_go, p_write_ok;
  assign p_go       = p_req && !init_busy;
  assign p_write_ok = p_go && p_we && p_hit && p_tag.flags.writable;

  // ---------------- replacement choice for software ----------------
  always_comb begin
    logic found;
    found      = 1'b0;
    sw_lru_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!found && !tags[slot_of(sw_set, WAY_W'(w))].flags.valid) begin
        found      = 1'b1;
        sw_lru_way = WAY_W'(w);
      end
    end
    for (int w = 0; w < WAYS; w++) begin
      if (!found && age[slot_of(sw_set, WAY_W'(w))] == WAY_W'(WAYS-1)) begin
        found      = 1'b1;
        sw_lru_way = WAY_W'(w);
      end
    end
  end

  assign sw_rvtag  = tags[slot_of(sw_set, sw_way)].vtag;
  assign sw_rasid  = tags[slot_of(sw_set, sw_way)].asid;
  assign sw_rflags = tags[slot_of(sw_set, sw_way)].flags;
  assign cp_rflags = tags[slot_of(cp_set, cp_way)].flags;
  assign cp_rdata  = data[{slot_of(cp_set, cp_way), cp_word}];

  // ---------------- tag and LRU update ----------------
  logic             touch;
  logic [SET_W-1:0] touch_set;
  logic [WAY_W-1:0] touch_way;

  always_comb begin
    touch     = 1'b0;
    touch_set = p_set;
    touch_way = p_way;
    if (cp_tag_we) begin
      touch     = 1'b1;
      touch_set = cp_set;
      touch_way = cp_way;
    end else if (p_go && p_hit && (!p_we || p_tag.flags.writable)) begin
      touch = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (init_busy) begin
      for (int w = 0; w < WAYS; w++) begin
        tags[slot_of(init_set, WAY_W'(w))] <= '0;
        age [slot_of(init_set, WAY_W'(w))] <= WAY_W'(w);
      end
    end else begin
      if (sw_we) begin
        tags[slot_of(sw_set, sw_way)] <= '{vtag: sw_wvtag, asid: sw_wasid, flags: sw_wflags};
      end else if (cp_tag_we) begin
        tags[slot_of(cp_set, cp_way)] <= '{vtag: cp_vtag, asid: cp_asid, flags: cp_flags};
      end else if (cp_flags_we) begin
        tags[slot_of(cp_set, cp_way)].flags <= cp_flags;
      end else if (p_write_ok) begin
        tags[slot_of(p_set, p_way)].flags.modified <= 1'b1;
      end
      if (touch) begin
        for (int w = 0; w < WAYS; w++) begin
          if (WAY_W'(w) == touch_way)
            age[slot_of(touch_set, WAY_W'(w))] <= '0;
          else if (age[slot_of(touch_set, WAY_W'(w))] < age[slot_of(touch_set, touch_way)])
            age[slot_of(touch_set, WAY_W'(w))] <= age[slot_of(touch_set, WAY_W'(w))] + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_set  <= '0;
    end else if (init_busy) begin
      init_set <= init_set + 1'b1;
      if (init_set == SET_W'(SETS-1)) init_busy <= 1'b0;
    end
  end

  // ---------------- data array ----------------
  always_ff @(posedge clk) begin
    if (cp_we) begin
      data[{slot_of(cp_set, cp_way), cp_word}] <= cp_wdata;
    end else if (p_write_ok) begin
      for (int b = 0; b < 4; b++)
        if (p_be[b]) data[{slot_of(p_set, p_way), p_word}][8*b +: 8] <= p_wdata[8*b +: 8];
    end
  end

  // ---------------- processor response ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_ack   <= 1'b0;
      p_fault <= FAULT_NONE;
      p_rdata <= '0;
    end else begin
      p_ack   <= p_go;
      p_fault <= FAULT_NONE;
      if (p_go) begin
        if (!p_hit)                        p_fault <= FAULT_MISS;
        else if (p_we && !p_tag.flags.writable) p_fault <= FAULT_WRITE;
        p_rdata <= data[{slot_of(p_set, p_way), p_word}];
      end
    end
  end

endmodule
