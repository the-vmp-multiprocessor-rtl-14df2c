// proc_board: one VMP processor board without its processor.
//
// It ties together the parts that let a processor run with a cache managed
// entirely in software:
//   vmp_cache     virtually addressed 4-way cache that faults on a miss,
//   block_copier  moves 128-byte blocks between a cache slot and the bus,
//   action_table  two bits per physical block frame for the bus monitor,
//   bus_monitor   aborts and/or queues interrupts for foreign transactions,
//   intr_fifo     512-entry queue of those interrupts,
//   local_mem     private memory for the cache management code and tables,
//   lock_cache    copies of lock bits of the lock segment (lock bus side),
//   cdi           cache directory interface: reads the software's page
//                 records in local memory for the hardware miss handler.
//
// Processor port (proc_req_t / proc_rsp_t): a cached reference gets ack one
// cycle after it is accepted, with data or a fault cause (miss, or write to a
// slot not owned) on which the processor traps. While a block transfer is in
// progress cached references are held off (no ack) so the faulting
// reference resumes only after the transfer completes or aborts; local
// memory references are always served. References to the lock segment
// (LOCK_BASE upwards, one lock per byte address) go to the lock cache: a
// read tests, a read-modify-write test-and-sets, a write clears; the lock
// value comes back in rdata[0] and a protection error as FAULT_LOCK.
// irq is raised while the interrupt FIFO holds an entry or has overflowed.
// In directory mode (dir_mode=1) the bus monitor is switched off and
// consistency interrupts arrive from the memory-side directory (ext_push).
// Software port (sw_req_t / sw_rsp_t): the cache controller registers used
// by the miss handler: slot tag read/write, replacement slot, start of a bus
// transaction, action-table access, FIFO pop and overflow clear. All of
// these act in the cycle they are asserted; reads are combinational.
// Bus port: request/grant, the address phase this board drives, the bus
// address phase it watches, its abort contribution and the wired-OR abort,
// and the data handshakes.
// Hardware miss handling (sreq.hw_miss=1): a miss or a write to a shared
// copy no longer traps at once. For a miss the sequencer takes the
// replacement slot; if that slot holds a modified block it traps (the
// write-back is left to software). Otherwise it clears the slot tag, has
// the CDI drop the slot from its old page record, translates the address
// through the page records, and starts a read shared (read private for a
// write) into the slot while the CDI records the new owner of the slot. An
// aborted transfer is retried after RETRY_WAIT cycles from the start, but
// if consistency interrupts are waiting on this board it traps instead:
// only the software serves them, and two boards stalled on each other's
// blocks would otherwise retry forever (own choice). For a
// write to a shared copy it translates and asserts ownership, but only
// while no consistency interrupt is queued: a queued one may invalidate
// that very copy, and claiming a stale copy would lose another board's
// write (own choice). Anything the
// sequencer cannot do (no page record, no write permission, an aborted
// ownership claim) ends in the usual trap; the processor stalls meanwhile.
// The register-level software interface and the sequencer's order of steps
// are this design's choices.
module proc_board
  import vmp_pkg::*;
#(
  parameter logic [SRC_W-1:0] MY_ID       = '0,
  parameter int               SETS        = 256,
  parameter int               WAYS        = 4,
  parameter int               BLOCK_WORDS = 32,
  parameter int               FRAMES      = 65536,
  parameter int               FIFO_DEPTH  = 512,
  parameter int               LM_WORDS    = 65536,
  parameter int               LC_ENTRIES  = 256,
  parameter int               LOCKS       = 4096,
  parameter logic [VA_W-1:0]  LOCK_BASE   = 32'hFFFF_F000,
  parameter int               RETRY_WAIT  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor
  input  proc_req_t         preq,
  output proc_rsp_t         prsp,
  input  sw_req_t           sreq,
  output sw_rsp_t           srsp,
  // system bus
  output logic              bus_req,
  input  logic              bus_gnt,
  output bus_addr_t         bus_a_out,
  input  bus_addr_t         bus_a_in,
  output logic              bus_abort_out,
  input  logic              bus_abort_in,
  output logic              bus_wvalid,
  output logic [WORD_W-1:0] bus_wdata,
  input  logic              bus_wready,
  input  logic              bus_rvalid,
  input  logic [WORD_W-1:0] bus_rdata,
  // memory-side directory
  input  logic              dir_mode,
  input  logic              ext_push,
  input  intr_entry_t       ext_entry,
  // lock bus
  output logic              lb_req,
  input  logic              lb_gnt,
  output lock_bus_req_t     lb_out,
  input  lock_bus_rsp_t     lb_rsp,
  // statistics
  output logic [15:0]       n_mon_abort,
  output logic [15:0]       n_mon_intr,
  output logic [15:0]       n_lock_local,
  output logic [15:0]       n_lock_bus,
  output logic [15:0]       n_hw_miss,
  output logic [15:0]       n_hw_trap
);
  localparam int SET_W  = $clog2(SETS);
  localparam int WAY_W  = $clog2(WAYS);
  localparam int WRD_W  = $clog2(BLOCK_WORDS);
  localparam int OFF_W  = WRD_W + 2;
  localparam int VTAG_W = VA_W - SET_W - OFF_W;
  localparam int FW     = $clog2(FRAMES);
  localparam int LMA_W  = $clog2(LM_WORDS);

  // ---------------- cache ----------------
  logic              c_init, at_init;
  logic              c_ack, lm_ack;
  fault_e            c_fault;
  logic [WORD_W-1:0] c_rdata, lm_rdata;
  logic              copy_busy;
  logic              c_req, lm_req;

  logic [SET_W-1:0]  cp_set;
  logic [WAY_W-1:0]  cp_way;
  logic [WRD_W-1:0]  cp_word;
  logic              cp_we, cp_tag_we, cp_flags_we;
  logic [WORD_W-1:0] cp_wdata, cp_rdata;
  logic [VTAG_W-1:0] cp_vtag;
  logic [ASID_W-1:0] cp_asid;
  slot_flags_t       cp_flags, cp_rflags;
  logic [VTAG_W-1:0] sw_rvtag;
  logic [WAY_W-1:0]  sw_lru;
  logic [ASID_W-1:0] sw_rasid;
  slot_flags_t       sw_rflags;
  action_e           sw_ract;

  typedef enum logic [3:0] {
    H_IDLE, H_LRU, H_INVAL, H_XLATE, H_COPY, H_WAIT, H_RETRY,
    H_FINDW, H_OXL, H_OWN, H_OWAIT, H_TRAP
  } hstate_e;
  hstate_e           h_st;   // hardware miss sequencer state

  logic ready, lc_init;
  logic in_lock;
  assign ready   = !c_init && !at_init && !lc_init;
  assign in_lock = !preq.local_sel && (preq.vaddr >= LOCK_BASE)
                   && (preq.vaddr - LOCK_BASE < VA_W'(LOCKS));
  assign c_req   = preq.req && !preq.local_sel && !in_lock && !copy_busy && ready
                   && h_st == H_IDLE;

  // cache software port: from the registers, or from the hardware miss
  // sequencer while it runs
  logic [SET_W-1:0]  sw_set;
  logic [WAY_W-1:0]  sw_way;
  logic              sw_we;
  logic [VTAG_W-1:0] sw_wvtag;
  logic [ASID_W-1:0] sw_wasid;
  slot_flags_t       sw_wflags;

  vmp_cache #(.SETS(SETS), .WAYS(WAYS), .BLOCK_WORDS(BLOCK_WORDS)) u_cache (
    .clk, .rst_n, .init_busy(c_init),
    .p_req(c_req), .p_we(preq.we), .p_be(preq.be), .p_vaddr(preq.vaddr),
    .p_asid(preq.asid), .p_wdata(preq.wdata),
    .p_ack(c_ack), .p_fault(c_fault), .p_rdata(c_rdata),
    .sw_set, .sw_way, .sw_we, .sw_wvtag, .sw_wasid, .sw_wflags,
    .sw_rvtag(sw_rvtag), .sw_rasid(sw_rasid), .sw_rflags(sw_rflags),
    .sw_lru_way(sw_lru),
    .cp_set, .cp_way, .cp_word, .cp_we, .cp_wdata, .cp_rdata,
    .cp_tag_we, .cp_vtag, .cp_asid, .cp_flags_we, .cp_flags, .cp_rflags
  );

  // ---------------- block copier ----------------
  logic              cp_go, cp_cown;
  bus_cmd_e          cp_cmd;
  logic [PA_W-1:0]   cp_paddr;
  logic [SET_W-1:0]  cp_cset;
  logic [WAY_W-1:0]  cp_cway;
  logic [VTAG_W-1:0] cp_cvtag;
  logic [ASID_W-1:0] cp_casid;
  logic          at_cp_we;
  logic [FW-1:0] at_cp_frame;
  action_e       at_cp_act;
  logic          copy_done, copy_aborted;

  block_copier #(.SETS(SETS), .WAYS(WAYS), .BLOCK_WORDS(BLOCK_WORDS),
                 .FRAMES(FRAMES), .MY_ID(MY_ID)) u_copier (
    .clk, .rst_n,
    .cmd_valid(cp_go), .cmd(cp_cmd), .cmd_paddr(cp_paddr),
    .cmd_set(cp_cset), .cmd_way(cp_cway), .cmd_vtag(cp_cvtag), .cmd_asid(cp_casid),
    .cmd_may_own(cp_cown),
    .busy(copy_busy), .done(copy_done), .aborted(copy_aborted),
    .bus_req, .bus_gnt, .bus_a(bus_a_out), .bus_abort(bus_abort_in),
    .bus_wvalid, .bus_wdata, .bus_wready, .bus_rvalid, .bus_rdata,
    .cp_set, .cp_way, .cp_word, .cp_we, .cp_wdata, .cp_rdata,
    .cp_tag_we, .cp_vtag, .cp_asid, .cp_flags_we, .cp_flags, .cp_rflags,
    .at_we(at_cp_we), .at_frame(at_cp_frame), .at_act(at_cp_act)
  );

  // ---------------- action table and bus monitor ----------------
  logic [FW-1:0] mon_frame;
  action_e       mon_act;
  logic          mon_push;
  intr_entry_t   mon_entry;

  action_table #(.FRAMES(FRAMES)) u_at (
    .clk, .rst_n, .init_busy(at_init),
    .mon_frame, .mon_act,
    .cp_we(at_cp_we), .cp_frame(at_cp_frame), .cp_act(at_cp_act),
    .sw_we(sreq.at_we), .sw_frame(sreq.paddr[OFF_W +: FW]), .sw_wact(sreq.at_act),
    .sw_ract(sw_ract)
  );

  bus_monitor #(.FRAMES(FRAMES), .OFF_W(OFF_W), .MY_ID(MY_ID)) u_mon (
    .clk, .rst_n, .enable(ready && !dir_mode), .bus_a(bus_a_in),
    .at_frame(mon_frame), .at_act(mon_act),
    .abort_o(bus_abort_out), .push(mon_push), .entry(mon_entry),
    .n_abort(n_mon_abort), .n_intr(n_mon_intr)
  );

  localparam int EW = $bits(intr_entry_t);
  logic [EW-1:0] fifo_dout;
  logic          fifo_empty, fifo_full, fifo_ovf;
  logic          irq_pend;
  assign irq_pend = !fifo_empty || fifo_ovf;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  intr_fifo #(.W(EW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(mon_push || ext_push), .din(mon_push ? mon_entry : ext_entry),
    .pop(sreq.fifo_pop), .dout(fifo_dout), .empty(fifo_empty), .full(fifo_full),
    .count(fifo_count), .overflow(fifo_ovf), .clr_ovf(sreq.clr_ovf)
  );

  // ---------------- local memory (processor or CDI) ----------------
  logic              cdi_mreq, cdi_mwe, lm_from_cdi, lm_we;
  logic [LMA_W-1:0]  cdi_maddr, lm_addr;
  logic [WORD_W-1:0] cdi_mwdata, lm_wdata;
  logic [3:0]        lm_be;

  assign lm_req   = cdi_mreq || (preq.req && preq.local_sel);
  assign lm_we    = cdi_mreq ? cdi_mwe : preq.we;
  assign lm_be    = cdi_mreq ? 4'hF : preq.be;
  assign lm_addr  = cdi_mreq ? cdi_maddr : preq.vaddr[2 +: LMA_W];
  assign lm_wdata = cdi_mreq ? cdi_mwdata : preq.wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lm_from_cdi <= 1'b0;
    else        lm_from_cdi <= cdi_mreq;
  end

  local_mem #(.WORDS(LM_WORDS)) u_lm (
    .clk, .rst_n, .req(lm_req), .we(lm_we), .be(lm_be),
    .addr(lm_addr), .wdata(lm_wdata),
    .ack(lm_ack), .rdata(lm_rdata)
  );

  // ---------------- hardware handling of simple misses ----------------
  // With sreq.hw_miss set, a cache miss or write fault does not reach the
  // processor at once: the reference stays held while this sequencer tries
  // the simple case through the CDI and the block copier. It traps (answers
  // the held reference with the fault) only when the case is not simple.
  logic [VA_W-1:0]   h_va;
  logic [ASID_W-1:0] h_asid;
  logic              h_we;
  logic [WAY_W-1:0]  h_way;
  fault_e            h_fault;
  logic              h_got_copy, h_got_cdi, h_aborted;
  logic [$clog2(RETRY_WAIT+1)-1:0] h_wait;

  logic              h_start, h_tag_clr;
  logic              cdi_go, cdi_busy, cdi_done, cdi_ok, cdi_wperm;
  cdi_op_e           cdi_op;
  logic [PA_W-1:0]   cdi_paddr;
  logic [15:0]       n_cdi_ok, n_cdi_fail;
  logic              h_match;

  assign h_start = sreq.hw_miss && h_st == H_IDLE && c_ack
                   && (c_fault == FAULT_MISS || c_fault == FAULT_WRITE);
  assign h_match = sw_rflags.valid && sw_rvtag == h_va[VA_W-1 -: VTAG_W]
                   && sw_rasid == h_asid;
  assign h_tag_clr = (h_st == H_LRU) && !(sw_rflags.valid && sw_rflags.modified);

  cdi #(.SETS(SETS), .WAYS(WAYS), .LMA_W(LMA_W), .OFF_W(OFF_W)) u_cdi (
    .clk, .rst_n,
    .op_valid(cdi_go), .op(cdi_op), .set(h_va[OFF_W +: SET_W]),
    .way((h_st == H_LRU) ? sw_lru : h_way),
    .vaddr(h_va), .asid(h_asid),
    .busy(cdi_busy), .done(cdi_done), .ok(cdi_ok), .paddr(cdi_paddr), .wperm(cdi_wperm),
    .m_req(cdi_mreq), .m_we(cdi_mwe), .m_addr(cdi_maddr), .m_wdata(cdi_mwdata),
    .m_ack(lm_ack && lm_from_cdi), .m_rdata(lm_rdata),
    .n_xlate_ok(n_cdi_ok), .n_xlate_fail(n_cdi_fail)
  );

  // CDI commands
  always_comb begin
    cdi_go = 1'b0;
    cdi_op = CDI_INVAL;
    unique case (h_st)
      H_LRU:   cdi_go = h_tag_clr;
      H_INVAL: if (cdi_done) begin cdi_go = 1'b1; cdi_op = CDI_XLATE; end
      H_COPY:  begin cdi_go = 1'b1; cdi_op = CDI_UPDATE; end
      H_FINDW: if (h_match && sw_rflags.may_own) begin cdi_go = 1'b1; cdi_op = CDI_XLATE; end
      default: ;
    endcase
  end

  // cache software port and copier command sources
  always_comb begin
    sw_set    = sreq.vaddr[OFF_W +: SET_W];
    sw_way    = sreq.way[WAY_W-1:0];
    sw_we     = sreq.tag_we;
    sw_wvtag  = sreq.vaddr[VA_W-1 -: VTAG_W];
    sw_wasid  = sreq.asid;
    sw_wflags = sreq.flags;
    cp_go     = sreq.copy_go && ready;
    cp_cmd    = sreq.copy_cmd;
    cp_paddr  = sreq.paddr;
    cp_cset   = sreq.vaddr[OFF_W +: SET_W];
    cp_cway   = sreq.way[WAY_W-1:0];
    cp_cvtag  = sreq.vaddr[VA_W-1 -: VTAG_W];
    cp_casid  = sreq.asid;
    cp_cown   = sreq.flags.may_own;
    if (h_st != H_IDLE) begin
      sw_set    = h_va[OFF_W +: SET_W];
      sw_way    = (h_st == H_LRU) ? sw_lru : h_way;
      sw_we     = h_tag_clr;
      sw_wvtag  = h_va[VA_W-1 -: VTAG_W];
      sw_wasid  = h_asid;
      sw_wflags = '0;
      cp_go     = (h_st == H_COPY) || (h_st == H_OWN);
      cp_cmd    = (h_st == H_OWN) ? BUS_ASSERT_OWN
                : (h_we ? BUS_READ_PRIVATE : BUS_READ_SHARED);
      cp_paddr  = cdi_paddr;
      cp_cset   = h_va[OFF_W +: SET_W];
      cp_cway   = h_way;
      cp_cvtag  = h_va[VA_W-1 -: VTAG_W];
      cp_casid  = h_asid;
      cp_cown   = cdi_wperm;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_st       <= H_IDLE;
      h_va       <= '0;
      h_asid     <= '0;
      h_we       <= 1'b0;
      h_way      <= '0;
      h_fault    <= FAULT_NONE;
      h_got_copy <= 1'b0;
      h_got_cdi  <= 1'b0;
      h_aborted  <= 1'b0;
      h_wait     <= '0;
      n_hw_miss  <= '0;
      n_hw_trap  <= '0;
    end else begin
      unique case (h_st)
        H_IDLE: if (h_start) begin
          h_va    <= preq.vaddr;
          h_asid  <= preq.asid;
          h_we    <= preq.we;
          h_way   <= '0;
          h_fault <= c_fault;
          h_st    <= (c_fault == FAULT_MISS) ? H_LRU : H_FINDW;
        end
        H_LRU: begin
          h_way <= sw_lru;
          h_st  <= h_tag_clr ? H_INVAL : H_TRAP;   // modified victim: software
        end
        H_INVAL: if (cdi_done) h_st <= H_XLATE;
        H_XLATE: if (cdi_done) begin
          if (!cdi_ok || (h_we && !cdi_wperm)) h_st <= H_TRAP;
          else                                  h_st <= H_COPY;
        end
        H_COPY: begin
          h_got_copy <= 1'b0;
          h_got_cdi  <= 1'b0;
          h_st       <= H_WAIT;
        end
        H_WAIT: begin
          if (copy_done) begin
            h_got_copy <= 1'b1;
            h_aborted  <= copy_aborted;
          end
          if (cdi_done) h_got_cdi <= 1'b1;
          if ((h_got_copy || copy_done) && (h_got_cdi || cdi_done)) begin
            if (copy_done ? copy_aborted : h_aborted) begin
              h_wait <= '0;
              // aborted: repeat the sequence, unless consistency interrupts
              // wait here, which only the software can serve
              h_st   <= irq_pend ? H_TRAP : H_RETRY;
            end else begin
              n_hw_miss <= n_hw_miss + 1'b1;
              h_st      <= H_IDLE;            // release the held reference
            end
          end
        end
        H_RETRY: begin
          h_wait <= h_wait + 1'b1;
          if (irq_pend)                            h_st <= H_TRAP;
          else if (int'(h_wait) >= RETRY_WAIT - 1) h_st <= H_LRU;
        end
        H_FINDW: begin
          if (h_match) begin
            // a queued interrupt may be the invalidation of this very
            // copy: only claim ownership with none waiting
            h_st <= (sw_rflags.may_own && !irq_pend) ? H_OXL : H_TRAP;
          end else begin
            h_way <= h_way + 1'b1;
            if (int'(h_way) == WAYS - 1) h_st <= H_TRAP;
          end
        end
        H_OXL: if (cdi_done) h_st <= (cdi_ok && !irq_pend) ? H_OWN : H_TRAP;
        H_OWN: h_st <= H_OWAIT;
        H_OWAIT: if (copy_done) begin
          if (copy_aborted) begin
            h_st <= H_TRAP;
          end else begin
            n_hw_miss <= n_hw_miss + 1'b1;
            h_st      <= H_IDLE;
          end
        end
        H_TRAP: begin
          n_hw_trap <= n_hw_trap + 1'b1;
          h_st      <= H_IDLE;
        end
        default: h_st <= H_IDLE;
      endcase
    end
  end

  // ---------------- lock cache ----------------
  logic        lk_req, lk_wait, lk_from_sw, lk_ack, lk_val, lk_err;
  lock_op_e    lk_op;
  logic [LOCK_W-1:0] lk_idx;
  logic [ASID_W-1:0] lk_asid;

  // a held processor request becomes a single pulse; software allocation
  // requests are pulses already
  always_comb begin
    lk_req  = 1'b0;
    lk_op   = LOCK_TEST;
    lk_idx  = LOCK_W'(preq.vaddr - LOCK_BASE);
    lk_asid = preq.asid;
    if (sreq.lock_alloc && !lk_wait) begin
      lk_req  = 1'b1;
      lk_op   = LOCK_ALLOC;
      lk_idx  = LOCK_W'(sreq.vaddr - LOCK_BASE);
      lk_asid = sreq.asid;
    end else if (preq.req && in_lock && ready && !lk_wait) begin
      lk_req = 1'b1;
      lk_op  = preq.rmw ? LOCK_TAS : (preq.we ? LOCK_CLEAR : LOCK_TEST);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lk_wait    <= 1'b0;
      lk_from_sw <= 1'b0;
    end else if (lk_req) begin
      lk_wait    <= 1'b1;
      lk_from_sw <= sreq.lock_alloc;
    end else if (lk_ack) begin
      lk_wait    <= 1'b0;
    end
  end

  lock_cache #(.MY_ID(MY_ID), .ENTRIES(LC_ENTRIES)) u_lc (
    .clk, .rst_n, .init_busy(lc_init),
    .req(lk_req), .op(lk_op), .idx(lk_idx), .asid(lk_asid),
    .ack(lk_ack), .val(lk_val), .err(lk_err),
    .lb_req, .lb_gnt, .lb_out, .lb_rsp,
    .n_local(n_lock_local), .n_bus(n_lock_bus)
  );

  // ---------------- responses ----------------
  always_comb begin
    prsp       = '0;
    prsp.irq   = irq_pend;
    if (h_st == H_TRAP) begin
      prsp.ack   = 1'b1;
      prsp.fault = h_fault;
    end else if (lk_ack && !lk_from_sw) begin
      prsp.ack      = 1'b1;
      prsp.rdata[0] = lk_val;
      prsp.fault    = lk_err ? FAULT_LOCK : FAULT_NONE;
    end else if (lm_ack && !lm_from_cdi) begin
      prsp.ack   = 1'b1;
      prsp.rdata = lm_rdata;
    end else if (c_ack && !h_start && h_st == H_IDLE) begin
      prsp.ack   = 1'b1;
      prsp.fault = c_fault;
      prsp.rdata = c_rdata;
    end
  end

  always_comb begin
    srsp.ready        = ready;
    srsp.tag_vaddr    = {sw_rvtag, sreq.vaddr[OFF_W +: SET_W], {OFF_W{1'b0}}};
    srsp.asid         = sw_rasid;
    srsp.flags        = sw_rflags;
    srsp.at_act       = sw_ract;
    srsp.lru_way      = 3'(sw_lru);
    srsp.copy_busy    = copy_busy;
    srsp.copy_done    = copy_done;
    srsp.copy_aborted = copy_aborted;
    srsp.fifo_empty   = fifo_empty;
    srsp.fifo_head    = fifo_dout;
    srsp.fifo_ovf     = fifo_ovf;
    srsp.lock_done    = lk_ack && lk_from_sw;
  end

endmodule
