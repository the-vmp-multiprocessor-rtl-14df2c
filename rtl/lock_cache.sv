// lock_cache: per-board cache of lock bits of the lock segment, kept
// consistent over the lock bus.
//
// The lock segment is a range of single-bit locks, addressed by byte
// address, each belonging to one address space (asid). The processor's
// references to the segment are routed here instead of to the data cache:
//   LOCK_TEST  reads a lock. A hit answers at once from the copy. A miss is
//              never seen by the processor: it answers 1 ("set") and starts
//              a refill from the lock memory in the background, so a
//              spinning processor retries and finds the copy.
//   LOCK_TAS   test-and-set. If the cached copy is already set it answers 1
//              locally (no bus traffic while spinning on a held lock);
//              otherwise the operation is made atomic at the lock memory
//              and the processor waits for the reply.
//   LOCK_CLEAR release, and LOCK_ALLOC (operating system: give the lock to
//              an asid) always go to the lock memory and wait.
// Accessing a lock with an asid other than its owner's gives err
// (protection error). Every reply on the lock bus is snooped: a copy of a
// lock whose value or owner changed is updated, so copies stay consistent.
//
// Processor protocol: req is a one-cycle pulse; ack pulses with val/err one
// cycle later for local answers, or when the lock memory replies. No new
// request may be issued before ack. Lock bus: req/gnt to the lock bus
// arbiter, a one-cycle request phase, the reply from the lock memory.
// Direct-mapped, 256 entries; entries reset invalid by a sweep.
// The document proposes the lock cache and its miss behaviour (answer 1,
// fetch in the background) and the asid protection; organisation, size and
// the bus protocol are this design's choices.
module lock_cache
  import vmp_pkg::*;
#(
  parameter logic [SRC_W-1:0] MY_ID   = '0,
  parameter int               ENTRIES = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              init_busy,
  // processor
  input  logic              req,
  input  lock_op_e          op,
  input  logic [LOCK_W-1:0] idx,
  input  logic [ASID_W-1:0] asid,
  output logic              ack,
  output logic              val,
  output logic              err,
  // lock bus
  output logic              lb_req,
  input  logic              lb_gnt,
  output lock_bus_req_t     lb_out,
  input  lock_bus_rsp_t     lb_rsp,
  // statistics
  output logic [15:0]       n_local,
  output logic [15:0]       n_bus
);
  localparam int EW = $clog2(ENTRIES);
  localparam int TW = LOCK_W - EW;

  typedef struct packed {
    logic              valid;
    logic [TW-1:0]     tag;
    logic [ASID_W-1:0] asid;
    logic              val;
  } entry_t;

  entry_t        ent [ENTRIES];
  logic [EW-1:0] init_idx;

  function automatic logic [EW-1:0] slot(logic [LOCK_W-1:0] i);
    return i[EW-1:0];
  endfunction
  function automatic logic [TW-1:0] tag_of(logic [LOCK_W-1:0] i);
    return i[LOCK_W-1:EW];
  endfunction

  // lookup of the processor request
  entry_t e;
  logic   hit;
  assign e   = ent[slot(idx)];
  assign hit = e.valid && e.tag == tag_of(idx);

  // pending work
  logic              op_pend;     // processor waits for a bus operation
  lock_op_e          op_op;
  logic [LOCK_W-1:0] op_idx;
  logic [ASID_W-1:0] op_asid;
  logic              fetch_pend;  // background refill after a TEST miss
  logic [LOCK_W-1:0] f_idx;
  logic [ASID_W-1:0] f_asid;

  typedef enum logic [1:0] {B_IDLE, B_REQ, B_ADDR, B_WAIT} bstate_e;
  bstate_e           bst;
  logic              b_is_fetch;
  lock_bus_req_t     b_req;

  assign lb_req = (bst == B_REQ) || (bst == B_ADDR) || (bst == B_WAIT);
  assign lb_out = (bst == B_ADDR) ? b_req : '0;

  logic own_rsp;
  assign own_rsp = lb_rsp.valid && lb_rsp.dst == MY_ID && bst == B_WAIT;

  // local answers
  logic local_ans, local_val, local_err, need_fetch, need_bus;
  always_comb begin
    local_ans  = 1'b0;
    local_val  = 1'b0;
    local_err  = 1'b0;
    need_fetch = 1'b0;
    need_bus   = 1'b0;
    if (req && !init_busy) begin
      unique case (op)
        LOCK_TEST: begin
          local_ans = 1'b1;
          if (hit) begin
            local_val = e.val;
            local_err = (e.asid != asid);
          end else begin
            local_val  = 1'b1;
            need_fetch = !fetch_pend;
          end
        end
        LOCK_TAS: if (hit && e.asid == asid && e.val) begin
            local_ans = 1'b1;
            local_val = 1'b1;
          end else begin
            need_bus = 1'b1;
          end
        default: need_bus = 1'b1;
      endcase
    end
  end

  // entry updates: sweep, snoop of every reply
  always_ff @(posedge clk) begin
    if (init_busy) begin
      ent[init_idx] <= '0;
    end else if (lb_rsp.valid) begin
      entry_t s;
      s = ent[slot(lb_rsp.idx)];
      if (lb_rsp.dst == MY_ID && !lb_rsp.err) begin
        ent[slot(lb_rsp.idx)] <= '{valid: 1'b1, tag: tag_of(lb_rsp.idx),
                                   asid: lb_rsp.asid, val: lb_rsp.new_val};
      end else if (lb_rsp.upd && s.valid && s.tag == tag_of(lb_rsp.idx)) begin
        ent[slot(lb_rsp.idx)].val  <= lb_rsp.new_val;
        ent[slot(lb_rsp.idx)].asid <= lb_rsp.asid;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy  <= 1'b1;
      init_idx   <= '0;
      ack        <= 1'b0;
      val        <= 1'b0;
      err        <= 1'b0;
      op_pend    <= 1'b0;
      op_op      <= LOCK_TEST;
      op_idx     <= '0;
      op_asid    <= '0;
      fetch_pend <= 1'b0;
      f_idx      <= '0;
      f_asid     <= '0;
      bst        <= B_IDLE;
      b_is_fetch <= 1'b0;
      b_req      <= '0;
      n_local    <= '0;
      n_bus      <= '0;
    end else begin
      if (init_busy) begin
        init_idx <= init_idx + 1'b1;
        if (init_idx == EW'(ENTRIES-1)) init_busy <= 1'b0;
      end
      ack <= 1'b0;
      if (local_ans) begin
        ack     <= 1'b1;
        val     <= local_val;
        err     <= local_err;
        n_local <= n_local + 1'b1;
      end
      if (need_fetch) begin
        fetch_pend <= 1'b1;
        f_idx      <= idx;
        f_asid     <= asid;
      end
      if (need_bus) begin
        op_pend <= 1'b1;
        op_op   <= op;
        op_idx  <= idx;
        op_asid <= asid;
      end
      unique case (bst)
        B_IDLE: begin
          if (op_pend) begin
            b_req      <= '{valid: 1'b1, op: op_op, idx: op_idx, asid: op_asid, src: MY_ID};
            b_is_fetch <= 1'b0;
            bst        <= B_REQ;
          end else if (fetch_pend) begin
            b_req      <= '{valid: 1'b1, op: LOCK_TEST, idx: f_idx, asid: f_asid, src: MY_ID};
            b_is_fetch <= 1'b1;
            bst        <= B_REQ;
          end
        end
        B_REQ:  if (lb_gnt) bst <= B_ADDR;
        B_ADDR: bst <= B_WAIT;
        B_WAIT: if (own_rsp) begin
          bst   <= B_IDLE;
          n_bus <= n_bus + 1'b1;
          if (b_is_fetch) begin
            fetch_pend <= 1'b0;
          end else begin
            op_pend <= 1'b0;
            ack     <= 1'b1;
            val     <= lb_rsp.val;
            err     <= lb_rsp.err;
          end
        end
        default: bst <= B_IDLE;
      endcase
    end
  end

  // the processor waits for ack before a new request
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n) req |-> !op_pend);

endmodule
