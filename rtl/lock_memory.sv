// lock_memory: the special memory on the lock bus that holds the
// authoritative value of every lock bit of the lock segment, together with
// the address space identifier (asid) that may use it.
//
// One request per cycle arrives from the lock bus (the granted lock cache).
// The reply, one cycle later, is also broadcast to every lock cache:
//   LOCK_TEST  returns the value and owning asid (a lock-cache refill),
//   LOCK_TAS   returns the old value and sets the bit,
//   LOCK_CLEAR returns the old value and clears the bit,
//   LOCK_ALLOC (operating system) gives the lock to the request's asid and
//              clears it.
// TAS and CLEAR from a different asid are refused with err and change
// nothing. Whenever a value or owner changes, upd/new_val tell the other
// lock caches to update their copies, which keeps them consistent without
// any further traffic. A sweep after reset clears all locks (init_busy).
// The document proposes the lock segment, the lock cache and a lock bus
// with a lock memory; the request/broadcast protocol is this design's
// choice (the document leaves the lock bus protocol open). The segment of
// 4096 locks is also this design's choice.
module lock_memory
  import vmp_pkg::*;
#(
  parameter int LOCKS = 4096
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          init_busy,
  input  lock_bus_req_t req,
  output lock_bus_rsp_t rsp
);
  localparam int LW = $clog2(LOCKS);

  logic              val  [LOCKS];
  logic [ASID_W-1:0] owner[LOCKS];
  logic [LW-1:0]     init_idx;
  logic [LW-1:0]     a;
  logic              cur;
  logic [ASID_W-1:0] cur_asid;
  logic              prot_err;

  assign a        = req.idx[LW-1:0];
  assign cur      = val[a];
  assign cur_asid = owner[a];
  assign prot_err = (req.op inside {LOCK_TAS, LOCK_CLEAR}) && (cur_asid != req.asid);

  always_ff @(posedge clk) begin
    if (init_busy) begin
      val[init_idx]   <= 1'b0;
      owner[init_idx] <= '0;
    end else if (req.valid && !prot_err) begin
      unique case (req.op)
        LOCK_TAS:   val[a] <= 1'b1;
        LOCK_CLEAR: val[a] <= 1'b0;
        LOCK_ALLOC: begin val[a] <= 1'b0; owner[a] <= req.asid; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_idx  <= '0;
      rsp       <= '0;
    end else begin
      if (init_busy) begin
        init_idx <= init_idx + 1'b1;
        if (init_idx == LW'(LOCKS-1)) init_busy <= 1'b0;
      end
      rsp <= '0;
      if (req.valid && !init_busy) begin
        rsp.valid <= 1'b1;
        rsp.dst   <= req.src;
        rsp.op    <= req.op;
        rsp.idx   <= req.idx;
        rsp.val   <= cur;
        rsp.err   <= prot_err;
        rsp.asid  <= (req.op == LOCK_ALLOC) ? req.asid : cur_asid;
        unique case (req.op)
          LOCK_TAS:   begin rsp.upd <= !prot_err; rsp.new_val <= 1'b1; end
          LOCK_CLEAR: begin rsp.upd <= !prot_err; rsp.new_val <= 1'b0; end
          LOCK_ALLOC: begin rsp.upd <= 1'b1;      rsp.new_val <= 1'b0; end
          default:    begin rsp.upd <= 1'b0;      rsp.new_val <= cur;  end
        endcase
      end
    end
  end

endmodule
