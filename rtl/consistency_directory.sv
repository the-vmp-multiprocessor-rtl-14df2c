// consistency_directory: memory-side consistency support. For every cache
// block frame of the memory module it keeps a bitmask of N+1 bits: one bit
// telling whether the block is exclusively owned, and N bits naming the
// processors that hold a copy. It replaces the per-board action tables and
// bus monitors, so processor boards need no table sized by physical memory
// and interrupts go only to the boards concerned instead of relying on
// every board watching the bus.
//
// On each address phase (cycle t) the entry of the frame is read and, with
// s the requesting board:
//   read shared     owned by another board -> abort, interrupt the owner
//                   (it writes back and releases); else add s as a sharer.
//   read private,   owned by another board -> abort, interrupt the owner;
//   assert owner.   else interrupt the other sharers (they invalidate) and
//                   record s as exclusive owner.
//   write back      owned by another board -> abort, interrupt the owner;
//                   else interrupt other holders of copies, clear the
//                   exclusive bit and keep s as a holder.
//   notify          interrupt every other holder.
// The abort and the interrupt (intr_valid with a mask of target boards and
// the transaction) are registered and appear in cycle t+1, the snoop cycle,
// like the bus monitor's. The directory is cleared by a sweep after reset.
// enable=0 turns it off (the boards' own monitors keep consistency then).
// The entry layout and the rules per transaction follow the description of
// the scheme; keeping the writer as a holder after a write back, and the
// treatment of notify, are this design's choices (software ignores
// interrupts for blocks it no longer holds).
module consistency_directory
  import vmp_pkg::*;
#(
  parameter int FRAMES = 65536,
  parameter int N      = 15,
  parameter int OFF_W  = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  output logic              init_busy,
  input  bus_addr_t         bus_a,
  output logic              abort_o,
  output logic              intr_valid,
  output logic [N-1:0]      intr_mask,
  output intr_entry_t       intr_entry
);
  localparam int FW = $clog2(FRAMES);

  typedef struct packed {
    logic         excl;
    logic [N-1:0] holders;
  } dir_entry_t;

  dir_entry_t    dir [FRAMES];
  logic [FW-1:0] init_idx;
  logic [FW-1:0] f;
  dir_entry_t    cur, nxt;
  logic [N-1:0]  sb, targets;
  logic          go, do_abort, do_write;

  assign f   = bus_a.paddr[OFF_W +: FW];
  assign cur = dir[f];
  assign sb  = N'(1) << bus_a.src;
  assign go  = enable && !init_busy && bus_a.valid;

  always_comb begin
    logic owned_by_other;
    owned_by_other = cur.excl && (cur.holders != sb);
    do_abort = 1'b0;
    do_write = 1'b0;
    targets  = '0;
    nxt      = cur;
    if (go) begin
      unique case (bus_a.cmd)
        BUS_READ_SHARED: begin
          if (owned_by_other) begin
            do_abort = 1'b1;
            targets  = cur.holders;
          end else begin
            do_write = 1'b1;
            nxt      = '{excl: 1'b0, holders: cur.holders | sb};
          end
        end
        BUS_READ_PRIVATE, BUS_ASSERT_OWN: begin
          if (owned_by_other) begin
            do_abort = 1'b1;
            targets  = cur.holders;
          end else begin
            do_write = 1'b1;
            targets  = cur.holders & ~sb;
            nxt      = '{excl: 1'b1, holders: sb};
          end
        end
        BUS_WRITE_BACK: begin
          if (owned_by_other) begin
            do_abort = 1'b1;
            targets  = cur.holders;
          end else begin
            do_write = 1'b1;
            targets  = cur.holders & ~sb;
            nxt      = '{excl: 1'b0, holders: sb};
          end
        end
        BUS_NOTIFY: targets = cur.holders & ~sb;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (init_busy)     dir[init_idx] <= '0;
    else if (do_write) dir[f] <= nxt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy  <= 1'b1;
      init_idx   <= '0;
      abort_o    <= 1'b0;
      intr_valid <= 1'b0;
      intr_mask  <= '0;
      intr_entry <= '0;
    end else begin
      if (init_busy) begin
        init_idx <= init_idx + 1'b1;
        if (init_idx == FW'(FRAMES-1)) init_busy <= 1'b0;
      end
      abort_o    <= do_abort;
      intr_valid <= (targets != '0);
      intr_mask  <= targets;
      if (targets != '0)
        intr_entry <= '{cmd: bus_a.cmd, src: bus_a.src, paddr: bus_a.paddr};
    end
  end

endmodule
