// bus_monitor: the small state machine on each processor board that keeps
// the software-managed cache consistent with the other boards.
//
// Every address phase driven by another board is looked up in the action
// table by its physical block frame. Following the single-writer,
// multiple-readers rule, the entry decides:
//   ACT_PRIVATE (this board holds the only, possibly modified, copy):
//       read shared, read private, assert ownership and write back are
//       aborted, and an interrupt is queued so software writes the block
//       back and releases it; the other board then retries.
//   ACT_SHARED (this board holds a read-only copy):
//       read private, assert ownership and write back queue an interrupt so
//       software invalidates its copy; the transaction proceeds.
//   ACT_NOTIFY: a notify transaction to the frame queues an interrupt
//       (used for address-space unmapping and deferred-copy updates).
//   ACT_IGNORE: nothing.
// Transactions driven by this board itself are not acted on.
//
// Timing: the address phase is cycle t; the action entry is read
// combinationally in cycle t; the abort line and the FIFO push are registered
// and appear in cycle t+1, the bus snoop cycle in which every master and
// memory sample the wired-OR abort.
// The decision table is this design's reading of the protocol; the document
// gives the actions (abort, write back, invalidate, notify) but not an
// encoding.
module bus_monitor
  import vmp_pkg::*;
#(
  parameter int               FRAMES = 65536,
  parameter int               OFF_W  = 7,      // log2 of the 128-byte block
  parameter logic [SRC_W-1:0] MY_ID  = '0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      enable,
  input  bus_addr_t                 bus_a,
  // action table lookup
  output logic [$clog2(FRAMES)-1:0] at_frame,
  input  action_e                   at_act,
  // bus abort, valid in the snoop cycle
  output logic                      abort_o,
  // interrupt FIFO
  output logic                      push,
  output intr_entry_t               entry,
  // statistics
  output logic [15:0]               n_abort,
  output logic [15:0]               n_intr
);
  localparam int FW = $clog2(FRAMES);

  logic foreign, do_abort, do_intr;

  assign at_frame = bus_a.paddr[OFF_W +: FW];
  assign foreign  = enable && bus_a.valid && (bus_a.src != MY_ID);

  always_comb begin
    do_abort = 1'b0;
    do_intr  = 1'b0;
    if (foreign) begin
      unique case (at_act)
        ACT_PRIVATE: if (bus_a.cmd inside {BUS_READ_SHARED, BUS_READ_PRIVATE,
                                           BUS_ASSERT_OWN, BUS_WRITE_BACK}) begin
                       do_abort = 1'b1;
                       do_intr  = 1'b1;
                     end
        ACT_SHARED:  if (bus_a.cmd inside {BUS_READ_PRIVATE, BUS_ASSERT_OWN,
                                           BUS_WRITE_BACK})
                       do_intr = 1'b1;
        ACT_NOTIFY:  if (bus_a.cmd == BUS_NOTIFY) do_intr = 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      abort_o <= 1'b0;
      push    <= 1'b0;
      entry   <= '0;
      n_abort <= '0;
      n_intr  <= '0;
    end else begin
      abort_o <= do_abort;
      push  <= do_intr;
      if (do_intr) entry <= '{cmd: bus_a.cmd, src: bus_a.src, paddr: bus_a.paddr};
      if (do_abort) n_abort <= n_abort + 1'b1;
      if (do_intr)  n_intr  <= n_intr + 1'b1;
    end
  end

endmodule
