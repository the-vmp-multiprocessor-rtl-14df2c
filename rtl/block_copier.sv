// block_copier: the bus side of the VMP cache controller. It performs one
// system bus transaction for the cache management software: a block move in
// (read shared or read private) into a chosen cache slot, a block move out
// (write back) from a slot, an ownership claim (assert ownership) or a
// notify.
//
// Sequence: the command is latched, the bus is requested, the address phase
// is driven for one cycle, and in the following snoop cycle the wired-OR
// abort line is sampled. An aborted transaction ends at once with
// aborted=1: the slot is left as it was (invalid for a move in), so the
// faulting reference simply faults again and software retries. Otherwise the
// 32 words of the block stream one per bus handshake (rvalid from memory for
// reads, wvalid/wready for writes), in ascending order. In the final cycle
// the copier installs the slot tag and flags (move in), sets the slot
// writable (ownership claim) or clears its modified flag (write back), and
// updates this board's action table entry for the frame (shared after read
// shared, private after read private or assert ownership).
//
// Timing with an idle bus and a memory that answers every cycle:
// 1 cycle to latch, 1 to request, 1 grant, 1 address, 1 snoop, BLOCK_WORDS
// data cycles, 1 finish; done (a register) pulses in the cycle after the
// finish cycle, when the slot and the action table already hold the update.
// Handshake details and the exact cycle plan are this design's choice; the
// document gives the transaction kinds, the sequential block transfer and the
// abort-and-retry rule.
module block_copier
  import vmp_pkg::*;
#(
  parameter int               SETS        = 256,
  parameter int               WAYS        = 4,
  parameter int               BLOCK_WORDS = 32,
  parameter int               FRAMES      = 65536,
  parameter logic [SRC_W-1:0] MY_ID       = '0,
  localparam int SET_W  = $clog2(SETS),
  localparam int WAY_W  = $clog2(WAYS),
  localparam int WRD_W  = $clog2(BLOCK_WORDS),
  localparam int OFF_W  = WRD_W + 2,
  localparam int VTAG_W = VA_W - SET_W - OFF_W,
  localparam int FW     = $clog2(FRAMES)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // command from the cache software
  input  logic                 cmd_valid,
  input  bus_cmd_e             cmd,
  input  logic [PA_W-1:0]      cmd_paddr,
  input  logic [SET_W-1:0]     cmd_set,
  input  logic [WAY_W-1:0]     cmd_way,
  input  logic [VTAG_W-1:0]    cmd_vtag,
  input  logic [ASID_W-1:0]    cmd_asid,
  input  logic                 cmd_may_own,
  output logic                 busy,
  output logic                 done,
  output logic                 aborted,
  // system bus
  output logic                 bus_req,
  input  logic                 bus_gnt,
  output bus_addr_t            bus_a,
  input  logic                 bus_abort,
  output logic                 bus_wvalid,
  output logic [WORD_W-1:0]    bus_wdata,
  input  logic                 bus_wready,
  input  logic                 bus_rvalid,
  input  logic [WORD_W-1:0]    bus_rdata,
  // cache slot access
  output logic [SET_W-1:0]     cp_set,
  output logic [WAY_W-1:0]     cp_way,
  output logic [WRD_W-1:0]     cp_word,
  output logic                 cp_we,
  output logic [WORD_W-1:0]    cp_wdata,
  input  logic [WORD_W-1:0]    cp_rdata,
  output logic                 cp_tag_we,
  output logic [VTAG_W-1:0]    cp_vtag,
  output logic [ASID_W-1:0]    cp_asid,
  output logic                 cp_flags_we,
  output slot_flags_t          cp_flags,
  input  slot_flags_t          cp_rflags,
  // action table update
  output logic                 at_we,
  output logic [FW-1:0]        at_frame,
  output action_e              at_act
);
  typedef enum logic [2:0] {S_IDLE, S_REQ, S_ADDR, S_SNOOP, S_XFER, S_FIN} state_e;

  state_e            st;
  bus_cmd_e          c_cmd;
  logic [PA_W-1:0]   c_paddr;
  logic [SET_W-1:0]  c_set;
  logic [WAY_W-1:0]  c_way;
  logic [VTAG_W-1:0] c_vtag;
  logic [ASID_W-1:0] c_asid;
  logic              c_may_own;
  logic [WRD_W-1:0]  cnt;
  logic              is_read, is_write;

  assign is_read  = (c_cmd == BUS_READ_SHARED) || (c_cmd == BUS_READ_PRIVATE);
  assign is_write = (c_cmd == BUS_WRITE_BACK);
  assign busy     = (st != S_IDLE);
  assign bus_req  = st inside {S_REQ, S_ADDR, S_SNOOP, S_XFER};

  always_comb begin
    bus_a       = '0;
    if (st == S_ADDR)
      bus_a = '{valid: 1'b1, cmd: c_cmd, src: MY_ID,
                paddr: {c_paddr[PA_W-1:OFF_W], {OFF_W{1'b0}}}};
  end

  assign bus_wvalid = (st == S_XFER) && is_write;
  assign bus_wdata  = bus_wvalid ? cp_rdata : '0;

  assign cp_set   = c_set;
  assign cp_way   = c_way;
  assign cp_word  = cnt;
  assign cp_we    = (st == S_XFER) && is_read && bus_rvalid;
  assign cp_wdata = bus_rdata;
  assign cp_vtag  = c_vtag;
  assign cp_asid  = c_asid;
  assign at_frame = c_paddr[OFF_W +: FW];

  always_comb begin
    cp_tag_we   = 1'b0;
    cp_flags_we = 1'b0;
    cp_flags    = cp_rflags;
    at_we       = 1'b0;
    at_act      = ACT_IGNORE;
    if (st == S_FIN) begin
      unique case (c_cmd)
        BUS_READ_SHARED, BUS_READ_PRIVATE: begin
          cp_tag_we = 1'b1;
          cp_flags  = '{valid: 1'b1, writable: (c_cmd == BUS_READ_PRIVATE),
                        modified: 1'b0, may_own: c_may_own};
          at_we     = 1'b1;
          at_act    = (c_cmd == BUS_READ_PRIVATE) ? ACT_PRIVATE : ACT_SHARED;
        end
        BUS_ASSERT_OWN: begin
          cp_flags_we       = 1'b1;
          cp_flags.writable = 1'b1;
          at_we             = 1'b1;
          at_act            = ACT_PRIVATE;
        end
        BUS_WRITE_BACK: begin
          cp_flags_we       = 1'b1;
          cp_flags.modified = 1'b0;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      c_cmd     <= BUS_IDLE;
      c_paddr   <= '0;
      c_set     <= '0;
      c_way     <= '0;
      c_vtag    <= '0;
      c_asid    <= '0;
      c_may_own <= 1'b0;
      cnt       <= '0;
      done      <= 1'b0;
      aborted   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (cmd_valid && cmd != BUS_IDLE) begin
          c_cmd     <= cmd;
          c_paddr   <= cmd_paddr;
          c_set     <= cmd_set;
          c_way     <= cmd_way;
          c_vtag    <= cmd_vtag;
          c_asid    <= cmd_asid;
          c_may_own <= cmd_may_own;
          aborted   <= 1'b0;
          st        <= S_REQ;
        end
        S_REQ:   if (bus_gnt) st <= S_ADDR;
        S_ADDR:  st <= S_SNOOP;
        S_SNOOP: begin
          cnt <= '0;
          if (bus_abort) begin
            aborted <= 1'b1;
            done    <= 1'b1;
            st      <= S_IDLE;
          end else if (cmd_has_data(c_cmd)) begin
            st <= S_XFER;
          end else begin
            st <= S_FIN;
          end
        end
        S_XFER: if ((is_read && bus_rvalid) || (is_write && bus_wready)) begin
          cnt <= cnt + 1'b1;
          if (cnt == WRD_W'(BLOCK_WORDS-1)) st <= S_FIN;
        end
        S_FIN: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // the address phase is only driven while this board owns the bus
  a_addr_owned: assert property (@(posedge clk) disable iff (!rst_n) bus_a.valid |-> bus_gnt);

endmodule
