// vmp_system: one VMP node, NPROC processor boards on a shared system bus.
//
// Each proc_board carries a software-managed virtually addressed cache, a
// block copier, a bus monitor with its action table and interrupt FIFO,
// local memory, a lock cache and a cache directory interface (CDI) that
// lets the cache controller handle simple misses without a trap. The boards
// share one system bus: bus_arbiter grants it to one block copier at a
// time, the granted board's address phase and write data are broadcast to
// all boards and to the memory, every board's monitor may pull the wired-OR
// abort line in the snoop cycle, and read data from memory goes to the
// board that owns the bus.
//
// The processors (one per board) and the sequential-access memory board are
// outside this module: their signals are ports. Per board: a processor
// request/response pair and the cache-controller register pair (see
// vmp_pkg). Memory side: the address phase, the abort line, write data with
// wready, and read data with rvalid. The memory must not move data for a
// transaction whose snoop cycle carried an abort.
//
// Two refinements of the basic design are included. A separate lock bus
// with its own round-robin arbiter connects the boards' lock caches to a
// lock memory (lock segment with test, clear and test-and-set). A
// memory-side consistency directory (N+1 bits per block frame) watches the
// system bus; with dir_mode=1 it takes over from the boards' bus monitors:
// it aborts conflicting transactions and sends consistency interrupts only
// to the boards holding copies. dir_mode should only change while the bus
// is idle and the caches are empty.
//
// init_busy is high while the directory and the lock memory clear
// themselves after reset (the boards report their own state in srsp.ready).
//
// Five boards per bus follows the planned 5-processor nodes of the
// prototype; the bus protocol cycle plan is this design's choice.
module vmp_system
  import vmp_pkg::*;
#(
  parameter int NPROC       = 5,
  parameter int SETS        = 256,
  parameter int WAYS        = 4,
  parameter int BLOCK_WORDS = 32,
  parameter int FRAMES      = 65536,
  parameter int FIFO_DEPTH  = 512,
  parameter int LM_WORDS    = 65536,
  parameter int LC_ENTRIES  = 256,
  parameter int LOCKS       = 4096,
  parameter int DIR_N       = 15
) (
  input  logic              clk,
  input  logic              rst_n,
  // processors
  input  proc_req_t         preq [NPROC],
  output proc_rsp_t         prsp [NPROC],
  input  sw_req_t           sreq [NPROC],
  output sw_rsp_t           srsp [NPROC],
  // memory board
  output bus_addr_t         mem_a,
  output logic              mem_abort,
  output logic              mem_wvalid,
  output logic [WORD_W-1:0] mem_wdata,
  input  logic              mem_wready,
  input  logic              mem_rvalid,
  input  logic [WORD_W-1:0] mem_rdata,
  // consistency mode: 0 bus monitors and action tables, 1 memory directory
  input  logic              dir_mode,
  // observation
  output logic [NPROC-1:0]  bus_gnt,
  output logic              init_busy,
  output logic              dir_abort,
  output logic              dir_intr,
  output logic [15:0]       n_lock_local [NPROC],
  output logic [15:0]       n_lock_bus   [NPROC],
  output logic [15:0]       n_mon_abort [NPROC],
  output logic [15:0]       n_mon_intr  [NPROC],
  output logic [15:0]       n_hw_miss   [NPROC],
  output logic [15:0]       n_hw_trap   [NPROC]
);
  logic [NPROC-1:0]  req;
  logic [$clog2(NPROC)-1:0] owner;
  bus_addr_t         a_out   [NPROC];
  logic [NPROC-1:0]  abort_out;
  logic [NPROC-1:0]  wvalid;
  logic [WORD_W-1:0] wdata   [NPROC];

  bus_addr_t         bus_a;
  logic              bus_abort;
  logic              bus_wvalid;
  logic [WORD_W-1:0] bus_wdata;

  bus_arbiter #(.N(NPROC)) u_arb (
    .clk, .rst_n, .req, .gnt(bus_gnt), .owner
  );

  // ---------------- memory-side consistency directory ----------------
  logic              dir_init;
  logic [DIR_N-1:0]  dir_mask;
  intr_entry_t       dir_entry;

  consistency_directory #(.FRAMES(FRAMES), .N(DIR_N), .OFF_W($clog2(BLOCK_WORDS) + 2)) u_dir (
    .clk, .rst_n, .enable(dir_mode), .init_busy(dir_init), .bus_a,
    .abort_o(dir_abort), .intr_valid(dir_intr), .intr_mask(dir_mask),
    .intr_entry(dir_entry)
  );

  // ---------------- lock bus: arbiter and lock memory ----------------
  logic [NPROC-1:0]  lb_req, lb_gnt;
  logic [$clog2(NPROC)-1:0] lb_owner;
  lock_bus_req_t     lb_out [NPROC];
  lock_bus_req_t     lb_bus;
  lock_bus_rsp_t     lb_rsp;
  logic              lm_init;

  bus_arbiter #(.N(NPROC)) u_lock_arb (
    .clk, .rst_n, .req(lb_req), .gnt(lb_gnt), .owner(lb_owner)
  );

  always_comb begin
    lb_bus = '0;
    for (int i = 0; i < NPROC; i++) lb_bus = lb_bus | lb_out[i];
  end

  lock_memory #(.LOCKS(LOCKS)) u_lock_mem (
    .clk, .rst_n, .init_busy(lm_init), .req(lb_bus), .rsp(lb_rsp)
  );

  for (genvar i = 0; i < NPROC; i++) begin : g_board
    proc_board #(
      .MY_ID(SRC_W'(i)), .SETS(SETS), .WAYS(WAYS), .BLOCK_WORDS(BLOCK_WORDS),
      .FRAMES(FRAMES), .FIFO_DEPTH(FIFO_DEPTH), .LM_WORDS(LM_WORDS),
      .LC_ENTRIES(LC_ENTRIES), .LOCKS(LOCKS)
    ) u_board (
      .clk, .rst_n,
      .preq(preq[i]), .prsp(prsp[i]), .sreq(sreq[i]), .srsp(srsp[i]),
      .bus_req(req[i]), .bus_gnt(bus_gnt[i]),
      .bus_a_out(a_out[i]), .bus_a_in(bus_a),
      .bus_abort_out(abort_out[i]), .bus_abort_in(bus_abort),
      .bus_wvalid(wvalid[i]), .bus_wdata(wdata[i]), .bus_wready(mem_wready),
      .bus_rvalid(mem_rvalid && bus_gnt[i]), .bus_rdata(mem_rdata),
      .dir_mode, .ext_push(dir_intr && dir_mask[i]), .ext_entry(dir_entry),
      .lb_req(lb_req[i]), .lb_gnt(lb_gnt[i]), .lb_out(lb_out[i]), .lb_rsp,
      .n_mon_abort(n_mon_abort[i]), .n_mon_intr(n_mon_intr[i]),
      .n_lock_local(n_lock_local[i]), .n_lock_bus(n_lock_bus[i]),
      .n_hw_miss(n_hw_miss[i]), .n_hw_trap(n_hw_trap[i])
    );
  end

  // Bus drivers: only the granted board drives, so an OR merges them.
  always_comb begin
    bus_a      = '0;
    bus_wvalid = 1'b0;
    bus_wdata  = '0;
    for (int i = 0; i < NPROC; i++) begin
      bus_a      = bus_a | a_out[i];
      bus_wvalid = bus_wvalid | wvalid[i];
      bus_wdata  = bus_wdata | wdata[i];
    end
  end

  assign bus_abort  = |abort_out || dir_abort;
  assign init_busy  = dir_init || lm_init;
  assign mem_a      = bus_a;
  assign mem_abort  = bus_abort;
  assign mem_wvalid = bus_wvalid;
  assign mem_wdata  = bus_wdata;

  // the address phase only comes from the board that owns the bus
  a_owner: assert property (@(posedge clk) disable iff (!rst_n)
                            bus_a.valid |-> bus_gnt[owner] && bus_a.src == SRC_W'(owner));
  // the same holds for the lock bus
  a_lb_owner: assert property (@(posedge clk) disable iff (!rst_n)
                               lb_bus.valid |-> lb_gnt[lb_owner] && lb_bus.src == SRC_W'(lb_owner));

endmodule
