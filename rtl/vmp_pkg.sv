// vmp_pkg: types and constants shared by the VMP processor-board RTL.
//
// VMP is a shared-bus multiprocessor whose per-processor caches are managed
// by software: on a miss the processor traps, software picks a slot and asks
// the cache controller to move a 128-byte block in over the system bus.
// Consistency is kept by a bus monitor that consults a per-frame action table
// and can abort a bus transaction and queue an interrupt for the software.
//
// Fixed by the design description: 128-byte cache blocks, the five bus
// transaction kinds (read shared, read private, write back, assert ownership,
// notify), two action-table bits per physical block frame.
// The package also holds the types of the extensions: lock-bus request and
// reply, the lock operations, and the operations of the cache directory
// interface that serves simple misses in hardware.
// Own choices: 32-bit words on the system bus (a VME D32 style bus), the
// numeric encodings below, and an 8-bit address space identifier.
package vmp_pkg;

  localparam int WORD_W  = 32;  // processor and system bus data width
  localparam int VA_W    = 32;  // virtual address width
  localparam int PA_W    = 32;  // physical address width
  localparam int ASID_W  = 8;   // address space identifier width
  localparam int SRC_W   = 3;   // bus master id width (up to 8 boards)

  // System bus transaction kinds.
  typedef enum logic [2:0] {
    BUS_IDLE         = 3'd0,
    BUS_READ_SHARED  = 3'd1,  // block move in, read-only copy
    BUS_READ_PRIVATE = 3'd2,  // block move in, exclusive copy
    BUS_WRITE_BACK   = 3'd3,  // block move out
    BUS_ASSERT_OWN   = 3'd4,  // claim ownership, no data
    BUS_NOTIFY       = 3'd5   // software signal to other boards, no data
  } bus_cmd_e;

  // Action-table entry, two bits per physical cache block frame.
  typedef enum logic [1:0] {
    ACT_IGNORE  = 2'd0,  // no copy here: no action
    ACT_SHARED  = 2'd1,  // shared copy: interrupt on a foreign ownership claim
    ACT_PRIVATE = 2'd2,  // exclusive copy: abort and interrupt on any foreign access
    ACT_NOTIFY  = 2'd3   // interrupt on notify transactions to this frame
  } action_e;

  // Per-slot cache flags.
  typedef struct packed {
    logic valid;     // slot holds a block
    logic writable;  // slot is exclusively owned, writes allowed
    logic modified;  // slot written since move in
    logic may_own;   // the user has write permission (slot can be made writable)
  } slot_flags_t;

  // Address phase of a system bus transaction.
  typedef struct packed {
    logic              valid;
    bus_cmd_e          cmd;
    logic [SRC_W-1:0]  src;
    logic [PA_W-1:0]   paddr;
  } bus_addr_t;

  // Entry of the bus monitor interrupt FIFO.
  typedef struct packed {
    bus_cmd_e          cmd;
    logic [SRC_W-1:0]  src;
    logic [PA_W-1:0]   paddr;
  } intr_entry_t;

  // Processor-side cause of a trap into the cache management software.
  typedef enum logic [1:0] {
    FAULT_NONE  = 2'd0,
    FAULT_MISS  = 2'd1,  // no valid slot holds the address
    FAULT_WRITE = 2'd2,  // write to a slot that is not exclusively owned
    FAULT_LOCK  = 2'd3   // lock segment access with a foreign asid
  } fault_e;

  // Processor request (68020 side). local_sel selects the board's local
  // memory instead of the cache. In the lock segment a read tests a lock, a
  // read-modify-write (rmw) is a test-and-set and a write clears it.
  typedef struct packed {
    logic              req;
    logic              we;
    logic              rmw;
    logic [3:0]        be;
    logic [VA_W-1:0]   vaddr;
    logic [ASID_W-1:0] asid;
    logic [WORD_W-1:0] wdata;
    logic              local_sel;
  } proc_req_t;

  typedef struct packed {
    logic              ack;    // request served this cycle
    fault_e            fault;  // trap cause when ack and not FAULT_NONE
    logic [WORD_W-1:0] rdata;
    logic              irq;    // bus monitor interrupt pending
  } proc_rsp_t;

  // Cache-controller registers as seen by the cache management software.
  // A slot is named by a virtual address (its set and tag bits) and a way.
  typedef struct packed {
    logic              tag_we;     // write tag, asid and flags of the slot
    logic [VA_W-1:0]   vaddr;
    logic [2:0]        way;
    logic [ASID_W-1:0] asid;
    slot_flags_t       flags;
    logic              copy_go;    // start a bus transaction
    bus_cmd_e          copy_cmd;
    logic [PA_W-1:0]   paddr;      // block address for copy and action table
    logic              at_we;      // write the action-table entry of paddr
    action_e           at_act;
    logic              fifo_pop;   // consume the oldest monitor interrupt
    logic              clr_ovf;    // clear the FIFO overflow flag
    logic              lock_alloc; // give lock vaddr to address space asid
    logic              hw_miss;    // level: simple misses handled in hardware
  } sw_req_t;

  typedef struct packed {
    logic              ready;      // reset sweeps finished
    logic [VA_W-1:0]   tag_vaddr;  // tag of the named slot, as an address
    logic [ASID_W-1:0] asid;
    slot_flags_t       flags;
    logic [2:0]        lru_way;    // replacement slot of the named set
    logic              copy_busy;
    logic              copy_done;  // pulse at the end of a transaction
    logic              copy_aborted;
    action_e           at_act;     // action-table entry of paddr
    logic              fifo_empty;
    intr_entry_t       fifo_head;
    logic              fifo_ovf;
    logic              lock_done;  // pulse: lock allocation finished
  } sw_rsp_t;

  // ---------------- lock segment (lock cache and lock bus) ----------------
  localparam int LOCK_W = 16;  // lock address width within the lock segment

  typedef enum logic [1:0] {
    LOCK_TEST  = 2'd0,  // read the lock bit (FETCH on the lock bus)
    LOCK_TAS   = 2'd1,  // atomic test-and-set
    LOCK_CLEAR = 2'd2,  // release
    LOCK_ALLOC = 2'd3   // give the lock to an address space, cleared
  } lock_op_e;

  typedef struct packed {
    logic              valid;
    lock_op_e          op;
    logic [LOCK_W-1:0] idx;
    logic [ASID_W-1:0] asid;
    logic [SRC_W-1:0]  src;
  } lock_bus_req_t;

  // Reply to the requester and update broadcast to every lock cache.
  typedef struct packed {
    logic              valid;
    logic [SRC_W-1:0]  dst;
    lock_op_e          op;
    logic [LOCK_W-1:0] idx;
    logic              val;    // lock value before the operation
    logic              err;    // asid mismatch: protection error
    logic [ASID_W-1:0] asid;   // address space owning the lock
    logic              upd;    // the lock value or owner changed
    logic              new_val;
  } lock_bus_rsp_t;

  // Services of the cache directory interface (hardware miss handling).
  typedef enum logic [1:0] {
    CDI_INVAL  = 2'd0,  // clear the slot-map entry of a slot about to be reused
    CDI_XLATE  = 2'd1,  // virtual to physical translation from the page records
    CDI_UPDATE = 2'd2   // record the new slot in the page record and slot map
  } cdi_op_e;

  // Returns true when the transaction carries a block of data.
  function automatic logic cmd_has_data(bus_cmd_e c);
    return c == BUS_READ_SHARED || c == BUS_READ_PRIVATE || c == BUS_WRITE_BACK;
  endfunction

endpackage
