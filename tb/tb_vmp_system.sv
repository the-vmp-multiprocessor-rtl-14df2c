// tb_vmp_system: end-to-end test of a full-size VMP node (five processor
// boards, all parameters at their defaults) with the sequential memory
// model. The testbench plays the five processors and their cache
// management software: a miss handler (replacement slot, write back of a
// modified victim, block move in, retry after an abort) and a consistency
// interrupt handler (write back and downgrade, or invalidate, as the queued
// bus transaction demands).
// Scenario: two boards share a block; one claims ownership and writes,
// which interrupts the other to invalidate; a later read by the second is
// aborted by the owner, whose handler writes back, after which the retry
// returns the written data; two boards miss in the same cycle and are
// serialized by the arbiter; a notify interrupts the board that asked for
// it, and 513 of them overflow its FIFO; a modified block is written back
// when its slot is replaced. Then the lock segment: the operating system
// allocates a lock, board 0 acquires it over the lock bus, board 1 tests it
// (miss answered 1, fetched in the background) and spins on its own copy,
// board 0's clear reaches board 1's copy and board 1 acquires; a wrong asid
// is refused. Last, directory mode: two boards share a fresh block, an
// ownership claim makes the directory interrupt only the other sharer, a
// read of the owned block is aborted by the directory and succeeds after
// the owner's write back. Finally board 0 turns on hardware miss handling
// with one page record in its local memory: a read miss in that page and
// the following write are served without a trap (move in, then ownership
// claim), the page record and slot map are updated, and a miss in a page
// with no record traps to software. Each mechanism is counted and must occur.
module tb_vmp_system;
  import vmp_pkg::*;
  localparam int NP = 5, BW = 32;
  logic clk = 0, rst_n = 0;
  proc_req_t preq [NP];
  proc_rsp_t prsp [NP];
  sw_req_t   sreq [NP];
  sw_rsp_t   srsp [NP];
  bus_addr_t mem_a;
  logic mem_abort, mem_wvalid, mem_wready, mem_rvalid;
  logic [31:0] mem_wdata, mem_rdata;
  logic [NP-1:0] bus_gnt;
  logic init_busy, dir_mode = 0, dir_abort, dir_intr;
  logic [15:0] n_lock_local [NP];
  logic [15:0] n_lock_bus [NP];
  logic [15:0] n_hw_miss [NP];
  logic [15:0] n_hw_trap [NP];
  localparam logic [31:0] LB = 32'hFFFF_F000;
  logic [15:0] n_mon_abort [NP];
  logic [15:0] n_mon_intr [NP];
  int n_reads, n_writes;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_miss = 0, n_wfault = 0, n_movein = 0, n_wb = 0, n_own = 0, n_abort = 0;
  int n_inval = 0, n_downgrade = 0, n_notify = 0, n_ovf = 0, n_contend = 0, n_stall = 0;
  int n_victim_wb = 0;
  int n_lock_acq = 0, n_lock_spin = 0, n_lock_bg = 0, n_lock_prot = 0, n_lock_upd = 0;
  int n_dir_abort = 0, n_dir_intr = 0;

  always @(posedge clk) begin
    if (dir_abort) n_dir_abort++;
    if (dir_intr)  n_dir_intr++;
  end

  vmp_system dut (.*);
  vme_mem_model #(.BLOCK_WORDS(BW), .FIRST_LAT(4)) u_mem (
    .clk, .rst_n, .bus_a(mem_a), .bus_abort(mem_abort), .wvalid(mem_wvalid),
    .wdata(mem_wdata), .wready(mem_wready), .rvalid(mem_rvalid), .rdata(mem_rdata),
    .n_reads, .n_writes);

  always #5 clk = ~clk;

  // software's record of which physical block each slot holds
  logic [31:0] slot_va [NP][logic [31:0]];
  logic [2:0]  slot_way [NP][logic [31:0]];
  logic [31:0] way_pa [NP][logic [10:0]];
  localparam logic [7:0] ASID = 8'd5;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    int busy;
    busy = 0;
    for (int i = 0; i < NP; i++) busy += int'(srsp[i].copy_busy);
    if (busy > 1) n_contend++;
  end

  task automatic access(int b, logic [31:0] va, bit we, logic [31:0] wd,
                        output fault_e f, output logic [31:0] rd);
    int n = 0;
    @(negedge clk);
    preq[b] = '{req: 1, we: we, rmw: 0, be: 4'hF, vaddr: va, asid: ASID, wdata: wd, local_sel: 0};
    @(negedge clk);
    while (!prsp[b].ack && n < 2000) begin @(negedge clk); n++; end
    if (n > 0) n_stall++;
    f = prsp[b].fault; rd = prsp[b].rdata;
    preq[b] = '0;
  endtask

  // lock reference: op 0 test (read), 1 test-and-set (rmw), 2 clear (write)
  task automatic lock(int b, int op, logic [11:0] idx, logic [7:0] asid,
                      output fault_e f, output logic v);
    int n = 0;
    @(negedge clk);
    preq[b] = '{req: 1, we: (op == 2), rmw: (op == 1), be: 4'hF, vaddr: LB + 32'(idx),
                asid: asid, wdata: 0, local_sel: 0};
    @(negedge clk);
    while (!prsp[b].ack && n < 2000) begin @(negedge clk); n++; end
    f = prsp[b].fault; v = prsp[b].rdata[0];
    preq[b] = '0;
  endtask

  // local memory word access by the board's software
  task automatic lm_access(int b, logic [15:0] waddr, bit we, logic [31:0] wd,
                           output logic [31:0] rd);
    int n = 0;
    @(negedge clk);
    preq[b] = '{req: 1, we: we, rmw: 0, be: 4'hF, vaddr: {14'b0, waddr, 2'b00}, asid: ASID,
                wdata: wd, local_sel: 1};
    @(negedge clk);
    while (!prsp[b].ack && n < 100) begin @(negedge clk); n++; end
    rd = prsp[b].rdata;
    preq[b] = '0;
  endtask

  task automatic start_copy(int b, bus_cmd_e c, logic [31:0] va, logic [2:0] way, logic [31:0] pa);
    sreq[b].vaddr = va; sreq[b].way = way; sreq[b].asid = ASID;
    sreq[b].flags = '{1, 0, 0, 1};
    sreq[b].copy_go = 1; sreq[b].copy_cmd = c; sreq[b].paddr = pa;
  endtask

  task automatic finish_copy(int b, output bit ab);
    int n = 0;
    @(negedge clk);
    sreq[b].copy_go = 0;
    while (!srsp[b].copy_done && n < 2000) begin @(negedge clk); n++; end
    check(n < 2000, "transfer completes");
    ab = srsp[b].copy_aborted;
    if (ab) n_abort++;
  endtask

  task automatic copy(int b, bus_cmd_e c, logic [31:0] va, logic [2:0] way,
                      logic [31:0] pa, output bit ab);
    @(negedge clk);
    start_copy(b, c, va, way, pa);
    finish_copy(b, ab);
    if (!ab && c inside {BUS_READ_SHARED, BUS_READ_PRIVATE}) n_movein++;
    if (!ab && c == BUS_WRITE_BACK) n_wb++;
    if (!ab && c == BUS_ASSERT_OWN) n_own++;
  endtask

  task automatic set_slot(int b, logic [31:0] va, logic [2:0] way, slot_flags_t fl);
    @(negedge clk);
    sreq[b].tag_we = 1; sreq[b].vaddr = va; sreq[b].way = way; sreq[b].asid = ASID;
    sreq[b].flags = fl;
    @(negedge clk);
    sreq[b].tag_we = 0;
  endtask

  task automatic set_action(int b, logic [31:0] pa, action_e a);
    @(negedge clk);
    sreq[b].at_we = 1; sreq[b].paddr = pa; sreq[b].at_act = a;
    @(negedge clk);
    sreq[b].at_we = 0;
  endtask

  // miss handler: choose slot, write back a modified victim, move in
  task automatic miss(int b, logic [31:0] va, logic [31:0] pa, bit priv, output bit ab);
    logic [2:0] way;
    logic [10:0] key;
    @(negedge clk);
    sreq[b].vaddr = va; #1;
    way = srsp[b].lru_way;
    sreq[b].way = way; #1;
    key = {va[14:7], way};
    if (srsp[b].flags.valid && way_pa[b].exists(key)) begin
      logic [31:0] vpa;
      vpa = way_pa[b][key];
      if (srsp[b].flags.modified) begin
        bit a2;
        copy(b, BUS_WRITE_BACK, srsp[b].tag_vaddr, way, vpa, a2);
        n_victim_wb++;
      end
      set_slot(b, va, way, '0);
      set_action(b, vpa, ACT_IGNORE);
      slot_va[b].delete(vpa); slot_way[b].delete(vpa);
    end
    copy(b, priv ? BUS_READ_PRIVATE : BUS_READ_SHARED, va, way, pa, ab);
    if (!ab) begin
      slot_va[b][pa] = va; slot_way[b][pa] = way; way_pa[b][key] = pa;
    end
  endtask

  // consistency interrupt handler: serve every queued entry
  task automatic service(int b);
    while (!srsp[b].fifo_empty) begin
      intr_entry_t e;
      e = srsp[b].fifo_head;
      @(negedge clk); sreq[b].fifo_pop = 1; @(negedge clk); sreq[b].fifo_pop = 0;
      if (e.cmd == BUS_NOTIFY) begin
        n_notify++;
      end else if (slot_va[b].exists(e.paddr)) begin
        logic [31:0] va; logic [2:0] way; bit ab;
        va = slot_va[b][e.paddr]; way = slot_way[b][e.paddr];
        @(negedge clk); sreq[b].vaddr = va; sreq[b].way = way; #1;
        if (srsp[b].flags.modified || srsp[b].flags.writable)
          copy(b, BUS_WRITE_BACK, va, way, e.paddr, ab);
        if (e.cmd == BUS_READ_SHARED) begin
          set_slot(b, va, way, '{1, 0, 0, 1});
          set_action(b, e.paddr, ACT_SHARED);
          n_downgrade++;
        end else begin
          set_slot(b, va, way, '0);
          set_action(b, e.paddr, ACT_IGNORE);
          slot_va[b].delete(e.paddr); slot_way[b].delete(e.paddr);
          n_inval++;
        end
      end
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fault_e f;
    logic [31:0] rd;
    bit ab, ab2;
    logic [31:0] vA = 32'h1000_0100, pA = 32'h0004_0100;
    for (int i = 0; i < NP; i++) begin preq[i] = '0; sreq[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NP; i++) while (!srsp[i].ready) @(negedge clk);

    // 1-2: boards 0 and 1 read block A
    for (int b = 0; b < 2; b++) begin
      access(b, vA + 8, 0, 0, f, rd);
      check(f == FAULT_MISS, "cold miss");
      if (f == FAULT_MISS) n_miss++;
      miss(b, vA, pA, 0, ab);
      check(!ab, "shared move in");
      access(b, vA + 8, 0, 0, f, rd);
      check(f == FAULT_NONE && rd == u_mem.init_word(pA / 4 + 2), "shared data");
    end
    // 3: board 0 writes: fault, claim ownership, board 1 interrupted
    access(0, vA + 8, 1, 32'hABCD_0001, f, rd);
    check(f == FAULT_WRITE, "write fault on shared block");
    if (f == FAULT_WRITE) n_wfault++;
    copy(0, BUS_ASSERT_OWN, vA, slot_way[0][pA], pA, ab);
    check(!ab, "ownership claimed");
    access(0, vA + 8, 1, 32'hABCD_0001, f, rd);
    check(f == FAULT_NONE, "write hits after ownership");
    repeat (3) @(negedge clk);
    check(prsp[1].irq && !prsp[0].irq, "sharer interrupted");
    // 4: board 1 invalidates its copy
    service(1);
    access(1, vA + 8, 0, 0, f, rd);
    check(f == FAULT_MISS, "invalidated copy misses");
    // 5: board 1 read is aborted by the owner; owner writes back; retry
    miss(1, vA, pA, 0, ab);
    check(ab, "read of owned block aborted");
    repeat (3) @(negedge clk);
    check(prsp[0].irq, "owner interrupted");
    service(0);
    check(u_mem.mem[pA / 4 + 2] == 32'hABCD_0001, "owner wrote back");
    miss(1, vA, pA, 0, ab);
    check(!ab, "retry succeeds");
    access(1, vA + 8, 0, 0, f, rd);
    check(f == FAULT_NONE && rd == 32'hABCD_0001, "retry sees written data");
    // 6: boards 2 and 3 miss together; the arbiter serializes them
    begin
      int t2, t3, n;
      @(negedge clk);
      start_copy(2, BUS_READ_SHARED, 32'h2000_0000, 0, 32'h0001_0000);
      start_copy(3, BUS_READ_SHARED, 32'h3000_0000, 0, 32'h0002_0000);
      @(negedge clk);
      sreq[2].copy_go = 0; sreq[3].copy_go = 0;
      t2 = -1; t3 = -1; n = 0;
      while ((t2 < 0 || t3 < 0) && n < 1000) begin
        if (srsp[2].copy_done) t2 = n;
        if (srsp[3].copy_done) t3 = n;
        @(negedge clk); n++;
      end
      n_movein += 2;
      check(t2 >= 0 && t3 >= 0 && (t3 - t2 > BW || t2 - t3 > BW), "serialized transfers");
      access(3, 32'h3000_0004, 0, 0, f, rd);
      check(f == FAULT_NONE && rd == u_mem.init_word(32'h0002_0000 / 4 + 1), "board 3 data");
    end
    // 6b: board 4 retries its reference while the transfer is under way
    access(4, 32'h4000_0010, 0, 0, f, rd);
    if (f == FAULT_MISS) n_miss++;
    @(negedge clk);
    start_copy(4, BUS_READ_SHARED, 32'h4000_0000, 0, 32'h0003_0000);
    @(negedge clk);
    sreq[4].copy_go = 0;
    n_movein++;
    begin
      int st0;
      st0 = n_stall;
      access(4, 32'h4000_0010, 0, 0, f, rd);
      check(n_stall == st0 + 1, "reference held during transfer");
      check(f == FAULT_NONE && rd == u_mem.init_word(32'h0003_0000 / 4 + 4), "held reference hits");
    end
    // 7: notify
    set_action(4, 32'h0070_0000, ACT_NOTIFY);
    copy(0, BUS_NOTIFY, 32'h0, 0, 32'h0070_0000, ab);
    repeat (3) @(negedge clk);
    check(prsp[4].irq && srsp[4].fifo_head.cmd == BUS_NOTIFY, "notify interrupt");
    service(4);
    check(!prsp[4].irq, "notify served");
    // 8: FIFO overflow: 513 notifies without service
    for (int i = 0; i < 513; i++) copy(0, BUS_NOTIFY, 32'h0, 0, 32'h0070_0000, ab);
    repeat (3) @(negedge clk);
    check(srsp[4].fifo_ovf, "fifo overflow");
    if (srsp[4].fifo_ovf) n_ovf++;
    @(negedge clk); sreq[4].clr_ovf = 1; @(negedge clk); sreq[4].clr_ovf = 0;
    service(4);
    // 9: board 1 writes A, board 0 invalidates, then board 1 evicts A
    access(1, vA + 12, 1, 32'h5555_AAAA, f, rd);
    check(f == FAULT_WRITE, "second write fault");
    if (f == FAULT_WRITE) n_wfault++;
    copy(1, BUS_ASSERT_OWN, vA, slot_way[1][pA], pA, ab);
    access(1, vA + 12, 1, 32'h5555_AAAA, f, rd);
    repeat (3) @(negedge clk);
    service(0);
    for (int k = 1; k <= 4; k++) begin
      logic [31:0] v, p;
      v = vA + 32'(k) * 32'h8000; p = pA + 32'(k) * 32'h10_0000;
      access(1, v, 0, 0, f, rd);
      if (f == FAULT_MISS) n_miss++;
      miss(1, v, p, 0, ab);
      access(1, v, 0, 0, f, rd);
      check(f == FAULT_NONE && rd == u_mem.init_word(p / 4), "set fill data");
    end
    check(u_mem.mem[pA / 4 + 3] == 32'h5555_AAAA, "victim written back on replacement");
    access(1, vA + 12, 0, 0, f, rd);
    check(f == FAULT_MISS, "evicted block misses");
    // 10: locks
    begin
      logic v; int n, nb, nl;
      while (init_busy) @(negedge clk);
      @(negedge clk); sreq[0].lock_alloc = 1; sreq[0].vaddr = LB + 32'h123; sreq[0].asid = ASID;
      @(negedge clk); sreq[0].lock_alloc = 0;
      n = 0;
      while (!srsp[0].lock_done && n < 200) begin @(negedge clk); n++; end
      check(n < 200, "lock allocated");
      lock(0, 1, 12'h123, ASID, f, v);
      check(f == FAULT_NONE && v == 0, "board 0 acquires");
      if (f == FAULT_NONE && v == 0) n_lock_acq++;
      nb = n_lock_bus[1];
      lock(1, 0, 12'h123, ASID, f, v);
      check(f == FAULT_NONE && v == 1, "uncached test answers held");
      repeat (20) @(negedge clk);
      check(n_lock_bus[1] == nb + 1, "background fetch");
      if (n_lock_bus[1] == nb + 1) n_lock_bg++;
      nb = n_lock_bus[1]; nl = n_lock_local[1];
      for (int k = 0; k < 5; k++) begin
        lock(1, 1, 12'h123, ASID, f, v);
        check(f == FAULT_NONE && v == 1, "lock stays held");
      end
      check(n_lock_bus[1] == nb && n_lock_local[1] == nl + 5, "spinning is local");
      if (n_lock_bus[1] == nb) n_lock_spin += 5;
      lock(0, 2, 12'h123, ASID, f, v);
      check(f == FAULT_NONE, "board 0 releases");
      nb = n_lock_bus[1];
      lock(1, 0, 12'h123, ASID, f, v);
      check(f == FAULT_NONE && v == 0 && n_lock_bus[1] == nb, "release seen in the copy");
      if (v == 0) n_lock_upd++;
      lock(1, 1, 12'h123, ASID, f, v);
      check(f == FAULT_NONE && v == 0, "board 1 acquires");
      if (f == FAULT_NONE && v == 0) n_lock_acq++;
      lock(2, 1, 12'h123, 8'd77, f, v);
      check(f == FAULT_LOCK, "wrong asid refused");
      if (f == FAULT_LOCK) n_lock_prot++;
    end
    // 11: directory mode, fresh blocks
    @(negedge clk); dir_mode = 1;
    begin
      logic [31:0] vB = 32'h5000_0000, pB = 32'h0050_0000;
      int na;
      for (int b = 2; b < 4; b++) begin
        access(b, vB, 0, 0, f, rd);
        miss(b, vB, pB, 0, ab);
        check(!ab, "directory: shared move in");
      end
      copy(2, BUS_ASSERT_OWN, vB, slot_way[2][pB], pB, ab);
      check(!ab, "directory: ownership claimed");
      access(2, vB + 4, 1, 32'h7777_0002, f, rd);
      check(f == FAULT_NONE, "directory: owner writes");
      repeat (3) @(negedge clk);
      check(prsp[3].irq && !prsp[0].irq && !prsp[1].irq && !prsp[2].irq && !prsp[4].irq,
            "directory interrupts only the sharer");
      service(3);
      na = n_dir_abort;
      miss(3, vB, pB, 0, ab);
      check(ab && n_dir_abort == na + 1, "directory aborts read of owned block");
      repeat (3) @(negedge clk);
      check(prsp[2].irq, "directory interrupts the owner");
      service(2);
      miss(3, vB, pB, 0, ab);
      check(!ab, "directory: retry succeeds");
      access(3, vB + 4, 0, 0, f, rd);
      check(f == FAULT_NONE && rd == 32'h7777_0002, "directory: retry sees written data");
      check(n_mon_abort[0] + n_mon_abort[1] + n_mon_abort[2] + n_mon_abort[3] + n_mon_abort[4]
            == 16'(n_abort - 1), "monitors silent in directory mode");
    end
    // 12: hardware handling of simple misses on board 0
    begin
      logic [31:0] vP, pP, w;
      logic [9:0] h;
      int nm, nt;
      vP = 32'h6000_0000; pP = 32'h0061_0000;
      h = vP[19:10] ^ {ASID, 2'b00};
      // empty slot-map words for the slots the misses below may take
      for (int k = 0; k < 4; k++) begin
        lm_access(0, 16'hC000 + 16'(4 * vP[14:7] + k), 1, 32'h0, w);
        lm_access(0, 16'hC000 + 16'(k), 1, 32'h0, w);
      end
      lm_access(0, 16'h8000 + 16'(h), 1, 32'h0000_1000, w);
      lm_access(0, 16'h1000, 1, {2'b00, ASID, vP[31:10]}, w);
      lm_access(0, 16'h1001, 1, {pP[31:10], 9'b0, 1'b1}, w);
      lm_access(0, 16'h1002, 1, 32'h0, w);
      for (int i = 0; i < 8; i++) lm_access(0, 16'h1003 + 16'(i), 1, 32'h0, w);
      @(negedge clk); sreq[0].hw_miss = 1;
      nm = n_hw_miss[0]; nt = n_hw_trap[0];
      access(0, vP + 32'h84, 0, 0, f, rd);
      check(f == FAULT_NONE && rd == u_mem.init_word((pP + 32'h84) / 4), "hardware miss served");
      check(n_hw_miss[0] == 16'(nm + 1), "one hardware miss");
      n_movein++;
      lm_access(0, 16'h1003 + 16'd1, 0, 0, w);
      check(w[31] && w[11:4] == 8'd1, "page record names the slot");
      access(0, vP + 32'h84, 1, 32'hBEEF_0084, f, rd);
      check(f == FAULT_NONE && n_hw_miss[0] == 16'(nm + 2), "ownership claimed in hardware");
      n_own++;
      access(0, vP + 32'h84, 0, 0, f, rd);
      check(f == FAULT_NONE && rd == 32'hBEEF_0084, "written data");
      access(0, 32'h6100_0000, 0, 0, f, rd);
      @(negedge clk);   // the trap counter steps at the end of the trap cycle
      check(f == FAULT_MISS && n_hw_trap[0] == 16'(nt + 1), $sformatf("no page record: trap (%0d %0d %0d)", f, n_hw_trap[0], nt));
      @(negedge clk); sreq[0].hw_miss = 0;
    end
    // every mechanism happened
    $display("mechanisms: miss=%0d write_fault=%0d move_in=%0d write_back=%0d own=%0d abort=%0d",
             n_miss, n_wfault, n_movein, n_wb, n_own, n_abort);
    $display("            invalidate=%0d downgrade=%0d notify=%0d overflow=%0d contention=%0d stall=%0d victim_wb=%0d",
             n_inval, n_downgrade, n_notify, n_ovf, n_contend, n_stall, n_victim_wb);
    check(n_miss > 0, "miss happened");
    check(n_wfault > 0, "write fault happened");
    check(n_movein > 0, "move in happened");
    check(n_wb > 0, "write back happened");
    check(n_own > 0, "ownership claim happened");
    check(n_abort > 0, "abort happened");
    check(n_inval > 0, "invalidation interrupt happened");
    check(n_downgrade > 0, "downgrade interrupt happened");
    check(n_notify > 0, "notify interrupt happened");
    check(n_ovf > 0, "FIFO overflow happened");
    check(n_contend > 0, "bus contention happened");
    check(n_stall > 0, "processor stall happened");
    check(n_victim_wb > 0, "victim write back happened");
    $display("            lock_acquire=%0d lock_spin=%0d lock_fetch=%0d lock_update=%0d lock_protect=%0d dir_abort=%0d dir_intr=%0d",
             n_lock_acq, n_lock_spin, n_lock_bg, n_lock_upd, n_lock_prot, n_dir_abort, n_dir_intr);
    check(n_lock_acq > 0, "lock acquired");
    check(n_lock_spin > 0, "local lock spin happened");
    check(n_lock_bg > 0, "background lock fetch happened");
    check(n_lock_upd > 0, "lock copy update happened");
    check(n_lock_prot > 0, "lock protection happened");
    check(n_dir_abort > 0, "directory abort happened");
    check(n_dir_intr > 0, "directory interrupt happened");
    $display("            hw_miss=%0d hw_trap=%0d", n_hw_miss[0], n_hw_trap[0]);
    check(n_hw_miss[0] > 0, "hardware miss handling happened");
    check(n_hw_trap[0] > 0, "hardware miss trap happened");
    check(n_reads == n_movein, "memory reads match move ins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
