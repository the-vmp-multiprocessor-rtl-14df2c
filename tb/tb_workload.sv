// tb_workload: a synthetic parallel workload on a full-size VMP node, in
// the configuration of the multiprocessor trace studies: four processors,
// each with private data that competes for a few sets of its cache, plus a
// small block of shared data that all four read and write.
//
// Each active board runs its own process: a reference stream with locality
// (mostly the next word, sometimes a random jump; 25 % of references to
// shared data, 30 % writes), and the cache management software as
// tasks: a miss handler (LRU slot, write back of a modified victim, move
// in, retry after an abort), a write-fault handler (serve queued
// interrupts, then assert ownership if the copy is still there) and
// a consistency interrupt handler (write back and downgrade or
// invalidate). Virtual pages map to physical memory by a fixed offset, so
// the handlers find a physical address from a tag and back.
//
// The run has three phases. In the first every miss traps to the software.
// In the second the software has built page records in every board's
// local memory and switched on hardware handling of simple misses; only
// misses the hardware cannot handle come to the software. In the third one
// board copies physical pages block by block through one cache slot (read
// shared from the source, write back to the destination) while other
// caches still own source and destination blocks; those transfers are
// aborted, the owners write back, and the copy retries. Both phases
// report references, misses, bus traffic and the average cycles per
// reference; the second must be cheaper. Every trap and interrupt costs the
// software TRAP_COST cycles on top of the handler's own register accesses:
// 100 cycles stands for the 10 us a 10 MIPS processor is taken to spend on
// a simple miss in software.
//
// Checks: a processor reading a word it wrote last reads its own value; any
// read returns either the memory's initial contents or a value written to
// that same word; after the run every modified block is written back and
// memory must equal the last value written to each word (the
// single-writer rule serialised all writes).
module tb_workload;
  import vmp_pkg::*;
  localparam int NP = 5, ACT = 4, BW = 32, REFS = 4000;
  localparam logic [31:0] VBASE = 32'h4000_0000;
  localparam int SHARED_BYTES = 8192;          // 64 blocks of shared data
  localparam int PRIV_BYTES   = 64 * 1024;      // 512 blocks on 32 sets
  localparam logic [7:0] ASID = 8'd9;
  // cost of entering and leaving a trap or interrupt handler, in cycles
  // (about 100 instructions: 10 us on a 10 MIPS processor)
  localparam int TRAP_COST = 100;

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
  logic [15:0] n_mon_abort [NP];
  logic [15:0] n_mon_intr [NP];
  int n_reads, n_writes;
  int checks = 0, failures = 0;

  vmp_system dut (.*);
  vme_mem_model #(.BLOCK_WORDS(BW), .FIRST_LAT(4)) u_mem (
    .clk, .rst_n, .bus_a(mem_a), .bus_abort(mem_abort), .wvalid(mem_wvalid),
    .wdata(mem_wdata), .wready(mem_wready), .rvalid(mem_rvalid), .rdata(mem_rdata),
    .n_reads, .n_writes);

  always #5 clk = ~clk;

  // statistics per phase
  int n_ref, n_miss, n_wfault, n_abort, n_inval, n_downgrade, n_victim_wb, n_bus;
  longint n_cycles;
  int running;
  int n_pc_abort = 0;
  int n_stale = 0;   // reads of an older value inside the invalidation window

  // reference model: last value written to a word, and by whom
  logic [31:0] gold [int unsigned];
  int          last_writer [int unsigned];

  function automatic logic [31:0] pa_of(logic [31:0] va);
    return va - VBASE;
  endfunction
  function automatic logic [31:0] va_of(logic [31:0] pa);
    return pa + VBASE;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (mem_a.valid) n_bus++;

  task automatic access(int b, logic [31:0] va, bit we, logic [31:0] wd,
                        output fault_e f, output logic [31:0] rd);
    int n = 0;
    @(negedge clk);
    preq[b] = '{req: 1, we: we, rmw: 0, be: 4'hF, vaddr: va, asid: ASID, wdata: wd, local_sel: 0};
    @(negedge clk);
    n_cycles += 2;
    while (!prsp[b].ack && n < 5000) begin @(negedge clk); n++; n_cycles++; end
    check(n < 5000, "reference answered");
    f = prsp[b].fault; rd = prsp[b].rdata;
    preq[b] = '0;
  endtask

  task automatic lm_write(int b, logic [15:0] waddr, logic [31:0] wd);
    int n = 0;
    @(negedge clk);
    preq[b] = '{req: 1, we: 1, rmw: 0, be: 4'hF, vaddr: {14'b0, waddr, 2'b00}, asid: ASID,
                wdata: wd, local_sel: 1};
    @(negedge clk);
    while (!prsp[b].ack && n < 100) begin @(negedge clk); n++; end
    preq[b] = '0;
  endtask

  // software time is counted as cycles of the reference that trapped
  task automatic tick(int b);
    @(negedge clk); n_cycles++;
  endtask

  task automatic copy(int b, bus_cmd_e c, logic [31:0] va, logic [2:0] way,
                      logic [31:0] pa, output bit ab);
    int n = 0;
    tick(b);
    sreq[b].vaddr = va; sreq[b].way = way; sreq[b].asid = ASID;
    sreq[b].flags = '{1, 0, 0, 1};
    sreq[b].copy_go = 1; sreq[b].copy_cmd = c; sreq[b].paddr = pa;
    tick(b);
    sreq[b].copy_go = 0;
    while (!srsp[b].copy_done && n < 5000) begin tick(b); n++; end
    check(n < 5000, "transfer completes");
    ab = srsp[b].copy_aborted;
    if (ab) n_abort++;
  endtask

  task automatic set_slot(int b, logic [31:0] va, logic [2:0] way, slot_flags_t fl);
    tick(b);
    sreq[b].tag_we = 1; sreq[b].vaddr = va; sreq[b].way = way; sreq[b].asid = ASID;
    sreq[b].flags = fl;
    tick(b);
    sreq[b].tag_we = 0;
  endtask

  task automatic set_action(int b, logic [31:0] pa, action_e a);
    tick(b);
    sreq[b].at_we = 1; sreq[b].paddr = pa; sreq[b].at_act = a;
    tick(b);
    sreq[b].at_we = 0;
  endtask

  // find the slot holding the block of va, by reading the tags of its set
  task automatic find_slot(int b, logic [31:0] va, output bit found, output logic [2:0] way,
                           output slot_flags_t fl);
    found = 0; way = 0; fl = '0;
    for (int w = 0; w < 4; w++) begin
      tick(b);
      sreq[b].vaddr = va; sreq[b].way = 3'(w); #1;
      if (!found && srsp[b].flags.valid && srsp[b].asid == ASID &&
          srsp[b].tag_vaddr[31:7] == va[31:7]) begin
        found = 1; way = 3'(w); fl = srsp[b].flags;
      end
    end
  endtask

  // miss handler
  task automatic miss(int b, logic [31:0] va, bit priv, output bit ab);
    logic [2:0] way;
    tick(b);
    sreq[b].vaddr = va; #1;
    way = srsp[b].lru_way;
    sreq[b].way = way; #1;
    if (srsp[b].flags.valid) begin
      logic [31:0] vva, vpa;
      vva = srsp[b].tag_vaddr; vpa = pa_of(vva);
      if (srsp[b].flags.modified) begin
        bit a2;
        copy(b, BUS_WRITE_BACK, vva, way, vpa, a2);
        n_victim_wb++;
      end
      set_slot(b, va, way, '0);
      set_action(b, vpa, ACT_IGNORE);
    end
    copy(b, priv ? BUS_READ_PRIVATE : BUS_READ_SHARED, {va[31:7], 7'b0}, way,
         pa_of({va[31:7], 7'b0}), ab);
  endtask

  // consistency interrupt handler
  task automatic service(int b);
    if (srsp[b].fifo_ovf) begin
      check(0, "interrupt FIFO overflow");
      tick(b); sreq[b].clr_ovf = 1; tick(b); sreq[b].clr_ovf = 0;
    end
    if (!srsp[b].fifo_empty) repeat (TRAP_COST) tick(b);
    while (!srsp[b].fifo_empty) begin
      intr_entry_t e;
      bit found, ab;
      logic [2:0] way;
      slot_flags_t fl;
      logic [31:0] va;
      e = srsp[b].fifo_head;
      tick(b); sreq[b].fifo_pop = 1; tick(b); sreq[b].fifo_pop = 0;
      va = va_of({e.paddr[31:7], 7'b0});
      find_slot(b, va, found, way, fl);
      // an entry for a block no longer held is stale: clear it
      if (e.cmd != BUS_NOTIFY && !found) set_action(b, pa_of(va), ACT_IGNORE);
      if (e.cmd != BUS_NOTIFY && found) begin
        if (fl.modified || fl.writable) copy(b, BUS_WRITE_BACK, va, way, pa_of(va), ab);
        if (e.cmd == BUS_READ_SHARED) begin
          set_slot(b, va, way, '{1, 0, 0, 1});
          set_action(b, pa_of(va), ACT_SHARED);
          n_downgrade++;
        end else begin
          set_slot(b, va, way, '0);
          set_action(b, pa_of(va), ACT_IGNORE);
          n_inval++;
        end
      end
    end
  endtask

  // one reference, handled until it completes
  task automatic reference(int b, logic [31:0] va, bit we, logic [31:0] wd);
    fault_e f;
    logic [31:0] rd;
    int tries = 0;
    n_ref++;
    do begin
      if (prsp[b].irq) service(b);
      access(b, va, we, wd, f, rd);
      tries++;
      if (f != FAULT_NONE) repeat (TRAP_COST) tick(b);
      if (f == FAULT_MISS) begin
        bit ab;
        n_miss++;
        miss(b, va, we, ab);
        if (ab) repeat ($urandom % 16) tick(b);
      end else if (f == FAULT_WRITE) begin
        bit found, ab;
        logic [2:0] way;
        slot_flags_t fl;
        n_wfault++;
        // serve queued interrupts first: one may invalidate this copy
        if (prsp[b].irq) service(b);
        find_slot(b, va, found, way, fl);
        if (found) copy(b, BUS_ASSERT_OWN, {va[31:7], 7'b0}, way, pa_of({va[31:7], 7'b0}), ab);
        if (found && ab) repeat ($urandom % 16) tick(b);
      end
    end while (f != FAULT_NONE && tries < 200);
    check(f == FAULT_NONE, $sformatf("reference completes b%0d va %h we %0d f %0d", b, va, we, f));
    begin
      int unsigned w;
      w = pa_of(va) >> 2;
      if (we) begin
        gold[w] = wd; last_writer[w] = b;
      end else if (last_writer.exists(w) && last_writer[w] == b) begin
        check(rd == gold[w], $sformatf("board %0d reads its own write at %h", b, va));
      end else begin
        check(rd == u_mem.init_word(w) || rd[31:12] == 20'(w), $sformatf("plausible data at %h", va));
        if (gold.exists(w) && rd != gold[w]) n_stale++;
      end
    end
  endtask

  // private data of board b: PRIV_BYTES in 2 KB pieces 16 KB apart, so that
  // they compete for 32 sets of the cache and are often replaced
  function automatic logic [31:0] priv_off(int b, logic [31:0] pos);
    return 32'h0010_0000 * (b + 1) + (pos / 2048) * 16384 + pos % 2048;
  endfunction

  // reference stream of one board
  task automatic run_board(int b, int refs);
    logic [31:0] pos_sh, pos_pr;
    pos_sh = 0; pos_pr = 0;
    for (int i = 0; i < refs; i++) begin
      bit sh, we;
      logic [31:0] off;
      sh = ($urandom % 100) < 25;
      we = ($urandom % 100) < 30;
      if (sh) begin
        if (($urandom % 100) < 20) pos_sh = ($urandom % SHARED_BYTES) & ~32'h3;
        else pos_sh = (pos_sh + 4) % SHARED_BYTES;
        off = pos_sh;
      end else begin
        if (($urandom % 100) < 5) pos_pr = ($urandom % PRIV_BYTES) & ~32'h3;
        else pos_pr = (pos_pr + 4) % PRIV_BYTES;
        off = priv_off(b, pos_pr);
      end
      // written values carry the word address in their upper bits
      reference(b, VBASE + off, we, {20'((off) >> 2), 12'($urandom)});
    end
    // the interrupt handler stays active until every board is done
    running--;
    while (running > 0) begin
      if (prsp[b].irq) service(b);
      else @(negedge clk);
    end
  endtask

  // write back every modified block and serve what is left
  task automatic flush(int b);
    service(b);
    for (int s = 0; s < 256; s++)
      for (int w = 0; w < 4; w++) begin
        bit ab;
        tick(b);
        sreq[b].vaddr = 32'(s) << 7; sreq[b].way = 3'(w); #1;
        if (srsp[b].flags.valid && srsp[b].flags.modified)
          copy(b, BUS_WRITE_BACK, srsp[b].tag_vaddr, 3'(w), pa_of(srsp[b].tag_vaddr), ab);
      end
  endtask

  // page records for the pages a board touches, and empty hash buckets and
  // slot-map words (see the CDI for the layout)
  task automatic build_records(int b);
    logic [15:0] head [1024];
    logic [15:0] rec;
    for (int i = 0; i < 1024; i++) begin
      head[i] = 0;
      lm_write(b, 16'hC000 + 16'(i), 32'h0);
    end
    rec = 16'h1000;
    for (int p = 0; p < (SHARED_BYTES + PRIV_BYTES) / 1024; p++) begin
      logic [31:0] va, pa;
      logic [9:0]  h;
      va = (p < SHARED_BYTES / 1024) ? VBASE + 32'(p) * 1024
                                     : VBASE + priv_off(b, 32'(p - SHARED_BYTES / 1024) * 1024);
      h = va[19:10] ^ {ASID, 2'b00};
      pa = pa_of(va);
      lm_write(b, rec, {2'b00, ASID, va[31:10]});
      lm_write(b, rec + 1, {pa[31:10], 9'b0, 1'b1});
      lm_write(b, rec + 2, {16'b0, head[h]});
      for (int i = 0; i < 8; i++) lm_write(b, rec + 3 + 16'(i), 32'h0);
      head[h] = rec;
      rec += 16;
    end
    for (int i = 0; i < 1024; i++) lm_write(b, 16'h8000 + 16'(i), {16'b0, head[i]});
  endtask

  // physical page copy by board b through one cache slot: each block is
  // read into the slot and written back to the destination; an abort
  // (another cache owns the source or the destination) is retried
  task automatic page_copy(int b, logic [31:0] src, logic [31:0] dst, int blocks);
    logic [31:0] sva;
    logic [2:0]  way;
    sva = VBASE + 32'h0070_0000;
    tick(b);
    sreq[b].vaddr = sva; #1;
    way = srsp[b].lru_way;
    sreq[b].way = way; #1;
    if (srsp[b].flags.valid) begin
      bit a2;
      if (srsp[b].flags.modified)
        copy(b, BUS_WRITE_BACK, srsp[b].tag_vaddr, way, pa_of(srsp[b].tag_vaddr), a2);
      set_slot(b, sva, way, '0);
      set_action(b, pa_of(srsp[b].tag_vaddr), ACT_IGNORE);
    end
    for (int i = 0; i < blocks; i++) begin
      bit ab;
      int tries;
      tries = 0;
      do begin
        copy(b, BUS_READ_SHARED, sva, way, src + 32'(128 * i), ab);
        if (ab) begin n_pc_abort++; repeat (20) tick(b); end
        tries++;
      end while (ab && tries < 50);
      set_action(b, src + 32'(128 * i), ACT_IGNORE);
      tries = 0;
      do begin
        copy(b, BUS_WRITE_BACK, sva, way, dst + 32'(128 * i), ab);
        if (ab) begin n_pc_abort++; repeat (20) tick(b); end
        tries++;
      end while (ab && tries < 50);
      check(!ab, "block copied");
      for (int k = 0; k < BW; k++) begin
        int unsigned ws, wd;
        ws = (src + 32'(128 * i)) / 4 + k; wd = (dst + 32'(128 * i)) / 4 + k;
        gold[wd] = gold.exists(ws) ? gold[ws] : u_mem.init_word(ws);
        last_writer[wd] = -1;
      end
    end
    set_slot(b, sva, way, '0);
  endtask

  task automatic serve_while_running(int b);
    while (running > 0) begin
      if (prsp[b].irq) service(b);
      else @(negedge clk);
    end
  endtask

  task automatic clear_stats();
    n_ref = 0; n_miss = 0; n_wfault = 0; n_abort = 0; n_inval = 0; n_downgrade = 0;
    n_victim_wb = 0; n_bus = 0; n_cycles = 0;
  endtask

  task automatic run_phase(output real cpr, output int misses);
    running = ACT;
    fork
      run_board(0, REFS);
      run_board(1, REFS);
      run_board(2, REFS);
      run_board(3, REFS);
    join
    cpr = real'(n_cycles) / real'(n_ref);
    misses = n_miss;
  endtask

  task automatic verify_memory();
    for (int b = 0; b < ACT; b++) flush(b);
    repeat (50) @(negedge clk);
    foreach (gold[w]) check(u_mem.mem[w] == gold[w], $sformatf("memory word %h holds the last write", w));
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real cpr_sw, cpr_hw;
    int miss_sw, miss_hw, hw_served, hw_trapped;
    for (int i = 0; i < NP; i++) begin preq[i] = '0; sreq[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NP; i++) while (!srsp[i].ready) @(negedge clk);
    while (init_busy) @(negedge clk);

    // phase 1: every miss handled by software
    clear_stats();
    run_phase(cpr_sw, miss_sw);
    $display("software misses: refs=%0d misses=%0d write_faults=%0d aborts=%0d invalidations=%0d downgrades=%0d victim_wb=%0d bus=%0d cycles/ref=%0.2f stale_reads=%0d",
             n_ref, n_miss, n_wfault, n_abort, n_inval, n_downgrade, n_victim_wb, n_bus, cpr_sw, n_stale);
    check(n_miss > 0 && n_wfault > 0 && n_abort > 0 && n_inval > 0 && n_downgrade > 0 && n_victim_wb > 0,
          "sharing, replacement and aborts all happened");
    verify_memory();

    // phase 2: page records built, simple misses handled in hardware
    fork
      build_records(0);
      build_records(1);
      build_records(2);
      build_records(3);
    join
    for (int b = 0; b < ACT; b++) sreq[b].hw_miss = 1;
    begin
      int m0, t0;
      m0 = 0; t0 = 0;
      for (int b = 0; b < ACT; b++) begin m0 += int'(n_hw_miss[b]); t0 += int'(n_hw_trap[b]); end
      clear_stats();
      run_phase(cpr_hw, miss_hw);
      hw_served = -m0; hw_trapped = -t0;
      for (int b = 0; b < ACT; b++) begin
        hw_served += int'(n_hw_miss[b]); hw_trapped += int'(n_hw_trap[b]);
      end
    end
    $display("hardware misses: refs=%0d served_in_hw=%0d trapped=%0d sw_misses=%0d write_faults=%0d aborts=%0d bus=%0d cycles/ref=%0.2f",
             n_ref, hw_served, hw_trapped, n_miss, n_wfault, n_abort, n_bus, cpr_hw);
    check(hw_served > 0, "misses served in hardware");
    check(hw_trapped > 0, "misses handed to software");
    check(cpr_hw < cpr_sw, $sformatf("hardware miss handling is cheaper (%0.2f vs %0.2f cycles per reference)",
                                     cpr_hw, cpr_sw));
    for (int b = 0; b < ACT; b++) sreq[b].hw_miss = 0;
    verify_memory();

    // phase 3: board 0 copies 8 blocks of board 1's private data over 8 of
    // board 2's, both still owned by those caches
    running = 1;
    fork
      begin
        page_copy(0, pa_of(VBASE + priv_off(1, 0)), pa_of(VBASE + priv_off(2, 0)), 8);
        running = 0;
      end
      serve_while_running(1);
      serve_while_running(2);
      serve_while_running(3);
    join
    $display("page copy: aborted transfers retried=%0d", n_pc_abort);
    check(n_pc_abort > 0, "page copy met an owned block and retried");
    verify_memory();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
