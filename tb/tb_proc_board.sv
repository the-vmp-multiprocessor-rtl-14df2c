// tb_proc_board: self-checking test of one processor board at full size,
// with the sequential memory model on its bus. The testbench plays the
// processor, the cache management software and the other boards (it can
// inject foreign address phases onto the bus the board watches).
// Sequence: a cold read faults; the miss handler asks for the replacement
// slot and moves the block in; a reference issued during the transfer is
// held until it completes, while local memory stays usable; the retried
// reference hits with the memory's data. A write faults on the shared
// slot; an ownership claim makes it writable. A foreign read of the owned
// block is aborted and interrupts the board; the handler writes the block
// back and memory then holds the written word. Finally 513 foreign notify
// transactions overflow the 512-entry interrupt FIFO. Lock segment: a test
// of an uncached lock answers 1 and fetches it; the operating system
// allocates a lock; test-and-set acquires it over the lock bus, a second
// one spins locally, clear releases it, a foreign asid gets a protection
// fault. Directory mode: the monitor is off and interrupts pushed by the
// directory reach the FIFO. Hardware miss handling: with one page record in
// local memory a read miss is served without a trap, its first attempt
// being aborted on the bus and repeated; a write to the shared copy claims
// ownership in hardware; a miss without a page record traps, and so do an
// aborted miss and a write to a shared copy while consistency interrupts
// are queued.
module tb_proc_board;
  import vmp_pkg::*;
  localparam int BW = 32;
  logic clk = 0, rst_n = 0;
  proc_req_t preq = '0;
  proc_rsp_t prsp;
  sw_req_t sreq = '0;
  sw_rsp_t srsp;
  logic bus_req, bus_gnt = 0, bus_abort_out, bus_wvalid, bus_wready, bus_rvalid;
  bus_addr_t bus_a_out, bus_a_in, inj = '0;
  logic [31:0] bus_wdata, bus_rdata;
  logic [15:0] n_mon_abort, n_mon_intr, n_lock_local, n_lock_bus, n_hw_miss, n_hw_trap;
  logic tb_abort = 0, bus_abort;
  assign bus_abort = bus_abort_out | tb_abort;
  logic dir_mode = 0, ext_push = 0, lb_req, lb_gnt = 0, lm_init;
  intr_entry_t ext_entry = '0;
  lock_bus_req_t lb_out;
  lock_bus_rsp_t lb_rsp;
  localparam logic [31:0] LB = 32'hFFFF_F000;
  int n_reads, n_writes;
  int checks = 0, failures = 0;

  assign bus_a_in = bus_a_out | inj;
  proc_board #(.MY_ID(3'd0)) dut (
    .clk, .rst_n, .preq, .prsp, .sreq, .srsp, .bus_req, .bus_gnt, .bus_a_out, .bus_a_in,
    .bus_abort_out, .bus_abort_in(bus_abort), .bus_wvalid, .bus_wdata, .bus_wready,
    .bus_rvalid, .bus_rdata, .dir_mode, .ext_push, .ext_entry,
    .lb_req, .lb_gnt, .lb_out, .lb_rsp, .n_mon_abort, .n_mon_intr, .n_lock_local, .n_lock_bus,
    .n_hw_miss, .n_hw_trap);
  lock_memory u_lm (.clk, .rst_n, .init_busy(lm_init), .req(lb_out), .rsp(lb_rsp));
  always_ff @(posedge clk) lb_gnt <= lb_req;
  vme_mem_model #(.BLOCK_WORDS(BW), .FIRST_LAT(4)) u_mem (
    .clk, .rst_n, .bus_a(bus_a_in), .bus_abort(bus_abort), .wvalid(bus_wvalid),
    .wdata(bus_wdata), .wready(bus_wready), .rvalid(bus_rvalid), .rdata(bus_rdata),
    .n_reads, .n_writes);
  always_ff @(posedge clk) bus_gnt <= bus_req;
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  task automatic access(bit local_sel, logic [31:0] va, bit we, logic [31:0] wd,
                        output fault_e f, output logic [31:0] rd, output int wait_cycles);
    @(negedge clk);
    preq = '{req: 1, we: we, rmw: 0, be: 4'hF, vaddr: va, asid: 8'd3, wdata: wd, local_sel: local_sel};
    wait_cycles = 0;
    @(negedge clk);
    while (!prsp.ack) begin @(negedge clk); wait_cycles++; if (wait_cycles > 1000) break; end
    f = prsp.fault; rd = prsp.rdata;
    preq = '0;
  endtask

  // lock reference: op 0 test (read), 1 test-and-set (rmw), 2 clear (write)
  task automatic lock(int op, logic [11:0] idx, logic [7:0] asid,
                      output fault_e f, output logic v, output int wait_cycles);
    @(negedge clk);
    preq = '{req: 1, we: (op == 2), rmw: (op == 1), be: 4'hF, vaddr: LB + 32'(idx),
             asid: asid, wdata: 0, local_sel: 0};
    wait_cycles = 0;
    @(negedge clk);
    while (!prsp.ack) begin @(negedge clk); wait_cycles++; if (wait_cycles > 1000) break; end
    f = prsp.fault; v = prsp.rdata[0];
    preq = '0;
  endtask

  task automatic u_lmem_wr(logic [15:0] a, logic [31:0] d);
    fault_e f; logic [31:0] rd; int w;
    access(1, {14'b0, a, 2'b00}, 1, d, f, rd, w);
  endtask

  task automatic copy(bus_cmd_e c, logic [31:0] va, logic [2:0] way, logic [31:0] pa);
    @(negedge clk);
    sreq.vaddr = va; sreq.way = way; sreq.asid = 8'd3; sreq.flags = '{1, 0, 0, 1};
    sreq.copy_go = 1; sreq.copy_cmd = c; sreq.paddr = pa;
    @(negedge clk);
    sreq.copy_go = 0;
  endtask

  task automatic wait_done(output bit ab);
    int n = 0;
    while (!srsp.copy_done && n < 1000) begin @(negedge clk); n++; end
    ab = srsp.copy_aborted;
    @(negedge clk);
  endtask

  task automatic inject(bus_cmd_e c, logic [31:0] pa);
    @(negedge clk);
    inj = '{valid: 1, cmd: c, src: 3'd4, paddr: pa};
    @(negedge clk);
    inj = '0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fault_e f;
    logic [31:0] rd, va, pa;
    int wc;
    bit ab;
    logic [2:0] way;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!srsp.ready) @(negedge clk);
    va = 32'h4000_1284; pa = 32'h0000_9280;
    access(0, va, 0, 0, f, rd, wc);
    check(f == FAULT_MISS, "cold miss");
    @(negedge clk); sreq.vaddr = va; #1; way = srsp.lru_way;
    check(way == 0, "first replacement slot");
    copy(BUS_READ_SHARED, va, way, pa);
    // the processor retries at once: held until the transfer ends
    begin
      fault_e f2; logic [31:0] r2; int w2;
      access(1, 32'h0000_0040, 1, 32'h1111_2222, f2, r2, w2);
      check(w2 == 0 && srsp.copy_busy, "local memory served during transfer");
    end
    access(0, va, 0, 0, f, rd, wc);
    check(wc > BW, $sformatf("reference held %0d cycles during move in", wc));
    check(f == FAULT_NONE && rd == u_mem.init_word(pa / 4 + 1), "hit after move in");
    access(1, 32'h0000_0040, 0, 0, f, rd, wc);
    check(rd == 32'h1111_2222, "local memory readback");
    @(negedge clk); sreq.paddr = pa; #1;
    check(srsp.at_act == ACT_SHARED, "action table shared after move in");
    access(0, va, 1, 32'hFEED_F00D, f, rd, wc);
    check(f == FAULT_WRITE, "write to shared slot faults");
    copy(BUS_ASSERT_OWN, va, way, pa);
    wait_done(ab);
    check(!ab, "ownership granted");
    access(0, va, 1, 32'hFEED_F00D, f, rd, wc);
    check(f == FAULT_NONE, "write after ownership");
    @(negedge clk); sreq.paddr = pa; sreq.vaddr = va; sreq.way = way; #1;
    check(srsp.at_act == ACT_PRIVATE && srsp.flags.modified, "private and modified");
    // foreign read of the owned block
    inject(BUS_READ_SHARED, pa);
    check(bus_abort_out == 1, "abort in the snoop cycle");
    @(negedge clk);
    check(bus_abort_out == 0, "abort pulse is over");
    @(negedge clk);
    check(prsp.irq && !srsp.fifo_empty, "interrupt raised");
    check(srsp.fifo_head.paddr == pa && srsp.fifo_head.cmd == BUS_READ_SHARED, "fifo entry");
    check(n_mon_abort == 1, "one abort");
    @(negedge clk); sreq.fifo_pop = 1; @(negedge clk); sreq.fifo_pop = 0; #1;
    check(!prsp.irq, "interrupt cleared");
    // handler: write back and downgrade to shared
    copy(BUS_WRITE_BACK, va, way, pa);
    wait_done(ab);
    check(!ab && u_mem.mem[pa / 4 + 1] == 32'hFEED_F00D, "written back");
    @(negedge clk); sreq.at_we = 1; sreq.at_act = ACT_SHARED; sreq.paddr = pa;
    sreq.tag_we = 1; sreq.vaddr = va; sreq.way = way; sreq.flags = '{1, 0, 0, 1};
    @(negedge clk); sreq.at_we = 0; sreq.tag_we = 0;
    inject(BUS_READ_SHARED, pa);
    repeat (2) @(negedge clk);
    check(!prsp.irq && n_mon_abort == 1, "shared copy lets readers through");
    // FIFO overflow by notify
    @(negedge clk); sreq.at_we = 1; sreq.at_act = ACT_NOTIFY; sreq.paddr = 32'h0070_0000;
    @(negedge clk); sreq.at_we = 0;
    for (int i = 0; i < 513; i++) inject(BUS_NOTIFY, 32'h0070_0000);
    @(negedge clk);
    check(srsp.fifo_ovf && prsp.irq, "fifo overflow");
    @(negedge clk); sreq.clr_ovf = 1; @(negedge clk); sreq.clr_ovf = 0; #1;
    check(!srsp.fifo_ovf, "overflow cleared");
    while (!srsp.fifo_empty) begin
      @(negedge clk); sreq.fifo_pop = 1; @(negedge clk); sreq.fifo_pop = 0;
    end
    // lock segment
    begin
      fault_e f; logic v; int w; int nl, nb;
      while (lm_init) @(negedge clk);
      nb = n_lock_bus;
      lock(0, 12'h05, 8'd3, f, v, w);
      check(f == FAULT_NONE && v == 1 && w == 0, "uncached test answers 1 at once");
      repeat (10) @(negedge clk);
      check(n_lock_bus == nb + 1, "background fetch on the lock bus");
      @(negedge clk); sreq.lock_alloc = 1; sreq.vaddr = LB + 32'h05; sreq.asid = 8'd3;
      @(negedge clk); sreq.lock_alloc = 0;
      w = 0;
      while (!srsp.lock_done && w < 100) begin @(negedge clk); w++; end
      check(w < 100, "allocation done");
      lock(0, 12'h05, 8'd3, f, v, w);
      check(f == FAULT_NONE && v == 0, "allocated lock reads free from the copy");
      lock(1, 12'h05, 8'd3, f, v, w);
      check(f == FAULT_NONE && v == 0 && w > 0, "test-and-set acquires over the bus");
      nb = n_lock_bus; nl = n_lock_local;
      lock(1, 12'h05, 8'd3, f, v, w);
      check(f == FAULT_NONE && v == 1 && n_lock_bus == nb && n_lock_local == nl + 1,
            "spin on held lock stays local");
      lock(1, 12'h05, 8'd9, f, v, w);
      check(f == FAULT_LOCK, "foreign asid gets a protection fault");
      lock(2, 12'h05, 8'd3, f, v, w);
      check(f == FAULT_NONE, "clear");
      lock(0, 12'h05, 8'd3, f, v, w);
      check(f == FAULT_NONE && v == 0, "released lock reads free");
      check(u_lm.val[5] == 0, "lock memory holds the free lock");
    end
    // directory mode: monitor off, directory interrupts reach the FIFO
    @(negedge clk); dir_mode = 1;
    begin
      int na;
      na = n_mon_abort;
      @(negedge clk); sreq.at_we = 1; sreq.at_act = ACT_PRIVATE; sreq.paddr = 32'h0060_0000;
      @(negedge clk); sreq.at_we = 0;
      inject(BUS_READ_SHARED, 32'h0060_0000);
      check(bus_abort_out == 0, "monitor silent in directory mode");
      repeat (2) @(negedge clk);
      check(n_mon_abort == na && srsp.fifo_empty, "no monitor interrupt in directory mode");
      @(negedge clk); ext_push = 1; ext_entry = '{cmd: BUS_READ_PRIVATE, src: 3'd2, paddr: 32'h0060_0000};
      @(negedge clk); ext_push = 0; #1;
      check(!srsp.fifo_empty && srsp.fifo_head.paddr == 32'h0060_0000 && prsp.irq,
            "directory interrupt queued");
    end
    // hardware miss handling
    @(negedge clk); dir_mode = 0;
    begin
      logic [31:0] vP, pP, rd; fault_e f; int w, naddr;
      logic [9:0] h;
      vP = 32'h6000_0400; pP = 32'h0020_0800;
      h = vP[19:10] ^ {8'd3, 2'b00};
      for (int k = 0; k < 4; k++) begin   // empty slot-map words
        u_lmem_wr(16'hC000 + 16'(4 * vP[14:7] + k), 32'h0);
        u_lmem_wr(16'hC000 + 16'(k), 32'h0);
      end
      u_lmem_wr(16'h8000 + 16'(10'h180 ^ 10'(12)), 32'h0);   // bucket of 6666_0000: empty
      u_lmem_wr(16'h8000 + 16'(h), 32'h0000_1000);
      u_lmem_wr(16'h1000, {2'b00, 8'd3, vP[31:10]});
      u_lmem_wr(16'h1001, {pP[31:10], 9'b0, 1'b1});
      u_lmem_wr(16'h1002, 32'h0);
      for (int i = 0; i < 8; i++) u_lmem_wr(16'h1003 + 16'(i), 32'h0);
      @(negedge clk); sreq.hw_miss = 1;
      naddr = 0;
      // the directory interrupt is still queued: an aborted miss traps
      check(prsp.irq, "interrupt waiting");
      fork
        begin
          while (!bus_a_out.valid) @(negedge clk);
          @(negedge clk); tb_abort = 1; @(negedge clk); tb_abort = 0;
        end
        access(0, vP + 32'h108, 0, 0, f, rd, w);
      join
      @(negedge clk);
      check(f == FAULT_MISS && n_hw_trap == 1 && n_hw_miss == 0, "aborted with interrupts waiting: trap");
      while (prsp.irq) begin
        @(negedge clk); sreq.fifo_pop = 1; sreq.clr_ovf = 1;
        @(negedge clk); sreq.fifo_pop = 0; sreq.clr_ovf = 0;
      end
      fork
        begin   // abort the first address phase of the board
          while (!bus_a_out.valid) @(negedge clk);
          @(negedge clk); tb_abort = 1; @(negedge clk); tb_abort = 0;
        end
        access(0, vP + 32'h108, 0, 0, f, rd, w);
      join
      check(f == FAULT_NONE && rd == u_mem.init_word((pP + 32'h108) / 4), "hardware miss after abort");
      check(n_hw_miss == 1 && n_hw_trap == 1, "served without a trap");
      check(dut.u_lm.mem[16'h1003 + 2][31] == 1'b1, "page record updated");
      // a foreign read-private queues an interrupt: the write must trap
      // rather than claim a copy that may be stale
      inject(BUS_READ_PRIVATE, pP + 32'h100);
      repeat (2) @(negedge clk);
      check(prsp.irq, "interrupt queued for the shared copy");
      access(0, vP + 32'h108, 1, 32'h1234_5678, f, rd, w);
      @(negedge clk);
      check(f == FAULT_WRITE && n_hw_trap == 2 && n_hw_miss == 1, "no claim with an interrupt queued");
      while (prsp.irq) begin
        @(negedge clk); sreq.fifo_pop = 1;
        @(negedge clk); sreq.fifo_pop = 0;
      end
      access(0, vP + 32'h108, 1, 32'h1234_5678, f, rd, w);
      check(f == FAULT_NONE && n_hw_miss == 2, "ownership claimed in hardware");
      access(0, vP + 32'h108, 0, 0, f, rd, w);
      check(rd == 32'h1234_5678, "write hit after claim");
      access(0, 32'h6666_0000, 0, 0, f, rd, w);
      @(negedge clk);
      check(f == FAULT_MISS && n_hw_trap == 3, "no record: trap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
