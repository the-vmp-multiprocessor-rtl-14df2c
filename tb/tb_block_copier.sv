// tb_block_copier: self-checking test of the block copier with the
// sequential memory model on the bus. The testbench stands in for the
// arbiter (grant one cycle after request), for the other boards' monitors
// (it can pull abort in the snoop cycle) and for the cache slot storage.
// It checks every transaction kind: read shared and read private move the
// memory block into the slot and install tag, flags and action-table entry;
// write back moves the slot to memory and clears modified; assert
// ownership sets writable and the private action; notify changes nothing;
// an aborted transaction changes nothing and reports aborted. Cycle counts
// from command to done are checked against the cycle plan: 6 + FIRST_LAT +
// 32 for a block move in, 5 for an aborted transaction.
module tb_block_copier;
  import vmp_pkg::*;
  localparam int BW = 32, LAT = 1;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  bus_cmd_e cmd = BUS_IDLE;
  logic [31:0] cmd_paddr = '0;
  logic [7:0] cmd_set = '0;
  logic [1:0] cmd_way = '0;
  logic [16:0] cmd_vtag = '0;
  logic [7:0] cmd_asid = '0;
  logic cmd_may_own = 0;
  logic busy, done, aborted;
  logic bus_req, bus_gnt = 0, bus_abort = 0, bus_wvalid, bus_wready, bus_rvalid;
  bus_addr_t bus_a;
  logic [31:0] bus_wdata, bus_rdata;
  logic [7:0] cp_set;
  logic [1:0] cp_way;
  logic [4:0] cp_word;
  logic cp_we, cp_tag_we, cp_flags_we;
  logic [31:0] cp_wdata, cp_rdata;
  logic [16:0] cp_vtag;
  logic [7:0] cp_asid;
  slot_flags_t cp_flags, cp_rflags;
  logic at_we;
  logic [15:0] at_frame;
  action_e at_act;
  int n_reads, n_writes;
  int checks = 0, failures = 0;

  block_copier #(.MY_ID(3'd1)) dut (.*);
  vme_mem_model #(.BLOCK_WORDS(BW), .FIRST_LAT(LAT)) u_mem (
    .clk, .rst_n, .bus_a, .bus_abort, .wvalid(bus_wvalid), .wdata(bus_wdata),
    .wready(bus_wready), .rvalid(bus_rvalid), .rdata(bus_rdata), .n_reads, .n_writes);

  // cache slot model
  logic [31:0] slot [BW];
  slot_flags_t flags_q = '0;
  logic [16:0] vtag_q = '0;
  int tag_writes = 0, at_writes = 0;
  action_e at_last = ACT_IGNORE;
  bit inject_abort = 0;
  assign cp_rdata  = slot[cp_word];
  assign cp_rflags = flags_q;
  always_ff @(posedge clk) begin
    bus_gnt   <= bus_req;
    bus_abort <= bus_a.valid && inject_abort;
    if (cp_we) slot[cp_word] <= cp_wdata;
    if (cp_tag_we) begin flags_q <= cp_flags; vtag_q <= cp_vtag; tag_writes++; end
    else if (cp_flags_we) begin flags_q <= cp_flags; tag_writes++; end
    if (at_we) begin at_last <= at_act; at_writes++; end
  end

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  task automatic run(bus_cmd_e c, logic [31:0] pa, output int cycles);
    @(negedge clk);
    cmd_valid = 1; cmd = c; cmd_paddr = pa; cmd_set = 8'h33; cmd_way = 2;
    cmd_vtag = 17'h1ABCD; cmd_asid = 8'h7; cmd_may_own = 1;
    @(negedge clk);
    cmd_valid = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; check(cycles < 500, "done arrives"); if (cycles >= 500) break; end
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, tw, aw;
    logic [31:0] pa;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // read shared
    pa = 32'h0000_4A80;
    run(BUS_READ_SHARED, pa, cyc);
    check(cyc == 6 + LAT + BW, $sformatf("move-in cycles %0d", cyc));
    check(!aborted, "not aborted");
    for (int w = 0; w < BW; w++) check(slot[w] == u_mem.init_word(pa / 4 + w), $sformatf("word %0d", w));
    check(flags_q.valid && !flags_q.writable && !flags_q.modified && flags_q.may_own, "shared flags");
    check(vtag_q == 17'h1ABCD, "tag installed");
    check(at_last == ACT_SHARED && at_frame == 16'(pa >> 7), "action shared");
    // read private
    pa = 32'h0001_0000;
    run(BUS_READ_PRIVATE, pa, cyc);
    check(slot[5] == u_mem.init_word(pa / 4 + 5), "private data");
    check(flags_q.valid && flags_q.writable, "private flags");
    check(at_last == ACT_PRIVATE, "action private");
    // write back modified data
    for (int w = 0; w < BW; w++) slot[w] = 32'hC0DE_0000 + 32'(w);
    flags_q.modified = 1;
    pa = 32'h0000_2000;
    run(BUS_WRITE_BACK, pa, cyc);
    check(cyc == 5 + BW + 1, $sformatf("write-back cycles %0d", cyc));
    for (int w = 0; w < BW; w++) check(u_mem.mem[pa / 4 + w] == 32'hC0DE_0000 + 32'(w), "memory written");
    check(!flags_q.modified && flags_q.valid, "modified cleared");
    // assert ownership
    flags_q = '{valid: 1, writable: 0, modified: 0, may_own: 1};
    run(BUS_ASSERT_OWN, 32'h0000_0380, cyc);
    check(cyc == 6, $sformatf("assert-ownership cycles %0d", cyc));
    check(flags_q.writable && at_last == ACT_PRIVATE && at_frame == 16'd7, "ownership");
    // notify
    tw = tag_writes; aw = at_writes;
    run(BUS_NOTIFY, 32'h0000_0400, cyc);
    check(tag_writes == tw && at_writes == aw && !aborted, "notify leaves slot alone");
    // aborted move in
    inject_abort = 1;
    flags_q = '0;
    tw = tag_writes; aw = at_writes;
    run(BUS_READ_SHARED, 32'h0000_6000, cyc);
    check(aborted, "aborted reported");
    check(cyc == 5, $sformatf("abort cycles %0d", cyc));
    check(tag_writes == tw && at_writes == aw && !flags_q.valid, "aborted leaves slot invalid");
    inject_abort = 0;
    repeat (5) @(negedge clk);
    check(n_reads == 2 && n_writes == 1, "memory saw two reads, one write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
