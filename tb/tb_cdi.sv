// tb_cdi: self-checking test of the cache directory interface against a
// local memory prepared by the testbench in the layout the CDI expects.
// A hash bucket holds a chain of three page records whose keys differ in
// asid or page number; translations must find the first and the third
// record with the right physical address and write permission, fail for
// an absent key and for a chain longer than the walk limit, and take the
// expected number of cycles. An update after a translation must fill the
// record's block word and the slot map; an invalidation must clear both,
// and an invalidation of an empty slot must write nothing.
module tb_cdi;
  import vmp_pkg::*;
  localparam int LMA_W = 16;
  localparam logic [15:0] HT = 16'h8000, SBM = 16'hC000;
  logic clk = 0, rst_n = 0;
  logic op_valid = 0;
  cdi_op_e op = CDI_INVAL;
  logic [7:0] set = 0;
  logic [1:0] way = 0;
  logic [31:0] vaddr = 0;
  logic [7:0] asid = 0;
  logic busy, done, ok, wperm;
  logic [31:0] paddr;
  logic m_req, m_we, m_ack;
  logic [15:0] m_addr;
  logic [31:0] m_wdata, m_rdata;
  logic [15:0] n_ok, n_fail;
  int checks = 0, failures = 0;
  int n_writes = 0;

  cdi dut (.clk, .rst_n, .op_valid, .op, .set, .way, .vaddr, .asid, .busy, .done, .ok,
           .paddr, .wperm, .m_req, .m_we, .m_addr, .m_wdata, .m_ack, .m_rdata,
           .n_xlate_ok(n_ok), .n_xlate_fail(n_fail));
  local_mem u_lm (.clk, .rst_n, .req(m_req), .we(m_we), .be(4'hF), .addr(m_addr),
                  .wdata(m_wdata), .ack(m_ack), .rdata(m_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) if (m_req && m_we) n_writes++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  function automatic logic [9:0] hash(logic [31:0] va, logic [7:0] a);
    return va[19:10] ^ {a, 2'b00};
  endfunction

  // record at word address r for (va, a) -> physical page pp, permission w
  task automatic put_rec(logic [15:0] r, logic [31:0] va, logic [7:0] a,
                         logic [31:0] pp, bit w, logic [15:0] link);
    u_lm.mem[r]     = {2'b00, a, va[31:10]};
    u_lm.mem[r + 1] = {pp[31:10], 9'b0, w};
    u_lm.mem[r + 2] = {16'b0, link};
    for (int i = 0; i < 8; i++) u_lm.mem[r + 3 + i] = 0;
  endtask

  task automatic run(cdi_op_e o, logic [31:0] va, logic [7:0] a, logic [7:0] s,
                     logic [1:0] w, output int cycles);
    @(negedge clk);
    op_valid = 1; op = o; vaddr = va; asid = a; set = s; way = w;
    @(negedge clk);
    op_valid = 0;
    cycles = 1;
    while (!done && cycles < 500) begin @(negedge clk); cycles++; end
    check(cycles < 500, "operation finishes");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [31:0] vA, vB, vC;
    for (int i = 0; i < 65536; i++) u_lm.mem[i] = 0;
    // three keys in one bucket: vA/asid 1, vB/asid 2 with vB = vA ^ (12 << 10)
    // (same hash), vC/asid 1 with vC = vA ^ (1 << 20) (same low page bits)
    vA = 32'h1234_5400; vB = vA ^ 32'h0000_3000; vC = vA ^ 32'h0010_0000;
    check(hash(vA, 1) == hash(vB, 2) && hash(vA, 1) == hash(vC, 1), "keys collide");
    u_lm.mem[HT + 16'(hash(vA, 1))] = 32'h0000_1000;
    put_rec(16'h1000, vA, 1, 32'h0040_0000, 1, 16'h1010);
    put_rec(16'h1010, vB, 2, 32'h0050_0000, 0, 16'h1020);
    put_rec(16'h1020, vC, 1, 32'h0060_0000, 0, 16'h0000);
    repeat (3) @(posedge clk);
    rst_n = 1;

    run(CDI_XLATE, vA + 32'h84, 1, 0, 0, cyc);
    check(ok && paddr == 32'h0040_0084 && wperm == 1, "first record translates");
    // HT read, key read, page read: 3 accesses of 2 cycles, 1 finish, 1 latch
    check(cyc == 8, $sformatf("first-record translation takes 8 cycles (%0d)", cyc));
    run(CDI_XLATE, vC + 32'h3FC, 1, 0, 0, cyc);
    check(ok && paddr == 32'h0060_03FC && wperm == 0, "third record translates");
    check(cyc == 8 + 2 * 4, $sformatf("two extra hops cost 4 cycles each (%0d)", cyc));
    run(CDI_XLATE, vB + 32'h10, 2, 0, 0, cyc);
    check(ok && paddr == 32'h0050_0010, "second record translates");
    // (vB, asid 1) hashes to its own bucket; point it into the middle of the
    // chain so the walk meets vB's record with asid 2 and must skip it
    u_lm.mem[HT + 16'(hash(vB, 1))] = 32'h0000_1010;
    run(CDI_XLATE, vB + 32'h10, 1, 0, 0, cyc);
    check(!ok, "wrong asid does not translate");
    check(cyc == 12, $sformatf("two keys and two links read before giving up (%0d)", cyc));
    run(CDI_XLATE, 32'h7777_7000, 1, 0, 0, cyc);
    check(!ok, "empty bucket does not translate");

    // update slot (set 5, way 2) with block 1 of vC's page
    run(CDI_XLATE, vC + 32'h80, 1, 0, 0, cyc);
    run(CDI_UPDATE, vC + 32'h80, 1, 8'd5, 2'd2, cyc);
    check(ok, "update done");
    check(u_lm.mem[16'h1020 + 3 + 1] == {1'b1, 19'b0, 8'd5, 4'd2}, "record block word");
    check(u_lm.mem[SBM + 5 * 4 + 2] == {1'b1, 12'b0, 3'd1, 16'h1020}, "slot map word");
    // invalidate it
    run(CDI_INVAL, 32'h0, 0, 8'd5, 2'd2, cyc);
    check(u_lm.mem[16'h1020 + 4] == 0 && u_lm.mem[SBM + 22] == 0, "invalidated");
    begin
      int w0;
      w0 = n_writes;
      run(CDI_INVAL, 32'h0, 0, 8'd9, 2'd1, cyc);
      check(n_writes == w0, "empty slot: no writes");
      check(cyc == 2 + 1 + 1, $sformatf("empty-slot invalidate takes 4 cycles (%0d)", cyc));
    end

    // chain longer than the walk limit (8): nine records, key in the last
    for (int i = 0; i < 9; i++)
      put_rec(16'h2000 + 16'(16 * i), (i == 8) ? vA : vA ^ (32'(i + 1) << 20), 7,
              32'h0070_0000, 0, (i == 8) ? 16'h0 : 16'h2000 + 16'(16 * (i + 1)));
    u_lm.mem[HT + 16'(hash(vA, 7))] = 32'h0000_2000;
    run(CDI_XLATE, vA, 7, 0, 0, cyc);
    check(!ok, "over-long chain gives up");
    check(n_ok == 4 && n_fail == 3, "translation counters");
    // a random walk of translations of the three good keys
    for (int k = 0; k < 50; k++) begin
      int unsigned r;
      logic [9:0] off;
      r = $urandom % 3; off = 10'($urandom);
      case (r)
        0: begin run(CDI_XLATE, vA | 32'(off), 1, 0, 0, cyc); check(ok && paddr == (32'h0040_0000 | 32'(off)), "A"); end
        1: begin run(CDI_XLATE, vB | 32'(off), 2, 0, 0, cyc); check(ok && paddr == (32'h0050_0000 | 32'(off)), "B"); end
        default: begin run(CDI_XLATE, vC | 32'(off), 1, 0, 0, cyc); check(ok && paddr == (32'h0060_0000 | 32'(off)), "C"); end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
