// tb_vmp_cache: self-checking test of the virtually addressed cache at its
// full 128 KB, 4-way, 128-byte-block geometry. The testbench plays both the
// block copier (filling slots word by word and installing tags) and the
// cache software (reading tags, asking for the replacement slot, writing
// flags). It checks: faults on a miss, on an asid mismatch and on a write to
// a slot that is not owned; read data and byte-enabled write merging on
// hits; the modified flag; one-cycle response latency; and the replacement
// choice (invalid slot first, then least recently used) against a
// reference recency list, including that asking twice gives the same slot.
module tb_vmp_cache;
  import vmp_pkg::*;
  localparam int SETS = 256, WAYS = 4, BW = 32;
  logic clk = 0, rst_n = 0, init_busy;
  logic p_req = 0, p_we = 0;
  logic [3:0] p_be = 4'hF;
  logic [31:0] p_vaddr = '0, p_wdata = '0, p_rdata;
  logic [7:0] p_asid = '0;
  logic p_ack;
  fault_e p_fault;
  logic [7:0] sw_set = '0;
  logic [1:0] sw_way = '0, sw_lru_way;
  logic sw_we = 0;
  logic [16:0] sw_wvtag = '0, sw_rvtag;
  logic [7:0] sw_wasid = '0, sw_rasid;
  slot_flags_t sw_wflags = '0, sw_rflags;
  logic [7:0] cp_set = '0;
  logic [1:0] cp_way = '0;
  logic [4:0] cp_word = '0;
  logic cp_we = 0, cp_tag_we = 0, cp_flags_we = 0;
  logic [31:0] cp_wdata = '0, cp_rdata;
  logic [16:0] cp_vtag = '0;
  logic [7:0] cp_asid = '0;
  slot_flags_t cp_flags = '0, cp_rflags;
  int checks = 0, failures = 0;

  vmp_cache #(.SETS(SETS), .WAYS(WAYS), .BLOCK_WORDS(BW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] pat(logic [31:0] va);
    return va * 32'h0101_0107 + 32'h1234;
  endfunction

  // fill slot (set, way) with the block of virtual address va
  task automatic fill(logic [31:0] va, logic [1:0] way, logic [7:0] asid, bit own);
    for (int w = 0; w < BW; w++) begin
      @(negedge clk);
      cp_set = va[14:7]; cp_way = way; cp_word = 5'(w); cp_we = 1;
      cp_wdata = pat({va[31:7], 5'(w), 2'b00});
    end
    @(negedge clk);
    cp_we = 0; cp_tag_we = 1; cp_vtag = va[31:15]; cp_asid = asid;
    cp_flags = '{valid: 1, writable: own, modified: 0, may_own: 1};
    @(negedge clk);
    cp_tag_we = 0;
  endtask

  task automatic access(logic [31:0] va, logic [7:0] asid, bit we, logic [3:0] be,
                        logic [31:0] wd, output fault_e f, output logic [31:0] rd);
    @(negedge clk);
    p_req = 1; p_we = we; p_vaddr = va; p_asid = asid; p_be = be; p_wdata = wd;
    @(negedge clk);
    p_req = 0;
    check(p_ack, "ack one cycle after request");
    f = p_fault; rd = p_rdata;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fault_e f;
    logic [31:0] rd;
    int order [$];
    logic [31:0] va0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (init_busy) @(posedge clk);
    va0 = 32'h0012_3480;  // set 0x69
    access(va0, 8'd1, 0, 4'hF, 0, f, rd);
    check(f == FAULT_MISS, "cold miss");
    @(negedge clk); sw_set = va0[14:7]; #1;
    check(sw_lru_way == 0, "invalid slot 0 first");
    fill(va0, 2'd0, 8'd1, 0);
    for (int w = 0; w < BW; w++) begin
      access(va0 + 32'(4 * w), 8'd1, 0, 4'hF, 0, f, rd);
      check(f == FAULT_NONE && rd == pat(va0 + 32'(4 * w)), $sformatf("hit data word %0d", w));
    end
    access(va0, 8'd2, 0, 4'hF, 0, f, rd);
    check(f == FAULT_MISS, "asid mismatch misses");
    access(va0 + 32'h0000_8000, 8'd1, 0, 4'hF, 0, f, rd);
    check(f == FAULT_MISS, "same set other tag misses");
    access(va0 + 8, 8'd1, 1, 4'hF, 32'hDEAD_BEEF, f, rd);
    check(f == FAULT_WRITE, "write to shared slot faults");
    // software grants ownership
    @(negedge clk); cp_set = va0[14:7]; cp_way = 0; cp_flags_we = 1;
    cp_flags = '{valid: 1, writable: 1, modified: 0, may_own: 1};
    @(negedge clk); cp_flags_we = 0;
    access(va0 + 8, 8'd1, 1, 4'b0101, 32'hDEAD_BEEF, f, rd);
    check(f == FAULT_NONE, "owned write hits");
    access(va0 + 8, 8'd1, 0, 4'hF, 0, f, rd);
    check(rd == ((pat(va0 + 8) & 32'hFF00_FF00) | 32'h00AD_00EF), "byte-enable merge");
    @(negedge clk); sw_set = va0[14:7]; sw_way = 0; #1;
    check(sw_rflags.modified && sw_rvtag == va0[31:15] && sw_rasid == 8'd1, "tag read, modified set");
    @(negedge clk); cp_set = va0[14:7]; cp_way = 0; cp_word = 2; #1;
    check(cp_rdata == rd, "copier read port sees write");
    // LRU: fill the other three ways, then touch in a known order
    order.push_back(0);
    for (int w = 1; w < 4; w++) begin
      fill(va0 + 32'(w) * 32'h8000, 2'(w), 8'd1, 0);
      order.push_back(w);
    end
    @(negedge clk); sw_set = va0[14:7]; #1;
    check(sw_lru_way == 2'(order[0]), "LRU after fills");
    for (int k = 0; k < 40; k++) begin
      int w, pos;
      w = $urandom % 4;
      access(va0 + 32'(w) * 32'h8000, 8'd1, 0, 4'hF, 0, f, rd);
      check(f == FAULT_NONE, "hit in full set");
      for (int j = 0; j < order.size(); j++) if (order[j] == w) pos = j;
      order.delete(pos); order.push_back(w);
      @(negedge clk); #1;
      check(sw_lru_way == 2'(order[0]), $sformatf("LRU way %0d expected %0d", sw_lru_way, order[0]));
      @(negedge clk); #1;
      check(sw_lru_way == 2'(order[0]), "same slot when asked again");
    end
    // software invalidates way 2: it becomes the replacement choice
    @(negedge clk); sw_set = va0[14:7]; sw_way = 2; sw_we = 1; sw_wflags = '0;
    sw_wvtag = '0; sw_wasid = '0;
    @(negedge clk); sw_we = 0; #1;
    check(sw_lru_way == 2, "invalidated slot chosen");
    access(va0 + 32'h1_0000, 8'd1, 0, 4'hF, 0, f, rd);
    check(f == FAULT_MISS, "invalidated slot misses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
