// tb_consistency_directory: self-checking test of the memory-side
// consistency directory at full size (65536 frames, 15 processors). A
// directed sequence checks the main cases (sharers added, ownership claim
// interrupting sharers, read of an owned block aborted with the owner
// interrupted, write back by the owner releasing it, notify); then random
// transactions from five boards on a few frames are compared cycle by
// cycle with an independent reference model of the N+1-bit entries.
module tb_consistency_directory;
  import vmp_pkg::*;
  localparam int N = 15;
  logic clk = 0, rst_n = 0, enable = 1, init_busy, abort_o, intr_valid;
  bus_addr_t bus_a = '0;
  logic [N-1:0] intr_mask;
  intr_entry_t intr_entry;
  int checks = 0, failures = 0;
  int n_ab = 0, n_int = 0;
  bit rex [16];
  logic [N-1:0] rh [16];

  consistency_directory #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic tx(bus_cmd_e c, int src, int fr, output bit ab, output logic [N-1:0] m);
    bit oth, e_ab;
    logic [N-1:0] sb, e_m;
    @(negedge clk);
    bus_a = '{valid: 1, cmd: c, src: 3'(src), paddr: 32'(fr) << 7 | 32'h0010_0000};
    sb = N'(1) << src;
    oth = rex[fr] && rh[fr] != sb;
    e_ab = 0; e_m = '0;
    unique case (c)
      BUS_READ_SHARED: if (oth) begin e_ab = 1; e_m = rh[fr]; end
                       else begin rex[fr] = 0; rh[fr] = rh[fr] | sb; end
      BUS_READ_PRIVATE, BUS_ASSERT_OWN:
                       if (oth) begin e_ab = 1; e_m = rh[fr]; end
                       else begin e_m = rh[fr] & ~sb; rex[fr] = 1; rh[fr] = sb; end
      BUS_WRITE_BACK:  if (oth) begin e_ab = 1; e_m = rh[fr]; end
                       else begin e_m = rh[fr] & ~sb; rex[fr] = 0; rh[fr] = sb; end
      BUS_NOTIFY:      e_m = rh[fr] & ~sb;
      default: ;
    endcase
    @(negedge clk);
    bus_a = '0;
    ab = abort_o; m = intr_mask;
    check(abort_o == e_ab, $sformatf("abort cmd=%0d src=%0d frame=%0d", c, src, fr));
    check(intr_valid == (e_m != 0) && intr_mask == e_m, $sformatf("interrupt mask cmd=%0d", c));
    if (e_m != 0) check(intr_entry.cmd == c && intr_entry.src == 3'(src), "interrupt entry");
    n_ab += e_ab; n_int += (e_m != 0);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ab;
    logic [N-1:0] m;
    for (int i = 0; i < 16; i++) begin rex[i] = 0; rh[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (init_busy) @(negedge clk);
    tx(BUS_READ_SHARED, 0, 3, ab, m);  check(!ab && m == 0, "first reader");
    tx(BUS_READ_SHARED, 1, 3, ab, m);  check(!ab && m == 0, "second reader");
    tx(BUS_ASSERT_OWN, 0, 3, ab, m);   check(!ab && m == 15'b10, "sharer interrupted");
    tx(BUS_READ_SHARED, 1, 3, ab, m);  check(ab && m == 15'b01, "owner interrupted, read aborted");
    tx(BUS_WRITE_BACK, 0, 3, ab, m);   check(!ab, "owner writes back");
    tx(BUS_READ_SHARED, 1, 3, ab, m);  check(!ab, "retry succeeds");
    tx(BUS_NOTIFY, 2, 3, ab, m);       check(m == 15'b11, "notify holders");
    for (int k = 0; k < 5000; k++)
      tx(bus_cmd_e'(1 + $urandom % 5), $urandom % 5, $urandom % 16, ab, m);
    check(n_ab > 50 && n_int > 50, "aborts and interrupts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
