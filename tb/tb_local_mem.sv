// tb_local_mem: self-checking test of the board's local memory at its full
// 64K-word size: random byte-enabled writes and reads against a reference
// model, and the one-cycle ack latency.
module tb_local_mem;
  localparam int WORDS = 65536;
  logic clk = 0, rst_n = 0, req = 0, we = 0, ack;
  logic [3:0] be = '0;
  logic [15:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [31:0] ref_m [logic [15:0]];

  local_mem #(.WORDS(WORDS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // initialise a window of addresses with full-word writes
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); req = 1; we = 1; be = 4'hF; addr = 16'(i * 251); wdata = $urandom;
      ref_m[addr] = wdata;
      @(posedge clk); #1; check(ack, "write ack after one cycle");
      req = 0;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      addr = 16'(($urandom % 256) * 251);
      req = 1; we = $urandom % 2; be = 4'($urandom); wdata = $urandom;
      if (we) for (int b = 0; b < 4; b++) if (be[b]) ref_m[addr][8*b +: 8] = wdata[8*b +: 8];
      @(posedge clk); #1;
      check(ack, "ack");
      if (!we) check(rdata == ref_m[addr], $sformatf("read %h", addr));
      req = 0;
      @(posedge clk); #1;
      check(!ack, "ack is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
