// tb_intr_fifo: self-checking test of the bus monitor interrupt FIFO at its
// full 512-entry depth. It fills the FIFO, checks full and count, pushes one
// more entry to provoke the sticky overflow flag, drains it checking order
// against a reference queue, clears the flag, and finally runs random
// simultaneous push/pop traffic against the same reference queue.
module tb_intr_fifo;
  localparam int W = 40, DEPTH = 512;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0, clr_ovf = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full, overflow;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  intr_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(empty && !full && count == 0 && !overflow, "reset state");
    for (int i = 0; i < DEPTH; i++) begin
      push <= 1; din <= {8'(i), 32'(i * 7 + 3)}; q.push_back({8'(i), 32'(i * 7 + 3)});
      @(posedge clk);
    end
    push <= 0;
    @(posedge clk);
    check(full && count == 10'(DEPTH) && !overflow, "full after DEPTH pushes");
    push <= 1; din <= '1;
    @(posedge clk);
    push <= 0;
    @(posedge clk);
    check(overflow, "overflow set by push into full FIFO");
    check(count == 10'(DEPTH), "dropped entry not stored");
    for (int i = 0; i < DEPTH; i++) begin
      check(dout == q[0], $sformatf("order at %0d", i));
      void'(q.pop_front());
      pop <= 1;
      @(posedge clk);
      pop <= 0;
      @(negedge clk);
    end
    check(empty && overflow, "empty, overflow still sticky");
    clr_ovf <= 1;
    @(posedge clk);
    clr_ovf <= 0;
    @(posedge clk);
    check(!overflow, "overflow cleared");
    // random traffic
    for (int i = 0; i < 4000; i++) begin
      bit dp, dq;
      dp = ($urandom % 2) == 1;
      dq = ($urandom % 3) == 0 && q.size() > 0;
      @(negedge clk);
      if (q.size() > 0) check(dout == q[0], "random head");
      check(32'(count) == q.size(), "random count");
      push = dp; din = {$urandom, 8'($urandom)}; pop = dq;
      @(posedge clk);
      #1;
      if (dq) void'(q.pop_front());
      if (dp && q.size() < DEPTH) q.push_back(din);
      push = 0; pop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
