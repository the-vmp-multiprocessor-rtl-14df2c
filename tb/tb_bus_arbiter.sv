// tb_bus_arbiter: self-checking test of system bus arbitration for five
// boards. Random requesters hold their request for a random transaction
// length; the test checks that at most one grant is active, that a grant
// only goes to a requester and is held until its request drops, that the
// next grant follows round-robin order from the previous owner, and that
// every requester is served within N transactions.
module tb_bus_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0, gnt;
  logic [2:0] owner;
  int checks = 0, failures = 0;
  int len [N];
  int waited [N];
  int last = N - 1;

  bus_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] prev_gnt = '0, prev_req = '0;
  int grants = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      check($onehot0(gnt), "one grant");
      check((gnt & ~prev_req) == '0 || prev_gnt == gnt, "grant to requester");
      if (prev_gnt != '0 && (prev_gnt & req) != '0) check(gnt == prev_gnt, "grant held");
      if (gnt != '0 && gnt != prev_gnt) begin
        int g, exp;
        g = $clog2(gnt);
        exp = -1;
        for (int k = 1; k <= N; k++) if (exp < 0 && prev_req[(last + k) % N]) exp = (last + k) % N;
        check(g == exp, $sformatf("round robin: got %0d expected %0d", g, exp));
        check(int'(owner) == g, "owner id");
        last = g;
        grants++;
      end
      prev_gnt = gnt;
      // drive requests
      for (int i = 0; i < N; i++) begin
        if (gnt[i]) begin
          if (len[i] > 0) len[i]--;
          else req[i] = 0;
        end else if (!req[i] && ($urandom % 4) == 0) begin
          req[i] = 1; len[i] = $urandom % 40; waited[i] = 0;
        end
        if (req[i] && !gnt[i]) begin
          waited[i]++;
          check(waited[i] < N * 45, "no starvation");
        end
      end
      prev_req = req;
    end
    check(grants > 100, "enough grants");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
