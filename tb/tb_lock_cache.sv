// tb_lock_cache: self-checking test of two lock caches sharing a lock bus
// (round-robin arbiter and lock memory). Checks: allocation of a lock to an
// asid; a TEST miss answered at once with 1 while the refill proceeds in
// the background; hits after the refill; test-and-set acquiring a free lock
// over the bus; the other cache's copy updated by snooping, so its TEST and
// TAS of the held lock are answered locally with 1 and cause no bus
// traffic; protection errors for a foreign asid; release making the lock
// available to the other board; and mutual exclusion under random
// concurrent TAS/CLEAR from both boards.
module tb_lock_cache;
  import vmp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic init0, init1, minit;
  logic [1:0] lbreq, gnt;
  logic owner;
  lock_bus_req_t o0, o1, lbus;
  lock_bus_rsp_t rsp;
  logic req [2];
  lock_op_e op [2];
  logic [15:0] idx [2];
  logic [7:0] asid [2];
  logic ack [2], val [2], err [2];
  logic [15:0] n_local [2], n_bus [2];
  int checks = 0, failures = 0;

  lock_cache #(.MY_ID(3'd0)) c0 (.clk, .rst_n, .init_busy(init0), .req(req[0]), .op(op[0]),
    .idx(idx[0]), .asid(asid[0]), .ack(ack[0]), .val(val[0]), .err(err[0]),
    .lb_req(lbreq[0]), .lb_gnt(gnt[0]), .lb_out(o0), .lb_rsp(rsp),
    .n_local(n_local[0]), .n_bus(n_bus[0]));
  lock_cache #(.MY_ID(3'd1)) c1 (.clk, .rst_n, .init_busy(init1), .req(req[1]), .op(op[1]),
    .idx(idx[1]), .asid(asid[1]), .ack(ack[1]), .val(val[1]), .err(err[1]),
    .lb_req(lbreq[1]), .lb_gnt(gnt[1]), .lb_out(o1), .lb_rsp(rsp),
    .n_local(n_local[1]), .n_bus(n_bus[1]));
  bus_arbiter #(.N(2)) u_arb (.clk, .rst_n, .req(lbreq), .gnt, .owner);
  assign lbus = o0 | o1;
  lock_memory u_lm (.clk, .rst_n, .init_busy(minit), .req(lbus), .rsp);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic lk(int b, lock_op_e o, int i, logic [7:0] a, output bit v, output bit e,
                    output int cyc);
    @(negedge clk);
    req[b] = 1; op[b] = o; idx[b] = 16'(i); asid[b] = a;
    @(negedge clk);
    req[b] = 0;
    cyc = 1;
    while (!ack[b] && cyc < 100) begin @(negedge clk); cyc++; end
    check(cyc < 100, "ack arrives");
    v = val[b]; e = err[b];
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit v, e;
    int cyc, nb;
    for (int b = 0; b < 2; b++) begin req[b] = 0; op[b] = LOCK_TEST; idx[b] = 0; asid[b] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (init0 || init1 || minit) @(negedge clk);
    lk(0, LOCK_ALLOC, 5, 8'd1, v, e, cyc);
    check(!e, "alloc");
    lk(0, LOCK_TEST, 5, 8'd1, v, e, cyc);
    check(cyc == 1 && v == 0 && !e, "own copy after alloc");
    lk(1, LOCK_TEST, 5, 8'd1, v, e, cyc);
    check(cyc == 1 && v == 1 && !e, "miss answers set at once");
    repeat (10) @(negedge clk);
    lk(1, LOCK_TEST, 5, 8'd1, v, e, cyc);
    check(cyc == 1 && v == 0, "refilled copy");
    lk(0, LOCK_TAS, 5, 8'd1, v, e, cyc);
    check(v == 0 && !e && cyc > 1, "TAS acquires over the bus");
    nb = n_bus[1];
    lk(1, LOCK_TEST, 5, 8'd1, v, e, cyc);
    check(cyc == 1 && v == 1, "snooped copy shows held");
    lk(1, LOCK_TAS, 5, 8'd1, v, e, cyc);
    check(cyc == 1 && v == 1 && n_bus[1] == nb, "spinning TAS stays local");
    lk(1, LOCK_TEST, 5, 8'd2, v, e, cyc);
    check(e, "TEST protection error");
    lk(1, LOCK_CLEAR, 5, 8'd2, v, e, cyc);
    check(e, "CLEAR protection error");
    lk(1, LOCK_TEST, 5, 8'd1, v, e, cyc);
    check(v == 1, "refused CLEAR changed nothing");
    lk(0, LOCK_CLEAR, 5, 8'd1, v, e, cyc);
    check(!e && v == 1, "release");
    lk(1, LOCK_TEST, 5, 8'd1, v, e, cyc);
    check(cyc == 1 && v == 0, "release seen by snoop");
    lk(1, LOCK_TAS, 5, 8'd1, v, e, cyc);
    check(v == 0 && !e, "other board acquires");
    lk(1, LOCK_CLEAR, 5, 8'd1, v, e, cyc);
    // mutual exclusion under concurrency
    begin
      int holder = -1;
      fork
        for (int b = 0; b < 2; b++) begin
          automatic int bb = b;
          fork
            for (int k = 0; k < 300; k++) begin
              bit vv, ee; int cc;
              lk(bb, LOCK_TAS, 5, 8'd1, vv, ee, cc);
              if (!vv) begin
                check(holder < 0, "mutual exclusion");
                holder = bb;
                repeat ($urandom % 5) @(negedge clk);
                holder = -1;
                lk(bb, LOCK_CLEAR, 5, 8'd1, vv, ee, cc);
              end
            end
          join_none
        end
      join_none
      wait fork;
    end
    check(n_local[0] > 0 && n_local[1] > 0 && n_bus[0] > 0 && n_bus[1] > 0, "both paths used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
