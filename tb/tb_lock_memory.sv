// tb_lock_memory: self-checking test of the lock memory at its full 4096
// locks. Checks the reset sweep, allocation to an asid, test-and-set
// returning the old value, clear, refusal (err, no change) of TAS and CLEAR
// from a foreign asid, the one-cycle reply and the update broadcast flags,
// against a reference model, with random operations.
module tb_lock_memory;
  import vmp_pkg::*;
  localparam int LOCKS = 4096;
  logic clk = 0, rst_n = 0, init_busy;
  lock_bus_req_t req = '0;
  lock_bus_rsp_t rsp;
  int checks = 0, failures = 0;
  bit rv [LOCKS];
  logic [7:0] ra [LOCKS];

  lock_memory #(.LOCKS(LOCKS)) dut (.*);
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
    while (init_busy) @(negedge clk);
    for (int i = 0; i < LOCKS; i++) begin rv[i] = 0; ra[i] = 0; end
    for (int n = 0; n < 6000; n++) begin
      int i;
      lock_op_e o;
      logic [7:0] as;
      bit e_err, e_upd, e_new;
      i = $urandom % 64;
      o = lock_op_e'($urandom % 4);
      as = 8'($urandom % 3);
      @(negedge clk);
      req = '{valid: 1, op: o, idx: 16'(i), asid: as, src: 3'($urandom % 5)};
      e_err = (o inside {LOCK_TAS, LOCK_CLEAR}) && ra[i] != as;
      @(negedge clk);
      check(rsp.valid && rsp.dst == req.src && rsp.idx == 16'(i) && rsp.op == o, "reply routing");
      check(rsp.val == rv[i], $sformatf("old value op=%0d", o));
      check(rsp.err == e_err, "protection");
      e_upd = 0; e_new = rv[i];
      if (!e_err) unique case (o)
        LOCK_TAS:   begin rv[i] = 1; e_upd = 1; e_new = 1; end
        LOCK_CLEAR: begin rv[i] = 0; e_upd = 1; e_new = 0; end
        LOCK_ALLOC: begin rv[i] = 0; ra[i] = as; e_upd = 1; e_new = 0; end
        default: ;
      endcase
      check(rsp.upd == e_upd && (!e_upd || rsp.new_val == e_new), "update broadcast");
      check(rsp.asid == ra[i], "owner asid");
      req = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
