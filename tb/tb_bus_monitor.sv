// tb_bus_monitor: self-checking test of the bus monitor decision table.
// Every combination of transaction kind, action-table entry and
// own/foreign source is presented as an address phase; one cycle later the
// abort line, the FIFO push and the queued entry are compared with an
// independent reference of the single-writer, multiple-readers rules.
// Also checks that the frame index sent to the action table is the physical
// address divided by the 128-byte block size, and the statistics counters.
module tb_bus_monitor;
  import vmp_pkg::*;
  localparam int FRAMES = 65536;
  localparam logic [SRC_W-1:0] ME = 3'd2;
  logic clk = 0, rst_n = 0, enable = 1;
  bus_addr_t bus_a = '0;
  logic [15:0] at_frame;
  action_e at_act = ACT_IGNORE;
  logic abort_o, push;
  intr_entry_t entry;
  logic [15:0] n_abort, n_intr;
  int checks = 0, failures = 0, exp_ab = 0, exp_in = 0;

  bus_monitor #(.FRAMES(FRAMES), .OFF_W(7), .MY_ID(ME)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 4; rep++)
    for (int c = 1; c <= 5; c++)
    for (int a = 0; a < 4; a++)
    for (int s = 0; s < 2; s++) begin
      bit e_ab, e_in;
      bus_cmd_e cmd;
      logic [31:0] pa;
      cmd = bus_cmd_e'(c);
      pa = {$urandom} & 32'h007F_FF80;
      e_ab = 0; e_in = 0;
      if (s == 1) begin
        if (a == 2 && c inside {1, 2, 3, 4}) begin e_ab = 1; e_in = 1; end
        if (a == 1 && c inside {2, 3, 4}) e_in = 1;
        if (a == 3 && c == 5) e_in = 1;
      end
      @(negedge clk);
      bus_a = '{valid: 1'b1, cmd: cmd, src: (s == 1) ? 3'd4 : ME, paddr: pa};
      at_act = action_e'(a);
      #1;
      check(at_frame == pa[22:7], "frame index");
      @(negedge clk);
      bus_a = '0;
      check(abort_o == e_ab, $sformatf("abort cmd=%0d act=%0d foreign=%0d", c, a, s));
      check(push == e_in, $sformatf("intr cmd=%0d act=%0d foreign=%0d", c, a, s));
      if (e_in) check(entry.paddr == pa && entry.cmd == cmd && entry.src == 3'd4, "entry");
      exp_ab += e_ab; exp_in += e_in;
      @(negedge clk);
      check(!abort_o && !push, "one-cycle pulses");
    end
    check(n_abort == 16'(exp_ab) && n_intr == 16'(exp_in), "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
