// tb_action_table: self-checking test of the per-frame action table at its
// full 65536-frame size. Checks the reset sweep (every frame reads
// ACT_IGNORE afterwards, whatever the array held), software and copier
// writes, the priority of a software write over a simultaneous copier write
// to the same frame, and independence of the monitor and software read
// ports, against a reference array kept by the testbench.
module tb_action_table;
  import vmp_pkg::*;
  localparam int FRAMES = 65536;
  localparam int FW = $clog2(FRAMES);
  logic clk = 0, rst_n = 0, init_busy;
  logic [FW-1:0] mon_frame = '0, cp_frame = '0, sw_frame = '0;
  action_e mon_act, cp_act = ACT_IGNORE, sw_wact = ACT_IGNORE, sw_ract;
  logic cp_we = 0, sw_we = 0;
  int checks = 0, failures = 0;
  action_e ref_tbl [FRAMES];

  action_table #(.FRAMES(FRAMES)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cyc = 0;
    while (init_busy) begin @(posedge clk); cyc++; end
    check(cyc >= FRAMES && cyc <= FRAMES + 2, $sformatf("sweep took %0d cycles", cyc));
    for (int i = 0; i < FRAMES; i++) ref_tbl[i] = ACT_IGNORE;
    for (int i = 0; i < FRAMES; i += 97) begin
      mon_frame = FW'(i); #1;
      check(mon_act == ACT_IGNORE, "cleared after sweep");
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      sw_we = ($urandom % 3) == 0; sw_frame = FW'($urandom % 512); sw_wact = action_e'($urandom % 4);
      cp_we = ($urandom % 3) == 0; cp_frame = ($urandom % 4 == 0) ? sw_frame : FW'($urandom % 512);
      cp_act = action_e'($urandom % 4);
      mon_frame = FW'($urandom % 512);
      #1;
      check(mon_act == ref_tbl[mon_frame], "monitor read");
      check(sw_ract == ref_tbl[sw_frame], "software read");
      @(posedge clk); #1;
      if (sw_we) ref_tbl[sw_frame] = sw_wact;
      else if (cp_we) ref_tbl[cp_frame] = cp_act;
      sw_we = 0; cp_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
