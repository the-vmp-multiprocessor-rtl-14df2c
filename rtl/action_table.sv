// action_table: two bits per physical cache block frame telling the bus
// monitor what to do when a transaction for that frame appears on the bus.
//
// The table is indexed by physical frame number (physical address divided by
// the 128-byte block size), so its size follows the size of physical memory.
// The cache management software reads and writes entries (sw_*); the block
// copier updates the entry of a frame as part of a successful move in or
// ownership claim (cp_*), so that software need not do it separately. The bus
// monitor reads the entry of the frame currently on the bus (mon_*).
//
// Interface timing: both reads are combinational; writes land at the clock
// edge. When both writers hit the same cycle, the software write wins.
// Entries reset to ACT_IGNORE through a hardware sweep that takes FRAMES
// cycles after reset (init_busy high meanwhile); the size of physical memory
// (8 MB, i.e. 65536 frames) is this design's choice.
module action_table
  import vmp_pkg::*;
#(
  parameter int FRAMES = 65536
) (
  input  logic                      clk,
  input  logic                      rst_n,
  output logic                      init_busy,
  // bus monitor lookup
  input  logic [$clog2(FRAMES)-1:0] mon_frame,
  output action_e                   mon_act,
  // block copier update
  input  logic                      cp_we,
  input  logic [$clog2(FRAMES)-1:0] cp_frame,
  input  action_e                   cp_act,
  // software access
  input  logic                      sw_we,
  input  logic [$clog2(FRAMES)-1:0] sw_frame,
  input  action_e                   sw_wact,
  output action_e                   sw_ract
);
  localparam int FW = $clog2(FRAMES);

  action_e        tbl [FRAMES];
  logic [FW-1:0]  init_idx;

  assign mon_act = tbl[mon_frame];
  assign sw_ract = tbl[sw_frame];

  always_ff @(posedge clk) begin
    if (init_busy)  tbl[init_idx] <= ACT_IGNORE;
    else if (sw_we) tbl[sw_frame] <= sw_wact;
    else if (cp_we) tbl[cp_frame] <= cp_act;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_idx  <= '0;
    end else if (init_busy) begin
      init_idx <= init_idx + 1'b1;
      if (init_idx == FW'(FRAMES-1)) init_busy <= 1'b0;
    end
  end

endmodule
