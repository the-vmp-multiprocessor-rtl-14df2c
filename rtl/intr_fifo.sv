// intr_fifo: queue of bus monitor interrupts awaiting the cache software.
//
// The bus monitor pushes one entry for every bus transaction that needs a
// write-back, an invalidation or a notify action; the processor pops them in
// its interrupt routine. The depth of 512 entries follows the design
// description. A push into a full FIFO is dropped and sets a sticky overflow
// flag; the software reacts to it by writing back and invalidating the whole
// cache, then clears the flag (clr_ovf).
//
// Interface: push/din, pop/dout (first-word fall-through: dout shows the
// oldest entry while empty is low), count, overflow.
// Timing: a push is visible on dout the cycle after; pop and push may happen
// in the same cycle. Storage is a plain array with one write port.
module intr_fifo #(
  parameter int W     = 40,
  parameter int DEPTH = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic         overflow,
  input  logic         clr_ovf
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic          do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_push) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      if (do_push && !do_pop)      count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
      if (push && !do_push)  overflow <= 1'b1;
      else if (clr_ovf)      overflow <= 1'b0;
    end
  end

endmodule
