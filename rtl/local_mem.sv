// local_mem: the processor board's private memory, which holds the cache
// management code and its data structures (the cache directory of page
// records, the hash tables and the slot map). It is never cached and never
// seen on the system bus, so the miss handler can run from it without
// faulting.
//
// A single-port synchronous RAM of 32-bit words with byte enables: a request
// is answered one cycle later by ack, with read data for a read. The size
// (256 KB) is this design's choice; the document does not give it.
module local_mem #(
  parameter int WORDS = 65536
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     req,
  input  logic                     we,
  input  logic [3:0]               be,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [31:0]              wdata,
  output logic                     ack,
  output logic [31:0]              rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (req && we)
      for (int b = 0; b < 4; b++)
        if (be[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack   <= 1'b0;
      rdata <= '0;
    end else begin
      ack <= req;
      if (req && !we) rdata <= mem[addr];
    end
  end

endmodule
