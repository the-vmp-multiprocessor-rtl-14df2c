// bus_arbiter: grants the shared system bus to one processor board at a time.
//
// A board raises req and holds it for its whole transaction (address phase,
// snoop cycle and block transfer); the grant stays with it until it drops
// req. When the bus is free, the next requester after the last owner in
// round-robin order receives the grant at the next clock edge, so no board
// can be starved by another. The document only names bus arbitration; the
// round-robin policy and one-cycle grant latency are this design's choice.
//
// Interface: req[N] in, gnt[N] out (one-hot or zero, registered), owner id.
module bus_arbiter #(
  parameter int N = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] owner
);
  localparam int IW = $clog2(N);

  logic [IW-1:0] last;
  logic [IW-1:0] pick;
  logic          found;

  // next requester after 'last', wrapping around
  always_comb begin
    pick  = '0;
    found = 1'b0;
    for (int k = 1; k <= N; k++) begin
      int idx;
      idx = (int'(last) + k) % N;
      if (!found && req[idx]) begin
        pick  = IW'(idx);
        found = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt   <= '0;
      owner <= '0;
      last  <= IW'(N-1);
    end else if (gnt == '0 || (gnt & req) == '0) begin
      // bus free (or owner just released it): grant the next requester
      gnt <= '0;
      if (found && (gnt == '0)) begin
        gnt[pick] <= 1'b1;
        owner     <= pick;
        last      <= pick;
      end
    end
  end

  // at most one board owns the bus
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
