// vme_mem_model: behavioural model of the system memory board, a
// sequential-access memory on the system bus. Not synthesizable intent:
// testbench use only.
//
// It watches the bus address phase. In the following snoop cycle it checks
// the abort line; an aborted transaction is dropped. Otherwise a read
// (shared or private) streams BLOCK_WORDS words from the block address
// upwards, the first after FIRST_LAT cycles and then one per cycle (rvalid);
// a write back accepts BLOCK_WORDS words (wready held high) and stores them.
// Assert-ownership and notify carry no data and need nothing from memory.
// Storage covers 2^AW words (8 MB by default); every word starts as init_word(word address),
// so a testbench can compute expected data independently.
module vme_mem_model
  import vmp_pkg::*;
#(
  parameter int BLOCK_WORDS = 32,
  parameter int FIRST_LAT   = 1,
  parameter int AW          = 21
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bus_addr_t         bus_a,
  input  logic              bus_abort,
  input  logic              wvalid,
  input  logic [WORD_W-1:0] wdata,
  output logic              wready,
  output logic              rvalid,
  output logic [WORD_W-1:0] rdata,
  output int                n_reads,
  output int                n_writes
);
  logic [WORD_W-1:0] mem [2**AW];

  function automatic logic [WORD_W-1:0] init_word(int unsigned waddr);
    return (waddr * 32'h9E37_79B9) ^ 32'h5A5A_0F0F;
  endfunction

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = init_word(i);
  end

  typedef enum logic [1:0] {M_IDLE, M_SNOOP, M_READ, M_WRITE} mstate_e;
  mstate_e           st;
  bus_cmd_e          cmd;
  logic [AW-1:0]     base;
  int                cnt;
  int                lat;

  assign wready = (st == M_WRITE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= M_IDLE;
      rvalid   <= 1'b0;
      rdata    <= '0;
      cnt      <= 0;
      lat      <= 0;
      cmd      <= BUS_IDLE;
      base     <= '0;
      n_reads  <= 0;
      n_writes <= 0;
    end else begin
      rvalid <= 1'b0;
      unique case (st)
        M_IDLE: if (bus_a.valid) begin
          cmd  <= bus_a.cmd;
          base <= bus_a.paddr[2 +: AW];
          st   <= M_SNOOP;
        end
        M_SNOOP: begin
          cnt <= 0;
          lat <= FIRST_LAT;
          if (bus_abort || !cmd_has_data(cmd)) st <= M_IDLE;
          else if (cmd == BUS_WRITE_BACK)      st <= M_WRITE;
          else                                 st <= M_READ;
        end
        M_READ: begin
          if (lat > 1) lat <= lat - 1;
          else begin
            rvalid <= 1'b1;
            rdata  <= mem[base + AW'(cnt)];
            cnt    <= cnt + 1;
            if (cnt == BLOCK_WORDS - 1) begin
              st      <= M_IDLE;
              n_reads <= n_reads + 1;
            end
          end
        end
        M_WRITE: if (wvalid) begin
          mem[base + AW'(cnt)] <= wdata;
          cnt <= cnt + 1;
          if (cnt == BLOCK_WORDS - 1) begin
            st       <= M_IDLE;
            n_writes <= n_writes + 1;
          end
        end
        default: st <= M_IDLE;
      endcase
    end
  end

endmodule
