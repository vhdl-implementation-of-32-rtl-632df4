// data_memory: the sample store of one exchange, 16 words of 17 bits.
//
// Each word holds a subscriber's enable flag and its 16 data bits. During the
// scan phase the inlets are written in order, one per clock, at the address
// of the inlet counter (sequential write). During the read phase words are
// read at any address (random read). One synchronous write port and NR
// combinational read ports: one serves the exchange's own outlet scan, the
// others the control-memory-directed reads of both exchanges. The size and
// word width follow the published design; the port count is this design's choice.
module data_memory
  import switch_pkg::*;
#(
  parameter int unsigned DEPTH = N_USERS,
  parameter int unsigned NR    = 3,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            we,
  input  logic [AW-1:0]   waddr,
  input  dm_word_t        wdata,
  input  logic [AW-1:0]   raddr [NR],
  output dm_word_t        rdata [NR]
);

  dm_word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  for (genvar r = 0; r < NR; r++) begin : g_rd
    assign rdata[r] = mem[raddr[r]];
  end

endmodule
