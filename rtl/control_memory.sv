// control_memory: the connection map of one exchange's outlets.
//
// One entry per outlet of this exchange. An entry holds the global number of
// the inlet (exchange and subscriber) whose sample the outlet is to receive,
// and a valid flag. It is written during the scan phase from the opcodes of
// enabled callers: the caller's D field is the entry address, its own inlet
// number the entry value. Both exchanges scan at once, so there is one write
// port per exchange (port e carries callers of exchange e). An outlet keeps
// the first caller that claims it in a frame; if two claim it in the same
// cycle, the caller of this exchange (port LOCAL) wins. `clr` empties the
// map at the start of each frame. The read port is combinational and is
// addressed by the outlet counter during the read phase.
// The published design gives the function (16 locations holding, for each outlet,
// the inlet address); the claim rules and the clear are this design's.
module control_memory
  import switch_pkg::*;
#(
  parameter int unsigned DEPTH = N_USERS,
  parameter int unsigned NW    = N_EXCH,
  parameter int unsigned LOCAL = 0,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       clr,
  input  logic       we    [NW],
  input  logic [AW-1:0] waddr [NW],
  input  inlet_t     wdata [NW],
  input  logic [AW-1:0] raddr,
  output cm_entry_t  rdata
);

  cm_entry_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      for (int a = 0; a < int'(DEPTH); a++) mem[a] <= '0;
    end else begin
      // Lower priority ports first so that LOCAL, written last, wins a tie.
      for (int p = 0; p < int'(NW); p++) begin
        if (p != int'(LOCAL) && we[p] && !mem[waddr[p]].valid)
          mem[waddr[p]] <= '{valid: 1'b1, inlet: wdata[p]};
      end
      if (we[LOCAL] && !mem[waddr[LOCAL]].valid)
        mem[waddr[LOCAL]] <= '{valid: 1'b1, inlet: wdata[LOCAL]};
    end
  end

  assign rdata = mem[raddr];

endmodule
