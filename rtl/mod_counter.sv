// mod_counter: modulo-N scan counter, the "modular counter" that steps the
// inlet and outlet addresses of the switch.
//
// The count register doubles as the memory address register of the side it
// scans. `clr` loads zero, `inc` advances by one and wraps from N-1 to 0;
// `last` is high while the count equals N-1, so `inc && last` marks the cycle
// on which a full scan completes. Synchronous, active-high reset; `clr` wins
// over `inc`. The published design names the block; its insides are this design's.
module mod_counter #(
  parameter int unsigned N = 16,
  parameter int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic         inc,
  output logic [W-1:0] count,
  output logic         last
);

  localparam logic [W-1:0] MAX = W'(N - 1);

  always_ff @(posedge clk) begin
    if (rst || clr)     count <= '0;
    else if (inc)       count <= (count == MAX) ? '0 : count + 1'b1;
  end

  assign last = (count == MAX);

endmodule
