// in_gate: connects one inlet at a time to the single memory data path.
//
// A 16-way selector: the inlet counter's address picks which subscriber's
// opcode reaches the memory data register. Purely combinational; the word is
// written into the memories at the end of the same clock cycle. The gate
// function is the published design's; building it as a multiplexer is this design's.
module in_gate
  import switch_pkg::*;
#(
  parameter int unsigned N = N_USERS
) (
  input  opcode_t                 inlets [N],
  input  logic [$clog2(N)-1:0]    sel,
  output opcode_t                 word
);

  assign word = inlets[sel];

endmodule
