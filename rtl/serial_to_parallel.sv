// serial_to_parallel: inlet line converter, one per subscriber line.
//
// Shifts the line bit `sin` into a 32-bit register on every clock with
// `shift` high, most significant bit first, so that after 32 shifts `word`
// holds the opcode the subscriber sent. The register holds while `shift` is
// low. No reset: the switch reads `word` only after a complete 32-bit load.
// The conversion is the published design's; the bit order is this design's.
module serial_to_parallel #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         shift,
  input  logic         sin,
  output logic [W-1:0] word
);

  always_ff @(posedge clk) begin
    if (shift) word <= {word[W-2:0], sin};
  end

endmodule
