// parallel_to_serial: outlet line converter, one per subscriber line.
//
// `load` takes a 32-bit word and puts its most significant bit on `sout` in
// the same cycle; each following cycle with `shift` high moves the next bit
// onto `sout`, so a word leaves in 32 cycles (the load cycle and 31 shifts),
// MSB first, the order the inlet converter expects. `load` wins over `shift`.
// Synchronous, active-high reset clears the register. The conversion is from the
// published design; the timing and bit order are this design's.
module parallel_to_serial #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] word,
  output logic         sout
);

  logic [W-1:0] sr;

  always_ff @(posedge clk) begin
    if (rst)        sr <= '0;
    else if (load)  sr <= {word[W-2:0], 1'b0};
    else if (shift) sr <= {sr[W-2:0], 1'b0};
  end

  assign sout = load ? word[W-1] : sr[W-1];

endmodule
