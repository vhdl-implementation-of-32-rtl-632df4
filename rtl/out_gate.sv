// out_gate: the data-out register bank and the gate that fills it.
//
// Holds one 32-bit opcode per outlet of an exchange. During the read phase
// the word assembled from the random read is presented with the outlet
// address; the gate decodes the address and loads only that outlet's
// register, together with a flag telling whether the word carries a call.
// The registers hold their value between frames and drive the outlets (in
// parallel, or through the parallel-to-serial converters). Synchronous,
// active-high reset clears them. The published design gives the gate's function;
// the register bank and the call flag are this design's.
module out_gate
  import switch_pkg::*;
#(
  parameter int unsigned N = N_USERS,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [AW-1:0] sel,
  input  opcode_t       word,
  input  logic          call,
  output opcode_t       outlets [N],
  output logic          called  [N]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int o = 0; o < int'(N); o++) begin
        outlets[o] <= '0;
        called[o]  <= 1'b0;
      end
    end else if (we) begin
      outlets[sel] <= word;
      called[sel]  <= call;
    end
  end

endmodule
