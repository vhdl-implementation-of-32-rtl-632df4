// caller_id_memory: caller numbers of one exchange, 16 source and 16
// destination locations.
//
// Source half: during the scan phase the S field (bits 25:22) of each inlet's
// opcode is written in order at the inlet address; it is read at any address
// through NR combinational ports when the read phase looks up a caller.
// Destination half: during the read phase, when an outlet is connected to a
// caller, the caller's number is written at the outlet address with its
// valid flag set; an outlet that receives no call gets its flag cleared.
// `dst_id` and `dst_valid` show, for every outlet, who is calling it. The
// 16 + 16 organisation is the published design's; the ports are this design's.
module caller_id_memory
  import switch_pkg::*;
#(
  parameter int unsigned DEPTH = N_USERS,
  parameter int unsigned NR    = 2,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  // source half
  input  logic          src_we,
  input  logic [AW-1:0] src_waddr,
  input  user_t         src_wid,
  input  logic [AW-1:0] src_raddr [NR],
  output user_t         src_rid   [NR],
  // destination half
  input  logic          dst_we,
  input  logic [AW-1:0] dst_waddr,
  input  user_t         dst_wid,
  input  logic          dst_wvalid,
  output user_t         dst_id    [DEPTH],
  output logic          dst_valid [DEPTH]
);

  user_t src_mem [DEPTH];

  always_ff @(posedge clk) begin
    if (src_we) src_mem[src_waddr] <= src_wid;
  end

  for (genvar r = 0; r < NR; r++) begin : g_rd
    assign src_rid[r] = src_mem[src_raddr[r]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int a = 0; a < int'(DEPTH); a++) begin
        dst_id[a]    <= '0;
        dst_valid[a] <= 1'b0;
      end
    end else if (dst_we) begin
      dst_id[dst_waddr]    <= dst_wid;
      dst_valid[dst_waddr] <= dst_wvalid;
    end
  end

endmodule
