// switch_ctrl: phase sequencer of the time switch.
//
// A frame is the scan phase (phase 1, sequential write: the inlet counter
// visits the 16 inlet addresses, one per clock, in both exchanges at once, so
// the 32 subscribers are scanned in 16 cycles) followed by the read phase
// (phase 2, random read: the outlet counter visits the 16 outlet addresses,
// one per clock). Frames repeat while `en` is high; with `en` low every
// counter and memory holds, so no data is exchanged. With SERIAL set, each
// frame starts with a 32-cycle load phase in which all inlet converters shift
// in the next opcodes while the outlet converters shift out the results of
// the previous frame (`ps_load` on its first cycle).
// Outputs: write strobes and addresses for the scan and read phases, the
// control-memory clear (asserted on the cycle before a scan begins), and a
// one-cycle `frame_done` on the last read cycle. Synchronous, active-high
// reset ("functions performed on low reset and positive edge of clock").
// The two phases and the 16-cycle scan are the published design's; the load phase,
// the clear and the strobes are this design's.
module switch_ctrl
  import switch_pkg::*;
#(
  parameter int unsigned N         = N_USERS,
  parameter bit          SERIAL    = 1'b0,
  parameter int unsigned LINE_BITS = OPCODE_W,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned BW = $clog2(LINE_BITS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  output phase_e        phase,
  output logic          scan_we,
  output logic [AW-1:0] scan_addr,
  output logic          read_we,
  output logic [AW-1:0] read_addr,
  output logic          cm_clr,
  output logic          line_shift,
  output logic          ps_load,
  output logic          frame_done
);

  logic scan_last, read_last, bit_last;
  logic [BW-1:0] bit_cnt;

  // inlet side modular counter: its count is the write address (MAR)
  mod_counter #(.N(N)) u_in_cnt (
    .clk, .rst, .clr(1'b0), .inc(scan_we),
    .count(scan_addr), .last(scan_last)
  );

  // outlet side modular counter: its count addresses the control memory
  mod_counter #(.N(N)) u_out_cnt (
    .clk, .rst, .clr(1'b0), .inc(read_we),
    .count(read_addr), .last(read_last)
  );

  // bit counter of the serial load phase
  mod_counter #(.N(LINE_BITS)) u_bit_cnt (
    .clk, .rst, .clr(1'b0), .inc(line_shift),
    .count(bit_cnt), .last(bit_last)
  );

  phase_e first_phase;
  assign first_phase = SERIAL ? PH_LOAD : PH_SCAN;

  always_ff @(posedge clk) begin
    if (rst) phase <= PH_IDLE;
    else if (en) begin
      unique case (phase)
        PH_IDLE: phase <= first_phase;
        PH_LOAD: if (bit_last)  phase <= PH_SCAN;
        PH_SCAN: if (scan_last) phase <= PH_READ;
        PH_READ: if (read_last) phase <= first_phase;
      endcase
    end
  end

  always_comb begin
    scan_we    = en && (phase == PH_SCAN);
    read_we    = en && (phase == PH_READ);
    line_shift = en && (phase == PH_LOAD);
    ps_load    = line_shift && (bit_cnt == '0);
    frame_done = read_we && read_last;
    cm_clr     = (phase == PH_IDLE) || (phase == PH_LOAD) || frame_done;
  end

  // the control memory must not be cleared while it is being written
  a_clr_not_in_scan: assert property (@(posedge clk) disable iff (rst)
    scan_we |-> !cm_clr);

endmodule
