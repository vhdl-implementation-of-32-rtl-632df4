// switching_system: two 16-subscriber exchanges joined by a time switch with
// caller ID, driven by 32-bit opcodes.
//
// Every subscriber presents an opcode (see switch_pkg): enable E, inter-
// exchange flag I, destination D, own number S and 16 data bits. A frame has
// two phases, run in both exchanges at once:
//  * Scan (phase 1, sequential write, 16 clocks). The inlet counter addresses
//    inlet k of each exchange. The in gate puts its opcode on the memory data
//    register (MDR), and at the counter address (MAR) the data memory stores
//    {E, data}, the caller ID memory stores S, and, if E is set, the control
//    memory of the called exchange (the other one when I = 1, the same one
//    when I = 0) records at outlet D that it is connected to inlet k.
//  * Read (phase 2, random read, 16 clocks). The outlet counter addresses
//    outlet j of each exchange. Its control-memory entry names the calling
//    inlet; that inlet's data word and caller number are read from the
//    memories of whichever exchange it belongs to. The call goes through only
//    if the called subscriber is itself disabled (E = 0). The out gate then
//    loads outlet j with {E=0, I, D=j, S=caller, 0, caller data}: the data and
//    the caller ID bits (25:22) of the called subscriber are overwritten.
//    An outlet with no call gets {own E, I=0, D=j, own S, 0, own data}.
// `frame_done` pulses on the last read clock; outlets then all hold the
// result of the frame. With `en` low the switch holds and nothing is
// exchanged. Reset is synchronous and active high.
// SERIAL = 0 (default) gives each subscriber a parallel 32-bit line, as the
// published top level does. SERIAL = 1 uses the one-bit lines `ser_in` /
// `ser_out` instead: each frame then begins with 32 clocks in which every
// inlet converter shifts in its next opcode (MSB first, a bit per clock with
// `line_shift` high) while every outlet converter shifts out the previous
// frame's result.
// Following the published design: two exchanges of 16 users, opcode layout, the
// 17-bit x 16 data memory, a 16-entry control memory, 16 + 16 caller ID
// locations, 16-clock sequential scan, I-bit routing, the enable rules, and
// the in gate / S/P / data memory / P/S / out gate / modular counter / MAR /
// MDR structure. This design's own choices: control memory indexed by
// outlet (first caller of a frame wins, the called exchange's own caller on
// a tie), the contents of an outlet that receives no call, and the serial
// framing.
module switching_system
  import switch_pkg::*;
#(
  parameter int unsigned N      = N_USERS,
  parameter bit          SERIAL = 1'b0,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    en,
  // parallel subscriber lines; index 0 is exchange 1, index 1 exchange 2
  input  opcode_t line_in  [N_EXCH][N],
  output opcode_t line_out [N_EXCH][N],
  // serial subscriber lines (SERIAL = 1)
  input  logic    ser_in   [N_EXCH][N],
  output logic    ser_out  [N_EXCH][N],
  output logic    line_shift,
  // status
  output phase_e  phase,
  output logic    frame_done,
  output logic    called          [N_EXCH][N],
  output user_t   caller_id       [N_EXCH][N],
  output logic    caller_id_valid [N_EXCH][N]
);

  localparam int unsigned NRD = 1 + N_EXCH;  // own outlet + one per exchange

  logic          scan_we, read_we, cm_clr, ps_load;
  logic [AW-1:0] scan_addr, read_addr;

  switch_ctrl #(.N(N), .SERIAL(SERIAL)) u_ctrl (
    .clk, .rst, .en, .phase,
    .scan_we, .scan_addr, .read_we, .read_addr,
    .cm_clr, .line_shift, .ps_load, .frame_done
  );

  opcode_t   inlets  [N_EXCH][N];
  opcode_t   mdr     [N_EXCH];          // gated inlet word
  logic [AW-1:0] dm_raddr [N_EXCH][NRD];
  dm_word_t  dm_rdata [N_EXCH][NRD];
  logic [AW-1:0] cid_raddr [N_EXCH][NRD];
  user_t     cid_rid  [N_EXCH][NRD];
  cm_entry_t cm_rd    [N_EXCH];
  logic      cm_we    [N_EXCH][N_EXCH]; // [called exchange][calling exchange]
  logic [AW-1:0] cm_waddr [N_EXCH];
  inlet_t    cm_wdata [N_EXCH];
  opcode_t   outlets  [N_EXCH][N];

  for (genvar x = 0; x < N_EXCH; x++) begin : g_exch

    // ---------------- inlet side ----------------
    for (genvar k = 0; k < N; k++) begin : g_inlet
      logic [OPCODE_W-1:0] sp_word;
      serial_to_parallel #(.W(OPCODE_W)) u_sp (
        .clk, .shift(line_shift), .sin(ser_in[x][k]), .word(sp_word)
      );
      assign inlets[x][k] = SERIAL ? opcode_t'(sp_word) : line_in[x][k];
    end

    in_gate #(.N(N)) u_in_gate (
      .inlets(inlets[x]), .sel(scan_addr), .word(mdr[x])
    );

    // scan writes: MAR is the inlet counter, MDR the gated word
    data_memory #(.DEPTH(N), .NR(NRD)) u_dm (
      .clk, .we(scan_we), .waddr(scan_addr),
      .wdata('{en: mdr[x].en, data: mdr[x].data}),
      .raddr(dm_raddr[x]), .rdata(dm_rdata[x])
    );

    // an enabled caller claims outlet D of the exchange selected by I
    for (genvar t = 0; t < N_EXCH; t++) begin : g_claim
      localparam logic SAME = (t == x);
      assign cm_we[t][x] = scan_we && mdr[x].en && (mdr[x].inter != SAME);
    end
    assign cm_waddr[x] = mdr[x].dst[AW-1:0];
    assign cm_wdata[x] = '{exch: 1'(x), user: user_t'(scan_addr)};

    control_memory #(.DEPTH(N), .NW(N_EXCH), .LOCAL(x)) u_cm (
      .clk, .rst, .clr(cm_clr),
      .we(cm_we[x]), .waddr(cm_waddr), .wdata(cm_wdata),
      .raddr(read_addr), .rdata(cm_rd[x])
    );

    // ---------------- read side ----------------
    // port 0: own outlet; port 1+y: random read for exchange y's outlet
    assign dm_raddr[x][0]  = read_addr;
    assign cid_raddr[x][0] = read_addr;
    for (genvar y = 0; y < N_EXCH; y++) begin : g_rport
      assign dm_raddr[x][1+y]  = cm_rd[y].inlet.user[AW-1:0];
      assign cid_raddr[x][1+y] = cm_rd[y].inlet.user[AW-1:0];
    end

    dm_word_t own, caller;
    user_t    own_id, caller_num;
    logic     call;
    opcode_t  out_word;

    assign own        = dm_rdata[x][0];
    assign own_id     = cid_rid[x][0];
    assign caller     = dm_rdata[cm_rd[x].inlet.exch][1+x];
    assign caller_num = cid_rid[cm_rd[x].inlet.exch][1+x];
    assign call       = cm_rd[x].valid && !own.en;

    always_comb begin
      out_word      = '0;
      out_word.dst  = user_t'(read_addr);
      if (call) begin
        out_word.en    = 1'b0;
        out_word.inter = (cm_rd[x].inlet.exch != 1'(x));
        out_word.src   = caller_num;
        out_word.data  = caller.data;
      end else begin
        out_word.en    = own.en;
        out_word.src   = own_id;
        out_word.data  = own.data;
      end
    end

    caller_id_memory #(.DEPTH(N), .NR(NRD)) u_cid (
      .clk, .rst,
      .src_we(scan_we), .src_waddr(scan_addr), .src_wid(mdr[x].src),
      .src_raddr(cid_raddr[x]), .src_rid(cid_rid[x]),
      .dst_we(read_we), .dst_waddr(read_addr), .dst_wid(caller_num),
      .dst_wvalid(call),
      .dst_id(caller_id[x]), .dst_valid(caller_id_valid[x])
    );

    out_gate #(.N(N)) u_out_gate (
      .clk, .rst, .we(read_we), .sel(read_addr), .word(out_word), .call,
      .outlets(outlets[x]), .called(called[x])
    );

    for (genvar o = 0; o < N; o++) begin : g_outlet
      assign line_out[x][o] = outlets[x][o];
      parallel_to_serial #(.W(OPCODE_W)) u_ps (
        .clk, .rst, .load(ps_load), .shift(line_shift && !ps_load),
        .word(outlets[x][o]), .sout(ser_out[x][o])
      );
    end
  end

endmodule
