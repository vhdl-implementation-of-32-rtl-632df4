// tb_switching_system: end-to-end test of the dual-exchange switch.
// Two switches run side by side: one with parallel subscriber lines (all
// defaults) and one with serial lines (SERIAL = 1). Each frame the test
// builds the 32 subscriber opcodes, runs the switch to `frame_done` and
// compares every outlet word, call flag and caller ID with the reference
// model in switch_model_pkg. Frames cover the two published calls (an inter-
// exchange and an intra-exchange call carrying 16'hAD01), then random
// traffic with random enable gaps, then a reset in the middle of a scan.
// Serial lines: opcodes are shifted in MSB first during the load phase; the
// previous frame's result is collected from the outlet lines at the same
// time and checked too. Counted mechanisms, each of which must occur:
// inter-exchange call, intra-exchange call, disabled caller, busy (enabled)
// called subscriber, two callers for one outlet, enable low (hold), reset
// during operation, serial load. Timing: 32 enabled clocks per parallel
// frame (16 of them the scan), 64 per serial frame.
module tb_switching_system;
  import switch_pkg::*;
  import switch_model_pkg::*;

  localparam int N = N_USERS;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_inter = 0, n_intra = 0, n_off = 0, n_busy = 0, n_contend = 0, n_hold = 0, n_reset = 0, n_serial = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- DUTs
  logic    rst_p, en_p, rst_s, en_s;
  opcode_t in_p [N_EXCH][N], out_p [N_EXCH][N], in_s [N_EXCH][N], out_s [N_EXCH][N];
  logic    sin_p [N_EXCH][N], sout_p [N_EXCH][N], sin_s [N_EXCH][N], sout_s [N_EXCH][N];
  logic    shift_p, shift_s, done_p, done_s;
  phase_e  ph_p, ph_s;
  logic    called_p [N_EXCH][N], called_s [N_EXCH][N];
  user_t   cid_p [N_EXCH][N], cid_s [N_EXCH][N];
  logic    cidv_p [N_EXCH][N], cidv_s [N_EXCH][N];

  switching_system dut_p (
    .clk, .rst(rst_p), .en(en_p), .line_in(in_p), .line_out(out_p),
    .ser_in(sin_p), .ser_out(sout_p), .line_shift(shift_p),
    .phase(ph_p), .frame_done(done_p), .called(called_p),
    .caller_id(cid_p), .caller_id_valid(cidv_p)
  );

  switching_system #(.SERIAL(1'b1)) dut_s (
    .clk, .rst(rst_s), .en(en_s), .line_in(in_s), .line_out(out_s),
    .ser_in(sin_s), .ser_out(sout_s), .line_shift(shift_s),
    .phase(ph_s), .frame_done(done_s), .called(called_s),
    .caller_id(cid_s), .caller_id_valid(cidv_s)
  );

  // ---------------------------------------------------------------- helpers
  function automatic void tally(input frame_result_t r);
    n_inter += r.inter_calls; n_intra += r.intra_calls; n_off += r.caller_off;
    n_busy += r.called_busy; n_contend += r.contended;
  endfunction

  task automatic compare(input string tag, input frame_result_t r,
                         input opcode_t o [N_EXCH][N], input logic c [N_EXCH][N],
                         input user_t id [N_EXCH][N], input logic idv [N_EXCH][N]);
    for (int y = 0; y < N_EXCH; y++)
      for (int j = 0; j < N; j++) begin
        check(o[y][j] == r.out[y][j],
              $sformatf("%s outlet %0d.%0d got %h exp %h", tag, y, j, o[y][j], r.out[y][j]));
        check(c[y][j] == r.called[y][j] && idv[y][j] == r.called[y][j],
              $sformatf("%s call flag %0d.%0d", tag, y, j));
        if (r.called[y][j]) check(id[y][j] == r.cid[y][j], $sformatf("%s caller id %0d.%0d", tag, y, j));
      end
  endtask

  function automatic opcode_t rand_op();
    opcode_t w = opcode_t'($urandom);
    w.zero = '0;
    w.en = ($urandom_range(0, 9) < 6);  // callers more often than called
    return w;
  endfunction

  // ---------------------------------------------------------------- parallel
  bit par_done = 0;
  initial begin : par
    frame_result_t r;
    rst_p = 1; en_p = 0;
    for (int x = 0; x < N_EXCH; x++) for (int k = 0; k < N; k++) begin in_p[x][k] = '0; sin_p[x][k] = 0; end
    repeat (3) @(negedge clk);
    rst_p = 0;
    for (int f = 0; f < 60; f++) begin
      int en_cnt, scan_cnt;
      en_cnt = 0; scan_cnt = 0;
      // stimulus
      for (int x = 0; x < N_EXCH; x++) for (int k = 0; k < N; k++) in_p[x][k] = '0;
      if (f == 0) begin
        // exchange 1, subscriber 5 calls subscriber 6 of exchange 2
        in_p[0][5] = make_op(1, 1, 5, 6, 16'hAD01);
      end else if (f == 1) begin
        // exchange 1, subscriber 6 calls subscriber 5 of exchange 1
        in_p[0][6] = make_op(1, 0, 6, 5, 16'hAD01);
      end else begin
        for (int x = 0; x < N_EXCH; x++) for (int k = 0; k < N; k++) in_p[x][k] = rand_op();
      end
      r = run_frame(in_p);
      tally(r);
      // run one frame
      en_p = 1;
      forever begin
        bit final_clk;
        if (f >= 2) en_p = ($urandom_range(0, 5) != 0);
        #1;
        if (!en_p) n_hold++;
        if (en_p && ph_p != PH_IDLE) en_cnt++;
        if (dut_p.scan_we) scan_cnt++;
        final_clk = done_p;
        @(negedge clk);
        if (final_clk) break;
      end
      check(en_cnt == 2 * N, $sformatf("frame %0d length %0d enabled clocks", f, en_cnt));
      check(scan_cnt == N, $sformatf("frame %0d scan of %0d clocks", f, scan_cnt));
      compare($sformatf("par frame %0d", f), r, out_p, called_p, cid_p, cidv_p);
      if (f == 0) check(out_p[1][6].data == 16'hAD01 && out_p[1][6].src == 4'd5 && out_p[1][6].inter,
                        "published inter-exchange call reaches exchange 2 outlet 6");
      if (f == 1) check(out_p[0][5].data == 16'hAD01 && out_p[0][5].src == 4'd6 && !out_p[0][5].inter,
                        "published intra-exchange call reaches exchange 1 outlet 5");
    end
    // reset in the middle of a scan
    en_p = 1;
    for (int x = 0; x < N_EXCH; x++) for (int k = 0; k < N; k++) in_p[x][k] = rand_op();
    repeat (5) @(negedge clk);
    check(ph_p == PH_SCAN, "in scan before reset");
    rst_p = 1;
    @(negedge clk);
    rst_p = 0;
    n_reset++;
    check(ph_p == PH_IDLE, "reset returns to idle");
    for (int y = 0; y < N_EXCH; y++) for (int j = 0; j < N; j++)
      check(out_p[y][j] == '0 && !called_p[y][j], "reset clears outlets");
    // one clean frame after the reset
    r = run_frame(in_p);
    tally(r);
    while (!done_p) @(negedge clk);
    @(negedge clk);
    compare("par after reset", r, out_p, called_p, cid_p, cidv_p);
    par_done = 1;
  end

  // ---------------------------------------------------------------- serial
  bit ser_done = 0;
  initial begin : ser
    frame_result_t r, prev;
    bit have_prev = 0;
    rst_s = 1; en_s = 0;
    for (int x = 0; x < N_EXCH; x++) for (int k = 0; k < N; k++) begin in_s[x][k] = '0; sin_s[x][k] = 0; end
    repeat (3) @(negedge clk);
    rst_s = 0;
    en_s = 1;
    for (int f = 0; f < 12; f++) begin
      opcode_t words [N_EXCH][N];
      logic [31:0] rx [N_EXCH][N];
      int bits, en_cnt;
      bits = 0; en_cnt = 0;
      for (int x = 0; x < N_EXCH; x++) for (int k = 0; k < N; k++) begin
        words[x][k] = (f == 0 && x == 1 && k == 3) ? make_op(1, 1, 3, 9, 16'hAD01) : rand_op();
        rx[x][k] = '0;
      end
      r = run_frame(words);
      tally(r);
      en_s = 1;
      while (ph_s == PH_IDLE) @(negedge clk);
      forever begin
        bit final_clk;
        en_s = ($urandom_range(0, 5) != 0);
        if (!en_s) n_hold++;
        #1;
        if (en_s) en_cnt++;
        if (shift_s) begin
          for (int x = 0; x < N_EXCH; x++) for (int k = 0; k < N; k++)
            sin_s[x][k] = words[x][k][31 - bits];
          #1;
          for (int x = 0; x < N_EXCH; x++) for (int k = 0; k < N; k++)
            rx[x][k] = {rx[x][k][30:0], sout_s[x][k]};
          bits++;
        end
        final_clk = done_s;
        @(negedge clk);
        if (final_clk) break;
      end
      n_serial++;
      check(bits == 32, $sformatf("serial frame %0d bits %0d", f, bits));
      check(en_cnt == 64, $sformatf("serial frame %0d length %0d", f, en_cnt));
      compare($sformatf("ser frame %0d", f), r, out_s, called_s, cid_s, cidv_s);
      if (have_prev)
        for (int y = 0; y < N_EXCH; y++) for (int j = 0; j < N; j++)
          check(rx[y][j] == 32'(prev.out[y][j]), $sformatf("serial outlet %0d.%0d of frame %0d", y, j, f - 1));
      prev = r;
      have_prev = 1;
    end
    ser_done = 1;
  end

  // ---------------------------------------------------------------- summary
  initial begin
    wait (par_done && ser_done);
    $display("inter=%0d intra=%0d caller_off=%0d called_busy=%0d contended=%0d hold=%0d reset=%0d serial_frames=%0d",
             n_inter, n_intra, n_off, n_busy, n_contend, n_hold, n_reset, n_serial);
    check(n_inter > 0,   "inter-exchange call happened");
    check(n_intra > 0,   "intra-exchange call happened");
    check(n_off > 0,     "disabled caller happened");
    check(n_busy > 0,    "busy called subscriber happened");
    check(n_contend > 0, "contention for one outlet happened");
    check(n_hold > 0,    "enable-low hold happened");
    check(n_reset > 0,   "reset during operation happened");
    check(n_serial > 0,  "serial frame happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
