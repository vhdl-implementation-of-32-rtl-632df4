// tb_switching_system_full: the switch at its default size (2 exchanges x
// 16 subscribers, parallel lines) taken through complete frames: the
// published inter-exchange call (exchange 1 subscriber 5 to exchange 2
// subscriber 6, data 16'hAD01), the published intra-exchange call (exchange
// 1 subscriber 6 to subscriber 5), and a frame in which all 32 subscribers
// present random opcodes. Outlets, call flags and caller IDs are compared
// with the reference model; each frame must take 32 clocks, 16 of them scan.
module tb_switching_system_full;
  import switch_pkg::*;
  import switch_model_pkg::*;

  localparam int N = N_USERS;

  logic clk = 0, rst = 1, en = 0;
  always #5 clk = ~clk;

  opcode_t line_in [N_EXCH][N], line_out [N_EXCH][N];
  logic    ser_in [N_EXCH][N], ser_out [N_EXCH][N];
  logic    line_shift, frame_done;
  phase_e  phase;
  logic    called [N_EXCH][N], cidv [N_EXCH][N];
  user_t   cid [N_EXCH][N];

  switching_system dut (
    .clk, .rst, .en, .line_in, .line_out, .ser_in, .ser_out, .line_shift,
    .phase, .frame_done, .called, .caller_id(cid), .caller_id_valid(cidv)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_result_t r;
    for (int x = 0; x < N_EXCH; x++) for (int k = 0; k < N; k++) begin line_in[x][k] = '0; ser_in[x][k] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    en = 1;
    @(negedge clk);                      // leave idle
    for (int f = 0; f < 3; f++) begin
      int clocks, scans;
      clocks = 0; scans = 0;
      for (int x = 0; x < N_EXCH; x++) for (int k = 0; k < N; k++) line_in[x][k] = '0;
      if (f == 0) line_in[0][5] = make_op(1, 1, 5, 6, 16'hAD01);
      else if (f == 1) line_in[0][6] = make_op(1, 0, 6, 5, 16'hAD01);
      else for (int x = 0; x < N_EXCH; x++) for (int k = 0; k < N; k++) begin
        line_in[x][k] = opcode_t'($urandom);
        line_in[x][k].zero = '0;
      end
      r = run_frame(line_in);
      forever begin
        bit last;
        #1;
        clocks++;
        if (phase == PH_SCAN) scans++;
        last = frame_done;
        @(negedge clk);
        if (last) break;
      end
      check(clocks == 32 && scans == 16, $sformatf("frame %0d took %0d clocks, %0d scanning", f, clocks, scans));
      for (int y = 0; y < N_EXCH; y++) for (int j = 0; j < N; j++) begin
        check(line_out[y][j] == r.out[y][j], $sformatf("frame %0d outlet %0d.%0d", f, y, j));
        check(called[y][j] == r.called[y][j], $sformatf("frame %0d flag %0d.%0d", f, y, j));
        if (r.called[y][j]) check(cid[y][j] == r.cid[y][j], $sformatf("frame %0d cid %0d.%0d", f, y, j));
      end
      if (f == 0) check(line_out[1][6].data == 16'hAD01 && cid[1][6] == 4'd5, "inter-exchange call delivered");
      if (f == 1) check(line_out[0][5].data == 16'hAD01 && cid[0][5] == 4'd6, "intra-exchange call delivered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
