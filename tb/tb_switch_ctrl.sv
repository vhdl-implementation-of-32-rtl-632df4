// tb_switch_ctrl: self-checking test of the phase sequencer.
// A parallel-line and a serial-line sequencer run from the same random
// enable. A cycle-by-cycle reference model predicts phase, strobes and
// addresses. Also checked: a full scan visits the 16 inlet addresses in
// order in 16 enabled clocks, and frames are 32 enabled clocks long
// (parallel) or 64 (serial, 32 of them the line load).
module tb_switch_ctrl;
  import switch_pkg::*;
  logic clk = 0, rst = 1, en;
  int checks = 0, failures = 0;

  phase_e ph [2];
  logic scan_we [2], read_we [2], cm_clr [2], line_shift [2], ps_load [2], frame_done [2];
  logic [3:0] scan_addr [2], read_addr [2];

  switch_ctrl #(.SERIAL(1'b0)) dut_p (.clk, .rst, .en, .phase(ph[0]),
    .scan_we(scan_we[0]), .scan_addr(scan_addr[0]), .read_we(read_we[0]), .read_addr(read_addr[0]),
    .cm_clr(cm_clr[0]), .line_shift(line_shift[0]), .ps_load(ps_load[0]), .frame_done(frame_done[0]));
  switch_ctrl #(.SERIAL(1'b1)) dut_s (.clk, .rst, .en, .phase(ph[1]),
    .scan_we(scan_we[1]), .scan_addr(scan_addr[1]), .read_we(read_we[1]), .read_addr(read_addr[1]),
    .cm_clr(cm_clr[1]), .line_shift(line_shift[1]), .ps_load(ps_load[1]), .frame_done(frame_done[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference state per instance: phase and position within it
  phase_e m_ph [2];
  int m_pos [2];
  int en_cycles [2], frames [2];
  int last_scan_len;

  initial begin
    en = 0;
    for (int d = 0; d < 2; d++) begin m_ph[d] = PH_IDLE; m_pos[d] = 0; en_cycles[d] = 0; frames[d] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      en = (i < 200) ? 1'b1 : ($urandom_range(0, 4) != 0);
      #1;
      for (int d = 0; d < 2; d++) begin
        int len;
        bit s_we, r_we, ls, pl, fd, cc;
        s_we = en && m_ph[d] == PH_SCAN;
        r_we = en && m_ph[d] == PH_READ;
        ls   = en && m_ph[d] == PH_LOAD;
        pl   = ls && m_pos[d] == 0;
        fd   = r_we && m_pos[d] == 15;
        cc   = m_ph[d] == PH_IDLE || m_ph[d] == PH_LOAD || fd;
        check(ph[d] == m_ph[d], $sformatf("inst %0d phase %s exp %s", d, ph[d].name(), m_ph[d].name()));
        check(scan_we[d] == s_we && read_we[d] == r_we && line_shift[d] == ls &&
              ps_load[d] == pl && frame_done[d] == fd && cm_clr[d] == cc,
              $sformatf("inst %0d strobes", d));
        if (s_we) check(scan_addr[d] == 4'(m_pos[d]), "scan address order");
        if (r_we) check(read_addr[d] == 4'(m_pos[d]), "read address order");
        if (m_ph[d] != PH_IDLE && en) en_cycles[d]++;
        if (fd) begin
          // frame length in enabled clocks
          if (frames[d] > 0 || d == 0 || d == 1) begin
            check(en_cycles[d] == (d == 0 ? 32 : 64), $sformatf("inst %0d frame length %0d", d, en_cycles[d]));
          end
          en_cycles[d] = 0;
          frames[d]++;
        end
        // advance the model
        if (en) begin
          len = (m_ph[d] == PH_LOAD) ? 32 : 16;
          if (m_ph[d] == PH_IDLE) begin
            m_ph[d] = d ? PH_LOAD : PH_SCAN; m_pos[d] = 0;
          end else if (m_pos[d] == len - 1) begin
            m_pos[d] = 0;
            unique case (m_ph[d])
              PH_LOAD: m_ph[d] = PH_SCAN;
              PH_SCAN: m_ph[d] = PH_READ;
              default: m_ph[d] = d ? PH_LOAD : PH_SCAN;
            endcase
          end else m_pos[d]++;
        end
      end
      @(negedge clk);
    end
    check(frames[0] > 10 && frames[1] > 5, "frames completed");
    $display("frames: parallel %0d serial %0d", frames[0], frames[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
