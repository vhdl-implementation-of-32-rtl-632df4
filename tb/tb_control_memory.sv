// tb_control_memory: self-checking test of the outlet connection map.
// Two claim ports driven at random (addresses, inlet numbers, strobes, with
// occasional clears) against a reference model of the rules: an entry keeps
// its first claim of a frame, the LOCAL port wins a same-cycle tie, `clr`
// empties the map. Every entry is read back through the read port each cycle.
module tb_control_memory;
  import switch_pkg::*;
  logic clk = 0, rst = 1, clr;
  logic we [2];
  logic [3:0] waddr [2];
  inlet_t wdata [2];
  logic [3:0] raddr;
  cm_entry_t rdata;
  cm_entry_t model [16], nxt [16];
  int checks = 0, failures = 0, ties = 0;

  control_memory #(.LOCAL(1)) dut (.clk, .rst, .clr, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int a = 0; a < 16; a++) begin
      raddr = 4'(a);
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL entry %0d got %h exp %h", a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    clr = 0; raddr = 0;
    for (int p = 0; p < 2; p++) begin we[p] = 0; waddr[p] = 0; wdata[p] = '0; end
    for (int a = 0; a < 16; a++) model[a] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    compare_all();
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      clr = ($urandom_range(0, 40) == 0);
      for (int p = 0; p < 2; p++) begin
        we[p]    = $urandom_range(0, 3) == 0;
        waddr[p] = 4'($urandom);
        wdata[p] = inlet_t'($urandom);
      end
      if ($urandom_range(0, 5) == 0) waddr[1] = waddr[0];
      // reference model, evaluated on the state before the edge
      nxt = model;
      if (clr) begin
        for (int a = 0; a < 16; a++) nxt[a] = '0;
      end else begin
        if (we[0] && !model[waddr[0]].valid) nxt[waddr[0]] = '{1'b1, wdata[0]};
        if (we[1] && !model[waddr[1]].valid) nxt[waddr[1]] = '{1'b1, wdata[1]};
        if (we[0] && we[1] && waddr[0] == waddr[1] && !model[waddr[0]].valid) ties++;
      end
      @(posedge clk);
      model = nxt;
      @(negedge clk);
      for (int p = 0; p < 2; p++) we[p] = 0;
      clr = 0;
      compare_all();
    end
    checks++;
    if (ties == 0) begin failures++; $display("FAIL no tie exercised"); end
    $display("ties exercised: %0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
