// tb_mod_counter: self-checking test of the modulo-N scan counter.
// Runs a 16-state and a 5-state counter side by side against a software
// model with random increment and clear strobes; checks count, the `last`
// flag, wrap-around and hold, and that a full 16-state scan takes 16 steps.
module tb_mod_counter;
  logic clk = 0, rst = 1;
  logic clr, inc, clr5, inc5;
  logic [3:0] count;
  logic [2:0] count5;
  logic last, last5;
  int checks = 0, failures = 0;
  int model = 0, model5 = 0;

  mod_counter #(.N(16)) dut   (.clk, .rst, .clr, .inc, .count, .last);
  mod_counter #(.N(5))  dut5  (.clk, .rst, .clr(clr5), .inc(inc5), .count(count5), .last(last5));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    clr = 0; inc = 0; clr5 = 0; inc5 = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(count == 0 && count5 == 0, "reset value");
    // one full scan: 16 increments bring it back to 0, last seen once at 15
    begin
      int lasts = 0;
      for (int i = 0; i < 16; i++) begin
        check(count == 4'(i), "scan order");
        if (last) lasts++;
        inc = 1;
        @(negedge clk);
      end
      inc = 0;
      check(lasts == 1 && count == 0, "16-step scan wraps once");
    end
    // random stimulus
    for (int i = 0; i < 500; i++) begin
      clr = ($urandom_range(0, 15) == 0);
      inc = $urandom_range(0, 1);
      clr5 = ($urandom_range(0, 15) == 0);
      inc5 = $urandom_range(0, 1);
      @(posedge clk);
      if (clr) model = 0; else if (inc) model = (model + 1) % 16;
      if (clr5) model5 = 0; else if (inc5) model5 = (model5 + 1) % 5;
      @(negedge clk);
      check(count == 4'(model) && last == (model == 15), "N=16 model");
      check(count5 == 3'(model5) && last5 == (model5 == 4), "N=5 model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
