// tb_parallel_to_serial: self-checking test of the outlet line converter.
// Loads random words and checks that `sout` shows bit 31 in the load cycle
// and the following bits, one per shift, MSB first; also checks that the
// output holds while shift is low and that reset clears the register.
module tb_parallel_to_serial;
  logic clk = 0, rst = 1;
  logic load, shift, sout;
  logic [31:0] word;
  int checks = 0, failures = 0;

  parallel_to_serial dut (.clk, .rst, .load, .shift, .word, .sout);

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

  initial begin
    load = 0; shift = 0; word = '0;
    @(negedge clk);
    @(negedge clk);
    rst = 0;
    check(sout == 0, "reset clears");
    for (int w = 0; w < 50; w++) begin
      logic [31:0] v;
      v = $urandom;
      word = v; load = 1;
      #1 check(sout == v[31], "bit 31 in load cycle");
      @(negedge clk);
      load = 0; word = ~v;
      // after the load edge the register presents bit 30; each shift moves on
      for (int b = 30; b >= 0; b--) begin
        shift = 0;
        #1 check(sout == v[b], $sformatf("bit %0d", b));
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          check(sout == v[b], "hold without shift");
        end
        shift = 1;
        @(negedge clk);
      end
      check(sout == 1'b0, "register empty after 31 shifts");
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
