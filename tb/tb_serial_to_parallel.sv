// tb_serial_to_parallel: self-checking test of the inlet line converter.
// Sends random 32-bit words MSB first, with random idle cycles (shift low)
// in between bits, and checks the assembled word after each 32nd bit.
module tb_serial_to_parallel;
  logic clk = 0;
  logic shift, sin;
  logic [31:0] word;
  int checks = 0, failures = 0;

  serial_to_parallel dut (.clk, .shift, .sin, .word);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift = 0; sin = 0;
    for (int w = 0; w < 50; w++) begin
      logic [31:0] v;
      v = $urandom;
      for (int b = 31; b >= 0; b--) begin
        @(negedge clk);
        shift = 1; sin = v[b];
        @(negedge clk);
        shift = 0; sin = ~v[b];
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
      @(negedge clk);
      checks++;
      if (word !== v) begin
        failures++;
        $display("FAIL got %h exp %h", word, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
