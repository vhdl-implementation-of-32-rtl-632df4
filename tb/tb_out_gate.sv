// tb_out_gate: self-checking test of the outlet register bank and its gate.
// Random words, addresses, call flags and strobes; after every clock all 16
// outlets and call flags are compared with a reference array.
module tb_out_gate;
  import switch_pkg::*;
  logic clk = 0, rst = 1;
  logic we, call;
  logic [3:0] sel;
  opcode_t word;
  opcode_t outlets [16];
  logic called [16];
  opcode_t ref_o [16];
  logic ref_c [16];
  int checks = 0, failures = 0;

  out_gate dut (.clk, .rst, .we, .sel, .word, .call, .outlets, .called);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; call = 0; sel = 0; word = '0;
    for (int o = 0; o < 16; o++) begin ref_o[o] = '0; ref_c[o] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      we = $urandom_range(0, 2) != 0;
      sel = 4'($urandom); word = opcode_t'($urandom); call = $urandom_range(0, 1);
      if (we) begin ref_o[sel] = word; ref_c[sel] = call; end
      @(negedge clk);
      for (int o = 0; o < 16; o++) begin
        checks++;
        if (outlets[o] !== ref_o[o] || called[o] !== ref_c[o]) begin
          failures++;
          $display("FAIL outlet %0d got %h/%0d exp %h/%0d", o, outlets[o], called[o], ref_o[o], ref_c[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
