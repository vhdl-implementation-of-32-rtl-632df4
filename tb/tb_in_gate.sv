// tb_in_gate: self-checking test of the 16-way inlet gate. Random opcodes
// on all 16 inlets, every select value, output compared with the chosen inlet.
module tb_in_gate;
  import switch_pkg::*;
  opcode_t inlets [16];
  logic [3:0] sel;
  opcode_t word;
  int checks = 0, failures = 0;

  in_gate dut (.inlets, .sel, .word);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int k = 0; k < 16; k++) inlets[k] = opcode_t'($urandom);
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s);
        #1;
        checks++;
        if (word !== inlets[s]) begin
          failures++;
          $display("FAIL sel=%0d got %h exp %h", s, word, inlets[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
