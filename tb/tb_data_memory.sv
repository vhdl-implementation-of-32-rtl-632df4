// tb_data_memory: self-checking test of the 16 x 17-bit data memory.
// Fills it sequentially as the scan does, then reads random addresses on all
// three read ports against a reference array; also checks that a cycle with
// the write strobe low changes nothing.
module tb_data_memory;
  import switch_pkg::*;
  logic clk = 0;
  logic we;
  logic [3:0] waddr;
  dm_word_t wdata;
  logic [3:0] raddr [3];
  dm_word_t rdata [3];
  dm_word_t ref_mem [16];
  int checks = 0, failures = 0;

  data_memory dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = '0;
    for (int r = 0; r < 3; r++) raddr[r] = 0;
    for (int pass = 0; pass < 4; pass++) begin
      // sequential write of all 16 locations
      for (int a = 0; a < 16; a++) begin
        @(negedge clk);
        we = 1; waddr = 4'(a); wdata = dm_word_t'($urandom);
        ref_mem[a] = wdata;
      end
      @(negedge clk);
      we = 0;
      // a cycle with a different value but no strobe
      waddr = 4'($urandom); wdata = ~ref_mem[waddr];
      @(negedge clk);
      // random reads
      for (int i = 0; i < 40; i++) begin
        for (int r = 0; r < 3; r++) raddr[r] = 4'($urandom);
        #1;
        for (int r = 0; r < 3; r++) begin
          checks++;
          if (rdata[r] !== ref_mem[raddr[r]]) begin
            failures++;
            $display("FAIL port %0d addr %0d got %h exp %h", r, raddr[r], rdata[r], ref_mem[raddr[r]]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
