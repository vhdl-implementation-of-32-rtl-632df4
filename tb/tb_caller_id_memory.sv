// tb_caller_id_memory: self-checking test of the caller ID memory.
// Source half: sequential writes of random caller numbers, random reads on
// both read ports. Destination half: random writes with and without the
// valid flag, all 16 outputs compared with a reference after every cycle.
module tb_caller_id_memory;
  import switch_pkg::*;
  logic clk = 0, rst = 1;
  logic src_we, dst_we, dst_wvalid;
  logic [3:0] src_waddr, dst_waddr;
  user_t src_wid, dst_wid;
  logic [3:0] src_raddr [2];
  user_t src_rid [2];
  user_t dst_id [16];
  logic dst_valid [16];
  user_t ref_src [16], ref_dst [16];
  logic ref_val [16];
  int checks = 0, failures = 0;

  caller_id_memory dut (.clk, .rst, .src_we, .src_waddr, .src_wid, .src_raddr, .src_rid,
                        .dst_we, .dst_waddr, .dst_wid, .dst_wvalid, .dst_id, .dst_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    src_we = 0; dst_we = 0; dst_wvalid = 0; src_waddr = 0; dst_waddr = 0;
    src_wid = 0; dst_wid = 0; src_raddr[0] = 0; src_raddr[1] = 0;
    for (int a = 0; a < 16; a++) begin ref_dst[a] = 0; ref_val[a] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int a = 0; a < 16; a++) check(dst_valid[a] == 0 && dst_id[a] == 0, "reset");
    for (int pass = 0; pass < 10; pass++) begin
      for (int a = 0; a < 16; a++) begin
        src_we = 1; src_waddr = 4'(a); src_wid = user_t'($urandom);
        ref_src[a] = src_wid;
        @(negedge clk);
      end
      src_we = 0;
      for (int i = 0; i < 32; i++) begin
        src_raddr[0] = 4'($urandom); src_raddr[1] = 4'($urandom);
        #1;
        check(src_rid[0] == ref_src[src_raddr[0]], "src port 0");
        check(src_rid[1] == ref_src[src_raddr[1]], "src port 1");
      end
      for (int i = 0; i < 40; i++) begin
        dst_we = $urandom_range(0, 2) != 0;
        dst_waddr = 4'($urandom); dst_wid = user_t'($urandom);
        dst_wvalid = $urandom_range(0, 1);
        if (dst_we) begin ref_dst[dst_waddr] = dst_wid; ref_val[dst_waddr] = dst_wvalid; end
        @(negedge clk);
        for (int a = 0; a < 16; a++)
          check(dst_valid[a] == ref_val[a] && dst_id[a] == ref_dst[a], $sformatf("dst %0d", a));
      end
      dst_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
