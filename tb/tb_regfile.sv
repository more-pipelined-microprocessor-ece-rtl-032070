// tb_regfile: self-checking test of the register file.
// Random writes and reads against a model array: R0 reads zero, writes
// land only when LD is high, and a read in the write cycle sees the old
// value (no write-through).
module tb_regfile;
  import cpu_pkg::*;
  logic clk = 0, rst, ld;
  reg_t sa, sb, dr, dbg_addr;
  logic [15:0] d_in, a, b, dbg_data;
  logic [15:0] model [8];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst, .ld, .sa, .sb, .dr, .d_in, .a, .b, .dbg_addr, .dbg_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    rst = 1; ld = 0; sa = 0; sb = 0; dr = 0; d_in = 0; dbg_addr = 0;
    foreach (model[i]) model[i] = 0;
    @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 3000; k++) begin
      ld = $urandom % 2; dr = 3'($urandom); d_in = 16'($urandom);
      sa = 3'($urandom); sb = dr; dbg_addr = 3'($urandom);
      #1;
      chk(a, model[sa], "a");
      chk(b, model[sb], "b (same-cycle read of write address)");
      chk(dbg_data, model[dbg_addr], "dbg");
      @(posedge clk);
      if (ld && dr != 0) model[dr] = d_in;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
