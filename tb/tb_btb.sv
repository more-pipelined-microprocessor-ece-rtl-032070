// tb_btb: self-checking test of the branch target buffer.
// Entries start invalid after reset; random updates and lookups are
// compared with a model of valid bits and last targets.
module tb_btb;
  logic clk = 0, rst, update_en, hit;
  logic [15:0] fetch_pc, update_pc, update_target, target;
  logic mvalid [256];
  logic [15:0] mtgt [256];
  int checks = 0, failures = 0, hits = 0;

  btb dut (.clk, .rst, .fetch_pc, .hit, .target, .update_en, .update_pc, .update_target);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; update_en = 0; update_pc = 0; update_target = 0; fetch_pc = 0;
    foreach (mvalid[i]) mvalid[i] = 0;
    @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 5000; k++) begin
      update_en = ($urandom % 3) == 0; update_pc = 16'($urandom % 128); update_target = 16'($urandom);
      fetch_pc = 16'($urandom % 128);
      #1;
      checks++;
      if (hit !== mvalid[fetch_pc[8:1]] || (hit && target !== mtgt[fetch_pc[8:1]])) begin
        failures++; $display("FAIL pc=%h hit=%b exp %b target=%h exp %h", fetch_pc, hit, mvalid[fetch_pc[8:1]], target, mtgt[fetch_pc[8:1]]);
      end
      if (hit) hits++;
      @(posedge clk);
      if (update_en) begin mvalid[update_pc[8:1]] = 1; mtgt[update_pc[8:1]] = update_target; end
      #1;
    end
    checks++;
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
