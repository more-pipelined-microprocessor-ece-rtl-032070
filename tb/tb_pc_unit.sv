// tb_pc_unit: self-checking test of the PC, PCJ mux and +2 incrementer.
// Random PCL/PCJ/target sequences against a model PC.
module tb_pc_unit;
  logic clk = 0, rst, pcl, pcj;
  logic [15:0] target, pc, pc_plus2, model;
  int checks = 0, failures = 0;

  pc_unit dut (.clk, .rst, .pcl, .pcj, .target, .pc, .pc_plus2);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; pcl = 1; pcj = 0; target = 0;
    @(posedge clk); #1 rst = 0; model = 0;
    for (int k = 0; k < 2000; k++) begin
      pcl = ($urandom % 4) != 0; pcj = ($urandom % 3) == 0; target = 16'($urandom) & 16'hfffe;
      #1;
      checks++;
      if (pc !== model || pc_plus2 !== 16'(model + 2)) begin
        failures++; $display("FAIL pc=%h exp %h pc+2=%h", pc, model, pc_plus2);
      end
      @(posedge clk);
      if (pcl) model = pcj ? target : 16'(model + 2);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
