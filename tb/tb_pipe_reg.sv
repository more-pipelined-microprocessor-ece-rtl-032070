// tb_pipe_reg: self-checking test of the pipeline register.
// Random load/clear sequences with a non-zero clear value: clear wins over
// load, load takes D, otherwise the contents hold.
module tb_pipe_reg;
  logic clk = 0, rst, load, clear;
  logic [11:0] d, q, model;
  int checks = 0, failures = 0;

  pipe_reg #(.T(logic [11:0]), .CLR_VAL(12'h5a5)) dut (.clk, .rst, .load, .clear, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; clear = 0; d = 0;
    @(posedge clk); #1 rst = 0; model = 12'h5a5;
    for (int k = 0; k < 3000; k++) begin
      load = $urandom % 2; clear = ($urandom % 5) == 0; d = 12'($urandom);
      @(posedge clk);
      if (clear) model = 12'h5a5; else if (load) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%h exp %h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
