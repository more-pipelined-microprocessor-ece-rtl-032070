// tb_data_ram: self-checking test of the data RAM.
// Random stores (MW) and loads by byte address against a model array;
// the debug port is checked too, and reset clears the contents.
module tb_data_ram;
  logic clk = 0, rst, mw;
  logic [15:0] addr, d_in, d_out, dbg_data;
  logic [7:0] dbg_addr;
  logic [15:0] model [256];
  int checks = 0, failures = 0;

  data_ram dut (.clk, .rst, .addr, .d_in, .mw, .d_out, .dbg_addr, .dbg_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; mw = 0; addr = 0; d_in = 0; dbg_addr = 0;
    foreach (model[i]) model[i] = 0;
    @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 4000; k++) begin
      mw = $urandom % 2; addr = 16'($urandom % 64); d_in = 16'($urandom); dbg_addr = 8'($urandom % 32);
      #1;
      checks++;
      if (d_out !== model[addr[8:1]] || dbg_data !== model[dbg_addr]) begin
        failures++; $display("FAIL addr=%h d_out=%h exp %h", addr, d_out, model[addr[8:1]]);
      end
      @(posedge clk);
      if (mw) model[addr[8:1]] = d_in;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
