// tb_inst_ram: self-checking test of the instruction RAM.
// Loads random words through the write port, then reads every word back
// by byte address (even and odd) in random order.
module tb_inst_ram;
  logic clk = 0, we;
  logic [15:0] addr, instr, wdata;
  logic [7:0] waddr;
  logic [15:0] model [256];
  int checks = 0, failures = 0;

  inst_ram dut (.clk, .addr, .instr, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = 16'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 2000; k++) begin
      addr = 16'($urandom);
      #1;
      checks++;
      if (instr !== model[addr[8:1]]) begin
        failures++; $display("FAIL addr=%h got %h exp %h", addr, instr, model[addr[8:1]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
