// tb_alu: self-checking test of the ALU.
// Drives random and corner operands through every function and compares Y
// and the V C Z N flags with values computed here from wider arithmetic.
module tb_alu;
  import cpu_pkg::*;
  logic [15:0] a, b, y;
  alu_f_e f;
  logic v, c, z, n;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .f, .y, .v, .c, .z, .n);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [15:0] ta, logic [15:0] tb_, int fn);
    logic [16:0] s;
    logic [15:0] ey; logic ev, ec;
    int sa, sb, sr;
    a = ta; b = tb_; f = alu_f_e'(fn);
    #1;
    sa = $signed(ta); sb = $signed(tb_);
    ev = 0; ec = 0;
    case (fn)
      0: begin s = ta + tb_; ey = s[15:0]; ec = s[16]; sr = sa + sb; ev = (sr > 32767 || sr < -32768); end
      1: begin ey = ta - tb_; ec = (ta >= tb_); sr = sa - sb; ev = (sr > 32767 || sr < -32768); end
      2: begin ey = 16'($signed(ta) >>> 1); ec = ta[0]; end
      3: begin ey = ta >> 1; ec = ta[0]; end
      4: begin ey = ta << 1; ec = ta[15]; end
      5: ey = ta & tb_;
      6: ey = ta | tb_;
      default: ey = ta;
    endcase
    checks++;
    if (y !== ey || v !== ev || c !== ec || z !== (ey == 0) || n !== ey[15]) begin
      failures++;
      $display("FAIL f=%0d a=%h b=%h y=%h/%h v=%b/%b c=%b/%b z=%b n=%b", fn, ta, tb_, y, ey, v, ev, c, ec, z, n);
    end
  endtask

  initial begin
    logic [15:0] corner [6] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'h5555};
    for (int fn = 0; fn < 8; fn++) begin
      foreach (corner[i]) foreach (corner[j]) check_one(corner[i], corner[j], fn);
      for (int k = 0; k < 300; k++) check_one(16'($urandom), 16'($urandom), fn);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
