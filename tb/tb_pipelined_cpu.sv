// tb_pipelined_cpu: self-checking test of the five-stage pipelined CPU.
//
// Each program is loaded through the instruction RAM port during reset and
// run; afterwards all eight registers and the data RAM are compared with the
// instruction-set reference model of tb_isa_pkg, which executes the same
// program one instruction at a time (with the branch delay slot).
//   0. ALU result used by the next three instructions: no stall, and each
//      takes it from the forwarding path expected (EX/MEM to EX, MEM/WB to
//      EX, MEM/WB to ID);
//   1. load-use example: LW R1,0(R2) followed by OR/SUB/AND using R1 and an
//      ADDI; exactly one stall, and the ADDI writes back at cycle 5+12+1;
//   2. the same with the ADDI moved up between LW and OR: no stall, and the
//      last write-back of the group one cycle earlier;
//   3. BEQ taken and BNE not taken with the delay slot filled by ADDI;
//   4. an ALU result compared by the next branch (one stall) and a load
//      compared by the next branch (two stalls);
//   5. random programs with forward branches, checked against the model.
module tb_pipelined_cpu;
  import cpu_pkg::*;
  import tb_isa_pkg::*;

  logic clk = 0, rst = 1;
  logic prog_we = 0;
  logic [7:0] prog_addr = 0;
  logic [15:0] prog_data = 0;
  reg_t dbg_reg_addr = 0;
  logic [15:0] dbg_reg_data, dbg_mem_data, pc;
  logic [7:0] dbg_mem_addr = 0;
  logic [3:0] alu_flags;

  pipelined_cpu dut (.clk, .rst, .prog_we, .prog_addr, .prog_data, .dbg_reg_addr, .dbg_reg_data,
                     .dbg_mem_addr, .dbg_mem_data, .pc, .alu_flags);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0;

  always @(posedge clk) if (!rst && dut.stall) n_stall++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  w16 prog [MEMW];

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic void clear_prog();
    foreach (prog[i]) prog[i] = NOP();
  endfunction

  // Appends the halt loop (BEQ R0,R0,-1 with a NOP delay slot) at word n.
  function automatic int halt_at(int n);
    prog[n] = BEQ(0, 0, -1);
    prog[n+1] = NOP();
    return 2 * n;
  endfunction

  task automatic load_and_reset();
    rst = 1;
    for (int i = 0; i < MEMW; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 8'(i); prog_data = prog[i];
    end
    @(negedge clk); prog_we = 0;
    @(negedge clk); rst = 0;
    n_stall = 0;
  endtask

  task automatic reg_value(int r, output logic [15:0] v);
    dbg_reg_addr = 3'(r); #1; v = dbg_reg_data;
  endtask

  task automatic compare_state(string name);
    logic [15:0] v;
    int bad = 0;
    for (int r = 0; r < 8; r++) begin
      reg_value(r, v);
      if (v !== iss_reg[r]) begin bad++; $display("  %s R%0d = %h, model %h", name, r, v, iss_reg[r]); end
    end
    for (int m = 0; m < MEMW; m++) begin
      dbg_mem_addr = 8'(m); #1;
      if (dbg_mem_data !== iss_mem[m]) begin bad++; $display("  %s M[%0d] = %h, model %h", name, m, dbg_mem_data, iss_mem[m]); end
    end
    chk(bad == 0, {name, ": registers and data memory match the reference model"});
  endtask

  // Runs the loaded program; returns the first cycle after reset at whose
  // end register wr_reg holds wr_val (-1 if never).
  task automatic run(int halt_pc, int cycles, int wr_reg, logic [15:0] wr_val, output int when);
    logic [15:0] v;
    when = -1;
    for (int c = 1; c <= cycles; c++) begin
      @(posedge clk); #1;
      if (wr_reg > 0 && when < 0) begin reg_value(wr_reg, v); if (v == wr_val) when = c; end
    end
    iss_run(prog, halt_pc, 10000);
  endtask

  initial begin
    int h, when, when2, st;
    logic [15:0] v;

    // ---- 0. ALU result forwarded to the next three instructions ----
    // ADD R1 then OR (R1 from EX/MEM), SUB (R1 from MEM/WB), AND (R1 from
    // MEM/WB into ID); no stall. Instruction k is in ID after clock edge
    // k+1 and in EX after edge k+2.
    clear_prog();
    prog[0] = ADDI(2, 0, 7); prog[1] = ADDI(3, 0, 9);
    prog[4] = ADD(1, 2, 3);
    prog[5] = OR(4, 1, 3);
    prog[6] = SUB(5, 2, 1);
    prog[7] = AND(6, 1, 2);
    prog[8] = ADDI(7, 7, 3);
    h = halt_at(9);
    load_and_reset();
    for (int c = 1; c <= 30; c++) begin
      @(posedge clk); #1;
      if (c == 7) chk(dut.fwd_ex_a == FWD_MEM, "ADD->OR: R1 forwarded from EX/MEM to EX");
      if (c == 8) chk(dut.fwd_ex_b == FWD_WB,  "ADD->SUB: R1 forwarded from MEM/WB to EX");
      if (c == 8) chk(dut.fwd_id_a == FWD_WB,  "ADD->AND: R1 forwarded from MEM/WB to ID");
    end
    iss_run(prog, h, 10000);
    compare_state("ALU forwarding");
    chk(n_stall == 0, $sformatf("ALU forwarding: %0d stall cycles, expected 0", n_stall));

    // ---- 1. load followed by R-type (document example) ----
    clear_prog();
    prog[0] = ADDI(2, 0, 8);   prog[1] = ADDI(6, 0, 25);
    prog[4] = SW(6, 0, 2);     prog[5] = ADDI(3, 0, 3);
    prog[8]  = LW(1, 0, 2);
    prog[9]  = OR(4, 1, 3);
    prog[10] = SUB(5, 2, 1);
    prog[11] = AND(6, 1, 2);
    prog[12] = ADDI(7, 7, 3);
    h = halt_at(13);
    load_and_reset();
    run(h, 40, 7, 16'd3, when);
    st = n_stall;
    compare_state("load-use");
    chk(st == 1, $sformatf("load-use: %0d stall cycles, expected 1", st));
    chk(when == 12 + 5 + 1, $sformatf("load-use: ADDI written at cycle %0d, expected %0d", when, 18));

    // ---- 2. the same with the ADDI moved into the load delay ----
    prog[9]  = ADDI(7, 7, 3);
    prog[10] = OR(4, 1, 3);
    prog[11] = SUB(5, 2, 1);
    prog[12] = AND(6, 1, 2);
    load_and_reset();
    run(h, 40, 6, 16'd8 & 16'd25, when2);   // AND R6,R1,R2 = 25 & 8
    st = n_stall;
    compare_state("reordered");
    chk(st == 0, $sformatf("reordered: %0d stall cycles, expected 0", st));
    chk(when2 == 12 + 5, $sformatf("reordered: last result at cycle %0d, expected %0d", when2, 17));

    // ---- 3. branches with a delay slot ----
    clear_prog();
    prog[0] = ADDI(2, 0, 5); prog[1] = ADDI(3, 0, 5); prog[2] = ADDI(1, 0, 1); prog[3] = ADDI(5, 0, 12);
    prog[4] = BEQ(3, 2, 4);      // taken to X (word 9)
    prog[5] = ADDI(7, 7, 3);     // delay slot: always executes
    prog[6] = OR(4, 1, 3);
    prog[7] = SUB(5, 2, 1);
    prog[8] = AND(6, 1, 2);
    prog[9] = SRL(4, 5);         // X
    h = halt_at(10);
    load_and_reset();
    run(h, 40, 0, 0, when);
    compare_state("BEQ taken");
    reg_value(7, v); chk(v == 3, "BEQ taken: delay-slot ADDI executed");
    reg_value(4, v); chk(v == 6, "BEQ taken: SRL at X executed, OR skipped");
    reg_value(6, v); chk(v == 0, "BEQ taken: AND skipped");
    prog[4] = BNE(3, 2, 4);      // not taken
    load_and_reset();
    run(h, 40, 0, 0, when);
    compare_state("BNE not taken");
    reg_value(6, v); chk(v == 1, "BNE not taken: AND executed");
    reg_value(4, v); chk(v == 2, "BNE not taken: SRL R4,R5 with R5 = 5-1");

    // ---- 4. branch hazards ----
    clear_prog();
    prog[0] = ADDI(1, 0, -1);
    prog[1] = BLTZ(1, 2);        // ALU result compared at once: 1 stall; taken to word 4
    prog[2] = ADDI(2, 0, 7);     // delay slot
    prog[3] = ADDI(3, 0, 9);     // skipped
    prog[4] = SW(1, 0, 0);       // M[0] = -1
    prog[5] = LW(4, 0, 0);
    prog[6] = BGEZ(4, 1);        // load compared at once: 2 stalls; not taken
    prog[7] = NOP();
    prog[8] = ADDI(5, 0, 1);
    h = halt_at(9);
    load_and_reset();
    run(h, 40, 0, 0, when);
    st = n_stall;
    compare_state("branch hazards");
    chk(st == 3, $sformatf("branch hazards: %0d stall cycles, expected 3", st));

    // ---- 5. random programs ----
    for (int p = 0; p < 40; p++) begin
      automatic int n = 40 + $urandom % 40;
      clear_prog();
      prog[0] = ADDI(1, 0, 2); prog[1] = ADDI(2, 0, -3); prog[2] = ADDI(3, 0, 17);
      for (int i = 3; i < n; i++) begin
        automatic int k = $urandom % 16;
        automatic int rd = $urandom % 8, rs = $urandom % 8, rt = $urandom % 8;
        automatic int imm = int'($urandom % 64) - 32;
        case (k)
          0, 1: prog[i] = r_type($urandom % 7, rd, rs, rt);
          2, 3: prog[i] = ADDI(rt, rs, imm);
          4, 5: prog[i] = LW(rt, imm, rs);
          6:    prog[i] = SW(rt, imm, rs);
          7:    prog[i] = BEQ(rt, rs, 1 + $urandom % 4);
          8:    prog[i] = BNE(rt, rs, 1 + $urandom % 4);
          9:    prog[i] = BGEZ(rs, 1 + $urandom % 4);
          10:   prog[i] = BLTZ(rs, 1 + $urandom % 4);
          default: prog[i] = r_type($urandom % 7, rd, rs, rt);
        endcase
      end
      h = halt_at(n + 6);
      load_and_reset();
      run(h, 4 * n + 40, 0, 0, when);
      compare_state($sformatf("random program %0d", p));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
