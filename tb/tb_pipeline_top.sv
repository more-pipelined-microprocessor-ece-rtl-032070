// tb_pipeline_top: end-to-end test of pipeline_top at its default sizes.
//
// Runs programs on the CPU and compares registers and data memory with the
// instruction-set reference model. While the CPU runs, every branch it
// resolves in ID is looked up in the bimodal predictor and the BTB by its
// PC, and then used to update both, as a fetch unit would: the prediction
// and the BTB target are checked against models kept here, and the
// predictor's accuracy is counted. Each mechanism of the design is counted
// and must occur at least once: load-use stall, ALU-then-branch stall,
// load-then-branch stall, forwarding to EX from EX/MEM and from MEM/WB,
// forwarding to the ID comparator from EX/MEM and from MEM/WB, taken and
// not-taken branches, delay-slot execution, correct and wrong predictions,
// BTB hits.
module tb_pipeline_top;
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
  logic [15:0] bp_fetch_pc = 0, bp_update_pc = 0;
  logic bp_predict_taken, bp_update_en = 0, bp_update_taken = 0;
  logic [1:0] bp_fetch_state;
  logic [15:0] btb_fetch_pc = 0, btb_target, btb_update_pc = 0, btb_update_target = 0;
  logic btb_hit, btb_update_en = 0;

  pipeline_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- mechanism counters
  typedef enum int {
    M_LOAD_USE, M_ALU_BR, M_LOAD_BR, M_EX_FWD_MEM, M_EX_FWD_WB, M_ID_FWD_MEM, M_ID_FWD_WB,
    M_TAKEN, M_NOT_TAKEN, M_DELAY_SLOT, M_PRED_OK, M_PRED_BAD, M_BTB_HIT, M_N
  } mech_e;
  int cnt [M_N];
  string mname [M_N] = '{"load-use stall", "ALU-then-branch stall", "load-then-branch stall",
                         "EX forward from EX/MEM", "EX forward from MEM/WB",
                         "ID forward from EX/MEM", "ID forward from MEM/WB",
                         "branch taken", "branch not taken", "delay slot executed",
                         "prediction correct", "prediction wrong", "BTB hit"};

  // models of the predictor and BTB
  logic [1:0]  bp_model  [256];
  logic        btb_valid [256];
  logic [15:0] btb_tgt   [256];
  logic        slot_next = 0;

  function automatic logic [1:0] fsm(logic [1:0] s, logic t);
    case (s)
      2'b00: return t ? 2'b01 : 2'b00;
      2'b01: return t ? 2'b11 : 2'b00;
      2'b10: return t ? 2'b11 : 2'b00;
      default: return t ? 2'b11 : 2'b10;
    endcase
  endfunction

  // Observe the CPU; drive the predictor and BTB from its resolved branches.
  always @(negedge clk) begin
    bp_update_en = 0; btb_update_en = 0;
    if (!rst) begin
      automatic logic br = dut.u_cpu.id_info.branch && !dut.u_cpu.stall;
      automatic logic taken = dut.u_cpu.pcj;
      automatic logic [15:0] bpc = dut.u_cpu.if_id.pc_plus2 - 16'd2;
      if (dut.u_cpu.stall) begin
        if (dut.u_cpu.id_ex.ctrl.load) cnt[M_LOAD_USE]++;
        else if (dut.u_cpu.id_info.branch && dut.u_cpu.ex_mem.ctrl.load) cnt[M_LOAD_BR]++;
        else if (dut.u_cpu.id_info.branch) cnt[M_ALU_BR]++;
      end
      if (dut.u_cpu.id_ex.ctrl.ld || dut.u_cpu.id_ex.ctrl.mw) begin
        if (dut.u_cpu.fwd_ex_a == FWD_MEM || dut.u_cpu.fwd_ex_b == FWD_MEM) cnt[M_EX_FWD_MEM]++;
        if (dut.u_cpu.fwd_ex_a == FWD_WB  || dut.u_cpu.fwd_ex_b == FWD_WB)  cnt[M_EX_FWD_WB]++;
      end
      if (br) begin
        if (dut.u_cpu.fwd_id_a == FWD_MEM || dut.u_cpu.fwd_id_b == FWD_MEM) cnt[M_ID_FWD_MEM]++;
        if (dut.u_cpu.fwd_id_a == FWD_WB  || dut.u_cpu.fwd_id_b == FWD_WB)  cnt[M_ID_FWD_WB]++;
      end
      // the instruction after a taken branch reaches ID and is not a bubble
      if (slot_next && dut.u_cpu.ifidl) begin
        cnt[M_DELAY_SLOT]++;
        slot_next = 0;
      end
      if (br) begin
        cnt[taken ? M_TAKEN : M_NOT_TAKEN]++;
        if (taken) slot_next = 1;
        bp_fetch_pc = bpc; btb_fetch_pc = bpc;
        #1;
        chk(bp_fetch_state == bp_model[bpc[8:1]] && bp_predict_taken == bp_model[bpc[8:1]][1],
            $sformatf("predictor state for PC %h", bpc));
        chk(btb_hit == btb_valid[bpc[8:1]] && (!btb_hit || btb_target == btb_tgt[bpc[8:1]]),
            $sformatf("BTB entry for PC %h", bpc));
        cnt[(bp_predict_taken == taken) ? M_PRED_OK : M_PRED_BAD]++;
        if (btb_hit) cnt[M_BTB_HIT]++;
        bp_update_en = 1; bp_update_pc = bpc; bp_update_taken = taken;
        bp_model[bpc[8:1]] = fsm(bp_model[bpc[8:1]], taken);
        if (taken) begin
          btb_update_en = 1; btb_update_pc = bpc; btb_update_target = dut.u_cpu.br_target;
          btb_valid[bpc[8:1]] = 1; btb_tgt[bpc[8:1]] = dut.u_cpu.br_target;
        end
      end
    end
  end

  // ---------------------------------------------------------------- program handling
  w16 prog [MEMW];

  function automatic void clear_prog();
    foreach (prog[i]) prog[i] = NOP();
  endfunction

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
    @(negedge clk);
    foreach (bp_model[i]) begin bp_model[i] = 0; btb_valid[i] = 0; end
    slot_next = 0;
    rst = 0;
  endtask

  task automatic run_and_compare(int halt_pc, int cycles, string name);
    logic [15:0] v;
    int bad = 0;
    repeat (cycles) @(posedge clk);
    iss_run(prog, halt_pc, 100000);
    #1;
    for (int r = 0; r < 8; r++) begin
      dbg_reg_addr = 3'(r); #1;
      if (dbg_reg_data !== iss_reg[r]) begin bad++; $display("  %s R%0d = %h, model %h", name, r, dbg_reg_data, iss_reg[r]); end
    end
    for (int m = 0; m < MEMW; m++) begin
      dbg_mem_addr = 8'(m); #1;
      if (dbg_mem_data !== iss_mem[m]) begin bad++; $display("  %s M[%0d] = %h, model %h", name, m, dbg_mem_data, iss_mem[m]); end
    end
    chk(bad == 0, {name, ": registers and data memory match the reference model"});
  endtask

  initial begin
    int h;
    foreach (cnt[i]) cnt[i] = 0;

    // ---- the document's load-use sequence ----
    clear_prog();
    prog[0] = ADDI(2, 0, 8);   prog[1] = ADDI(6, 0, 25);
    prog[4] = SW(6, 0, 2);     prog[5] = ADDI(3, 0, 3);
    prog[8]  = LW(1, 0, 2);    prog[9]  = OR(4, 1, 3);
    prog[10] = SUB(5, 2, 1);   prog[11] = AND(6, 1, 2);
    prog[12] = ADDI(7, 7, 3);
    h = halt_at(13);
    load_and_reset();
    run_and_compare(h, 60, "load-use sequence");

    // ---- a counted loop summing an array: backward branch trains the predictor ----
    // for (i = 8; i != 0; i--) sum += M[i]; the array is written first.
    clear_prog();
    prog[0]  = ADDI(1, 0, 16);         // R1 = byte address of element 8
    prog[1]  = ADDI(2, 0, 8);          // R2 = counter
    prog[2]  = ADDI(3, 0, 5);          // R3 = value to store
    // fill loop: M[R1] = R3; R3 += 3; R1 -= 2
    prog[3]  = SW(3, 0, 1);
    prog[4]  = ADDI(3, 3, 3);
    prog[5]  = ADDI(2, 2, -1);
    prog[6]  = BNE(2, 0, -4);          // back to word 3 (ALU-then-branch stall)
    prog[7]  = ADDI(1, 1, -2);         // delay slot
    prog[8]  = ADDI(1, 0, 16);
    prog[9]  = ADDI(2, 0, 8);
    // sum loop: R4 = M[R1]; if (R4 < 0) skip; R5 += R4
    prog[10] = LW(4, 0, 1);
    prog[11] = BLTZ(4, 1);             // load-then-branch stall
    prog[12] = ADDI(2, 2, -1);         // delay slot
    prog[13] = ADD(5, 5, 4);           // forwarded from MEM/WB
    prog[14] = BNE(2, 0, -5);          // back to word 10
    prog[15] = ADDI(1, 1, -2);         // delay slot
    prog[16] = SW(5, 2, 0);            // M[1] = sum
    h = halt_at(17);
    load_and_reset();
    run_and_compare(h, 200, "array loop");

    // ---- random programs ----
    for (int p = 0; p < 30; p++) begin
      automatic int n = 60 + $urandom % 60;
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
      run_and_compare(h, 4 * n + 40, $sformatf("random program %0d", p));
    end

    for (int i = 0; i < M_N; i++) begin
      $display("  %-26s %0d", mname[i], cnt[i]);
      chk(cnt[i] > 0, {"mechanism never happened: ", mname[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
