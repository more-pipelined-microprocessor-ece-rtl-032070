// tb_hazard_unit: self-checking test of the Hazard Detection Unit.
// First the cases the source lists, one by one (load followed by R-type,
// I-type ALU, load, store base, store data, branch; ALU instruction followed
// by branch), each with and without a dependence; then random inputs against
// the stall rule. PCL and IF/IDL must be low and Clear high exactly on a
// stall.
module tb_hazard_unit;
  import cpu_pkg::*;
  reg_t id_sa, id_sb, ex_dr, mem_dr;
  instr_info_t id_info;
  logic ex_load, ex_ld, mem_load;
  logic pcl, ifidl, clear, stall;
  int checks = 0, failures = 0;

  hazard_unit dut (.id_sa, .id_sb, .id_info, .ex_load, .ex_ld, .ex_dr, .mem_load, .mem_dr,
                   .pcl, .ifidl, .clear, .stall);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // {rtype, addi, load, store, branch, uses_sa, uses_sb}
  localparam instr_info_t I_R    = 7'b1000011;
  localparam instr_info_t I_ADDI = 7'b0100010;
  localparam instr_info_t I_LW   = 7'b0010010;
  localparam instr_info_t I_SW   = 7'b0001011;
  localparam instr_info_t I_BEQ  = 7'b0000111;
  localparam instr_info_t I_BGEZ = 7'b0000110;

  task automatic expect_stall(logic exp, string what);
    #1;
    checks++;
    if (stall !== exp || pcl !== !exp || ifidl !== !exp || clear !== exp) begin
      failures++;
      $display("FAIL %s: stall=%b pcl=%b ifidl=%b clear=%b exp stall=%b", what, stall, pcl, ifidl, clear, exp);
    end
  endtask

  task automatic set_ex(logic is_load, logic writes, int dr);
    ex_load = is_load; ex_ld = writes; ex_dr = 3'(dr); mem_load = 0; mem_dr = 0;
  endtask

  initial begin
    // LW R1 in EX
    set_ex(1, 1, 1);
    id_info = I_R;    id_sa = 1; id_sb = 3; expect_stall(1, "load then R-type (SA)");
    id_info = I_R;    id_sa = 2; id_sb = 1; expect_stall(1, "load then R-type (SB)");
    id_info = I_R;    id_sa = 2; id_sb = 3; expect_stall(0, "load then independent R-type");
    id_info = I_ADDI; id_sa = 1; id_sb = 5; expect_stall(1, "load then ADDI");
    id_info = I_ADDI; id_sa = 4; id_sb = 1; expect_stall(0, "load then ADDI whose RT is the load's DR");
    id_info = I_LW;   id_sa = 1; id_sb = 6; expect_stall(1, "load then load");
    id_info = I_SW;   id_sa = 1; id_sb = 6; expect_stall(1, "load then store (base)");
    id_info = I_SW;   id_sa = 6; id_sb = 1; expect_stall(1, "load then store (data)");
    id_info = I_BEQ;  id_sa = 6; id_sb = 1; expect_stall(1, "load then branch");
    id_info = I_BGEZ; id_sa = 6; id_sb = 1; expect_stall(0, "load then BGEZ on another register");
    // ALU instruction writing R1 in EX
    set_ex(0, 1, 1);
    id_info = I_R;    id_sa = 1; id_sb = 1; expect_stall(0, "ALU then R-type (forwarded)");
    id_info = I_BEQ;  id_sa = 1; id_sb = 2; expect_stall(1, "ALU then branch");
    id_info = I_BGEZ; id_sa = 1; id_sb = 0; expect_stall(1, "ALU then BGEZ");
    // R0 never stalls
    set_ex(1, 1, 0);
    id_info = I_R;    id_sa = 0; id_sb = 0; expect_stall(0, "load to R0");
    // load in MEM, branch in ID
    set_ex(0, 0, 0); mem_load = 1; mem_dr = 3;
    id_info = I_BEQ;  id_sa = 3; id_sb = 2; expect_stall(1, "load in MEM then branch");
    id_info = I_R;    id_sa = 3; id_sb = 2; expect_stall(0, "load in MEM then R-type (forwarded from WB next cycle)");

    for (int k = 0; k < 5000; k++) begin
      logic e, uses;
      instr_info_t inf;
      case ($urandom % 6)
        0: inf = I_R; 1: inf = I_ADDI; 2: inf = I_LW; 3: inf = I_SW; 4: inf = I_BEQ; default: inf = I_BGEZ;
      endcase
      id_info = inf; id_sa = 3'($urandom % 4); id_sb = 3'($urandom % 4);
      ex_load = $urandom % 2; ex_ld = ex_load | ($urandom % 2); ex_dr = 3'($urandom % 4);
      mem_load = $urandom % 2; mem_dr = 3'($urandom % 4);
      e = 0;
      if (ex_dr != 0 && ((inf.uses_sa && ex_dr == id_sa) || (inf.uses_sb && ex_dr == id_sb))) begin
        if (ex_load) e = 1;
        if (inf.branch && ex_ld) e = 1;
      end
      if (inf.branch && mem_load && mem_dr != 0 &&
          ((inf.uses_sa && mem_dr == id_sa) || (inf.uses_sb && mem_dr == id_sb))) e = 1;
      expect_stall(e, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
