// tb_forwarding_unit: self-checking test of the forwarding select logic.
// Random source/destination registers (drawn from a few so matches are
// common); each select is compared with the priority rule: EX/MEM (not a
// load) before MEM/WB before none, never for R0.
module tb_forwarding_unit;
  import cpu_pkg::*;
  reg_t id_sa, id_sb, ex_sa, ex_sb, mem_dr, wb_dr;
  logic mem_ld, mem_load, wb_ld;
  fwd_e fwd_id_a, fwd_id_b, fwd_ex_a, fwd_ex_b;
  int checks = 0, failures = 0;
  int n_mem = 0, n_wb = 0;

  forwarding_unit dut (.id_sa, .id_sb, .ex_sa, .ex_sb, .mem_ld, .mem_load, .mem_dr,
                       .wb_ld, .wb_dr, .fwd_id_a, .fwd_id_b, .fwd_ex_a, .fwd_ex_b);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fwd_e ref_sel(reg_t s);
    if (s != 0 && mem_ld && !mem_load && mem_dr == s) return FWD_MEM;
    if (s != 0 && wb_ld && wb_dr == s) return FWD_WB;
    return FWD_NONE;
  endfunction

  initial begin
    for (int k = 0; k < 5000; k++) begin
      id_sa = 3'($urandom % 4); id_sb = 3'($urandom % 4);
      ex_sa = 3'($urandom % 4); ex_sb = 3'($urandom % 4);
      mem_dr = 3'($urandom % 4); wb_dr = 3'($urandom % 4);
      mem_ld = $urandom % 2; mem_load = ($urandom % 4) == 0; wb_ld = $urandom % 2;
      #1;
      checks++;
      if (fwd_id_a !== ref_sel(id_sa) || fwd_id_b !== ref_sel(id_sb) ||
          fwd_ex_a !== ref_sel(ex_sa) || fwd_ex_b !== ref_sel(ex_sb)) begin
        failures++;
        $display("FAIL id %0d %0d ex %0d %0d mem %b%b%0d wb %b%0d -> %0d %0d %0d %0d",
                 id_sa, id_sb, ex_sa, ex_sb, mem_ld, mem_load, mem_dr, wb_ld, wb_dr,
                 fwd_id_a, fwd_id_b, fwd_ex_a, fwd_ex_b);
      end
      if (fwd_ex_a == FWD_MEM) n_mem++;
      if (fwd_ex_a == FWD_WB) n_wb++;
    end
    checks++;
    if (n_mem == 0 || n_wb == 0) begin failures++; $display("FAIL a forwarding path was never selected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
