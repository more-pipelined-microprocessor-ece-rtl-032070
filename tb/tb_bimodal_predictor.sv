// tb_bimodal_predictor: self-checking test of the bimodal predictor.
// First walks one entry through every arc of the four-state FSM; then runs
// random updates and lookups against a model table whose next-state rule
// is written here as a table (state, outcome) -> state.
module tb_bimodal_predictor;
  logic clk = 0, rst, update_en, update_taken, predict_taken;
  logic [15:0] fetch_pc, update_pc;
  logic [1:0] fetch_state;
  logic [1:0] model [256];
  // next state indexed by {state, taken}
  logic [1:0] nxt [8] = '{2'b00, 2'b01,   // 00: NT->00, T->01
                          2'b00, 2'b11,   // 01: NT->00, T->11
                          2'b00, 2'b11,   // 10: NT->00, T->11
                          2'b10, 2'b11};  // 11: NT->10, T->11
  int checks = 0, failures = 0;

  bimodal_predictor dut (.clk, .rst, .fetch_pc, .predict_taken, .fetch_state,
                         .update_en, .update_pc, .update_taken);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic en, logic [15:0] upc, logic t);
    update_en = en; update_pc = upc; update_taken = t;
    @(posedge clk);
    if (en) model[upc[8:1]] = nxt[{model[upc[8:1]], t}];
    #1;
  endtask

  task automatic look(logic [15:0] fpc);
    fetch_pc = fpc;
    #1;
    checks++;
    if (fetch_state !== model[fpc[8:1]] || predict_taken !== model[fpc[8:1]][1]) begin
      failures++;
      $display("FAIL pc=%h state=%b exp %b pred=%b", fpc, fetch_state, model[fpc[8:1]], predict_taken);
    end
  endtask

  initial begin
    logic [1:0] path [10];
    logic outc [9] = '{1, 1, 1, 0, 1, 0, 0, 1, 0};
    rst = 1; update_en = 0; update_pc = 0; update_taken = 0; fetch_pc = 0;
    foreach (model[i]) model[i] = 0;
    @(posedge clk); #1 rst = 0;
    // 00 -T-> 01 -T-> 11 -T-> 11 -NT-> 10 -T-> 11 -NT-> 10 -NT-> 00 -T-> 01 -NT-> 00
    path = '{2'b00, 2'b01, 2'b11, 2'b11, 2'b10, 2'b11, 2'b10, 2'b00, 2'b01, 2'b00};
    look(16'h0010);
    checks++; if (fetch_state !== path[0]) failures++;
    foreach (outc[i]) begin
      step(1, 16'h0010, outc[i]);
      look(16'h0010);
      checks++;
      if (fetch_state !== path[i+1]) begin
        failures++; $display("FAIL arc %0d: state %b exp %b", i, fetch_state, path[i+1]);
      end
    end
    for (int k = 0; k < 5000; k++) begin
      step($urandom % 2, 16'($urandom % 64), $urandom % 2);
      look(16'($urandom % 64));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
