// bimodal_predictor: bimodal branch outcome predictor.
//
// An ENTRIES-location RAM holds the 2-bit state of ENTRIES identical
// four-state FSMs, one per index. When a branch is fetched, the low PC bits
// above bit 0 (instructions are 2-byte aligned) address the RAM and the MSB
// of the state is the prediction: 11 and 10 predict taken, 01 and 00 not
// taken. When the outcome is known (update_en), the state at update_pc moves:
//   11: T->11 NT->10      10: T->11 NT->00
//   01: T->11 NT->00      00: T->01 NT->00
// Lookup is combinational; the update is written at the clock edge and a
// lookup of the same entry in that cycle sees the old state. The FSM follows
// the source; the size, the reset to 00 and skipping PC bit 0 are this
// design's choice.
module bimodal_predictor #(
  parameter int ENTRIES = 256,
  parameter int PCW     = 16,
  localparam int IW     = $clog2(ENTRIES)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [PCW-1:0] fetch_pc,
  output logic           predict_taken,
  output logic [1:0]     fetch_state,
  input  logic           update_en,
  input  logic [PCW-1:0] update_pc,
  input  logic           update_taken
);

  logic [1:0] state [ENTRIES];

  function automatic logic [1:0] next_state(input logic [1:0] s, input logic taken);
    unique case (s)
      2'b11: return taken ? 2'b11 : 2'b10;
      2'b10: return taken ? 2'b11 : 2'b00;
      2'b01: return taken ? 2'b11 : 2'b00;
      2'b00: return taken ? 2'b01 : 2'b00;
      default: return 2'b00;
    endcase
  endfunction

  logic [IW-1:0] fidx, uidx;
  assign fidx = fetch_pc[IW:1];
  assign uidx = update_pc[IW:1];

  assign fetch_state   = state[fidx];
  assign predict_taken = fetch_state[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < ENTRIES; i++) state[i] <= 2'b00;
    end else if (update_en) begin
      state[uidx] <= next_state(state[uidx], update_taken);
    end
  end

endmodule
