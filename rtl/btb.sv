// btb: branch target buffer.
//
// A small memory of ENTRIES entries addressed by the low branch-PC bits
// above bit 0. Each entry holds the last target address of the branch that
// maps to it, plus a valid bit. When a branch is fetched the entry is read
// combinationally (hit = valid); when a branch resolves, update_en writes
// its target at the clock edge. The function and the typical size (256 to
// 512 entries) follow the source; the valid bit, the absence of a tag and
// skipping PC bit 0 are this design's choice.
module btb #(
  parameter int ENTRIES = 256,
  parameter int PCW     = 16,
  localparam int IW     = $clog2(ENTRIES)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [PCW-1:0] fetch_pc,
  output logic           hit,
  output logic [PCW-1:0] target,
  input  logic           update_en,
  input  logic [PCW-1:0] update_pc,
  input  logic [PCW-1:0] update_target
);

  logic [ENTRIES-1:0] valid;
  logic [PCW-1:0]     tgt [ENTRIES];

  logic [IW-1:0] fidx, uidx;
  assign fidx = fetch_pc[IW:1];
  assign uidx = update_pc[IW:1];

  assign hit    = valid[fidx];
  assign target = tgt[fidx];

  always_ff @(posedge clk) begin
    if (rst)            valid       <= '0;
    else if (update_en) valid[uidx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (update_en) tgt[uidx] <= update_target;
  end

endmodule
