// filter_buffer: the small direct-mapped BTB that sits in front of the main
// BTB and catches most predicted-taken target lookups.
//
// ENTRIES entries, direct mapped. The index is taken from the PC just above
// the two instruction-alignment bits, the tag is the rest of the PC, and the
// stored target omits its two zero low bits. Each entry has a valid bit that
// reset clears.
//
// Interface and timing:
//   rd_en/rd_pc   lookup; the result (rd_hit, rd_target) is registered and
//                 valid in the next cycle, when rd_done is high. Without
//                 rd_en nothing is read and rd_done stays low.
//   wr_en/wr_pc/wr_target  allocate or overwrite the entry for wr_pc at the
//                 clock edge. A lookup in the same cycle sees the old entry.
//
// Its size (128 entries, direct mapped) and its role follow the design; the
// index/tag split, the synchronous read and the write-at-update policy (set
// by the parent) are choices of this RTL.
module filter_buffer #(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned PC_W    = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_en,
  input  logic [PC_W-1:0]   rd_pc,
  output logic              rd_done,
  output logic              rd_hit,
  output logic [PC_W-1:0]   rd_target,
  input  logic              wr_en,
  input  logic [PC_W-1:0]   wr_pc,
  input  logic [PC_W-1:0]   wr_target
);

  import baf_pkg::INST_ALIGN;

  localparam int unsigned IW  = $clog2(ENTRIES);
  localparam int unsigned TW  = PC_W - IW - INST_ALIGN;
  localparam int unsigned DW  = PC_W - INST_ALIGN;

  logic [ENTRIES-1:0] valid;
  logic [TW-1:0]      tags    [ENTRIES];
  logic [DW-1:0]      targets [ENTRIES];

  logic [IW-1:0] rd_idx, wr_idx;
  logic [TW-1:0] rd_tag;

  assign rd_idx = rd_pc[INST_ALIGN +: IW];
  assign rd_tag = rd_pc[PC_W-1 -: TW];
  assign wr_idx = wr_pc[INST_ALIGN +: IW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid   <= '0;
      rd_done <= 1'b0;
      rd_hit  <= 1'b0;
    end else begin
      rd_done <= rd_en;
      if (rd_en) rd_hit <= valid[rd_idx] && (tags[rd_idx] == rd_tag);
      if (wr_en) valid[wr_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_target <= {targets[rd_idx], {INST_ALIGN{1'b0}}};
    if (wr_en) begin
      tags[wr_idx]    <= wr_pc[PC_W-1 -: TW];
      targets[wr_idx] <= wr_target[PC_W-1:INST_ALIGN];
    end
  end

endmodule
