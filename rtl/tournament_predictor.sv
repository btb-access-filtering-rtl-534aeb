// tournament_predictor: Alpha 21264-style tournament direction predictor.
//
// Three predictors vote on a conditional branch:
//   local   a per-branch history table (LHT_ENTRIES x LHIST_W bits, indexed
//           by PC) selects one of 2^LHIST_W saturating LCTR_W-bit counters;
//   global  the global history of the last GHIST_W conditional outcomes
//           selects one of 2^GHIST_W 2-bit counters;
//   choice  the same global history selects a 2-bit counter that says whether
//           to trust the global (upper half) or the local (lower half) vote.
// A taken prediction is what lets the branch go on to a target lookup in the
// BTBs; a not-taken prediction filters the lookup out.
//
// Interface and timing:
//   lk_pc -> pred_taken (and the two votes) combinationally from the
//            current tables; the parent registers them.
//   upd_valid/upd_pc/upd_taken  train with a resolved conditional branch at
//            the clock edge: both counters move toward the outcome, the
//            choice counter moves toward whichever vote was right when they
//            disagree, the branch's local history and the global history
//            shift the outcome in.
// The history is updated only by resolved branches, in order; the update
// recomputes its table indices from the tables at update time.
// Reset clears all histories, sets the counters to weakly not-taken and the
// choice counters to weakly local.
//
// The design names this predictor only; the table sizes (1K x 10-bit local
// history, 1K 3-bit local counters, 4K 2-bit global and choice counters,
// 12-bit history) are those of the Alpha 21264, and the rest (non-speculative
// history, reset values) are choices of this RTL.
module tournament_predictor #(
  parameter int unsigned PC_W        = 64,
  parameter int unsigned LHT_ENTRIES = 1024,
  parameter int unsigned LHIST_W     = 10,
  parameter int unsigned LCTR_W      = 3,
  parameter int unsigned GHIST_W     = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PC_W-1:0] lk_pc,
  output logic            pred_taken,
  output logic            pred_local,
  output logic            pred_global,
  input  logic            upd_valid,
  input  logic [PC_W-1:0] upd_pc,
  input  logic            upd_taken
);

  import baf_pkg::INST_ALIGN;

  localparam int unsigned LIW = $clog2(LHT_ENTRIES);
  localparam int unsigned LCN = 1 << LHIST_W;
  localparam int unsigned GCN = 1 << GHIST_W;

  logic [LHIST_W-1:0] lht   [LHT_ENTRIES];
  logic [LCTR_W-1:0]  lctr  [LCN];
  logic [1:0]         gctr  [GCN];
  logic [1:0]         cctr  [GCN];
  logic [GHIST_W-1:0] ghist;

  // ---- lookup ------------------------------------------------------------
  logic [LHIST_W-1:0] lk_lh;
  assign lk_lh       = lht[lk_pc[INST_ALIGN +: LIW]];
  assign pred_local  = lctr[lk_lh][LCTR_W-1];
  assign pred_global = gctr[ghist][1];
  assign pred_taken  = cctr[ghist][1] ? pred_global : pred_local;

  // ---- update ------------------------------------------------------------
  logic [LIW-1:0]     u_li;
  logic [LHIST_W-1:0] u_lh;
  logic               u_local, u_global;
  assign u_li     = upd_pc[INST_ALIGN +: LIW];
  assign u_lh     = lht[u_li];
  assign u_local  = lctr[u_lh][LCTR_W-1];
  assign u_global = gctr[ghist][1];

  function automatic logic [LCTR_W-1:0] sat_l(logic [LCTR_W-1:0] c, logic up);
    if (up) return (c == '1) ? c : c + 1'b1;
    else    return (c == '0) ? c : c - 1'b1;
  endfunction

  function automatic logic [1:0] sat2(logic [1:0] c, logic up);
    if (up) return (c == 2'b11) ? c : c + 2'b01;
    else    return (c == 2'b00) ? c : c - 2'b01;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ghist <= '0;
      for (int unsigned i = 0; i < LHT_ENTRIES; i++) lht[i]  <= '0;
      for (int unsigned i = 0; i < LCN; i++)         lctr[i] <= {1'b0, {(LCTR_W-1){1'b1}}};
      for (int unsigned i = 0; i < GCN; i++) begin
        gctr[i] <= 2'b01;
        cctr[i] <= 2'b01;
      end
    end else if (upd_valid) begin
      lctr[u_lh]  <= sat_l(lctr[u_lh], upd_taken);
      gctr[ghist] <= sat2(gctr[ghist], upd_taken);
      if (u_local != u_global)
        cctr[ghist] <= sat2(cctr[ghist], u_global == upd_taken);
      lht[u_li] <= {u_lh[LHIST_W-2:0], upd_taken};
      ghist     <= {ghist[GHIST_W-2:0], upd_taken};
    end
  end

endmodule
