// baf_bpu: branch prediction unit with BTB access filtering.
//
// A large BTB is accurate but costly in energy and, at high clock rates, in
// access time. Most branch lookups do not need it: a branch predicted
// not-taken needs no target at all, and most taken branches are found in a
// much smaller buffer. This unit therefore puts two filters in front of the
// large BTB:
//   1. the direction predictor: a conditional branch predicted not-taken
//      reads neither BTB;
//   2. the filter buffer, a small direct-mapped BTB: a predicted-taken branch
//      (or an unconditional jump or call) reads it first, and only on a miss
//      is the main BTB read, at its own (possibly multi-cycle) latency.
// Returns take their target from the return address stack and read no BTB.
// Because the main BTB is read so rarely, its sets spend most of their time
// drowsy (low leakage), and its longer latency is seldom exposed.
//
// Lookup interface (from fetch, branches only; the branch class comes from
// predecode):  lk_valid/lk_ready handshake with lk_pc and lk_kind.
// Response: rsp_valid for one cycle per accepted lookup, with
//   rsp_pred_taken  predicted direction (always 1 for jumps, calls, returns)
//   rsp_taken       fetch should redirect to rsp_target
//   rsp_src         which structure gave the target (handed back at update)
// Timing: the predictor and (when allowed) the filter buffer are read in the
// lookup cycle; the response comes in the next cycle unless the main BTB is
// needed, in which case it comes BTB_LAT cycles later (one more if the set
// was drowsy). lk_ready is low while a main-BTB read is in flight: that is
// the only stall. A new lookup may be accepted in the response cycle.
//
// Update interface (from branch resolution, in program order): upd_valid with
// the branch PC, class, outcome, actual target and the rsp_src and target
// that were predicted. Conditional branches train the predictor. A taken
// branch whose correct target did not come from the filter buffer is written
// into it; if the correct target did not come from the main BTB either, it is
// written there too. On a main-BTB hit the entry is also copied into the
// filter buffer at response time (an update write in the same cycle wins).
//
// Activity outputs count energy-relevant events: fb_access and main_access
// pulse on each read of the two buffers, main_wake pulses with a main-BTB
// result that paid the drowsy wake-up cycle, main_awake_sets gives how many main
// BTB sets are not drowsy.
//
// Following the design: the filtering by the direction predictor, the
// 128-entry direct-mapped filter buffer, the 2048-entry 2-way main BTB, its
// 1/2/3-cycle latency, the drowsy main BTB, the 32-entry RAS and the
// 21264-style predictor. Choices of this RTL: the handshakes, the serial
// predictor-then-filter read in one cycle, the fill and update policy, the
// RAS handling and the non-speculative predictor history.
module baf_bpu
  import baf_pkg::*;
#(
  parameter int unsigned PC_W          = 64,
  parameter int unsigned FB_ENTRIES    = 128,
  parameter int unsigned BTB_ENTRIES   = 2048,
  parameter int unsigned BTB_WAYS      = 2,
  parameter int unsigned BTB_LAT       = 1,
  parameter bit          DROWSY_EN     = 1'b1,
  parameter int unsigned DROWSY_WINDOW = 4000,
  parameter int unsigned RAS_DEPTH     = 32,
  parameter int unsigned LHT_ENTRIES   = 1024,
  parameter int unsigned LHIST_W       = 10,
  parameter int unsigned LCTR_W        = 3,
  parameter int unsigned GHIST_W       = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  // lookup
  input  logic            lk_valid,
  output logic            lk_ready,
  input  logic [PC_W-1:0] lk_pc,
  input  br_kind_e        lk_kind,
  // response
  output logic            rsp_valid,
  output logic            rsp_pred_taken,
  output logic            rsp_taken,
  output logic [PC_W-1:0] rsp_target,
  output tgt_src_e        rsp_src,
  // update
  input  logic            upd_valid,
  input  logic [PC_W-1:0] upd_pc,
  input  br_kind_e        upd_kind,
  input  logic            upd_taken,
  input  logic [PC_W-1:0] upd_target,
  input  tgt_src_e        upd_src,
  input  logic [PC_W-1:0] upd_pred_target,
  // activity
  output logic            fb_access,
  output logic            main_access,
  output logic            main_wake,
  output logic [$clog2(BTB_ENTRIES/BTB_WAYS):0] main_awake_sets
);

  typedef enum logic [1:0] {S_IDLE, S_RESOLVE, S_MAIN} state_e;

  state_e          state;
  logic            lk_fire;
  logic [PC_W-1:0] pc_q;
  br_kind_e        kind_q;
  logic            pred_q;
  logic [PC_W-1:0] ras_q;
  logic            ras_ok_q;

  // ---- direction predictor ---------------------------------------------
  logic pred_taken;
  tournament_predictor #(
    .PC_W(PC_W), .LHT_ENTRIES(LHT_ENTRIES), .LHIST_W(LHIST_W),
    .LCTR_W(LCTR_W), .GHIST_W(GHIST_W)
  ) u_dir (
    .clk, .rst_n,
    .lk_pc       (lk_pc),
    .pred_taken  (pred_taken),
    .pred_local  (),
    .pred_global (),
    .upd_valid   (upd_valid && upd_kind == BR_COND),
    .upd_pc      (upd_pc),
    .upd_taken   (upd_taken)
  );

  // ---- return address stack -------------------------------------------
  logic [PC_W-INST_ALIGN-1:0] ras_top;
  logic                       ras_valid;
  logic [PC_W-1:0]            ret_addr;
  assign ret_addr = lk_pc + PC_W'(4);
  ras #(.DEPTH(RAS_DEPTH), .W(PC_W-INST_ALIGN)) u_ras (
    .clk, .rst_n,
    .push      (lk_fire && lk_kind == BR_CALL),
    .push_addr (ret_addr[PC_W-1:INST_ALIGN]),
    .pop       (lk_fire && lk_kind == BR_RET),
    .top       (ras_top),
    .valid     (ras_valid)
  );

  // ---- filter buffer ----------------------------------------------------
  logic            fb_rd_en, fb_done, fb_hit;
  logic [PC_W-1:0] fb_target;
  logic            fb_wr_en;
  logic [PC_W-1:0] fb_wr_pc, fb_wr_target;

  // first filter: only a branch that will be taken reads a BTB at all
  assign fb_rd_en = lk_fire && lk_kind != BR_RET &&
                    (lk_kind != BR_COND || pred_taken);

  filter_buffer #(.ENTRIES(FB_ENTRIES), .PC_W(PC_W)) u_fb (
    .clk, .rst_n,
    .rd_en     (fb_rd_en),
    .rd_pc     (lk_pc),
    .rd_done   (fb_done),
    .rd_hit    (fb_hit),
    .rd_target (fb_target),
    .wr_en     (fb_wr_en),
    .wr_pc     (fb_wr_pc),
    .wr_target (fb_wr_target)
  );

  // ---- main BTB ----------------------------------------------------------
  logic            main_rd_req, main_rd_valid, main_hit, main_woke;
  logic [PC_W-1:0] main_target;
  logic            main_wr_en;

  main_btb #(
    .ENTRIES(BTB_ENTRIES), .WAYS(BTB_WAYS), .PC_W(PC_W), .LAT(BTB_LAT),
    .DROWSY_EN(DROWSY_EN), .DROWSY_WINDOW(DROWSY_WINDOW)
  ) u_main (
    .clk, .rst_n,
    .rd_req    (main_rd_req),
    .rd_pc     (pc_q),
    .busy      (),
    .rd_valid  (main_rd_valid),
    .rd_hit    (main_hit),
    .rd_target (main_target),
    .rd_woke   (main_woke),
    .wr_en     (main_wr_en),
    .wr_pc     (upd_pc),
    .wr_target (upd_target),
    .awake_cnt (main_awake_sets)
  );

  // ---- resolve stage -----------------------------------------------------
  logic s1_dir, s1_need_main;
  assign s1_dir       = (kind_q == BR_COND) ? pred_q : 1'b1;
  // second filter: the filter buffer answers, or the main BTB is read
  assign s1_need_main = state == S_RESOLVE && kind_q != BR_RET && s1_dir && !fb_hit;
  assign main_rd_req  = s1_need_main;

  assign lk_ready = (state == S_IDLE) ||
                    (state == S_RESOLVE && !s1_need_main) ||
                    (state == S_MAIN && main_rd_valid);
  assign lk_fire  = lk_valid && lk_ready;

  always_comb begin
    rsp_valid      = 1'b0;
    rsp_pred_taken = 1'b0;
    rsp_taken      = 1'b0;
    rsp_target     = '0;
    rsp_src        = SRC_NONE;
    if (state == S_RESOLVE) begin
      if (kind_q == BR_RET) begin
        rsp_valid      = 1'b1;
        rsp_pred_taken = 1'b1;
        rsp_taken      = ras_ok_q;
        rsp_target     = ras_q;
        rsp_src        = ras_ok_q ? SRC_RAS : SRC_NONE;
      end else if (!s1_dir) begin
        rsp_valid      = 1'b1;
      end else if (fb_hit) begin
        rsp_valid      = 1'b1;
        rsp_pred_taken = 1'b1;
        rsp_taken      = 1'b1;
        rsp_target     = fb_target;
        rsp_src        = SRC_FILTER;
      end
    end else if (state == S_MAIN && main_rd_valid) begin
      rsp_valid      = 1'b1;
      rsp_pred_taken = 1'b1;
      rsp_taken      = main_hit;
      rsp_target     = main_hit ? main_target : '0;
      rsp_src        = main_hit ? SRC_MAIN : SRC_NONE;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      pc_q     <= '0;
      kind_q   <= BR_COND;
      pred_q   <= 1'b0;
      ras_q    <= '0;
      ras_ok_q <= 1'b0;
    end else begin
      if (lk_fire) begin
        state    <= S_RESOLVE;
        pc_q     <= lk_pc;
        kind_q   <= lk_kind;
        pred_q   <= pred_taken;
        ras_q    <= {ras_top, {INST_ALIGN{1'b0}}};
        ras_ok_q <= ras_valid;
      end else if (s1_need_main) begin
        state <= S_MAIN;
      end else if (state == S_RESOLVE || (state == S_MAIN && main_rd_valid)) begin
        state <= S_IDLE;
      end
    end
  end

  // ---- update ------------------------------------------------------------
  logic upd_btb, upd_fb_ok, upd_main_ok, upd_tgt_ok;
  assign upd_btb     = upd_valid && upd_taken && upd_kind != BR_RET;
  assign upd_tgt_ok  = (upd_pred_target == upd_target);
  assign upd_fb_ok   = (upd_src == SRC_FILTER) && upd_tgt_ok;
  assign upd_main_ok = (upd_src == SRC_MAIN) && upd_tgt_ok;
  assign main_wr_en  = upd_btb && !upd_fb_ok && !upd_main_ok;

  // filter-buffer write: resolution update first, else copy of a main hit
  always_comb begin
    if (upd_btb && !upd_fb_ok) begin
      fb_wr_en     = 1'b1;
      fb_wr_pc     = upd_pc;
      fb_wr_target = upd_target;
    end else begin
      fb_wr_en     = state == S_MAIN && main_rd_valid && main_hit;
      fb_wr_pc     = pc_q;
      fb_wr_target = main_target;
    end
  end

  assign fb_access   = fb_rd_en;
  assign main_access = main_rd_req;
  assign main_wake   = main_rd_valid && main_woke;

  // a branch predicted not-taken never reaches the main BTB
  a_filtered: assert property (@(posedge clk) disable iff (!rst_n)
    main_rd_req |-> (kind_q != BR_COND || pred_q));
  // the filter buffer result is there whenever the resolve stage needs it
  a_fb_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_RESOLVE && kind_q != BR_RET && s1_dir) |-> fb_done);

endmodule
