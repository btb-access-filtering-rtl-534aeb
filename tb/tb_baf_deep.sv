// tb_baf_deep: the branch prediction unit with a slower main BTB, as in a
// deeper pipeline: one instance with a 2-cycle and one with a 3-cycle main
// BTB access. Each gets its own baf_stim stream; the checker expects main-BTB
// responses 1+LAT cycles after the lookup (one more for a drowsy set) and
// filter-buffer responses after one cycle, whatever the main BTB latency.
module tb_baf_deep;
  import baf_pkg::*;
  localparam int unsigned PC_W = 64;

  logic clk = 0;
  always #5 clk = ~clk;

  logic            rst_n [2], lk_valid [2], lk_ready [2], rsp_valid [2];
  logic            rsp_pred_taken [2], rsp_taken [2];
  logic [PC_W-1:0] lk_pc [2], rsp_target [2], upd_pc [2], upd_target [2], upd_pred_target [2];
  br_kind_e        lk_kind [2], upd_kind [2];
  tgt_src_e        rsp_src [2], upd_src [2];
  logic            upd_valid [2], upd_taken [2], fb_access [2], main_access [2], main_wake [2];
  logic [10:0]     main_awake_sets [2];
  int              checks [2], failures [2];
  logic            done [2];

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    baf_bpu #(.BTB_LAT(g + 2)) dut (
      .clk, .rst_n (rst_n[g]), .lk_valid (lk_valid[g]), .lk_ready (lk_ready[g]),
      .lk_pc (lk_pc[g]), .lk_kind (lk_kind[g]), .rsp_valid (rsp_valid[g]),
      .rsp_pred_taken (rsp_pred_taken[g]), .rsp_taken (rsp_taken[g]),
      .rsp_target (rsp_target[g]), .rsp_src (rsp_src[g]),
      .upd_valid (upd_valid[g]), .upd_pc (upd_pc[g]), .upd_kind (upd_kind[g]),
      .upd_taken (upd_taken[g]), .upd_target (upd_target[g]), .upd_src (upd_src[g]),
      .upd_pred_target (upd_pred_target[g]), .fb_access (fb_access[g]),
      .main_access (main_access[g]), .main_wake (main_wake[g]),
      .main_awake_sets (main_awake_sets[g])
    );
    baf_stim #(.PC_W(PC_W), .LAT(g + 2), .NLK(10000), .SEED(7 + g)) stim (
      .clk, .rst_n (rst_n[g]), .lk_valid (lk_valid[g]), .lk_ready (lk_ready[g]),
      .lk_pc (lk_pc[g]), .lk_kind (lk_kind[g]), .rsp_valid (rsp_valid[g]),
      .rsp_pred_taken (rsp_pred_taken[g]), .rsp_taken (rsp_taken[g]),
      .rsp_target (rsp_target[g]), .rsp_src (rsp_src[g]),
      .upd_valid (upd_valid[g]), .upd_pc (upd_pc[g]), .upd_kind (upd_kind[g]),
      .upd_taken (upd_taken[g]), .upd_target (upd_target[g]), .upd_src (upd_src[g]),
      .upd_pred_target (upd_pred_target[g]), .fb_access (fb_access[g]),
      .main_access (main_access[g]), .main_wake (main_wake[g]),
      .checks (checks[g]), .failures (failures[g]), .done (done[g])
    );
  end

  initial begin
    // done starts unknown: look at it only once the stimulus has reset it
    repeat (2) @(posedge clk);
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1]);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1] + 1);
    $finish;
  end
endmodule
