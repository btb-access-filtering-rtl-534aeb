// tb_baf_bpu: end-to-end test of the branch prediction unit at its default
// size (128-entry filter buffer, 2048-entry 2-way main BTB with a 1-cycle
// access and drowsy sets, 32-entry RAS, full-size predictor). baf_stim runs
// a 20000-branch synthetic stream through it and checks targets, latency,
// filtering and that every mechanism occurs.
module tb_baf_bpu;
  import baf_pkg::*;
  localparam int unsigned PC_W = 64;

  logic clk = 0;
  always #5 clk = ~clk;

  logic            rst_n, lk_valid, lk_ready, rsp_valid, rsp_pred_taken, rsp_taken;
  logic [PC_W-1:0] lk_pc, rsp_target, upd_pc, upd_target, upd_pred_target;
  br_kind_e        lk_kind, upd_kind;
  tgt_src_e        rsp_src, upd_src;
  logic            upd_valid, upd_taken, fb_access, main_access, main_wake;
  logic [10:0]     main_awake_sets;
  int              checks, failures;
  logic            done;

  baf_bpu dut (.*);

  baf_stim #(.PC_W(PC_W), .LAT(1)) stim (
    .clk, .rst_n, .lk_valid, .lk_ready, .lk_pc, .lk_kind, .rsp_valid,
    .rsp_pred_taken, .rsp_taken, .rsp_target, .rsp_src, .upd_valid, .upd_pc,
    .upd_kind, .upd_taken, .upd_target, .upd_src, .upd_pred_target,
    .fb_access, .main_access, .main_wake, .checks, .failures, .done
  );

  int extra = 0, extra_fail = 0;
  // with the sets drowsy most of the time, far fewer than all are awake
  int awake_sum = 0, samples = 0;
  always @(posedge clk) if (rst_n) begin
    awake_sum += int'(main_awake_sets);
    samples++;
  end

  initial begin
    // done starts unknown: look at it only once the stimulus has reset it
    repeat (2) @(posedge clk);
    wait (done);
    extra++;
    if (samples == 0 || awake_sum / samples >= 1024 / 2) extra_fail++;
    $display("average awake main-BTB sets: %0d of 1024", awake_sum / (samples > 0 ? samples : 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra, failures + extra_fail);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra, failures + extra_fail + 1);
    $finish;
  end
endmodule
