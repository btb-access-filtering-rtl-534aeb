// baf_stim: stimulus and checker for the filtered branch prediction unit.
//
// It plays a synthetic branch stream through the lookup and update ports of
// one baf_bpu instance. The stream has NBR static branches, each with a
// fixed class and (for taken ones) a fixed target: conditional branches with
// a per-branch taken probability (never, always, mostly, rarely), jumps,
// and calls paired with later returns. Checks, per lookup:
//   * any target from the filter buffer or main BTB is the branch's target;
//   * a return's target is the address after its call (own stack model);
//   * a branch predicted not-taken reads neither buffer;
//   * the response comes 1 cycle after the lookup, or 1+LAT cycles when the
//     main BTB is read (2+LAT when its set was drowsy);
//   * the main BTB is read only after a filter-buffer miss.
// It counts how often each mechanism happened (filtered lookup, filter hit,
// main hit, main miss, drowsy wake-up, return from the RAS, cycles fetch
// waits for the main BTB)
// and counts a failure for any that never did. Updates are sent in the
// cycle after each response, in order. Outputs checks/failures and done.
module baf_stim
  import baf_pkg::*;
#(
  parameter int unsigned PC_W = 64,
  parameter int unsigned LAT  = 1,
  parameter int unsigned NBR  = 400,
  parameter int unsigned NLK  = 20000,
  parameter int unsigned SEED = 1
) (
  input  logic            clk,
  output logic            rst_n,
  output logic            lk_valid,
  input  logic            lk_ready,
  output logic [PC_W-1:0] lk_pc,
  output br_kind_e        lk_kind,
  input  logic            rsp_valid,
  input  logic            rsp_pred_taken,
  input  logic            rsp_taken,
  input  logic [PC_W-1:0] rsp_target,
  input  tgt_src_e        rsp_src,
  output logic            upd_valid,
  output logic [PC_W-1:0] upd_pc,
  output br_kind_e        upd_kind,
  output logic            upd_taken,
  output logic [PC_W-1:0] upd_target,
  output tgt_src_e        upd_src,
  output logic [PC_W-1:0] upd_pred_target,
  input  logic            fb_access,
  input  logic            main_access,
  input  logic            main_wake,
  output int              checks,
  output int              failures,
  output logic            done
);

  // static program
  logic [PC_W-1:0] br_pc   [NBR];
  logic [PC_W-1:0] br_tgt  [NBR];
  br_kind_e        br_kind [NBR];
  int              br_prob [NBR];   // taken probability in percent

  int n_filtered, n_fb_hit, n_main_hit, n_main_miss, n_wake, n_ras, n_stall;
  int n_fb_rd, n_main_rd, n_lookups;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // access strobes, counted per cycle
  int fb_rd_cycle, main_rd_cycle;
  always @(posedge clk) if (rst_n) begin
    if (fb_access)   begin n_fb_rd++;   fb_rd_cycle   = cyc; end
    if (main_access) begin n_main_rd++; main_rd_cycle = cyc; end
  end

  logic [PC_W-1:0] call_stack[$];

  initial begin
    int unsigned rs = SEED;
    void'($urandom(rs));
    checks = 0; failures = 0; done = 0;
    n_filtered = 0; n_fb_hit = 0; n_main_hit = 0; n_main_miss = 0;
    n_wake = 0; n_ras = 0; n_stall = 0; n_fb_rd = 0; n_main_rd = 0; n_lookups = 0;
    rst_n = 0; lk_valid = 0; lk_pc = '0; lk_kind = BR_COND;
    upd_valid = 0; upd_pc = '0; upd_kind = BR_COND; upd_taken = 0;
    upd_target = '0; upd_src = SRC_NONE; upd_pred_target = '0;
    for (int i = 0; i < NBR; i++) begin
      int r;
      r = $urandom % 100;
      // PCs spread so that both buffers see conflicts
      br_pc[i]  = PC_W'(64'h0001_2000 + 64'(i) * 64'h34 + 64'(($urandom % 4) * 4096));
      br_tgt[i] = PC_W'(64'h0040_0000 + 64'($urandom % 65536) * 4);
      if (r < 70) begin
        br_kind[i] = BR_COND;
        case ($urandom % 4)
          0: br_prob[i] = 0;
          1: br_prob[i] = 100;
          2: br_prob[i] = 90;
          default: br_prob[i] = 10;
        endcase
      end else if (r < 85) begin
        br_kind[i] = BR_UNCOND; br_prob[i] = 100;
      end else begin
        br_kind[i] = BR_CALL;   br_prob[i] = 100;
      end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);

    for (int n = 0; n < NLK; n++) begin
      int              b, t_acc, lat_got, lat_exp;
      logic [PC_W-1:0] pc, exp_ret;
      br_kind_e        kind;
      bit              taken;
      logic [PC_W-1:0] target;
      bit              is_ret, acc;
      // choose the next branch: a pending return now and then, else a branch
      // from a hot working set with occasional far ones
      is_ret = (call_stack.size() > 0) && (($urandom % 4) == 0 || call_stack.size() > 6);
      if (is_ret) begin
        b = -1;
        pc = PC_W'(64'h0080_0000 + 64'($urandom % 256) * 4);
        kind = BR_RET;
        exp_ret = call_stack.pop_back();
        taken = 1; target = exp_ret;
      end else begin
        b = (($urandom % 10) < 8) ? int'($urandom % 100) : int'($urandom % NBR);
        pc = br_pc[b]; kind = br_kind[b];
        taken  = int'($urandom % 100) < br_prob[b];
        target = br_tgt[b];
        if (kind == BR_CALL) call_stack.push_back(pc + PC_W'(4));
      end
      // lookup, holding lk_valid until accepted (lk_ready is registered
      // state, stable through the cycle)
      lk_valid = 1; lk_pc = pc; lk_kind = kind;
      forever begin
        acc   = lk_ready;
        t_acc = cyc;
        @(posedge clk); #1;
        if (acc) break;
      end
      lk_valid = 0;
      n_lookups++;
      lat_got = 1;
      while (!rsp_valid && lat_got < 20) begin
        // fetch waits for the main BTB: no new lookup can be taken
        check(!lk_ready, "lookup port blocked while main BTB is read");
        n_stall++;
        @(posedge clk); #1; lat_got++;
      end
      check(rsp_valid, "response arrives");
      // classify the response
      if (kind == BR_RET) begin
        check(rsp_src == SRC_RAS && rsp_taken && rsp_target == exp_ret, "return target from RAS");
        lat_exp = 1;
        n_ras++;
      end else if (!rsp_pred_taken) begin
        check(kind == BR_COND, "only conditional branches predicted not-taken");
        check(fb_rd_cycle != t_acc && main_rd_cycle != t_acc + 1, "filtered lookup reads no buffer");
        lat_exp = 1;
        n_filtered++;
      end else if (rsp_src == SRC_FILTER) begin
        check(rsp_taken && rsp_target == target, "filter-buffer target");
        check(fb_rd_cycle == t_acc, "filter buffer read in lookup cycle");
        lat_exp = 1;
        n_fb_hit++;
      end else begin
        check(fb_rd_cycle == t_acc && main_rd_cycle == t_acc + 1, "main BTB read after filter miss");
        lat_exp = 1 + LAT + (main_wake ? 1 : 0);
        if (main_wake) n_wake++;
        if (rsp_src == SRC_MAIN) begin
          check(rsp_taken && rsp_target == target, "main-BTB target");
          n_main_hit++;
        end else begin
          check(!rsp_taken && rsp_src == SRC_NONE, "main-BTB miss falls through");
          n_main_miss++;
        end
      end
      check(lat_got == lat_exp, $sformatf("latency got %0d expected %0d", lat_got, lat_exp));
      // resolve in the next cycle
      @(posedge clk); #1;
      upd_valid = 1; upd_pc = pc; upd_kind = kind; upd_taken = taken;
      upd_target = target; upd_src = rsp_src; upd_pred_target = rsp_target;
      @(posedge clk); #1;
      upd_valid = 0;
    end

    $display("lookups=%0d filtered=%0d fb_hit=%0d main_hit=%0d main_miss=%0d ras=%0d wake=%0d stall_cycles=%0d",
             n_lookups, n_filtered, n_fb_hit, n_main_hit, n_main_miss, n_ras, n_wake, n_stall);
    $display("filter-buffer reads=%0d main-BTB reads=%0d (%0d%% of lookups)",
             n_fb_rd, n_main_rd, (100 * n_main_rd) / n_lookups);
    check(n_filtered  > 0, "mechanism: lookup filtered by direction prediction");
    check(n_fb_hit    > 0, "mechanism: filter-buffer hit");
    check(n_main_hit  > 0, "mechanism: main-BTB hit after filter miss");
    check(n_main_miss > 0, "mechanism: miss in both buffers");
    check(n_ras       > 0, "mechanism: return predicted from RAS");
    check(n_wake      > 0, "mechanism: drowsy set woken");
    check(n_stall     > 0, "mechanism: lookup stalled by main-BTB read");
    check(n_main_rd < n_lookups / 2, "main BTB read by fewer than half the lookups");
    done = 1;
  end

endmodule
