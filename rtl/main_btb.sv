// main_btb: the large set-associative branch target buffer behind the filter.
//
// ENTRIES entries in WAYS ways (SETS = ENTRIES/WAYS sets). The set index is
// taken from the PC just above the two alignment bits, the tag is the rest
// of the PC. Replacement: the victim is the first invalid way, else the way
// after the most recently used one (for two ways this is exact LRU). A read
// hit and a write make their way most recently used.
//
// Access latency is LAT cycles, so that the deeper-pipelined versions of the
// design (a 2- or 3-cycle BTB) can be built. With DROWSY_EN the sets are kept
// in a drowsy low-leakage state by drowsy_ctrl, and a read of a drowsy set
// takes one extra cycle to wake it.
//
// Interface and timing (one read outstanding at a time):
//   rd_req/rd_pc   start a read; not allowed while busy. The tags are
//                  compared in the request cycle.
//   rd_valid       high for one cycle, LAT cycles after rd_req (LAT+1 when
//                  the set was drowsy), with rd_hit and rd_target.
//                  A new rd_req may be given in that cycle.
//   rd_woke        high with rd_valid when the read paid the wake-up cycle.
//   busy           a read is in flight and its result is not out yet.
//   wr_en/...      allocate or update the entry for wr_pc at the clock edge
//                  (separate write port; it wakes the set, with no delay).
//   awake_cnt      number of sets not drowsy (all sets when DROWSY_EN=0).
//
// Size and associativity (2048 entries, 2 ways) and the 1/2/3-cycle latency
// follow the design; the replacement policy, the separate read and write
// ports, the one-cycle wake-up and the delay-line model of latency are
// choices of this RTL.
module main_btb #(
  parameter int unsigned ENTRIES       = 2048,
  parameter int unsigned WAYS          = 2,
  parameter int unsigned PC_W          = 64,
  parameter int unsigned LAT           = 1,
  parameter bit          DROWSY_EN     = 1'b1,
  parameter int unsigned DROWSY_WINDOW = 4000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    rd_req,
  input  logic [PC_W-1:0]         rd_pc,
  output logic                    busy,
  output logic                    rd_valid,
  output logic                    rd_hit,
  output logic [PC_W-1:0]         rd_target,
  output logic                    rd_woke,
  input  logic                    wr_en,
  input  logic [PC_W-1:0]         wr_pc,
  input  logic [PC_W-1:0]         wr_target,
  output logic [$clog2(ENTRIES/WAYS):0] awake_cnt
);

  import baf_pkg::INST_ALIGN;

  localparam int unsigned SETS = ENTRIES / WAYS;
  localparam int unsigned IW   = $clog2(SETS);
  localparam int unsigned TW   = PC_W - IW - INST_ALIGN;
  localparam int unsigned DW   = PC_W - INST_ALIGN;
  localparam int unsigned WW   = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned CW   = $clog2(LAT + 1) + 1;

  initial begin
    assert (LAT >= 1) else $error("main_btb: LAT must be at least 1");
    assert (WAYS >= 1 && ENTRIES % WAYS == 0) else $error("main_btb: bad geometry");
  end

  logic [WAYS-1:0] valid [SETS];
  logic [TW-1:0]   tags    [SETS][WAYS];
  logic [DW-1:0]   targets [SETS][WAYS];
  logic [WW-1:0]   mru     [SETS];

  logic [IW-1:0] rd_idx, wr_idx;
  logic [TW-1:0] rd_tag, wr_tag;
  assign rd_idx = rd_pc[INST_ALIGN +: IW];
  assign rd_tag = rd_pc[PC_W-1 -: TW];
  assign wr_idx = wr_pc[INST_ALIGN +: IW];
  assign wr_tag = wr_pc[PC_W-1 -: TW];

  // ---- drowsy state ------------------------------------------------------
  logic [SETS-1:0] drowsy;
  if (DROWSY_EN) begin : g_drowsy
    drowsy_ctrl #(.SETS(SETS), .WINDOW(DROWSY_WINDOW)) u_drowsy (
      .clk, .rst_n,
      .rd_wake (rd_req), .rd_idx,
      .wr_wake (wr_en),  .wr_idx,
      .drowsy, .awake_cnt
    );
  end else begin : g_awake
    assign drowsy    = '0;
    assign awake_cnt = ($clog2(SETS)+1)'(SETS);
  end

  // ---- read: compare in the request cycle --------------------------------
  logic          lk_hit;
  logic [WW-1:0] lk_way;
  always_comb begin
    lk_hit = 1'b0;
    lk_way = '0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (!lk_hit && valid[rd_idx][w] && tags[rd_idx][w] == rd_tag) begin
        lk_hit = 1'b1;
        lk_way = WW'(w);
      end
  end

  // ---- write: find the way to fill ---------------------------------------
  logic          wr_hit;
  logic [WW-1:0] wr_way, wr_victim;
  always_comb begin
    wr_hit = 1'b0;
    wr_way = '0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (!wr_hit && valid[wr_idx][w] && tags[wr_idx][w] == wr_tag) begin
        wr_hit = 1'b1;
        wr_way = WW'(w);
      end
    // victim: first invalid way, else the way after the MRU one
    if (WAYS == 1) wr_victim = '0;
    else if (mru[wr_idx] == WW'(WAYS - 1)) wr_victim = '0;
    else wr_victim = mru[wr_idx] + 1'b1;
    for (int w = WAYS - 1; w >= 0; w--)
      if (!valid[wr_idx][w]) wr_victim = WW'(w);
    if (!wr_hit) wr_way = wr_victim;
  end

  // ---- latency pipeline --------------------------------------------------
  logic          pending;
  logic [CW-1:0] remain;
  logic          res_hit, res_woke;
  logic [DW-1:0] res_target;

  assign rd_valid  = pending && (remain == '0);
  assign busy      = pending && (remain != '0);
  assign rd_hit    = res_hit;
  assign rd_target = {res_target, {INST_ALIGN{1'b0}}};
  assign rd_woke   = res_woke;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending  <= 1'b0;
      remain   <= '0;
      res_hit  <= 1'b0;
      res_woke <= 1'b0;
      for (int unsigned s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        mru[s]   <= '0;
      end
    end else begin
      if (rd_req) begin
        pending  <= 1'b1;
        remain   <= CW'(LAT - 1) + CW'(drowsy[rd_idx]);
        res_hit  <= lk_hit;
        res_woke <= drowsy[rd_idx];
        if (lk_hit) mru[rd_idx] <= lk_way;
      end else if (rd_valid) begin
        pending <= 1'b0;
      end else if (busy) begin
        remain <= remain - 1'b1;
      end
      if (wr_en) begin
        valid[wr_idx][wr_way] <= 1'b1;
        mru[wr_idx]           <= wr_way;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rd_req) res_target <= targets[rd_idx][lk_way];
    if (wr_en) begin
      tags[wr_idx][wr_way]    <= wr_tag;
      targets[wr_idx][wr_way] <= wr_target[PC_W-1:INST_ALIGN];
    end
  end

  // a read may only start when none is in flight
  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    rd_req |-> !busy);

endmodule
