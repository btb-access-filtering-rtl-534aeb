// drowsy_ctrl: drowsy-mode bookkeeping for the sets of the main BTB.
//
// Leakage in the large BTB is cut by holding its cells at a low retention
// voltage ("drowsy") whenever they are not in use. This block follows the
// simple drowsy policy: every WINDOW cycles all sets are put to drowsy at
// once; a set that is read or written is woken and stays awake until the next
// window boundary. Reading a drowsy set costs one extra cycle to restore the
// supply; the main BTB adds that cycle, this block only reports the state.
//
// Interface: rd_wake/rd_idx and wr_wake/wr_idx wake a set (effective from the
// next cycle); drowsy[s] is 1 when set s is drowsy now; awake_cnt counts the
// sets that are awake (a measure of the leakage being paid).
// Timing: the window counter runs from reset; on the boundary cycle the
// whole vector is set, and a wake in that same cycle is ignored.
// After reset every set is awake.
//
// The drowsy technique is named by the design; the window policy, the
// one-cycle wake-up and the per-set granularity are choices of this RTL.
module drowsy_ctrl #(
  parameter int unsigned SETS   = 1024,
  parameter int unsigned WINDOW = 4000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    rd_wake,
  input  logic [$clog2(SETS)-1:0] rd_idx,
  input  logic                    wr_wake,
  input  logic [$clog2(SETS)-1:0] wr_idx,
  output logic [SETS-1:0]         drowsy,
  output logic [$clog2(SETS):0]   awake_cnt
);

  logic [$clog2(WINDOW)-1:0] win_cnt;
  logic                      boundary;

  assign boundary = (win_cnt == $clog2(WINDOW)'(WINDOW - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_cnt <= '0;
      drowsy  <= '0;
    end else begin
      win_cnt <= boundary ? '0 : win_cnt + 1'b1;
      if (boundary) begin
        drowsy <= '1;
      end else begin
        if (rd_wake) drowsy[rd_idx] <= 1'b0;
        if (wr_wake) drowsy[wr_idx] <= 1'b0;
      end
    end
  end

  always_comb begin
    awake_cnt = '0;
    for (int unsigned s = 0; s < SETS; s++)
      awake_cnt = awake_cnt + {{$clog2(SETS){1'b0}}, ~drowsy[s]};
  end

endmodule
