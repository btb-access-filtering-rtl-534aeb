// tb_tournament_predictor: self-checking test of the tournament predictor.
// Part 1 compares every lookup against a reference model of the local /
// global / choice scheme (its own tables, written as plain arrays of ints)
// over a random branch stream. Part 2 checks learning behaviour that follows
// from the scheme itself: a loop branch with a period-4 pattern must be
// predicted perfectly once its local history has trained, and a branch that
// copies the outcome of the branch before it must be predicted perfectly
// through the global history (apart from the few history patterns it
// shares with the random branch).
module tb_tournament_predictor;
  localparam int unsigned PC_W = 32, LHT = 64, LH = 6, LC = 3, GH = 8;
  logic clk = 0, rst_n = 0;
  logic [PC_W-1:0] lk_pc = 0, upd_pc = 0;
  logic upd_valid = 0, upd_taken = 0;
  logic pred_taken, pred_local, pred_global;
  int checks = 0, failures = 0;

  tournament_predictor #(.PC_W(PC_W), .LHT_ENTRIES(LHT), .LHIST_W(LH),
                         .LCTR_W(LC), .GHIST_W(GH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endfunction

  // reference model
  int m_lht [LHT];
  int m_lc  [1 << LH];
  int m_gc  [1 << GH];
  int m_cc  [1 << GH];
  int m_gh;

  function automatic void m_reset();
    foreach (m_lht[i]) m_lht[i] = 0;
    foreach (m_lc[i])  m_lc[i]  = (1 << (LC - 1)) - 1;
    foreach (m_gc[i])  m_gc[i]  = 1;
    foreach (m_cc[i])  m_cc[i]  = 1;
    m_gh = 0;
  endfunction

  function automatic int li(logic [PC_W-1:0] pc);
    return int'((pc >> 2) % LHT);
  endfunction

  function automatic bit m_local(logic [PC_W-1:0] pc);
    return m_lc[m_lht[li(pc)]] >= (1 << (LC - 1));
  endfunction
  function automatic bit m_global();
    return m_gc[m_gh] >= 2;
  endfunction
  function automatic bit m_pred(logic [PC_W-1:0] pc);
    return (m_cc[m_gh] >= 2) ? m_global() : m_local(pc);
  endfunction

  function automatic int sat(int v, bit up, int maxv);
    if (up) return (v < maxv) ? v + 1 : v;
    return (v > 0) ? v - 1 : v;
  endfunction

  function automatic void m_update(logic [PC_W-1:0] pc, bit t);
    bit l = m_local(pc), g = m_global();
    int h = m_lht[li(pc)];
    m_lc[h] = sat(m_lc[h], t, (1 << LC) - 1);
    m_gc[m_gh] = sat(m_gc[m_gh], t, 3);
    if (l != g) m_cc[m_gh] = sat(m_cc[m_gh], g == t, 3);
    m_lht[li(pc)] = ((h << 1) | int'(t)) & ((1 << LH) - 1);
    m_gh = ((m_gh << 1) | int'(t)) & ((1 << GH) - 1);
  endfunction

  // lookup then resolve one branch; returns 1 if the prediction was right
  task automatic branch(logic [PC_W-1:0] pc, bit t, output bit right);
    lk_pc = pc;
    #1;
    check(pred_local == m_local(pc), "local vote");
    check(pred_global == m_global(), "global vote");
    check(pred_taken == m_pred(pc), "prediction");
    right = (pred_taken == t);
    upd_valid = 1; upd_pc = pc; upd_taken = t;
    @(posedge clk);
    m_update(pc, t);
    #1 upd_valid = 0;
  endtask

  initial begin
    bit r;
    int wrong;
    m_reset();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // part 1: random stream over a few PCs with biased outcomes
    for (int i = 0; i < 3000; i++) begin
      logic [PC_W-1:0] pc;
      bit t;
      pc = PC_W'((($urandom % 200)) * 4);
      t  = ((pc >> 2) % 3 == 0) ? (($urandom % 8) != 0) : (($urandom % 5) == 0);
      branch(pc, t, r);
    end
    // part 2a: loop branch T T T N repeated
    wrong = 0;
    for (int i = 0; i < 400; i++) begin
      branch(32'h1000, (i % 4) != 3, r);
      if (i >= 200 && !r) wrong++;
    end
    check(wrong == 0, "period-4 loop branch learned");
    // part 2b: branch B repeats the random outcome of branch A
    wrong = 0;
    for (int i = 0; i < 1500; i++) begin
      bit t;
      t = 1'($urandom % 2);
      branch(32'h2000, t, r);
      branch(32'h3004, t, r);
      if (i >= 1200 && !r) wrong++;
    end
    // the two all-equal history patterns are shared with branch A, whose
    // outcome there is random, so a few mispredictions remain
    $display("correlated branch: %0d of 300 mispredicted", wrong);
    check(wrong <= 15, "correlated branch learned through global history");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
