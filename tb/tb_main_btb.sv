// tb_main_btb: self-checking test of the set-associative main BTB.
// The reference model keeps, per set, a list of (PC, target) in recency
// order (most recent first) and evicts the least recent entry when a set
// overflows, which for two ways is what the block must do. Each read is
// checked for hit, target and latency: LAT cycles, plus one when the set
// was drowsy. The model tracks drowsiness with its own window counter.
// The test runs once per latency 1, 2 and 3 (three instances).
module tb_main_btb;
  localparam int unsigned ENTRIES = 32, WAYS = 2, PC_W = 32, WINDOW = 50;
  localparam int unsigned SETS = ENTRIES / WAYS;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endfunction

  // per-latency interface signals
  logic                  rd_req [3];
  logic [PC_W-1:0]       rd_pc  [3];
  logic                  busy [3], rd_valid [3], rd_hit [3], rd_woke [3];
  logic [PC_W-1:0]       rd_target [3];
  logic                  wr_en [3];
  logic [PC_W-1:0]       wr_pc [3], wr_target [3];
  logic [$clog2(SETS):0] awake_cnt [3];

  for (genvar g = 0; g < 3; g++) begin : g_dut
    main_btb #(.ENTRIES(ENTRIES), .WAYS(WAYS), .PC_W(PC_W), .LAT(g + 1),
               .DROWSY_EN(1'b1), .DROWSY_WINDOW(WINDOW)) dut (
      .clk, .rst_n,
      .rd_req (rd_req[g]), .rd_pc (rd_pc[g]), .busy (busy[g]),
      .rd_valid (rd_valid[g]), .rd_hit (rd_hit[g]), .rd_target (rd_target[g]),
      .rd_woke (rd_woke[g]),
      .wr_en (wr_en[g]), .wr_pc (wr_pc[g]), .wr_target (wr_target[g]),
      .awake_cnt (awake_cnt[g])
    );
  end

  int cyc = 0;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  // cycle of the last read or write of each set; the set is drowsy now if a
  // window boundary (the edge after cycle k*WINDOW-1) came at or after it
  int last_touch [3][SETS];

  int wakes [3];
  int hits  [3];
  int evicts[3];

  task automatic run(int g);
    int unsigned     lat = g + 1;
    logic [PC_W-1:0] m_pc  [SETS][$];
    logic [PC_W-1:0] m_tgt [SETS][$];
    for (int i = 0; i < 600; i++) begin
      logic [PC_W-1:0] pc;
      int              s, pos, t0, waited;
      bit              exp_hit, exp_drowsy;
      logic [PC_W-1:0] exp_tgt;
      // idle for a while so that windows pass and sets turn drowsy
      repeat ($urandom % 30) @(posedge clk);
      #1;
      pc = PC_W'(($urandom % (3 * ENTRIES)) * 4);
      s  = int'((pc >> 2) % SETS);
      exp_drowsy = (cyc / WINDOW) != (last_touch[g][s] / WINDOW);
      pos = -1;
      foreach (m_pc[s][k]) if (m_pc[s][k] == pc) pos = k;
      exp_hit = pos >= 0;
      exp_tgt = exp_hit ? m_tgt[s][pos] : '0;
      if ($urandom % 2) begin
        // read
        rd_req[g] = 1; rd_pc[g] = pc;
        t0 = cyc;
        @(posedge clk); #1;
        rd_req[g] = 0;
        last_touch[g][s] = t0;
        waited = 1;
        while (!rd_valid[g] && waited < 10) begin @(posedge clk); #1; waited++; end
        check(rd_valid[g], "read completes");
        check(waited == int'(lat) + (exp_drowsy ? 1 : 0), $sformatf("latency LAT=%0d drowsy=%0d got %0d", lat, exp_drowsy, waited));
        check(rd_woke[g] == exp_drowsy, "wake flag");
        check(rd_hit[g] == exp_hit, "read hit");
        if (exp_hit) begin
          check(rd_target[g] == exp_tgt, "read target");
          hits[g]++;
          // move to most recent
          m_pc[s].delete(pos);  m_pc[s].push_front(pc);
          m_tgt[s].delete(pos); m_tgt[s].push_front(exp_tgt);
        end
        if (exp_drowsy) wakes[g]++;
        @(posedge clk); #1;
      end else begin
        // write
        wr_en[g] = 1; wr_pc[g] = pc; wr_target[g] = PC_W'($urandom) & ~PC_W'(3);
        t0 = cyc;
        @(posedge clk); #1;
        wr_en[g] = 0;
        last_touch[g][s] = t0;
        if (exp_hit) begin
          m_pc[s].delete(pos); m_tgt[s].delete(pos);
        end
        m_pc[s].push_front(wr_pc[g]); m_tgt[s].push_front(wr_target[g]);
        if (m_pc[s].size() > WAYS) begin
          void'(m_pc[s].pop_back()); void'(m_tgt[s].pop_back());
          evicts[g]++;
        end
      end
    end
  endtask

  initial begin
    for (int g = 0; g < 3; g++) begin
      rd_req[g] = 0; wr_en[g] = 0; rd_pc[g] = 0; wr_pc[g] = 0; wr_target[g] = 0;
      wakes[g] = 0; hits[g] = 0; evicts[g] = 0;
      for (int s = 0; s < SETS; s++) last_touch[g][s] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    fork
      run(0);
      run(1);
      run(2);
    join
    for (int g = 0; g < 3; g++) begin
      check(wakes[g] > 10, "drowsy wake-ups exercised");
      check(hits[g] > 50, "hits exercised");
      check(evicts[g] > 10, "evictions exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
