// tb_filter_buffer: self-checking test of the direct-mapped filter buffer.
// An associative array keyed by the entry index holds the expected
// (PC, target) of each entry. Random lookups and writes over a small PC
// range (so that entries conflict) are checked for hit, target and the
// one-cycle read latency; a write and a read in the same cycle must return
// the old contents.
module tb_filter_buffer;
  localparam int unsigned ENTRIES = 16, PC_W = 32;
  logic clk = 0, rst_n = 0;
  logic rd_en = 0, wr_en = 0;
  logic [PC_W-1:0] rd_pc = 0, wr_pc = 0, wr_target = 0;
  logic rd_done, rd_hit;
  logic [PC_W-1:0] rd_target;
  int checks = 0, failures = 0;

  filter_buffer #(.ENTRIES(ENTRIES), .PC_W(PC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [PC_W-1:0] m_pc  [int];
  logic [PC_W-1:0] m_tgt [int];

  function automatic int idx_of(logic [PC_W-1:0] pc);
    return int'((pc >> 2) % ENTRIES);
  endfunction

  int hits = 0;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      logic            exp_hit;
      logic [PC_W-1:0] exp_tgt;
      logic            do_rd;
      do_rd     = ($urandom % 4) != 0;
      rd_en     = do_rd;
      rd_pc     = PC_W'(($urandom % (4 * ENTRIES)) * 4);
      wr_en     = ($urandom % 3) == 0;
      wr_pc     = PC_W'(($urandom % (4 * ENTRIES)) * 4);
      wr_target = PC_W'($urandom) & ~PC_W'(3);
      // expectation from the contents before this edge
      exp_hit = m_pc.exists(idx_of(rd_pc)) && m_pc[idx_of(rd_pc)] == rd_pc;
      exp_tgt = exp_hit ? m_tgt[idx_of(rd_pc)] : '0;
      @(posedge clk);
      if (wr_en) begin
        m_pc[idx_of(wr_pc)]  = wr_pc;
        m_tgt[idx_of(wr_pc)] = wr_target;
      end
      #1;
      rd_en = 0; wr_en = 0;
      check(rd_done == do_rd, "rd_done one cycle after rd_en");
      if (do_rd) begin
        check(rd_hit == exp_hit, "hit");
        if (exp_hit) begin
          hits++;
          check(rd_target == exp_tgt, "target");
        end
      end
    end
    check(hits > 100, "enough hits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
