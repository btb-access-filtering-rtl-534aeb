// tb_drowsy_ctrl: self-checking test of the drowsy-set bookkeeping.
// A cycle-level model keeps its own window counter and drowsy vector; random
// read and write wake-ups are applied and the vector and the awake count are
// compared every cycle. It also checks that all sets go drowsy exactly
// WINDOW cycles after reset and every WINDOW cycles after that.
module tb_drowsy_ctrl;
  localparam int unsigned SETS = 16, WINDOW = 10;
  logic clk = 0, rst_n = 0;
  logic rd_wake = 0, wr_wake = 0;
  logic [$clog2(SETS)-1:0] rd_idx = 0, wr_idx = 0;
  logic [SETS-1:0] drowsy;
  logic [$clog2(SETS):0] awake_cnt;
  int checks = 0, failures = 0;

  drowsy_ctrl #(.SETS(SETS), .WINDOW(WINDOW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [SETS-1:0] m_drowsy;
  int              m_cyc;
  int              n_boundary;

  initial begin
    m_drowsy = '0; m_cyc = 0; n_boundary = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 500; c++) begin
      // drive random wakes for this cycle (mostly idle, so sets stay drowsy)
      rd_wake = ($urandom % 4) == 0;
      wr_wake = ($urandom % 8) == 0;
      rd_idx  = $urandom;
      wr_idx  = $urandom;
      @(posedge clk);
      // model the edge
      if (m_cyc % WINDOW == WINDOW - 1) begin
        m_drowsy = '1;
        n_boundary++;
      end else begin
        if (rd_wake) m_drowsy[rd_idx] = 1'b0;
        if (wr_wake) m_drowsy[wr_idx] = 1'b0;
      end
      m_cyc++;
      #1;
      check(drowsy == m_drowsy, "drowsy vector");
      check(awake_cnt == ($clog2(SETS)+1)'(SETS - $countones(m_drowsy)), "awake count");
      if (m_cyc % WINDOW == 0) check(drowsy == '1 && awake_cnt == 0, "all drowsy at window boundary");
    end
    check(n_boundary == 500 / WINDOW, "number of windows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
