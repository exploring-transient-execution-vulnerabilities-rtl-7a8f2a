// tb_pht: checks the pattern history table and its mode chooser.
// A reduced table (256 counters) is driven with random lookups and updates
// and compared with a reference model of the 2-bit saturating counters and
// of the chooser; lookups are checked one clock after the request. Directed
// phases then make each addressing mode win the chooser at least once.
module tb_pht;
  localparam int ENTRIES = 256;
  logic clk = 0, rst_n = 0;
  logic rd_en = 0, wr_en = 0, wr_taken = 0;
  logic [7:0] rd_idx1 = 0, rd_idx2 = 0, wr_idx1 = 0, wr_idx2 = 0;
  logic [1:0] ctr1, ctr2;
  logic use2, taken;
  int checks = 0, failures = 0, saw_use1 = 0, saw_use2 = 0, saw_sat = 0;

  pht #(.ENTRIES(ENTRIES)) dut (.*);
  always #5 clk = ~clk;

  int m_ctr [ENTRIES];
  int m_ch;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int step(int c, bit up);
    return up ? ((c == 3) ? 3 : c + 1) : ((c == 0) ? 0 : c - 1);
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int r1, int r2, bit we, int w1, int w2, bit t);
    int e1, e2, ech;
    @(negedge clk);
    rd_en = 1; rd_idx1 = 8'(r1); rd_idx2 = 8'(r2);
    wr_en = we; wr_idx1 = 8'(w1); wr_idx2 = 8'(w2); wr_taken = t;
    e1 = m_ctr[r1]; e2 = m_ctr[r2];
    if (we) begin
      bit ok1, ok2;
      int n1, n2;
      ok1 = ((m_ctr[w1] >= 2) == t); ok2 = ((m_ctr[w2] >= 2) == t);
      n1 = step(m_ctr[w1], t); n2 = step(m_ctr[w2], t);
      m_ctr[w1] = n1; m_ctr[w2] = n2;
      if (ok1 != ok2) m_ch = step(m_ch, ok2);
      if (n1 == 3 || n1 == 0) saw_sat++;
    end
    ech = m_ch;
    @(negedge clk);
    rd_en = 0; wr_en = 0;
    check(ctr1 == 2'(e1) && ctr2 == 2'(e2), $sformatf("counters %0d/%0d expected %0d/%0d", ctr1, ctr2, e1, e2));
    check(use2 == (ech >= 2), "chooser");
    check(taken == ((ech >= 2) ? (e2 >= 2) : (e1 >= 2)), "direction");
    if (use2) saw_use2++; else saw_use1++;
  endtask

  initial begin
    for (int i = 0; i < ENTRIES; i++) m_ctr[i] = 1;
    m_ch = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++)
      one($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 1),
          $urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 1));
    // 2-level counter right, 1-level wrong: chooser moves to mode 2
    for (int n = 0; n < 6; n++) one(10, 20, 1, 10, 20, 1);
    for (int n = 0; n < 6; n++) one(10, 30, 1, 10, 30, 0);
    // 1-level right: chooser moves back
    for (int n = 0; n < 6; n++) one(40, 50, 1, 40, 50, 1);
    for (int n = 0; n < 6; n++) one(60, 50, 1, 60, 50, 0);
    check(saw_use1 > 0 && saw_use2 > 0 && saw_sat > 0, "both modes and saturation must occur");
    $display("mode1 %0d mode2 %0d saturations %0d", saw_use1, saw_use2, saw_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
