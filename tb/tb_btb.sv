// tb_btb: checks the set-associative BTB against a reference model.
// A reduced geometry (16 sets x 4 ways, 3-bit tags, 2-bit offsets) makes
// hits, replacement and evictions frequent. Random writes and two-key
// lookups are compared with a model that keeps, per set, the entries in way
// order and a round-robin pointer; lookup results are checked one clock
// after the request, and `evict` in the cycle of each write.
module tb_btb;
  localparam int SETS = 16, WAYS = 4, TAG_W = 3, OFFS_W = 2, DATA_W = 32;
  logic clk = 0, rst_n = 0;
  logic rd_en = 0, wr_en = 0;
  logic [3:0] rd_idx = 0, wr_idx = 0;
  logic [TAG_W-1:0] rd_tag_ip = 0, rd_tag_bhb = 0, wr_tag = 0;
  logic [OFFS_W-1:0] rd_offs = 0, wr_offs = 0;
  logic [DATA_W-1:0] wr_data = 0, ip_data, bhb_data;
  logic ip_hit, bhb_hit, evict;
  int checks = 0, failures = 0, n_evict = 0, n_hit = 0, n_miss = 0;

  btb #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W), .OFFS_W(OFFS_W), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  bit          m_v   [SETS][WAYS];
  int          m_tag [SETS][WAYS];
  int          m_off [SETS][WAYS];
  int unsigned m_dat [SETS][WAYS];
  int          m_rr  [SETS];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int find(int s, int tag, int off);
    for (int w = 0; w < WAYS; w++) if (m_v[s][w] && m_tag[s][w] == tag && m_off[s][w] == off) return w;
    return -1;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < SETS; s++) begin m_rr[s] = 0; for (int w = 0; w < WAYS; w++) m_v[s][w] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int ri, rt1, rt2, ro, wi, wt, wo, eip, ebhb;
      int unsigned eipd, ebhbd, wd;
      bit we, exp_ev;
      @(negedge clk);
      ri = $urandom_range(0, SETS-1); rt1 = $urandom_range(0, 7); rt2 = $urandom_range(0, 7); ro = $urandom_range(0, 3);
      rd_en = 1; rd_idx = 4'(ri); rd_tag_ip = 3'(rt1); rd_tag_bhb = 3'(rt2); rd_offs = 2'(ro);
      // expected lookup result from the state before this cycle's write
      eip = find(ri, rt1, ro); ebhb = find(ri, rt2, ro);
      eipd = (eip >= 0) ? m_dat[ri][eip] : 0;
      ebhbd = (ebhb >= 0) ? m_dat[ri][ebhb] : 0;
      we = $urandom_range(0, 1);
      wi = $urandom_range(0, SETS-1); wt = $urandom_range(0, 7); wo = $urandom_range(0, 3); wd = $urandom();
      wr_en = we; wr_idx = 4'(wi); wr_tag = 3'(wt); wr_offs = 2'(wo); wr_data = wd;
      exp_ev = 0;
      if (we) begin
        int w;
        w = find(wi, wt, wo);
        if (w < 0) begin
          for (int k = 0; k < WAYS; k++) if (w < 0 && !m_v[wi][k]) w = k;
          if (w < 0) begin w = m_rr[wi]; m_rr[wi] = (m_rr[wi] + 1) % WAYS; exp_ev = 1; end
        end
        m_v[wi][w] = 1; m_tag[wi][w] = wt; m_off[wi][w] = wo; m_dat[wi][w] = wd;
      end
      #1 check(evict == exp_ev, $sformatf("evict=%0b expected %0b", evict, exp_ev));
      if (exp_ev) n_evict++;
      @(negedge clk);
      rd_en = 0; wr_en = 0;
      check(ip_hit == (eip >= 0), $sformatf("ip_hit=%0b expected %0b", ip_hit, eip >= 0));
      check(bhb_hit == (ebhb >= 0), "bhb_hit");
      if (eip >= 0)  check(ip_data == eipd, $sformatf("ip_data %h expected %h", ip_data, eipd));
      if (ebhb >= 0) check(bhb_data == ebhbd, "bhb_data");
      if (eip >= 0) n_hit++; else n_miss++;
    end
    check(n_evict > 0 && n_hit > 0 && n_miss > 0, "hits, misses and evictions must all occur");
    $display("hits %0d misses %0d evictions %0d", n_hit, n_miss, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
