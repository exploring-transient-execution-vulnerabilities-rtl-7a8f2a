// tb_mode_selector: walks the predictor-selector state machine through the
// branch patterns used to recover it and checks use_ip after every step
// against a table model of its transitions, then runs random patterns.
// Each of the four states must be visited. It then replays the five
// published probe patterns (d = direct branch, i = indirect branch,
// I = monitoring indirect branch, which hits when BHB mode is selected and
// misses in IP mode) and checks the steady hit/miss sequence of I that was
// observed on hardware: d I -> MHMH, d i I -> HHHH, d I i -> MHMH,
// d d I i -> MMMM, d d i I -> HHHH.
module tb_mode_selector;
  logic clk = 0, rst_n = 0, dir = 0, ind = 0, use_ip;
  int checks = 0, failures = 0;
  int visits [4];

  mode_selector dut (.*);
  always #5 clk = ~clk;

  // states: 0 BHB_A, 1 BHB_B, 2 BHB_C (reset), 3 IP
  int next_d [4] = '{1, 3, 3, 3};
  int next_i [4] = '{0, 1, 1, 0};
  int m;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic ev(bit d, bit i);
    @(negedge clk);
    dir = d; ind = i;
    if (d) m = next_d[m]; else if (i) m = next_i[m];
    @(negedge clk);
    dir = 0; ind = 0;
    visits[m]++;
    check(use_ip == (m == 3), $sformatf("use_ip=%0b in model state %0d", use_ip, m));
  endtask

  // one probe pattern, coded as a string of 'd', 'i' and 'I'; returns the
  // hit (1) / miss (0) sequence of I over the last 8 of 12 repetitions
  task automatic probe(string pat, output bit [7:0] hits);
    hits = '0;
    for (int r = 0; r < 12; r++)
      for (int c = 0; c < pat.len(); c++) begin
        if (pat[c] == "I" && r >= 4) hits = {hits[6:0], !use_ip};
        ev(pat[c] == "d", pat[c] != "d");
      end
  endtask

  task automatic probe_check(string pat, bit alt, bit all_hit);
    bit [7:0] h;
    probe(pat, h);
    if (alt) check(h == 8'b1010_1010 || h == 8'b0101_0101,
                   $sformatf("pattern %s: I hits %b, expected alternating", pat, h));
    else     check(h == (all_hit ? 8'hFF : 8'h00),
                   $sformatf("pattern %s: I hits %b, expected all %s", pat, h, all_hit ? "H" : "M"));
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = 2;
    foreach (visits[k]) visits[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    visits[2]++;
    check(!use_ip, "reset state must select BHB mode");
    // from reset: i -> BHB_B, d -> IP, d stays IP, i -> BHB_A, i stays, d -> BHB_B, d -> IP
    ev(0, 1); ev(1, 0); ev(1, 0); ev(0, 1); ev(0, 1); ev(1, 0); ev(1, 0);
    check(m == 3, "directed walk should end in IP state");
    for (int n = 0; n < 2000; n++) begin
      int k;
      k = $urandom_range(0, 2);
      ev(k == 1, k == 2);
    end
    probe_check("dI", 1, 0);
    probe_check("diI", 0, 1);
    probe_check("dIi", 1, 0);
    probe_check("ddIi", 0, 0);
    probe_check("ddiI", 0, 1);
    foreach (visits[k]) check(visits[k] > 0, $sformatf("state %0d never visited", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
