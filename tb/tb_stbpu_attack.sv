// tb_stbpu_attack: blind BTB flooding by an attacker thread against the
// full-size predictor with the default re-randomization thresholds.
//
// Under secret-token remapping an attacker cannot compute eviction sets, so
// the only way left to disturb or probe another thread's BTB entries is to
// execute a stream of branches at fresh addresses and watch for evictions.
// Every such branch is a BTB miss (a misprediction) and, once the BTB is
// full, an eviction, so the attacker's own counters run down and its token
// is replaced long before the tens of thousands of probes turn into an
// attack (about 5.3e5 evictions or 8.3e5 mispredictions for an even chance
// of success).
//
// Thread 0 (victim) trains a few branches under its token; thread 1
// (attacker) then runs FLOOD direct branches at random new addresses. The
// testbench counts, independently of the predictor, the evictions and the
// mispredictions charged to thread 1 and checks:
//   - the number of token re-randomizations of thread 1 equals
//     floor(E / 26500) + floor(M / 41500) (each counter reloads itself);
//   - the remaining counts read back through the CSR port are
//     26500 - E mod 26500 and 41500 - M mod 41500;
//   - the first re-randomization comes exactly at the 26500th eviction;
//   - thread 1's token changed, and thread 0's token and counters did not;
//   - the victim retrains its branches under its unchanged token.
module tb_stbpu_attack;
  import stbpu_pkg::*;

  localparam int MISP_THR  = 41500;  // the predictor's default
  localparam int EVICT_THR = 26500;  // the predictor's default
  localparam int FLOOD     = 45000;

  logic clk = 0, rst_n = 0;
  logic pred_valid = 0; logic [0:0] pred_tid = 0; logic [47:0] pred_ip = 0; br_kind_e pred_kind = BR_COND;
  logic resp_valid, resp_taken, resp_target_valid; logic [47:0] resp_target; pred_src_e resp_src;
  logic upd_valid = 0; logic [0:0] upd_tid = 0; logic [47:0] upd_ip = 0; br_kind_e upd_kind = BR_COND;
  logic upd_call = 0, upd_taken = 0, upd_mispredict = 0, upd_ready;
  logic [47:0] upd_target = 0, upd_fallthrough = 0;
  logic csr_valid = 0, csr_we = 0, csr_priv = 0; logic [0:0] csr_tid = 0;
  csr_addr_e csr_addr = CSR_ST; logic [63:0] csr_wdata = 0, csr_rdata; logic csr_err;
  logic rng_reseed = 0; logic [63:0] rng_reseed_val = 0;
  logic [1:0] st_rerand; logic btb_evict, rsb_overflow, rsb_underflow;

  stbpu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_evict [2], n_misp [2], n_rerand [2];
  int evict_at_first_rerand = -1;

  // eviction pulses are charged to the thread whose update is being taken
  always @(posedge clk) if (rst_n) begin
    if (btb_evict) n_evict[upd_tid]++;
    if (upd_valid && upd_ready && upd_mispredict) n_misp[upd_tid]++;
    for (int t = 0; t < 2; t++) if (st_rerand[t]) begin
      n_rerand[t]++;
      if (t == 1 && evict_at_first_rerand < 0) evict_at_first_rerand = n_evict[1];
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic exec(int tid, logic [47:0] ip, logic [47:0] tgt, output bit ok);
    @(negedge clk);
    pred_valid = 1; pred_tid = 1'(tid); pred_ip = ip; pred_kind = BR_DIRECT;
    @(negedge clk);
    pred_valid = 0;
    check(resp_valid, "response missing one clock after request");
    ok = resp_taken && resp_target_valid && resp_target == tgt;
    upd_valid = 1; upd_tid = 1'(tid); upd_ip = ip; upd_kind = BR_DIRECT; upd_call = 0;
    upd_taken = 1; upd_target = tgt; upd_fallthrough = ip + 48'd5; upd_mispredict = !ok;
    while (!upd_ready) @(negedge clk);
    @(negedge clk);
    upd_valid = 0;
  endtask

  task automatic csr_write(int tid, csr_addr_e a, logic [63:0] v);
    @(negedge clk);
    csr_valid = 1; csr_we = 1; csr_priv = 1; csr_tid = 1'(tid); csr_addr = a; csr_wdata = v;
    @(negedge clk);
    csr_valid = 0; csr_we = 0;
  endtask

  task automatic csr_read(int tid, csr_addr_e a, output logic [63:0] v);
    @(negedge clk);
    csr_valid = 1; csr_we = 0; csr_priv = 1; csr_tid = 1'(tid); csr_addr = a;
    #1 v = csr_rdata;
    @(negedge clk);
    csr_valid = 0;
  endtask

  localparam logic [63:0] KV = 64'h2B7E_1516_28AE_D2A6;
  localparam logic [63:0] KA = 64'h3243_F6A8_885A_308D;
  localparam logic [47:0] VB = 48'h7FFF_0040_0000;  // victim code

  initial begin
    bit ok; logic [63:0] v, v2; logic [47:0] ip;
    int good, exp_rr;
    for (int t = 0; t < 2; t++) begin n_evict[t] = 0; n_misp[t] = 0; n_rerand[t] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    csr_write(0, CSR_ST, KV);
    csr_write(1, CSR_ST, KA);
    csr_read(0, CSR_MISP_THR, v);  check(v == 64'(MISP_THR), "default misprediction threshold");
    csr_read(0, CSR_EVICT_THR, v); check(v == 64'(EVICT_THR), "default eviction threshold");

    // victim trains 8 direct branches
    for (int r = 0; r < 2; r++)
      for (int k = 0; k < 8; k++) exec(0, VB + 48'(k) * 48'h100, VB + 48'(k) * 48'h100 + 48'h7c0, ok);
    check(n_rerand[0] == 0 && n_rerand[1] == 0, "no re-randomization during training");

    // attacker floods the BTB with branches at fresh addresses
    for (int n = 0; n < FLOOD; n++) begin
      ip = {16'h0000, $urandom()} ^ (48'(n) << 16);
      exec(1, ip, ip + 48'h40 + 48'($urandom_range(0, 255)), ok);
    end
    repeat (2) @(posedge clk);

    exp_rr = n_evict[1] / EVICT_THR + n_misp[1] / MISP_THR;
    $display("attacker: %0d branches, %0d evictions, %0d mispredictions, %0d re-randomizations (expected %0d)",
             FLOOD, n_evict[1], n_misp[1], n_rerand[1], exp_rr);
    check(n_evict[1] >= EVICT_THR, "flood caused fewer evictions than the threshold");
    check(n_misp[1] >= MISP_THR, "flood caused fewer mispredictions than the threshold");
    check(n_rerand[1] == exp_rr, "attacker re-randomizations differ from the counter model");
    check(evict_at_first_rerand == EVICT_THR, "first re-randomization not at the threshold'th eviction");
    check(n_rerand[0] == 0, "victim token re-randomized by the attacker's events");

    csr_read(1, CSR_EVICT_CNT, v);
    check(v == 64'(EVICT_THR - n_evict[1] % EVICT_THR), "attacker eviction counter");
    csr_read(1, CSR_MISP_CNT, v);
    check(v == 64'(MISP_THR - n_misp[1] % MISP_THR), "attacker misprediction counter");
    csr_read(1, CSR_ST, v);
    check(v != KA, "attacker token unchanged after re-randomization");
    csr_read(0, CSR_ST, v2);
    check(v2 == KV, "victim token changed");
    check(v2 != v, "victim and attacker tokens equal");
    csr_read(0, CSR_EVICT_CNT, v);
    check(v == 64'(EVICT_THR - n_evict[0]), "victim eviction counter");

    // the victim's branches may have been evicted (the flood is a denial of
    // service the token cannot prevent) but retrain under the same token
    for (int k = 0; k < 8; k++) exec(0, VB + 48'(k) * 48'h100, VB + 48'(k) * 48'h100 + 48'h7c0, ok);
    good = 0;
    for (int k = 0; k < 8; k++) begin
      exec(0, VB + 48'(k) * 48'h100, VB + 48'(k) * 48'h100 + 48'h7c0, ok);
      if (ok) good++;
    end
    check(good == 8, "victim did not retrain its branches");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
