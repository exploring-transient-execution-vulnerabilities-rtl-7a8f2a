// tb_stbpu: end-to-end test of the secret-token branch predictor at its
// full default size (512x8 BTB, 16k PHT, 16-entry RSB, two threads).
//
// The testbench plays the role of the front end and back end: for every
// branch it sends a prediction request, compares the response with the
// branch's real outcome, tells the predictor whether it mispredicted and
// sends the resolved branch, honouring upd_ready. It plays the OS through
// the privileged CSR port. Expected results follow from the architecture,
// not from the RTL's internals: a trained direct branch must return its
// exact target, a return must get its call's fall-through address from the
// RSB, an indirect branch must learn one target per branch-history context,
// a branch trained under one token must not reproduce its target under
// another token or after re-randomization, and a token shared by two
// threads must share the history. Every mechanism (each prediction source,
// RSB overflow and underflow, BTB evictions, re-randomization by
// mispredictions and by evictions, the update stall, both selector modes,
// refused unprivileged access) is counted and must occur.
module tb_stbpu;
  import stbpu_pkg::*;

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
  int n_src_ok [4];
  int n_evict = 0, n_ovf = 0, n_udf = 0, n_stall = 0, n_rerand [2], n_ind_ip = 0, n_ind_bhb = 0;
  int n_taken_ok = 0, n_ntaken_ok = 0, n_isolated = 0, n_shared = 0, n_csr_err = 0;
  int n_rr_misp = 0, n_rr_evict = 0, n_branches = 0, n_misp = 0;

  always @(posedge clk) if (rst_n) begin
    if (btb_evict) n_evict++;
    if (rsb_overflow) n_ovf++;
    if (rsb_underflow) n_udf++;
    if (upd_valid && !upd_ready) n_stall++;
    for (int t = 0; t < 2; t++) if (st_rerand[t]) n_rerand[t]++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- bus tasks ----------------
  typedef struct { bit taken; bit tv; logic [47:0] target; pred_src_e src; } pred_t;

  task automatic predict(int tid, logic [47:0] ip, br_kind_e kind, output pred_t p);
    @(negedge clk);
    pred_valid = 1; pred_tid = 1'(tid); pred_ip = ip; pred_kind = kind;
    @(negedge clk);
    pred_valid = 0;
    check(resp_valid, "response missing one clock after request");
    p.taken = resp_taken; p.tv = resp_target_valid; p.target = resp_target; p.src = resp_src;
  endtask

  task automatic update(int tid, logic [47:0] ip, br_kind_e kind, bit call, bit taken,
                        logic [47:0] tgt, logic [47:0] fall, bit misp);
    @(negedge clk);
    upd_valid = 1; upd_tid = 1'(tid); upd_ip = ip; upd_kind = kind; upd_call = call;
    upd_taken = taken; upd_target = tgt; upd_fallthrough = fall; upd_mispredict = misp;
    while (!upd_ready) @(negedge clk);
    @(negedge clk);
    upd_valid = 0;
  endtask

  // one executed branch; returns whether it was predicted right
  task automatic exec(int tid, logic [47:0] ip, br_kind_e kind, bit call, bit taken,
                      logic [47:0] tgt, output bit ok, output pred_src_e src);
    pred_t p;
    predict(tid, ip, kind, p);
    if (kind == BR_COND && !taken) ok = !p.taken;
    else ok = p.taken && p.tv && p.target == tgt;
    src = p.src;
    n_branches++;
    if (!ok) n_misp++;
    if (ok && p.taken) n_src_ok[p.src]++;
    update(tid, ip, kind, call, taken, tgt, ip + 48'd5, !ok);
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

  // 30 taken branches at fixed addresses: afterwards the BHB holds a state
  // that depends on this sequence only
  task automatic prefix(int tid, int set, br_kind_e kind);
    bit ok; pred_src_e s;
    for (int k = 0; k < 30; k++)
      exec(tid, 48'h7f10_0000_0000 + 48'(set) * 48'h10000 + 48'(k) * 48'h40, kind, 0, 1,
           48'h7f10_0000_0000 + 48'(set) * 48'h10000 + 48'(k) * 48'h40 + 48'h20, ok, s);
  endtask

  localparam logic [63:0] K0 = 64'hA5A5_0001_3C3C_1001;
  localparam logic [63:0] K1 = 64'h5A5A_0002_C3C3_2002;

  initial begin
    bit ok; pred_src_e s; pred_t p; logic [63:0] v, old_st;
    logic [47:0] D1, T1, C1, I1, R1;
    foreach (n_src_ok[i]) n_src_ok[i] = 0;
    n_rerand[0] = 0; n_rerand[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- OS loads the two threads' tokens ----
    csr_write(0, CSR_ST, K0);
    csr_write(1, CSR_ST, K1);
    csr_read(0, CSR_ST, v); check(v == K0, "token readback");
    // unprivileged access is refused
    @(negedge clk);
    csr_valid = 1; csr_we = 1; csr_priv = 0; csr_tid = 0; csr_addr = CSR_ST; csr_wdata = 64'h1;
    #1 if (csr_err) n_csr_err++;
    @(negedge clk); csr_valid = 0; csr_we = 0;
    csr_read(0, CSR_ST, v); check(v == K0, "unprivileged write changed the token");

    // ---- S1: direct branch learns its exact target (IP-mode BTB) ----
    D1 = 48'h7f3a_1234_5670; T1 = 48'h7f3a_0042_0000;
    exec(0, D1, BR_DIRECT, 0, 1, T1, ok, s);
    check(!ok, "untrained branch predicted");
    exec(0, D1, BR_DIRECT, 0, 1, T1, ok, s);
    check(ok && s == SRC_BTB_IP, "trained direct branch not predicted from the BTB");

    // ---- S2: another token does not reproduce the target; a shared one does ----
    predict(1, D1, BR_DIRECT, p);
    check(!(p.tv && p.target == T1), "thread with a different token reproduced the target");
    if (!(p.tv && p.target == T1)) n_isolated++;
    csr_write(1, CSR_ST, K0);
    predict(1, D1, BR_DIRECT, p);
    check(p.tv && p.target == T1, "thread sharing the token did not share the history");
    if (p.tv && p.target == T1) n_shared++;
    // same remapping key, different encryption key: the entry is found but
    // the planted target decodes to a different address
    csr_write(1, CSR_ST, {K1[63:32], K0[31:0]});
    predict(1, D1, BR_DIRECT, p);
    check(p.tv && p.src == SRC_BTB_IP, "colliding entry not found under the same psi");
    check(p.target == {D1[47:32], T1[31:0] ^ K0[63:32] ^ K1[63:32]},
          $sformatf("colliding target %h not decrypted with the reader's phi", p.target));
    if (p.tv && p.target != T1) n_isolated++;
    csr_write(1, CSR_ST, K1);

    // ---- S3: conditional branch, taken then not-taken ----
    C1 = 48'h0000_5555_0100;
    for (int n = 0; n < 12; n++) begin
      exec(0, C1, BR_COND, 0, 1, C1 + 48'h80, ok, s);
      if (n >= 8) begin check(ok, "loop branch not predicted taken with its target"); if (ok) n_taken_ok++; end
    end
    for (int n = 0; n < 12; n++) begin
      exec(0, C1, BR_COND, 0, 0, C1 + 48'h80, ok, s);
      if (n >= 8) begin check(ok, "branch not predicted not-taken"); if (ok) n_ntaken_ok++; end
    end

    // ---- S4: nested calls and returns through the RSB ----
    for (int rep = 0; rep < 2; rep++) begin
      for (int d = 0; d < 3; d++)
        exec(0, 48'h0000_4000_0000 + 48'(d) * 48'h1000, BR_DIRECT, 1, 1, 48'h0000_4000_0800 + 48'(d) * 48'h1000, ok, s);
      for (int d = 2; d >= 0; d--) begin
        exec(0, 48'h0000_4000_0F00 + 48'(d) * 48'h1000, BR_RETURN, 0, 1, 48'h0000_4000_0005 + 48'(d) * 48'h1000, ok, s);
        check(ok && s == SRC_RSB, $sformatf("return at depth %0d not predicted from the RSB", d));
      end
    end

    // ---- S5: RSB overflow and underflow ----
    for (int d = 0; d < 20; d++)
      exec(0, 48'h0000_6000_0000 + 48'(d) * 48'h100, BR_DIRECT, 1, 1, 48'h0000_6000_0000 + 48'(d + 1) * 48'h100, ok, s);
    for (int d = 19; d >= 0; d--) begin
      exec(0, 48'h0000_6000_0080 + 48'(d) * 48'h100, BR_RETURN, 0, 1, 48'h0000_6000_0005 + 48'(d) * 48'h100, ok, s);
      if (d >= 4) check(ok && s == SRC_RSB, $sformatf("return %0d lost from a full RSB", d));
      else check(s != SRC_RSB, "return predicted from an RSB that overflowed");
    end

    // ---- S6: return with an empty RSB falls back to the BHB-mode BTB ----
    R1 = 48'h0000_7000_0400;
    for (int n = 0; n < 3; n++) begin
      prefix(0, 1, BR_DIRECT);
      exec(0, R1, BR_RETURN, 0, 1, 48'h0000_7123_4567, ok, s);
      if (n == 2) check(ok && s == SRC_BTB_BHB, "empty-RSB return not predicted from the BHB-mode BTB");
    end

    // ---- S7: indirect branch, one target per history context ----
    I1 = 48'h0000_7777_0010;
    for (int n = 0; n < 6; n++) begin
      prefix(0, 2, BR_INDIRECT);
      exec(0, I1, BR_INDIRECT, 0, 1, 48'h0000_7777_A000, ok, s);
      if (n >= 4) begin check(ok && s == SRC_BTB_BHB, "context A target not learnt"); if (ok && s == SRC_BTB_BHB) n_ind_bhb++; end
      prefix(0, 7, BR_INDIRECT);
      exec(0, I1, BR_INDIRECT, 0, 1, 48'h0000_7777_B000, ok, s);
      if (n >= 4) begin check(ok && s == SRC_BTB_BHB, "context B target not learnt"); if (ok && s == SRC_BTB_BHB) n_ind_bhb++; end
    end

    // ---- S8: after direct branches the selector prefers the IP mode ----
    for (int n = 0; n < 3; n++) begin
      prefix(0, 4, BR_DIRECT);
      exec(0, I1, BR_INDIRECT, 0, 1, 48'h0000_7777_C000, ok, s);
    end
    prefix(0, 4, BR_DIRECT);
    predict(0, I1, BR_INDIRECT, p);
    check(p.src == SRC_BTB_IP && p.target == 48'h0000_7777_C000, "selector in IP state did not use the IP-mode entry");
    if (p.src == SRC_BTB_IP) n_ind_ip++;

    // ---- S8b: back-to-back updates stall behind the second BTB write ----
    begin
      int st0;
      st0 = n_stall;
      @(negedge clk);
      upd_valid = 1; upd_tid = 0; upd_ip = 48'h0000_3300_0000; upd_kind = BR_INDIRECT; upd_call = 0;
      upd_taken = 1; upd_target = 48'h0000_3300_9000; upd_fallthrough = 0; upd_mispredict = 0;
      @(negedge clk);
      check(!upd_ready, "no stall after an indirect update");
      upd_ip = 48'h0000_3311_0000; upd_kind = BR_DIRECT; upd_target = 48'h0000_3311_8000;
      while (!upd_ready) @(negedge clk);
      @(negedge clk);
      upd_valid = 0;
      check(n_stall == st0 + 1, "stall should last exactly one clock");
      predict(0, 48'h0000_3311_0000, BR_DIRECT, p);
      check(p.tv && p.target == 48'h0000_3311_8000, "update issued during the stall was lost");
    end

    // ---- S9: mispredictions re-randomize the token ----
    csr_read(0, CSR_ST, old_st);
    csr_write(0, CSR_MISP_THR, 5);
    csr_write(0, CSR_MISP_CNT, 5);
    begin
      int rr_before;
      rr_before = n_rerand[0];
      for (int n = 0; n < 5; n++) begin
        exec(0, 48'h0000_1234_0000 + 48'(n) * 48'h4444, BR_DIRECT, 0, 1, 48'h0000_0BAD_0000, ok, s);
        check(!ok, "new branch predicted");
        check(n_rerand[0] == rr_before + ((n == 4) ? 1 : 0), $sformatf("re-randomization count after %0d mispredictions", n + 1));
      end
      if (n_rerand[0] == rr_before + 1) n_rr_misp++;
    end
    csr_read(0, CSR_ST, v);
    check(v != old_st, "token unchanged after the misprediction threshold");
    predict(0, D1, BR_DIRECT, p);
    check(!(p.tv && p.target == T1), "history still usable after re-randomization");
    csr_write(0, CSR_MISP_THR, 41500);

    // ---- S10: BTB evictions re-randomize the token ----
    csr_write(1, CSR_EVICT_THR, 200);
    csr_write(1, CSR_EVICT_CNT, 200);
    begin
      int rr_before, ev0;
      rr_before = n_rerand[1]; ev0 = n_evict;
      for (int n = 0; n < 6000; n++) begin
        logic [47:0] a;
        a = {16'h0000, $urandom()} & 48'hFFFF_FFFF_FFF0;
        exec(1, a, BR_DIRECT, 0, 1, a + 48'h1000, ok, s);
      end
      $display("evictions in S10: %0d, re-randomizations of thread 1: %0d", n_evict - ev0, n_rerand[1] - rr_before);
      check(n_evict - ev0 >= 200, "too few evictions from 6000 distinct branches in a 4096-entry BTB");
      check(n_rerand[1] - rr_before == (n_evict - ev0) / 200, "eviction re-randomizations do not match the threshold");
      if (n_rerand[1] > rr_before) n_rr_evict++;
    end

    // ---- mechanisms ----
    $display("branches %0d mispredicted %0d", n_branches, n_misp);
    $display("correct by source: btb_ip %0d btb_bhb %0d rsb %0d", n_src_ok[SRC_BTB_IP], n_src_ok[SRC_BTB_BHB], n_src_ok[SRC_RSB]);
    $display("evict %0d ovf %0d udf %0d stall %0d rerand_misp %0d rerand_evict %0d ind_ip %0d ind_bhb %0d",
             n_evict, n_ovf, n_udf, n_stall, n_rr_misp, n_rr_evict, n_ind_ip, n_ind_bhb);
    check(n_src_ok[SRC_BTB_IP] > 0,  "mechanism never seen: IP-mode BTB prediction");
    check(n_src_ok[SRC_BTB_BHB] > 0, "mechanism never seen: BHB-mode BTB prediction");
    check(n_src_ok[SRC_RSB] > 0,     "mechanism never seen: RSB prediction");
    check(n_taken_ok > 0 && n_ntaken_ok > 0, "mechanism never seen: PHT direction");
    check(n_ovf > 0,       "mechanism never seen: RSB overflow");
    check(n_udf > 0,       "mechanism never seen: RSB underflow");
    check(n_evict > 0,     "mechanism never seen: BTB eviction");
    check(n_stall > 0,     "mechanism never seen: update stall");
    check(n_rr_misp > 0,   "mechanism never seen: re-randomization by mispredictions");
    check(n_rr_evict > 0,  "mechanism never seen: re-randomization by evictions");
    check(n_ind_ip > 0 && n_ind_bhb > 0, "mechanism never seen: both selector modes");
    check(n_isolated > 0 && n_shared > 0, "mechanism never seen: token isolation and sharing");
    check(n_csr_err > 0,   "mechanism never seen: refused unprivileged access");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
