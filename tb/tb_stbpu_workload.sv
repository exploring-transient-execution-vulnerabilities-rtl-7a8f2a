// tb_stbpu_workload: prediction accuracy of the full-size predictor on a
// synthetic two-thread branch stream.
//
// Real program traces are not available to a self-contained testbench, so
// each hardware thread runs a small generated program with the usual branch
// mix: an outer loop that calls one of four functions; each function has an
// inner loop with a counted back edge and a data-dependent conditional, an
// indirect branch (a switch) and a return. Both threads run the same code
// at the same virtual addresses, as two processes of one program would, and
// are interleaved one outer iteration at a time, as on an SMT core. The
// testbench plays front end, back end and OS exactly as tb_stbpu does.
//
// Phases and what each must show:
//   A  distinct tokens, default thresholds: the predictor learns (accuracy
//      over the measured window at least ACC_MIN percent) and, with far fewer
//      mispredictions than the threshold, no token is re-randomized;
//   B  misprediction threshold lowered to AGGR_THR through the CSR port
//      (a very aggressive attack-difficulty factor): tokens are re-randomized
//      and accuracy drops below phase A;
//   C  thread 1 joins under the token of an already trained thread 0: its
//      cold-start accuracy is higher than
//   D  the same cold start under a fresh token of its own.
// Accuracy counts a branch as right only when both the direction and, for
// taken branches, the full 48-bit target are right. The thresholds of the
// checks are this testbench's own; the comparison shapes (small loss under
// distinct tokens, loss growing with aggressive re-randomization, benefit of
// a shared token) are the ones the STBPU evaluation reports.
module tb_stbpu_workload;
  import stbpu_pkg::*;

  localparam int ITER_A   = 1200;  // outer iterations per thread in phase A
  localparam int ITER_B   = 600;
  localparam int WARM     = 200;   // iterations not measured at the start of A
  localparam int ITER_CD  = 40;    // cold-start window of phases C and D
  localparam int ACC_MIN  = 75;    // percent
  localparam int AGGR_THR = 20;    // mispredictions per re-randomization in B

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
  int n_rerand = 0;
  // per-thread accuracy bookkeeping for the current measurement window
  int n_br [2], n_ok [2];
  bit measuring = 0;

  always @(posedge clk) if (rst_n) begin
    if (st_rerand[0]) n_rerand++;
    if (st_rerand[1]) n_rerand++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- bus tasks ----------------
  task automatic exec(int tid, logic [47:0] ip, br_kind_e kind, bit call, bit taken,
                      logic [47:0] tgt);
    bit ok;
    @(negedge clk);
    pred_valid = 1; pred_tid = 1'(tid); pred_ip = ip; pred_kind = kind;
    @(negedge clk);
    pred_valid = 0;
    check(resp_valid, "response missing one clock after request");
    if (kind == BR_COND && !taken) ok = !resp_taken;
    else ok = resp_taken && resp_target_valid && resp_target == tgt;
    if (measuring) begin n_br[tid]++; if (ok) n_ok[tid]++; end
    upd_valid = 1; upd_tid = 1'(tid); upd_ip = ip; upd_kind = kind; upd_call = call;
    upd_taken = taken; upd_target = tgt; upd_fallthrough = ip + 48'd5; upd_mispredict = !ok;
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

  // ---------------- the synthetic program ----------------
  localparam logic [47:0] BASE = 48'h0000_5555_4000;

  // one outer-loop iteration of the program: 16 branches
  task automatic iteration(int tid, int i);
    logic [47:0] fb;
    int f;
    f  = i % 4;
    fb = BASE + 48'h1000 * 48'(f + 1);
    exec(tid, BASE + 48'h10, BR_DIRECT, 1, 1, fb);                       // call
    for (int j = 0; j < 6; j++) begin
      exec(tid, fb + 48'h20, BR_COND, 0, j == (i % 3), fb + 48'h40);     // data-dependent
      exec(tid, fb + 48'h80, BR_COND, 0, j < 5, fb + 48'h08);            // loop back edge
    end
    exec(tid, fb + 48'h100, BR_INDIRECT, 0, 1, fb + 48'h200 + 48'h40 * 48'(f % 2)); // switch
    exec(tid, fb + 48'h300, BR_RETURN, 0, 1, BASE + 48'h15);             // return
    exec(tid, BASE + 48'h80, BR_COND, 0, 1, BASE);                       // outer back edge
  endtask

  task automatic clear_acc();
    n_br[0] = 0; n_br[1] = 0; n_ok[0] = 0; n_ok[1] = 0;
  endtask

  function automatic int pct(int ok, int n);
    return (n == 0) ? 0 : (100 * ok) / n;
  endfunction

  initial begin
    int acc_a [2], acc_b [2], acc_c, acc_d, rr_a, rr_b;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- phase A ----------------
    csr_write(0, CSR_ST, 64'h1357_9BDF_2468_ACE0);
    csr_write(1, CSR_ST, 64'hFEDC_BA98_7654_3210);
    clear_acc();
    for (int i = 0; i < ITER_A; i++) begin
      measuring = (i >= WARM);
      iteration(0, i);
      iteration(1, i);
    end
    measuring = 0;
    acc_a[0] = pct(n_ok[0], n_br[0]);
    acc_a[1] = pct(n_ok[1], n_br[1]);
    rr_a = n_rerand;
    $display("phase A: accuracy t0 %0d%% t1 %0d%% over %0d branches each, re-randomizations %0d",
             acc_a[0], acc_a[1], n_br[0], rr_a);
    check(acc_a[0] >= ACC_MIN, "phase A: thread 0 accuracy too low");
    check(acc_a[1] >= ACC_MIN, "phase A: thread 1 accuracy too low");
    check(rr_a == 0, "phase A: re-randomization below the default thresholds");

    // ---------------- phase B ----------------
    csr_write(0, CSR_MISP_THR, 64'(AGGR_THR));
    csr_write(1, CSR_MISP_THR, 64'(AGGR_THR));
    csr_write(0, CSR_MISP_CNT, 64'(AGGR_THR));
    csr_write(1, CSR_MISP_CNT, 64'(AGGR_THR));
    clear_acc();
    measuring = 1;
    for (int i = 0; i < ITER_B; i++) begin
      iteration(0, i);
      iteration(1, i);
    end
    measuring = 0;
    acc_b[0] = pct(n_ok[0], n_br[0]);
    acc_b[1] = pct(n_ok[1], n_br[1]);
    rr_b = n_rerand - rr_a;
    $display("phase B: accuracy t0 %0d%% t1 %0d%%, re-randomizations %0d",
             acc_b[0], acc_b[1], rr_b);
    check(rr_b > 0, "phase B: no re-randomization at the aggressive threshold");
    check(acc_b[0] < acc_a[0], "phase B: thread 0 lost no accuracy");
    check(acc_b[1] < acc_a[1], "phase B: thread 1 lost no accuracy");

    // ---------------- phase C: shared token ----------------
    csr_write(0, CSR_MISP_THR, 64'd0);     // re-randomization off for a clean comparison
    csr_write(1, CSR_MISP_THR, 64'd0);
    csr_write(0, CSR_ST, 64'h0F1E_2D3C_4B5A_6978);
    for (int i = 0; i < 300; i++) iteration(0, i);
    csr_write(1, CSR_ST, 64'h0F1E_2D3C_4B5A_6978);
    clear_acc();
    measuring = 1;
    for (int i = 0; i < ITER_CD; i++) iteration(1, i);
    measuring = 0;
    acc_c = pct(n_ok[1], n_br[1]);

    // ---------------- phase D: fresh token ----------------
    csr_write(1, CSR_ST, 64'h8899_AABB_CCDD_EEF1);
    clear_acc();
    measuring = 1;
    for (int i = 0; i < ITER_CD; i++) iteration(1, i);
    measuring = 0;
    acc_d = pct(n_ok[1], n_br[1]);
    $display("cold start of thread 1: shared token %0d%%, fresh token %0d%%", acc_c, acc_d);
    check(acc_c > acc_d, "shared token gave no cold-start benefit");
    check(acc_c >= ACC_MIN, "shared token: cold start not at trained accuracy");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
