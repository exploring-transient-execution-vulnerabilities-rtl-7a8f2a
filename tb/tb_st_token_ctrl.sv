// tb_st_token_ctrl: checks token registers, counters and re-randomization.
// Small thresholds keep the run short. A reference model of the per-thread
// counters predicts exactly when each thread's token must change and to
// which PRNG word; privileged CSR reads are compared with the model, and
// unprivileged accesses must be refused without effect.
module tb_st_token_ctrl;
  import stbpu_pkg::*;
  localparam int THREADS = 2, MT = 5, ET = 3;
  logic clk = 0, rst_n = 0;
  logic misp_evt = 0, evict_evt = 0;
  logic [0:0] misp_tid = 0, evict_tid = 0, csr_tid = 0;
  logic csr_valid = 0, csr_we = 0, csr_priv = 0;
  csr_addr_e csr_addr = CSR_ST;
  logic [63:0] csr_wdata = '0, csr_rdata, rnd;
  logic csr_err, rnd_next;
  st_t st [THREADS];
  logic [THREADS-1:0] rerand;
  int checks = 0, failures = 0;
  int n_rerand_misp = 0, n_rerand_evict = 0;

  st_token_ctrl #(.THREADS(THREADS), .MISP_THR(MT), .EVICT_THR(ET)) dut (.*);

  // stand-in random source: changes every cycle
  logic [63:0] lfsr = 64'hDEAD_BEEF_0BAD_F00D;
  always @(posedge clk) lfsr <= {lfsr[62:0], lfsr[63] ^ lfsr[62] ^ lfsr[60] ^ lfsr[59]};
  assign rnd = lfsr;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [63:0] rot(logic [63:0] v, int t);
    return (t == 0) ? v : ((v << (17 * t)) | (v >> (64 - 17 * t)));
  endfunction

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic csr_rd(input int t, input csr_addr_e a, output logic [63:0] v);
    @(negedge clk);
    csr_valid = 1; csr_we = 0; csr_priv = 1; csr_tid = 1'(t); csr_addr = a;
    #1 v = csr_rdata;
    @(negedge clk);
    csr_valid = 0;
  endtask

  task automatic csr_wr(input int t, input csr_addr_e a, input logic [63:0] v, input bit priv);
    @(negedge clk);
    csr_valid = 1; csr_we = 1; csr_priv = priv; csr_tid = 1'(t); csr_addr = a; csr_wdata = v;
    #1 check(csr_err == !priv, "csr_err wrong");
    @(negedge clk);
    csr_valid = 0; csr_we = 0;
  endtask

  initial begin
    logic [63:0] v, m_st [THREADS];
    int m_mc [THREADS], m_ec [THREADS], m_mt [THREADS], m_et [THREADS];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < THREADS; t++) begin m_st[t] = '0; m_mc[t] = MT; m_ec[t] = ET; m_mt[t] = MT; m_et[t] = ET; end

    // OS loads tokens
    csr_wr(0, CSR_ST, 64'h1111_2222_3333_4444, 1); m_st[0] = 64'h1111_2222_3333_4444;
    csr_wr(1, CSR_ST, 64'h5555_6666_7777_8888, 1); m_st[1] = 64'h5555_6666_7777_8888;
    // unprivileged write refused
    csr_wr(0, CSR_ST, 64'hBAD, 0);
    csr_rd(0, CSR_ST, v); check(v == m_st[0], "token changed by unprivileged write");
    csr_rd(1, CSR_ST, v); check(v == m_st[1], "token 1 readback");
    csr_rd(0, CSR_MISP_THR, v);  check(v == MT, "misp threshold reset value");
    csr_rd(1, CSR_EVICT_CNT, v); check(v == ET, "evict counter reset value");
    // unprivileged read returns nothing
    @(negedge clk);
    csr_valid = 1; csr_we = 0; csr_priv = 0; csr_addr = CSR_ST; csr_tid = 0;
    #1 check(csr_rdata == 0 && csr_err, "unprivileged read leaked the token");
    @(negedge clk); csr_valid = 0;

    // random events against the model
    for (int n = 0; n < 3000; n++) begin
      bit me, ee; int mt, et; bit exp_r [THREADS];
      logic [63:0] r;
      @(negedge clk);
      me = $urandom_range(0, 1); ee = $urandom_range(0, 2) == 0;
      mt = $urandom_range(0, 1); et = $urandom_range(0, 1);
      misp_evt = me; misp_tid = 1'(mt); evict_evt = ee; evict_tid = 1'(et);
      r = rnd;
      for (int t = 0; t < THREADS; t++) begin
        exp_r[t] = 0;
        if (me && mt == t) begin
          if (m_mc[t] <= 1) begin exp_r[t] = 1; m_mc[t] = m_mt[t]; n_rerand_misp++; end else m_mc[t]--;
        end
        if (ee && et == t) begin
          if (m_ec[t] <= 1) begin exp_r[t] = 1; m_ec[t] = m_et[t]; n_rerand_evict++; end else m_ec[t]--;
        end
      end
      #1;
      for (int t = 0; t < THREADS; t++) check(rerand[t] == exp_r[t], $sformatf("cycle %0d thread %0d rerand=%0b expected %0b", n, t, rerand[t], exp_r[t]));
      check(rnd_next == (exp_r[0] | exp_r[1]), "rnd_next");
      @(posedge clk); #1;
      for (int t = 0; t < THREADS; t++) begin
        if (exp_r[t]) m_st[t] = rot(r, t);
        check(st[t] == m_st[t], $sformatf("cycle %0d thread %0d token %h expected %h", n, t, st[t], m_st[t]));
      end
      misp_evt = 0; evict_evt = 0;
      if (n % 500 == 250) begin
        csr_rd(0, CSR_MISP_CNT, v);  check(v == m_mc[0], "misp counter readback");
        csr_rd(1, CSR_EVICT_CNT, v); check(v == m_ec[1], "evict counter readback");
      end
    end

    // threshold 1: every event re-randomizes
    csr_wr(1, CSR_MISP_THR, 1, 1); csr_wr(1, CSR_MISP_CNT, 1, 1);
    for (int n = 0; n < 4; n++) begin
      @(negedge clk); misp_evt = 1; misp_tid = 1; #1;
      check(rerand[1], "threshold 1 did not re-randomize on every event");
      @(negedge clk); misp_evt = 0;
    end
    // threshold 0 disables the counter
    csr_wr(0, CSR_EVICT_THR, 0, 1);
    for (int n = 0; n < 10; n++) begin
      @(negedge clk); evict_evt = 1; evict_tid = 0; #1;
      check(!rerand[0], "disabled counter re-randomized");
    end
    evict_evt = 0;

    check(n_rerand_misp > 0 && n_rerand_evict > 0, "a re-randomization cause never occurred");
    $display("re-randomizations: misprediction %0d, eviction %0d", n_rerand_misp, n_rerand_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
