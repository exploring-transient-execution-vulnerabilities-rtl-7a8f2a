// st_token_ctrl: secret-token registers and automatic re-randomization.
//
// Every hardware thread owns a 64-bit secret token ST = {phi, psi} and a
// pair of model-specific registers per monitored event: a threshold and a
// down-counter, one pair for branch mispredictions and one for BTB
// evictions. Each event reported for a thread decrements that thread's
// counter; when a counter would reach zero the thread's token is replaced by
// the current PRNG output, the PRNG advances and that counter is reloaded
// with its threshold. Only privileged accesses through the CSR port may read
// or write the registers (the OS saves and restores them on context and mode
// switches); an unprivileged access is refused with csr_err and changes
// nothing.
//
// Timing: events and CSR writes take effect at the next clock edge; csr_rdata
// and csr_err are combinational. A CSR write in the same cycle as an event
// for the same register wins. Design choices not fixed by the STBPU
// description: reset values (tokens zero, thresholds MISP_THR/EVICT_THR,
// counters equal to the thresholds), a threshold of zero disables that
// counter, one event per counter per cycle, and a thread re-randomized in the
// same cycle as another receives the PRNG word rotated by 17*thread bits.
module st_token_ctrl
  import stbpu_pkg::*;
#(
  parameter int unsigned THREADS   = 2,
  parameter int unsigned CNT_W     = 32,
  parameter int unsigned MISP_THR  = 41500,  // r = 0.05 of 8.3e5 mispredictions
  parameter int unsigned EVICT_THR = 26500,  // r = 0.05 of 5.3e5 evictions
  localparam int unsigned TID_W = (THREADS > 1) ? $clog2(THREADS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // monitored events
  input  logic               misp_evt,
  input  logic [TID_W-1:0]   misp_tid,
  input  logic               evict_evt,
  input  logic [TID_W-1:0]   evict_tid,
  // privileged register port
  input  logic               csr_valid,
  input  logic               csr_we,
  input  logic               csr_priv,
  input  logic [TID_W-1:0]   csr_tid,
  input  csr_addr_e          csr_addr,
  input  logic [63:0]        csr_wdata,
  output logic [63:0]        csr_rdata,
  output logic               csr_err,
  // random source
  input  logic [63:0]        rnd,
  output logic               rnd_next,
  // tokens in use and re-randomization report
  output st_t                st     [THREADS],
  output logic [THREADS-1:0] rerand
);

  st_t              st_q        [THREADS];
  logic [CNT_W-1:0] misp_thr_q  [THREADS];
  logic [CNT_W-1:0] evict_thr_q [THREADS];
  logic [CNT_W-1:0] misp_cnt_q  [THREADS];
  logic [CNT_W-1:0] evict_cnt_q [THREADS];

  logic [THREADS-1:0] misp_hit, evict_hit, misp_zero, evict_zero;

  always_comb begin
    for (int t = 0; t < THREADS; t++) begin
      misp_hit[t]   = misp_evt  && (misp_tid  == TID_W'(t)) && (misp_thr_q[t]  != '0);
      evict_hit[t]  = evict_evt && (evict_tid == TID_W'(t)) && (evict_thr_q[t] != '0);
      misp_zero[t]  = misp_hit[t]  && (misp_cnt_q[t]  <= CNT_W'(1));
      evict_zero[t] = evict_hit[t] && (evict_cnt_q[t] <= CNT_W'(1));
    end
    rerand   = misp_zero | evict_zero;
    rnd_next = |rerand;
  end

  logic csr_wr;
  assign csr_wr  = csr_valid && csr_we && csr_priv;
  assign csr_err = csr_valid && !csr_priv;

  always_comb begin
    csr_rdata = '0;
    if (csr_valid && csr_priv && !csr_we) begin
      unique case (csr_addr)
        CSR_ST:        csr_rdata = st_q[csr_tid];
        CSR_MISP_THR:  csr_rdata = 64'(misp_thr_q[csr_tid]);
        CSR_EVICT_THR: csr_rdata = 64'(evict_thr_q[csr_tid]);
        CSR_MISP_CNT:  csr_rdata = 64'(misp_cnt_q[csr_tid]);
        CSR_EVICT_CNT: csr_rdata = 64'(evict_cnt_q[csr_tid]);
        default:       csr_rdata = '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < THREADS; t++) begin
        st_q[t]        <= '0;
        misp_thr_q[t]  <= CNT_W'(MISP_THR);
        evict_thr_q[t] <= CNT_W'(EVICT_THR);
        misp_cnt_q[t]  <= CNT_W'(MISP_THR);
        evict_cnt_q[t] <= CNT_W'(EVICT_THR);
      end
    end else begin
      for (int t = 0; t < THREADS; t++) begin
        // event counting and re-randomization
        if (misp_hit[t])
          misp_cnt_q[t] <= misp_zero[t] ? misp_thr_q[t] : misp_cnt_q[t] - 1'b1;
        if (evict_hit[t])
          evict_cnt_q[t] <= evict_zero[t] ? evict_thr_q[t] : evict_cnt_q[t] - 1'b1;
        if (rerand[t])
          st_q[t] <= (rnd << (17 * t)) | (rnd >> ((64 - 17 * t) % 64));
        // privileged writes override
        if (csr_wr && csr_tid == TID_W'(t)) begin
          unique case (csr_addr)
            CSR_ST:        st_q[t]        <= csr_wdata;
            CSR_MISP_THR:  misp_thr_q[t]  <= csr_wdata[CNT_W-1:0];
            CSR_EVICT_THR: evict_thr_q[t] <= csr_wdata[CNT_W-1:0];
            CSR_MISP_CNT:  misp_cnt_q[t]  <= csr_wdata[CNT_W-1:0];
            CSR_EVICT_CNT: evict_cnt_q[t] <= csr_wdata[CNT_W-1:0];
            default: ;
          endcase
        end
      end
    end
  end

  assign st = st_q;

  // A token in use must never be left at the value it had when a counter
  // expired: the PRNG never outputs zero and rotation keeps that.
  for (genvar g = 0; g < THREADS; g++) begin : g_chk
    a_rerand_nonzero: assert property (@(posedge clk)
      rerand[g] && !(csr_wr && csr_tid == TID_W'(g)) |=> st_q[g] != '0);
  end

endmodule
