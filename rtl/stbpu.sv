// stbpu: secret-token branch prediction unit.
//
// A Skylake-like branch predictor (8-way 4096-entry BTB, 16k-entry PHT,
// 16-entry return stack, branch history buffer and global history) in which
// every deterministic index/tag/offset hash is replaced by a keyed remapping
// function and every stored target is encrypted. Each hardware thread runs
// with a 64-bit secret token {phi, psi} loaded by the OS. psi keys the
// remappings, so branches of software entities with different tokens land on
// unrelated predictor entries and cannot be made to collide on purpose; phi
// is XORed into every target written to the BTB and the RSB and removed
// again on prediction, so a target planted under another token decodes to a
// random address. Mispredictions and BTB evictions are counted per thread;
// when either count reaches its OS-set threshold the thread's token is
// re-randomized from an on-chip PRNG, which discards what an attacker may
// have learnt about the mapping.
//
// Remappings (all keyed with the 32-bit psi of the thread concerned):
//   R1 {psi, ip[47:0]}      -> BTB index, IP-mode tag, offset (9+8+5)
//   R2 {psi, bhb[57:0]}     -> BTB BHB-mode tag (8)
//   R3 {psi, ip[47:0]}      -> PHT 1-level index (14)
//   R4 {psi, ghr[15:0], ip} -> PHT 2-level index (14)
//
// Prediction port: pred_valid with thread, address and kind; the response
// appears one clock later on resp_* (remap and table read in the first
// cycle, tag compare, selection and decryption in the second). Conditional
// branches get a direction from the PHT and a target from the IP-mode BTB
// entry. Direct branches use the IP-mode entry. Indirect branches look up
// both modes in one set read; if both hit, the mode selector decides.
// Returns use the RSB, or the BHB-mode BTB entry when the RSB is empty.
//
// Update port: resolved branches in program order, each after its own
// prediction, accepted when upd_valid and upd_ready are both high. An update
// trains the PHT (conditional), writes the BTB (taken conditional and direct
// branches with the IP-mode key; indirect branches with both keys, the
// IP-mode write taking one extra clock during which upd_ready is low;
// returns with the BHB-mode key when the RSB is empty), pushes the
// encrypted fall-through address for calls, pops for returns, steps the mode
// selector (direct and conditional branches toward IP mode, indirect ones
// toward BHB mode) and shifts the histories.
// upd_mispredict is the back end's verdict on the prediction and feeds the
// misprediction counter; BTB evictions feed the eviction counter.
//
// CSR port: privileged reads and writes of the token and counter registers
// (see st_token_ctrl). Structure sizes and the re-randomization scheme follow
// the STBPU description; the one-clock prediction pipeline, the in-order
// update protocol with its ready signal, and the BTB write policy are this
// design's.
module stbpu
  import stbpu_pkg::*;
#(
  parameter int unsigned THREADS     = 2,
  parameter int unsigned BTB_SETS    = 512,
  parameter int unsigned BTB_WAYS    = 8,
  parameter int unsigned BTB_TAG_W   = 8,
  parameter int unsigned BTB_OFFS_W  = 5,
  parameter int unsigned PHT_ENTRIES = 16384,
  parameter int unsigned RSB_DEPTH   = 16,
  parameter int unsigned MISP_THR    = 41500,
  parameter int unsigned EVICT_THR   = 26500,
  parameter logic [63:0] PRNG_SEED   = 64'h9E37_79B9_7F4A_7C15,
  localparam int unsigned TID_W      = (THREADS > 1) ? $clog2(THREADS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // prediction request
  input  logic               pred_valid,
  input  logic [TID_W-1:0]   pred_tid,
  input  logic [47:0]        pred_ip,
  input  br_kind_e           pred_kind,
  // prediction response (one clock later)
  output logic               resp_valid,
  output logic               resp_taken,
  output logic               resp_target_valid,
  output logic [47:0]        resp_target,
  output pred_src_e          resp_src,
  // resolved branch
  input  logic               upd_valid,
  input  logic [TID_W-1:0]   upd_tid,
  input  logic [47:0]        upd_ip,
  input  br_kind_e           upd_kind,
  input  logic               upd_call,
  input  logic               upd_taken,
  input  logic [47:0]        upd_target,
  input  logic [47:0]        upd_fallthrough,
  input  logic               upd_mispredict,
  output logic               upd_ready,
  // privileged token / threshold registers
  input  logic               csr_valid,
  input  logic               csr_we,
  input  logic               csr_priv,
  input  logic [TID_W-1:0]   csr_tid,
  input  csr_addr_e          csr_addr,
  input  logic [63:0]        csr_wdata,
  output logic [63:0]        csr_rdata,
  output logic               csr_err,
  // entropy input for the PRNG
  input  logic               rng_reseed,
  input  logic [63:0]        rng_reseed_val,
  // event reports
  output logic [THREADS-1:0] st_rerand,
  output logic               btb_evict,
  output logic               rsb_overflow,
  output logic               rsb_underflow
);

  localparam int unsigned BTB_IDX_W = $clog2(BTB_SETS);
  localparam int unsigned R1_W      = BTB_IDX_W + BTB_TAG_W + BTB_OFFS_W;
  localparam int unsigned PHT_IDX_W = $clog2(PHT_ENTRIES);

  // ------------------------------------------------------------------
  // Tokens, PRNG, histories
  // ------------------------------------------------------------------
  st_t         st [THREADS];
  logic [63:0] rnd;
  logic        rnd_next;
  logic [BHB_W-1:0] bhb;
  logic [GHR_W-1:0] ghr;

  st_prng #(.SEED(PRNG_SEED)) u_prng (
    .clk, .rst_n, .next(rnd_next), .reseed(rng_reseed),
    .reseed_val(rng_reseed_val), .value(rnd)
  );

  logic upd_fire;     // update accepted this cycle
  logic upd_is_taken;
  assign upd_is_taken = upd_taken || (upd_kind != BR_COND);

  branch_history #(.BHB_W(BHB_W), .GHR_W(GHR_W)) u_hist (
    .clk, .rst_n, .upd_valid(upd_fire), .upd_cond(upd_kind == BR_COND),
    .upd_taken(upd_is_taken), .upd_ip, .bhb, .ghr
  );

  // ------------------------------------------------------------------
  // Remapping, prediction side and update side
  // ------------------------------------------------------------------
  st_t p_st, u_st;
  assign p_st = st[pred_tid];
  assign u_st = st[upd_tid];

  logic [R1_W-1:0]      p_r1, u_r1;
  logic [BTB_TAG_W-1:0] p_r2, u_r2;
  logic [PHT_IDX_W-1:0] p_r3, u_r3, p_r4, u_r4;

  st_remap #(.IN_W(KEY_W + 48),         .OUT_W(R1_W),      .MID_W(40), .SALT(1))
    u_r1_p (.din({p_st.psi, pred_ip}), .dout(p_r1));
  st_remap #(.IN_W(KEY_W + 48),         .OUT_W(R1_W),      .MID_W(40), .SALT(1))
    u_r1_u (.din({u_st.psi, upd_ip}),  .dout(u_r1));
  st_remap #(.IN_W(KEY_W + BHB_W),      .OUT_W(BTB_TAG_W), .MID_W(48), .SALT(2))
    u_r2_p (.din({p_st.psi, bhb}),     .dout(p_r2));
  st_remap #(.IN_W(KEY_W + BHB_W),      .OUT_W(BTB_TAG_W), .MID_W(48), .SALT(2))
    u_r2_u (.din({u_st.psi, bhb}),     .dout(u_r2));
  st_remap #(.IN_W(KEY_W + 48),         .OUT_W(PHT_IDX_W), .MID_W(40), .SALT(3))
    u_r3_p (.din({p_st.psi, pred_ip}), .dout(p_r3));
  st_remap #(.IN_W(KEY_W + 48),         .OUT_W(PHT_IDX_W), .MID_W(40), .SALT(3))
    u_r3_u (.din({u_st.psi, upd_ip}),  .dout(u_r3));
  st_remap #(.IN_W(KEY_W + GHR_W + 48), .OUT_W(PHT_IDX_W), .MID_W(48), .SALT(4))
    u_r4_p (.din({p_st.psi, ghr, pred_ip}), .dout(p_r4));
  st_remap #(.IN_W(KEY_W + GHR_W + 48), .OUT_W(PHT_IDX_W), .MID_W(48), .SALT(4))
    u_r4_u (.din({u_st.psi, ghr, upd_ip}),  .dout(u_r4));

  // R1 output fields: {index, tag, offset}
  logic [BTB_IDX_W-1:0]  p_idx, u_idx;
  logic [BTB_TAG_W-1:0]  p_tag, u_tag;
  logic [BTB_OFFS_W-1:0] p_offs, u_offs;
  assign {p_idx, p_tag, p_offs} = p_r1;
  assign {u_idx, u_tag, u_offs} = u_r1;

  // ------------------------------------------------------------------
  // Target encryption (update) and decryption (prediction)
  // ------------------------------------------------------------------
  logic [TGT_W-1:0] enc_target, enc_fallthrough;
  logic [TGT_W-1:0] sel_data;
  logic [KEY_W-1:0] q_phi;
  logic [47:0]      q_ip;

  st_target_codec u_codec_tgt (
    .enc_phi(u_st.phi), .dec_phi(q_phi), .enc_in(upd_target), .enc_out(enc_target),
    .dec_in(sel_data), .dec_ip(q_ip), .dec_out(resp_target)
  );
  // second encoder for call return addresses; its decoder is unused
  logic [47:0] unused_dec;
  st_target_codec u_codec_ret (
    .enc_phi(u_st.phi), .dec_phi('0), .enc_in(upd_fallthrough), .enc_out(enc_fallthrough),
    .dec_in('0), .dec_ip('0), .dec_out(unused_dec)
  );

  // ------------------------------------------------------------------
  // Mode selector
  // ------------------------------------------------------------------
  logic use_ip;
  mode_selector u_sel (
    .clk, .rst_n,
    .dir(upd_fire && (upd_kind == BR_COND || upd_kind == BR_DIRECT)),
    .ind(upd_fire && upd_kind == BR_INDIRECT),
    .use_ip
  );

  // ------------------------------------------------------------------
  // Return stack
  // ------------------------------------------------------------------
  logic             rsb_empty;
  logic [TGT_W-1:0] rsb_top;
  logic             rsb_push, rsb_pop;

  assign rsb_push = upd_fire && upd_call && (upd_kind == BR_DIRECT || upd_kind == BR_INDIRECT);
  assign rsb_pop  = upd_fire && upd_kind == BR_RETURN;

  rsb #(.DEPTH(RSB_DEPTH), .DATA_W(TGT_W)) u_rsb (
    .clk, .rst_n, .push(rsb_push), .push_data(enc_fallthrough), .pop(rsb_pop),
    .empty(rsb_empty), .top(rsb_top), .overflow(rsb_overflow), .underflow(rsb_underflow)
  );

  // ------------------------------------------------------------------
  // BTB
  // ------------------------------------------------------------------
  logic                  ip_hit, bhb_hit;
  logic [TGT_W-1:0]      ip_data, bhb_data;
  logic                  btb_we;
  logic [BTB_IDX_W-1:0]  btb_widx;
  logic [BTB_TAG_W-1:0]  btb_wtag;
  logic [BTB_OFFS_W-1:0] btb_woffs;
  logic [TGT_W-1:0]      btb_wdata;

  // An indirect branch trains both addressing modes: the BHB-mode entry is
  // written with the update, the IP-mode entry one clock later from this
  // one-entry buffer, while upd_ready is low.
  logic                  pend_valid;
  logic [TID_W-1:0]      pend_tid;
  logic [BTB_IDX_W-1:0]  pend_idx;
  logic [BTB_TAG_W-1:0]  pend_tag;
  logic [BTB_OFFS_W-1:0] pend_offs;
  logic [TGT_W-1:0]      pend_data;

  assign upd_ready = !pend_valid;
  assign upd_fire  = upd_valid && upd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pend_valid <= 1'b0;
    else        pend_valid <= upd_fire && upd_kind == BR_INDIRECT;
  end

  always_ff @(posedge clk) begin
    if (upd_fire && upd_kind == BR_INDIRECT) begin
      pend_tid  <= upd_tid;
      pend_idx  <= u_idx;
      pend_tag  <= u_tag;
      pend_offs <= u_offs;
      pend_data <= enc_target;
    end
  end

  always_comb begin
    btb_we    = 1'b0;
    btb_widx  = u_idx;
    btb_wtag  = u_tag;
    btb_woffs = u_offs;
    btb_wdata = enc_target;
    if (pend_valid) begin
      btb_we    = 1'b1;
      btb_widx  = pend_idx;
      btb_wtag  = pend_tag;
      btb_woffs = pend_offs;
      btb_wdata = pend_data;
    end else if (upd_valid) begin
      unique case (upd_kind)
        BR_COND:     btb_we = upd_taken;
        BR_DIRECT:   btb_we = 1'b1;
        BR_INDIRECT: begin btb_we = 1'b1; btb_wtag = u_r2; end
        BR_RETURN:   begin btb_we = rsb_empty; btb_wtag = u_r2; end
        default: ;
      endcase
    end
  end

  btb #(.SETS(BTB_SETS), .WAYS(BTB_WAYS), .TAG_W(BTB_TAG_W), .OFFS_W(BTB_OFFS_W),
        .DATA_W(TGT_W)) u_btb (
    .clk, .rst_n,
    .rd_en(pred_valid), .rd_idx(p_idx), .rd_tag_ip(p_tag), .rd_tag_bhb(p_r2),
    .rd_offs(p_offs), .ip_hit, .ip_data, .bhb_hit, .bhb_data,
    .wr_en(btb_we), .wr_idx(btb_widx), .wr_tag(btb_wtag), .wr_offs(btb_woffs),
    .wr_data(btb_wdata), .evict(btb_evict)
  );

  // ------------------------------------------------------------------
  // PHT
  // ------------------------------------------------------------------
  logic [1:0] pht_ctr1, pht_ctr2;
  logic       pht_use2, pht_taken;

  pht #(.ENTRIES(PHT_ENTRIES)) u_pht (
    .clk, .rst_n,
    .rd_en(pred_valid), .rd_idx1(p_r3), .rd_idx2(p_r4),
    .ctr1(pht_ctr1), .ctr2(pht_ctr2), .use2(pht_use2), .taken(pht_taken),
    .wr_en(upd_fire && upd_kind == BR_COND), .wr_idx1(u_r3), .wr_idx2(u_r4),
    .wr_taken(upd_taken)
  );

  // ------------------------------------------------------------------
  // Token control
  // ------------------------------------------------------------------
  st_token_ctrl #(.THREADS(THREADS), .MISP_THR(MISP_THR), .EVICT_THR(EVICT_THR)) u_tok (
    .clk, .rst_n,
    .misp_evt(upd_fire && upd_mispredict), .misp_tid(upd_tid),
    .evict_evt(btb_evict), .evict_tid(pend_valid ? pend_tid : upd_tid),
    .csr_valid, .csr_we, .csr_priv, .csr_tid, .csr_addr, .csr_wdata, .csr_rdata, .csr_err,
    .rnd, .rnd_next, .st, .rerand(st_rerand)
  );

  // ------------------------------------------------------------------
  // Prediction stage 2: select and decrypt
  // ------------------------------------------------------------------
  logic             q_valid;
  br_kind_e         q_kind;
  logic             q_rsb_empty;
  logic [TGT_W-1:0] q_rsb_top;
  logic             q_use_ip;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_valid <= 1'b0;
    else        q_valid <= pred_valid;
  end

  always_ff @(posedge clk) begin
    if (pred_valid) begin
      q_kind      <= pred_kind;
      q_ip        <= pred_ip;
      q_phi       <= p_st.phi;
      q_rsb_empty <= rsb_empty;
      q_rsb_top   <= rsb_top;
      q_use_ip    <= use_ip;
    end
  end

  always_comb begin
    resp_src = SRC_NONE;
    sel_data = '0;
    unique case (q_kind)
      BR_COND, BR_DIRECT: if (ip_hit) begin resp_src = SRC_BTB_IP; sel_data = ip_data; end
      BR_INDIRECT: begin
        if (ip_hit && (q_use_ip || !bhb_hit)) begin resp_src = SRC_BTB_IP;  sel_data = ip_data; end
        else if (bhb_hit)                     begin resp_src = SRC_BTB_BHB; sel_data = bhb_data; end
      end
      BR_RETURN: begin
        if (!q_rsb_empty)  begin resp_src = SRC_RSB;     sel_data = q_rsb_top; end
        else if (bhb_hit)  begin resp_src = SRC_BTB_BHB; sel_data = bhb_data; end
      end
      default: ;
    endcase
  end

  assign resp_valid        = q_valid;
  assign resp_taken        = q_valid && ((q_kind == BR_COND) ? pht_taken : 1'b1);
  assign resp_target_valid = q_valid && (resp_src != SRC_NONE);

endmodule
