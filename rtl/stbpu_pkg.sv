// stbpu_pkg: types, sizes and substitution boxes shared by the secret-token
// branch prediction unit (STBPU).
//
// The structure sizes are those of the Skylake-like baseline predictor the
// design protects: a 512-set, 8-way BTB with 8-bit tags, 5-bit offsets and
// 32-bit stored targets, a 16k-entry PHT of 2-bit counters, a 16-entry return
// stack, a 58-bit branch history buffer and a 64-bit secret token split into
// a 32-bit remapping key (psi) and a 32-bit encryption key (phi).
// The two 4-bit S-boxes are the PRESENT and SPONGENT boxes. The branch-kind
// encoding, the CSR map and the default re-randomization thresholds
// (r = 0.05 of the weakest attack's event count) are this design's choices.
package stbpu_pkg;

  localparam int unsigned VA_W   = 48;  // branch virtual address width
  localparam int unsigned TGT_W  = 32;  // stored (truncated) target width
  localparam int unsigned KEY_W  = 32;  // width of psi and of phi
  localparam int unsigned BHB_W  = 58;  // branch history buffer
  localparam int unsigned GHR_W  = 16;  // global history fed to R4

  // Kinds of branch the front end presents.
  typedef enum logic [1:0] {
    BR_COND     = 2'd0,  // conditional jump, direct target
    BR_DIRECT   = 2'd1,  // unconditional direct jump or call
    BR_INDIRECT = 2'd2,  // indirect jump or call
    BR_RETURN   = 2'd3   // return
  } br_kind_e;

  // Where a target prediction came from.
  typedef enum logic [1:0] {
    SRC_NONE    = 2'd0,
    SRC_BTB_IP  = 2'd1,  // BTB, IP-based addressing (R1)
    SRC_BTB_BHB = 2'd2,  // BTB, BHB-based addressing (R1 index/offset, R2 tag)
    SRC_RSB     = 2'd3
  } pred_src_e;

  // Model-specific registers reachable through the privileged CSR port.
  typedef enum logic [2:0] {
    CSR_ST        = 3'd0,  // {phi, psi}
    CSR_MISP_THR  = 3'd1,  // misprediction threshold
    CSR_EVICT_THR = 3'd2,  // BTB eviction threshold
    CSR_MISP_CNT  = 3'd3,  // misprediction down-counter
    CSR_EVICT_CNT = 3'd4   // eviction down-counter
  } csr_addr_e;

  // The 64-bit secret token.
  typedef struct packed {
    logic [KEY_W-1:0] phi;  // target encryption key
    logic [KEY_W-1:0] psi;  // remapping key
  } st_t;

  // PRESENT 4-bit S-box: C56B90AD3EF84712.
  function automatic logic [3:0] sbox_present(input logic [3:0] x);
    logic [63:0] tbl;
    tbl = 64'h2174_8FE3_DA09_B65C;  // nibble i holds S[i]
    return tbl[x*4 +: 4];
  endfunction

  // SPONGENT 4-bit S-box: EDB0214F7A859C36.
  function automatic logic [3:0] sbox_spongent(input logic [3:0] x);
    logic [63:0] tbl;
    tbl = 64'h63C9_58A7_F412_0BDE;  // nibble i holds S[i]
    return tbl[x*4 +: 4];
  endfunction

  // Multiplier of the affine pin permutation i -> (a*i + b) mod n used by
  // the P-boxes: the first candidate that is coprime with n.
  function automatic int unsigned pbox_mult(input int unsigned n, input int unsigned salt);
    int unsigned cands [8] = '{7, 11, 13, 17, 19, 23, 29, 31};
    int unsigned a;
    a = 1;
    for (int k = 0; k < 8; k++) begin
      int unsigned c;
      c = cands[(k + salt) % 8];
      if (a == 1 && (n % c) != 0 && c < n) a = c;
    end
    return a;
  endfunction

endpackage
