// branch_history: the two history shift registers of the predictor.
//
// GHR (GHR_W bits) records taken/not-taken outcomes of conditional branches:
// on each resolved conditional branch it shifts left and takes the outcome
// in bit 0. BHB (BHB_W bits) accumulates the path context used by the
// BHB-based BTB mode: on every taken branch it shifts left by BHB_SHIFT bits
// and is XORed with a FOLD_W-bit XOR-fold of the branch's 48-bit address.
// Both update at the clock edge of a valid update; their current values are
// outputs. Reset clears both.
// The register widths (58-bit BHB, 16 GHR bits used by the remapping) follow
// the STBPU's function table; the fold width, shift amount and the choice to
// fold the branch address only are this design's, since the exact baseline
// update function is not public.
module branch_history #(
  parameter int unsigned BHB_W     = 58,
  parameter int unsigned GHR_W     = 16,
  parameter int unsigned FOLD_W    = 16,
  parameter int unsigned BHB_SHIFT = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             upd_valid,
  input  logic             upd_cond,    // branch is conditional
  input  logic             upd_taken,   // branch was taken
  input  logic [47:0]      upd_ip,
  output logic [BHB_W-1:0] bhb,
  output logic [GHR_W-1:0] ghr
);

  logic [FOLD_W-1:0] fold;
  always_comb begin
    fold = '0;
    for (int i = 0; i < 48; i++) fold[i % FOLD_W] ^= upd_ip[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bhb <= '0;
      ghr <= '0;
    end else if (upd_valid) begin
      if (upd_cond)  ghr <= {ghr[GHR_W-2:0], upd_taken};
      if (upd_taken) bhb <= (bhb << BHB_SHIFT) ^ BHB_W'(fold);
    end
  end

endmodule
