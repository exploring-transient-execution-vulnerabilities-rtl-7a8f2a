// pht: pattern history table with two addressing modes and a mode chooser.
//
// ENTRIES 2-bit saturating counters (0 strongly not-taken .. 3 strongly
// taken) predict the direction of conditional branches. Like the gshare-style
// baseline it is addressed two ways: a 1-level index computed from the branch
// address alone (R3 in the STBPU) and a 2-level index computed from the
// address and the global history (R4). Both counters are read at once; a
// global 2-bit chooser picks which one gives the prediction.
//
// Lookup: rd_en with both indices; ctr1/ctr2/taken are valid one clock later.
// Update: wr_en with both indices and the resolved direction; both counters
// step toward the outcome, and the chooser steps toward the mode that was
// right when the two modes disagreed (read-modify-write in one clock). The
// chooser and its policy, and the reset value (all counters weakly
// not-taken, chooser weakly 1-level) are this design's choices: the baseline
// is only known to have both modes.
module pht #(
  parameter int unsigned ENTRIES = 16384,
  localparam int unsigned IDX_W = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd_en,
  input  logic [IDX_W-1:0] rd_idx1,   // 1-level (address) index
  input  logic [IDX_W-1:0] rd_idx2,   // 2-level (address + history) index
  output logic [1:0]       ctr1,
  output logic [1:0]       ctr2,
  output logic             use2,      // chooser selected the 2-level counter
  output logic             taken,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_idx1,
  input  logic [IDX_W-1:0] wr_idx2,
  input  logic             wr_taken
);

  logic [1:0] ctr [ENTRIES];
  logic [1:0] chooser;

  function automatic logic [1:0] sat_step(input logic [1:0] c, input logic up);
    if (up) return (c == 2'd3) ? c : c + 2'd1;
    else    return (c == 2'd0) ? c : c - 2'd1;
  endfunction

  // lookup
  always_ff @(posedge clk) begin
    if (rd_en) begin
      ctr1 <= ctr[rd_idx1];
      ctr2 <= ctr[rd_idx2];
    end
  end
  assign use2  = chooser[1];
  assign taken = use2 ? ctr2[1] : ctr1[1];

  // update
  logic [1:0] old1, old2, new1, new2;
  logic       right1, right2;
  always_comb begin
    old1   = ctr[wr_idx1];
    old2   = ctr[wr_idx2];
    right1 = (old1[1] == wr_taken);
    right2 = (old2[1] == wr_taken);
    new1   = sat_step(old1, wr_taken);
    // when both indices name the same counter it steps once
    new2   = sat_step(old2, wr_taken);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ctr[i] <= 2'd1;
      chooser <= 2'd1;
    end else if (wr_en) begin
      ctr[wr_idx1] <= new1;
      ctr[wr_idx2] <= new2;
      if (right1 != right2) chooser <= sat_step(chooser, right2);
    end
  end

endmodule
