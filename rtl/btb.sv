// btb: set-associative branch target buffer shared by all branch kinds.
//
// SETS x WAYS entries, each holding a tag, an offset and a truncated target
// (in the STBPU the stored target is already XOR-encrypted with the owner's
// phi; the BTB itself does not know). An entry hits only if both tag and
// offset match. The BTB serves the two addressing modes of the predictor
// with one set read: the IP-based key (tag from R1) and the BHB-based key
// (tag from R2) share the index and offset and are compared in parallel.
//
// Lookup: present rd_en with index, two tags and offset; ip_hit/ip_data and
// bhb_hit/bhb_data are valid one clock later (registered set read, compare
// in the second cycle). Update: wr_en with a key and data writes in one
// clock; if the key already hits in the set its way is overwritten,
// otherwise the first invalid way is filled, else the way named by the
// set's round-robin pointer is replaced and `evict` pulses for that cycle.
// The replacement policy and reset (all entries invalid) are this design's
// choices; the geometry (512 sets, 8 ways, 8-bit tag, 5-bit offset, 32-bit
// target) is the Skylake-like baseline's.
module btb #(
  parameter int unsigned SETS   = 512,
  parameter int unsigned WAYS   = 8,
  parameter int unsigned TAG_W  = 8,
  parameter int unsigned OFFS_W = 5,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned IDX_W = $clog2(SETS),
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  logic              rd_en,
  input  logic [IDX_W-1:0]  rd_idx,
  input  logic [TAG_W-1:0]  rd_tag_ip,
  input  logic [TAG_W-1:0]  rd_tag_bhb,
  input  logic [OFFS_W-1:0] rd_offs,
  output logic              ip_hit,
  output logic [DATA_W-1:0] ip_data,
  output logic              bhb_hit,
  output logic [DATA_W-1:0] bhb_data,
  // update
  input  logic              wr_en,
  input  logic [IDX_W-1:0]  wr_idx,
  input  logic [TAG_W-1:0]  wr_tag,
  input  logic [OFFS_W-1:0] wr_offs,
  input  logic [DATA_W-1:0] wr_data,
  output logic              evict
);

  typedef struct packed {
    logic [TAG_W-1:0]  tag;
    logic [OFFS_W-1:0] offs;
    logic [DATA_W-1:0] data;
  } entry_t;

  entry_t           mem   [WAYS][SETS];
  logic [WAYS-1:0]  valid [SETS];
  logic [WAY_W-1:0] rr    [SETS];

  // ---- lookup: cycle 1 reads the set, cycle 2 compares ----
  entry_t            rd_set   [WAYS];
  logic [WAYS-1:0]   rd_valid;
  logic [TAG_W-1:0]  rd_tag_ip_q, rd_tag_bhb_q;
  logic [OFFS_W-1:0] rd_offs_q;

  always_ff @(posedge clk) begin
    if (rd_en) begin
      for (int w = 0; w < WAYS; w++) rd_set[w] <= mem[w][rd_idx];
      rd_tag_ip_q  <= rd_tag_ip;
      rd_tag_bhb_q <= rd_tag_bhb;
      rd_offs_q    <= rd_offs;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rd_valid <= '0;
    else if (rd_en) rd_valid <= valid[rd_idx];
  end

  always_comb begin
    ip_hit = 1'b0;  ip_data = '0;
    bhb_hit = 1'b0; bhb_data = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (rd_valid[w] && rd_set[w].offs == rd_offs_q) begin
        if (!ip_hit && rd_set[w].tag == rd_tag_ip_q) begin
          ip_hit = 1'b1; ip_data = rd_set[w].data;
        end
        if (!bhb_hit && rd_set[w].tag == rd_tag_bhb_q) begin
          bhb_hit = 1'b1; bhb_data = rd_set[w].data;
        end
      end
    end
  end

  // ---- update: find the way, write it ----
  logic             wr_hit;
  logic [WAY_W-1:0] wr_hit_way, wr_free_way, wr_way;
  logic             wr_has_free;

  always_comb begin
    wr_hit = 1'b0; wr_hit_way = '0;
    wr_has_free = 1'b0; wr_free_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!wr_hit && valid[wr_idx][w] && mem[w][wr_idx].tag == wr_tag
          && mem[w][wr_idx].offs == wr_offs) begin
        wr_hit = 1'b1; wr_hit_way = WAY_W'(w);
      end
      if (!wr_has_free && !valid[wr_idx][w]) begin
        wr_has_free = 1'b1; wr_free_way = WAY_W'(w);
      end
    end
    wr_way = wr_hit ? wr_hit_way : (wr_has_free ? wr_free_way : rr[wr_idx]);
    evict  = wr_en && !wr_hit && !wr_has_free;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_way][wr_idx] <= '{tag: wr_tag, offs: wr_offs, data: wr_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        rr[s]    <= '0;
      end
    end else if (wr_en) begin
      valid[wr_idx][wr_way] <= 1'b1;
      if (evict) rr[wr_idx] <= rr[wr_idx] + 1'b1;
    end
  end

endmodule
