// st_remap: keyed remapping function R(psi, x) of the STBPU.
//
// It replaces the fixed index/tag/offset hash of a branch predictor with a
// lightweight non-cryptographic hash whose key is the 32-bit psi half of the
// current secret token, so that each software entity sees its own mapping of
// branches onto predictor entries. The caller concatenates psi with the
// address or history bits into din (Table of widths: R1 80->22, R2 90->8,
// R3 80->14, R4 96->14).
//
// Six stages, as in the published R1 construction:
//   1. S-box layer over the (zero-padded) 2*MID_W input bits,
//   2. XOR compression 2*MID_W -> MID_W (bit i folded with bit i+MID_W),
//   3. S-box layer,
//   4. P-box, XOR mix, P-box, XOR mix, P-box,
//   5. S-box layer,
//   6. C-S compression MID_W -> OUT_W (output bit j is the XOR of all
//      bits i with i mod OUT_W == j).
// The 4-bit S-boxes are PRESENT and SPONGENT, used on alternate nibbles.
// The published design uses randomly generated P-box wirings and also 3-bit
// S-boxes whose tables are not given; here every P-box is the affine wiring
// i -> (a*i + b) mod MID_W (a coprime with MID_W, chosen from SALT), each
// XOR mix adds two rotated copies of the word to itself (x ^ x<<<7 ^ x<<<19,
// then x ^ x<<<5 ^ x<<<13), and only 4-bit S-boxes are used. The function is purely combinational and meant to fit in one
// clock cycle; it has no clock.
module st_remap #(
  parameter int unsigned IN_W  = 80,  // psi + input bits
  parameter int unsigned OUT_W = 22,  // index + tag + offset bits produced
  parameter int unsigned MID_W = 40,  // width after the first compression, multiple of 8
  parameter int unsigned SALT  = 0    // selects the P-box wirings
) (
  input  logic [IN_W-1:0]  din,
  output logic [OUT_W-1:0] dout
);
  import stbpu_pkg::sbox_present;
  import stbpu_pkg::sbox_spongent;
  import stbpu_pkg::pbox_mult;

  localparam int unsigned WIDE_W = 2 * MID_W;

  initial begin
    assert (WIDE_W >= IN_W) else $error("st_remap: 2*MID_W must cover IN_W");
    assert (MID_W % 8 == 0 && MID_W > 19) else $error("st_remap: MID_W must be a multiple of 8");
    assert (OUT_W <= MID_W) else $error("st_remap: OUT_W must not exceed MID_W");
  end

  // One S-box layer; PRESENT on even nibbles when flip is 0.
  function automatic logic [MID_W-1:0] sbox_layer(input logic [MID_W-1:0] x, input logic flip);
    logic [MID_W-1:0] y;
    for (int k = 0; k < MID_W / 4; k++) begin
      if (((k % 2) == 1) ^ flip) y[k*4 +: 4] = sbox_spongent(x[k*4 +: 4]);
      else                       y[k*4 +: 4] = sbox_present(x[k*4 +: 4]);
    end
    return y;
  endfunction

  // P-box: input pin i drives output pin (a*i + b) mod MID_W.
  function automatic logic [MID_W-1:0] pbox(input logic [MID_W-1:0] x, input int unsigned stage);
    logic [MID_W-1:0] y;
    int unsigned a, b;
    a = pbox_mult(MID_W, SALT + stage);
    b = (SALT * 5 + stage * 3 + 1) % MID_W;
    for (int i = 0; i < MID_W; i++) y[(a * i + b) % MID_W] = x[i];
    return y;
  endfunction

  function automatic logic [MID_W-1:0] rotl(input logic [MID_W-1:0] x, input int unsigned k);
    return (x << k) | (x >> (MID_W - k));
  endfunction

  logic [WIDE_W-1:0] din_pad, s1;
  logic [MID_W-1:0]  s2, s3, s4a, s4b, s4c, s4d, s4, s5;

  always_comb begin
    din_pad = '0;
    din_pad[IN_W-1:0] = din;
    // stage 1: two MID_W-wide S-box layers side by side
    s1[MID_W-1:0]      = sbox_layer(din_pad[MID_W-1:0], 1'b0);
    s1[WIDE_W-1:MID_W] = sbox_layer(din_pad[WIDE_W-1:MID_W], 1'b1);
    // stage 2: XOR compression
    s2 = s1[MID_W-1:0] ^ s1[WIDE_W-1:MID_W];
    // stage 3
    s3 = sbox_layer(s2, 1'b1);
    // stage 4: P / XOR / P / XOR / P
    s4a = pbox(s3, 0);
    s4b = s4a ^ rotl(s4a, 7) ^ rotl(s4a, 19);
    s4c = pbox(s4b, 1);
    s4d = s4c ^ rotl(s4c, 5) ^ rotl(s4c, 13);
    s4  = pbox(s4d, 2);
    // stage 5
    s5 = sbox_layer(s4, 1'b0);
    // stage 6: C-S compression
    dout = '0;
    for (int i = 0; i < MID_W; i++) dout[i % OUT_W] ^= s5[i];
  end

endmodule
