// st_target_codec: target encryption and target reconstruction.
//
// Stored targets are truncated to their 32 low bits and XORed with phi, the
// encryption half of the owner's secret token, before they enter the BTB or
// the return stack (enc_out = enc_in[31:0] ^ phi). On a prediction the
// stored word is XORed with the current phi again and extended to a 48-bit
// address with the 16 upper bits of the branch's own address
// (dec_out = {ip[47:32], stored ^ phi}). A word written under a different
// token therefore decodes to an unrelated address. The two paths take their
// keys separately because the writer and the reader of an entry may run
// under different tokens. Purely combinational.
// By construction enc_in[47:32] and dec_ip[31:0] are not used, and
// dec_out[47:32] is a straight copy of dec_ip[47:32]: only 32 target bits
// are stored, as in the predictor being modelled.
module st_target_codec
  import stbpu_pkg::*;
(
  // encryption path (update), keyed with the writer's phi
  input  logic [KEY_W-1:0] enc_phi,
  input  logic [47:0]      enc_in,
  output logic [TGT_W-1:0] enc_out,
  // decryption path (prediction), keyed with the reader's phi
  input  logic [KEY_W-1:0] dec_phi,
  input  logic [TGT_W-1:0] dec_in,
  input  logic [47:0]      dec_ip,
  output logic [47:0]      dec_out
);
  assign enc_out = enc_in[TGT_W-1:0] ^ enc_phi;
  assign dec_out = {dec_ip[47:TGT_W], dec_in ^ dec_phi};

endmodule
