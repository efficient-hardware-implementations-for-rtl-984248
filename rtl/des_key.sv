// des_key: the Key module of one DES round (one per pipeline stage).
//
// The 56-bit key state C||D (after permuted choice 1) travels down the
// pipeline next to the data. Each stage rotates both 28-bit halves and
// selects the 48-bit round subkey from the result with permuted choice 2,
// so no key schedule is precomputed and every block may carry its own key.
//
// Encryption, round i (1..16): rotate left by the standard schedule
// 1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1. Decryption must produce the subkeys in
// reverse order; since the encryption rotations add up to 28 (a full turn),
// round j of decryption rotates right by 0 for j = 1 and by the (18-j)-th
// encryption amount for j >= 2, which yields K16, K15, ... K1 in turn.
// The split into RL, F and Key modules follows the design; computing the
// decryption subkeys by right rotation is this implementation's choice.
//
// Interface: purely combinational, cd_in -> cd_out (rotated state passed to
// the next stage) and subkey (used by des_f in the same stage).
module des_key
  import des_pkg::*;
#(
  parameter int unsigned ROUND = 1  // 1..16, position of this stage
) (
  input  logic        decrypt,
  input  logic [55:0] cd_in,
  output logic [55:0] cd_out,
  output logic [47:0] subkey
);

  localparam int unsigned ENC_SHIFT = int'(SHIFT_T[ROUND - 1]);
  localparam int unsigned DEC_SHIFT = (ROUND == 1) ? 0 : int'(SHIFT_T[17 - ROUND]);

  function automatic logic [27:0] rotl(input logic [27:0] v, input int unsigned s);
    return (s == 0) ? v : ((v << s) | (v >> (28 - s)));
  endfunction

  function automatic logic [27:0] rotr(input logic [27:0] v, input int unsigned s);
    return (s == 0) ? v : ((v >> s) | (v << (28 - s)));
  endfunction

  always_comb begin
    if (decrypt) cd_out = {rotr(cd_in[55:28], DEC_SHIFT), rotr(cd_in[27:0], DEC_SHIFT)};
    else         cd_out = {rotl(cd_in[55:28], ENC_SHIFT), rotl(cd_in[27:0], ENC_SHIFT)};
    subkey = pc2(cd_out);
  end

endmodule
