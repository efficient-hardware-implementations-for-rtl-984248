// des_f: the F module of one DES round, f(R, K) = P(S(E(R) xor K)).
//
// The 32-bit right half is expanded to 48 bits, mixed with the 48-bit round
// subkey, cut into eight 6-bit groups that address the eight S-boxes (outer
// bits select the row, inner four the column), and the 32 S-box output bits
// are permuted by P. E and P are wiring; the S-boxes are eight 64x4 lookup
// tables that synthesize to combinational logic.
//
// Interface: purely combinational, r and subkey in, f out; the stage's
// register sits in des_rl. Having F as a module of its own, next to Key and
// RL, follows the design; its contents are the standard DES round function,
// and writing the S-boxes as lookup tables is this implementation's choice.
module des_f
  import des_pkg::*;
(
  input  logic [31:0] r,
  input  logic [47:0] subkey,
  output logic [31:0] f
);

  logic [47:0] mixed;
  logic [31:0] s_out;

  always_comb begin
    mixed = expand(r) ^ subkey;
    for (int b = 0; b < 8; b++)
      s_out[31 - 4*b -: 4] = sbox(3'(b), mixed[47 - 6*b -: 6]);
    f = perm_p(s_out);
  end

endmodule
