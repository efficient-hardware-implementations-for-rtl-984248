// des_pipe16: performance-optimized, low-power synchronous DES core.
//
// The sixteen DES rounds are unrolled into a sixteen-stage pipeline, one
// round per stage, each stage made of a Key, an F and an RL module
// (des_stage). The initial permutation and permuted choice 1 are applied to
// the inputs and the final swap and permutation to the last stage's
// register; all three are wiring. Each block carries its own key and mode
// through the pipeline, so the core accepts a new block every cycle whatever
// its key, and the key-setup latency is zero. Stages that hold no valid
// block keep their registers still, so an idle or partly filled pipeline
// does not switch.
//
// Interface: a block presented with in_valid = 1 at a rising edge of clk
// comes out on out_block with out_valid = 1 exactly 16 cycles later
// (throughput: one 64-bit block per cycle). in_decrypt selects decryption
// for that block; in_key is the 64-bit DES key (bits 8, 16, ... 64, the
// parity bits, are ignored). No backpressure: the pipeline always advances.
// rst_n is an asynchronous active-low reset that empties the pipeline.
// The sixteen-stage organisation and the RL/F/Key split follow the design;
// per-block keys, the valid-gated registers and the port set are this
// implementation's choices.
module des_pipe16
  import des_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_decrypt,
  input  logic [63:0] in_key,
  input  logic [63:0] in_block,
  output logic        out_valid,
  output logic        out_decrypt,
  output logic [63:0] out_block
);

  des_state_t st [ROUNDS + 1];
  logic [63:0] permuted;

  always_comb begin
    permuted       = ip(in_block);
    st[0].valid    = in_valid;
    st[0].decrypt  = in_decrypt;
    st[0].l        = permuted[63:32];
    st[0].r        = permuted[31:0];
    st[0].cd       = pc1(in_key);
  end

  for (genvar i = 1; i <= ROUNDS; i++) begin : g_round
    des_stage #(.ROUND(i)) u_stage (
      .clk   (clk),
      .rst_n (rst_n),
      .s_in  (st[i - 1]),
      .s_out (st[i])
    );
  end

  // After the last round the halves are swapped (R16 L16) before IP^-1.
  assign out_valid   = st[ROUNDS].valid;
  assign out_decrypt = st[ROUNDS].decrypt;
  assign out_block   = fp({st[ROUNDS].r, st[ROUNDS].l});

  // A block that enters leaves exactly ROUNDS cycles later.
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
                              in_valid |-> ##16 out_valid);

endmodule
