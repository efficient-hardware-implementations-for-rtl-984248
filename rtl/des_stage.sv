// des_stage: one of the sixteen pipeline stages, i.e. one DES round.
//
// A stage is built from the three modules of the design: des_key derives the
// round subkey from the key state that arrives with the block, des_f
// computes f(R, K), and des_rl registers the new halves. The rotated key
// state and the encrypt/decrypt flag are registered next to the halves, so
// blocks with different keys and modes can follow each other on successive
// cycles. All data registers load only when a valid block arrives; the
// valid bit itself is registered every cycle.
//
// Interface: s_in (des_state_t) is the previous stage's register (or the
// pipeline input after IP/PC-1); s_out is this stage's register, one cycle
// later. rst_n clears it asynchronously.
module des_stage
  import des_pkg::*;
#(
  parameter int unsigned ROUND = 1  // 1..16, position of this stage
) (
  input  logic       clk,
  input  logic       rst_n,
  input  des_state_t s_in,
  output des_state_t s_out
);

  logic [55:0] cd_next;
  logic [47:0] subkey;
  logic [31:0] f_val;

  des_key #(.ROUND(ROUND)) u_key (
    .decrypt (s_in.decrypt),
    .cd_in   (s_in.cd),
    .cd_out  (cd_next),
    .subkey  (subkey)
  );

  des_f u_f (
    .r      (s_in.r),
    .subkey (subkey),
    .f      (f_val)
  );

  des_rl u_rl (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (s_in.valid),
    .l_in  (s_in.l),
    .r_in  (s_in.r),
    .f_in  (f_val),
    .l_q   (s_out.l),
    .r_q   (s_out.r)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_out.valid   <= 1'b0;
      s_out.decrypt <= 1'b0;
      s_out.cd      <= '0;
    end else begin
      s_out.valid <= s_in.valid;
      if (s_in.valid) begin
        s_out.decrypt <= s_in.decrypt;
        s_out.cd      <= cd_next;
      end
    end
  end

endmodule
