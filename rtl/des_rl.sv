// des_rl: the RL module of one DES round, the stage's left/right register.
//
// On a clock edge with load = 1 it stores the round's outputs
//   L' = R,   R' = L xor f(R, K)
// where f comes from the stage's des_f. With load = 0 the register keeps
// its value: a stage that receives no block does not toggle, which is how
// the pipeline keeps signal transitions (and so dynamic power) down when
// it is not fully loaded. The clock enable is this implementation's reading
// of the design's low-power aim; a gated clock could replace it.
//
// Interface: l_in, r_in, f_in sampled at the rising edge of clk when load is
// high; l_q, r_q valid one cycle later. rst_n clears the register
// asynchronously.
module des_rl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [31:0] l_in,
  input  logic [31:0] r_in,
  input  logic [31:0] f_in,
  output logic [31:0] l_q,
  output logic [31:0] r_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_q <= '0;
      r_q <= '0;
    end else if (load) begin
      l_q <= r_in;
      r_q <= l_in ^ f_in;
    end
  end

endmodule
