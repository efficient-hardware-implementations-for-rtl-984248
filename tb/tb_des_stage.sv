// tb_des_stage: self-checking test of one pipeline stage (one DES round).
//
// Four stages (ROUND = 1, 3, 9, 16) are each given one encryption and one
// decryption vector: random L, R and key state C||D, with the next L, R and
// rotated key state computed by a separate software model of FIPS 46-3.
// Each result must appear one clock after the input. Every stage is then
// fed a bubble (valid = 0) with different data: its registers must hold the
// previous result and its valid output must drop.
module tb_des_stage
  import des_pkg::*;
;
  typedef struct packed {
    logic        dec;
    logic [31:0] l, r;
    logic [55:0] cd;
    logic [31:0] l_n, r_n;
    logic [55:0] cd_n;
  } vec_t;

  // Index: 2*stage + mode; stages are rounds 1, 3, 9, 16.
  localparam vec_t VECS [8] = '{
    '{1'b0, 32'h93BD04CF, 32'h95E60AF5, 56'h0CB1E2658CDA14, 32'h95E60AF5, 32'h4F663C5C, 56'h1963C4CB19B428},
    '{1'b1, 32'hF9EBDACC, 32'h3898D190, 56'h8E81970BECD7B0, 32'h3898D190, 32'h1D9A91BA, 56'h8E81970BECD7B0},
    '{1'b0, 32'hDBC496CB, 32'h2217BEAD, 56'h6B4CB24A23D596, 32'h2217BEAD, 32'h89E3DEAA, 56'hAD32C9188F565A},
    '{1'b1, 32'h24EDE6A4, 32'h8A6A63EC, 56'h9227661E27A1C0, 32'h8A6A63EC, 32'h0FE07802, 56'h6489D98389E870},
    '{1'b0, 32'h4EF8AA38, 32'h8F6D0558, 56'hAE97BAD0EDA82F, 32'h8F6D0558, 32'hD2CB7A12, 56'h5D2F75B1DB505E},
    '{1'b1, 32'h2E44158B, 32'h1A61DBE2, 56'h923A7394E3BF91, 32'h1A61DBE2, 32'hDEE39AD6, 56'hC91D39CA71DFC8},
    '{1'b0, 32'hA38FD547, 32'h301850C5, 56'h18F1355F557203, 32'h301850C5, 32'h5928EEEC, 56'h31E26AAEAAE407},
    '{1'b1, 32'h8C38FB29, 32'hB64CE422, 56'h907A701012F037, 32'hB64CE422, 32'h842E0525, 56'hC83D380809781B}
  };

  logic clk = 1'b0, rst_n = 1'b1;
  des_state_t s_in [4];
  des_state_t s_out [4];
  int checks = 0, failures = 0;

  des_stage #(.ROUND(1))  u_s1  (.clk, .rst_n, .s_in(s_in[0]), .s_out(s_out[0]));
  des_stage #(.ROUND(3))  u_s3  (.clk, .rst_n, .s_in(s_in[1]), .s_out(s_out[1]));
  des_stage #(.ROUND(9))  u_s9  (.clk, .rst_n, .s_in(s_in[2]), .s_out(s_out[2]));
  des_stage #(.ROUND(16)) u_s16 (.clk, .rst_n, .s_in(s_in[3]), .s_out(s_out[3]));

  always #5 clk = ~clk;

  task automatic check_out(input int s, input vec_t v, input logic exp_valid);
    checks++;
    if (s_out[s].valid !== exp_valid || s_out[s].decrypt !== v.dec || s_out[s].l !== v.l_n ||
        s_out[s].r !== v.r_n || s_out[s].cd !== v.cd_n) begin
      failures++;
      $display("FAIL stage %0d dec=%b: got v=%b l=%h r=%h cd=%h expected v=%b l=%h r=%h cd=%h",
               s, v.dec, s_out[s].valid, s_out[s].l, s_out[s].r, s_out[s].cd,
               exp_valid, v.l_n, v.r_n, v.cd_n);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (s_in[s]) s_in[s] = '0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 2; m++) begin
      @(negedge clk);
      foreach (s_in[s])
        s_in[s] = '{valid: 1'b1, decrypt: VECS[2*s + m].dec, l: VECS[2*s + m].l,
                    r: VECS[2*s + m].r, cd: VECS[2*s + m].cd};
      @(posedge clk);
      #1;
      foreach (s_in[s]) check_out(s, VECS[2*s + m], 1'b1);
    end
    // Bubble: new data without valid must not disturb the registers.
    @(negedge clk);
    foreach (s_in[s]) s_in[s] = '{valid: 1'b0, decrypt: 1'b0, l: $urandom, r: $urandom, cd: '1};
    @(posedge clk);
    #1;
    foreach (s_in[s]) check_out(s, VECS[2*s + 1], 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
