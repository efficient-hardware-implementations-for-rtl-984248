// tb_des_pipe16: end-to-end test of the sixteen-stage DES core at its
// default (and only) size.
//
// Phase 1 streams 22 published known-answer vectors (FIPS 46-3 / NBS test
// sets and the textbook example) into the core on consecutive cycles, each
// with its own key, and checks every ciphertext. Phase 2 streams the same
// ciphertexts back in decryption mode, alternating with re-encryptions, so
// the mode changes from one cycle to the next. Phase 3 sends random keys and
// blocks with random idle cycles, and checks properties that hold for any
// correct DES without a reference model: decrypting a ciphertext with the
// same key returns the plaintext, and E(~k, ~p) = ~E(k, p) (complementation).
//
// For every result the testbench also checks that it left exactly 16 cycles
// after its block entered and in the same order, and that the pipeline ran
// at one block per cycle. It counts how often each mechanism of the core was
// exercised: encryption, decryption, a mode change between consecutive
// blocks, a key change between consecutive blocks, a full-rate run of 16
// or more blocks, and an idle cycle during which the first stage kept its
// register unchanged (the valid-gated low-power hold). A mechanism that
// never happened counts as a failure.
module tb_des_pipe16;
  localparam int LATENCY = 16;

  typedef enum logic [1:0] {K_PLAIN, K_RT_ENC, K_CPL_A, K_CPL_B} kind_t;

  typedef struct {
    logic [63:0] key;
    logic [63:0] blk;
    logic        dec;
    kind_t       kind;
    logic        has_exp;
    logic [63:0] exp;
    longint      cycle;
  } req_t;

  typedef struct packed {
    logic [63:0] key, pt, ct;
  } kat_t;

  localparam kat_t KAT [22] = '{
    '{64'h133457799BBCDFF1, 64'h0123456789ABCDEF, 64'h85E813540F0AB405},
    '{64'h0123456789ABCDEF, 64'h4E6F772069732074, 64'h3FA40E8A984D4815},
    '{64'h0E329232EA6D0D73, 64'h8787878787878787, 64'h0000000000000000},
    '{64'h0000000000000000, 64'h0000000000000000, 64'h8CA64DE9C1B123A7},
    '{64'hFFFFFFFFFFFFFFFF, 64'hFFFFFFFFFFFFFFFF, 64'h7359B2163E4EDC58},
    '{64'h3000000000000000, 64'h1000000000000001, 64'h958E6E627A05557B},
    '{64'h1111111111111111, 64'h1111111111111111, 64'hF40379AB9E0EC533},
    '{64'h0123456789ABCDEF, 64'h1111111111111111, 64'h17668DFC7292532D},
    '{64'h1111111111111111, 64'h0123456789ABCDEF, 64'h8A5AE1F81AB8F2DD},
    '{64'hFEDCBA9876543210, 64'h0123456789ABCDEF, 64'hED39D950FA74BCC4},
    '{64'h0101010101010101, 64'h8000000000000000, 64'h95F8A5E5DD31D900},
    '{64'h0101010101010101, 64'h4000000000000000, 64'hDD7F121CA5015619},
    '{64'h0101010101010101, 64'h2000000000000000, 64'h2E8653104F3834EA},
    '{64'h0101010101010101, 64'h1000000000000000, 64'h4BD388FF6CD81D4F},
    '{64'h0101010101010101, 64'h0800000000000000, 64'h20B9E767B2FB1456},
    '{64'h0101010101010101, 64'h0400000000000000, 64'h55579380D77138EF},
    '{64'h0101010101010101, 64'h0200000000000000, 64'h6CC5DEFAAF04512F},
    '{64'h0101010101010101, 64'h0100000000000000, 64'h0D9F279BA5D87260},
    '{64'h8001010101010101, 64'h0000000000000000, 64'h95A8D72813DAA94D},
    '{64'h4001010101010101, 64'h0000000000000000, 64'h0EEC1487DD8C26D5},
    '{64'h2001010101010101, 64'h0000000000000000, 64'h7AD16FFB79C45926},
    '{64'h1001010101010101, 64'h0000000000000000, 64'hD3746294CA6A6CF3}
  };

  logic        clk = 1'b0, rst_n = 1'b1;
  logic        in_valid = 1'b0, in_decrypt = 1'b0;
  logic [63:0] in_key = '0, in_block = '0;
  logic        out_valid, out_decrypt;
  logic [63:0] out_block;

  des_pipe16 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  req_t in_flight [$];   // issued, not yet out (in order)
  req_t followups [$];   // decryptions generated from results
  logic [63:0] cpl_a_result;

  // Mechanism counters.
  int n_enc = 0, n_dec = 0, n_mode_switch = 0, n_key_change = 0;
  int n_full_rate_runs = 0, n_idle_hold = 0, n_out = 0;
  int run_len = 0;
  logic        have_last = 1'b0, last_dec;
  logic [63:0] last_key;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0d: %s", cycle, msg);
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor: in-order scoreboard with latency and rate checks.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      req_t r;
      n_out++;
      run_len++;
      if (run_len == LATENCY) n_full_rate_runs++;
      checks++;
      if (in_flight.size() == 0) begin
        fail("result with nothing in flight");
      end else begin
        r = in_flight.pop_front();
        if (cycle - r.cycle != longint'(LATENCY))
          fail($sformatf("latency %0d, expected %0d", cycle - r.cycle, LATENCY));
        else if (out_decrypt !== r.dec)
          fail("mode flag does not match the block");
        else if (r.has_exp && out_block !== r.exp)
          fail($sformatf("key %h in %h dec=%b: got %h expected %h",
                         r.key, r.blk, r.dec, out_block, r.exp));
        else if (r.kind == K_CPL_B && out_block !== ~cpl_a_result)
          fail($sformatf("complementation: got %h expected %h", out_block, ~cpl_a_result));
        if (r.kind == K_CPL_A) cpl_a_result = out_block;
        if (r.kind == K_RT_ENC || (r.kind == K_PLAIN && !r.dec))
          followups.push_back('{key: r.key, blk: out_block, dec: 1'b1, kind: K_PLAIN,
                                has_exp: 1'b1, exp: r.blk, cycle: 0});
      end
    end else begin
      run_len = 0;
    end
  end

  task automatic issue(input req_t r);
    @(negedge clk);
    in_valid   = 1'b1;
    in_decrypt = r.dec;
    in_key     = r.key;
    in_block   = r.blk;
    if (r.dec) n_dec++; else n_enc++;
    if (have_last && last_dec != r.dec) n_mode_switch++;
    if (have_last && last_key != r.key) n_key_change++;
    have_last = 1'b1;
    last_dec  = r.dec;
    last_key  = r.key;
    r.cycle   = cycle;
    in_flight.push_back(r);
    @(posedge clk);
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      logic [31:0] st1_before;
      @(negedge clk);
      in_valid = 1'b0;
      in_block = {$urandom, $urandom};
      in_key   = {$urandom, $urandom};
      st1_before   = dut.st[1].l;
      @(posedge clk);
      #1;
      if (cycle > 20) begin
        checks++;
        if (dut.st[1].l !== st1_before) fail("stage 1 register changed on an idle cycle");
        else n_idle_hold++;
      end
    end
  endtask

  task automatic drain();
    idle(LATENCY + 2);
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Phase 1: known answers, one block per cycle, a new key on most cycles.
    foreach (KAT[i])
      issue('{key: KAT[i].key, blk: KAT[i].pt, dec: 1'b0, kind: K_RT_ENC,
              has_exp: 1'b1, exp: KAT[i].ct, cycle: 0});
    drain();

    // Phase 2: decrypt the ciphertexts, alternating with encryptions.
    foreach (KAT[i]) begin
      issue('{key: KAT[i].key, blk: KAT[i].ct, dec: 1'b1, kind: K_PLAIN,
              has_exp: 1'b1, exp: KAT[i].pt, cycle: 0});
      issue('{key: KAT[i].key, blk: KAT[i].pt, dec: 1'b0, kind: K_PLAIN,
              has_exp: 1'b1, exp: KAT[i].ct, cycle: 0});
    end
    drain();
    // Round-trip decryptions generated from phase 1 and 2 results.
    while (followups.size() > 0) issue(followups.pop_front());
    drain();

    // Phase 3: random traffic with idle cycles, round trips, complement pairs.
    for (int i = 0; i < 300; i++) begin
      logic [63:0] k, p;
      k = {$urandom, $urandom};
      p = {$urandom, $urandom};
      case ($urandom_range(3))
        0: idle($urandom_range(1, 3));
        1: begin
          issue('{key: k, blk: p, dec: 1'b0, kind: K_CPL_A, has_exp: 1'b0, exp: '0, cycle: 0});
          issue('{key: ~k, blk: ~p, dec: 1'b0, kind: K_CPL_B, has_exp: 1'b0, exp: '0, cycle: 0});
        end
        default: issue('{key: k, blk: p, dec: 1'b0, kind: K_RT_ENC, has_exp: 1'b0, exp: '0, cycle: 0});
      endcase
      if (followups.size() > 0 && $urandom_range(1) == 1) issue(followups.pop_front());
    end
    drain();
    while (followups.size() > 0) issue(followups.pop_front());
    drain();

    checks++;
    if (in_flight.size() != 0) fail($sformatf("%0d blocks never came out", in_flight.size()));
    checks += 6;
    if (n_enc == 0)            fail("no encryption");
    if (n_dec == 0)            fail("no decryption");
    if (n_mode_switch == 0)    fail("no mode change between consecutive blocks");
    if (n_key_change == 0)     fail("no key change between consecutive blocks");
    if (n_full_rate_runs == 0) fail("no full-rate run of 16 blocks");
    if (n_idle_hold == 0)      fail("no idle cycle with held registers");
    $display("blocks out=%0d enc=%0d dec=%0d mode_switches=%0d key_changes=%0d full_rate_runs=%0d idle_holds=%0d",
             n_out, n_enc, n_dec, n_mode_switch, n_key_change, n_full_rate_runs, n_idle_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
