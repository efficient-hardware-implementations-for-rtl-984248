// tb_des_workloads: batch workloads on the sixteen-stage DES core.
//
// Runs the batch experiment used to compare DES implementations: one key,
// a batch of N blocks encrypted, then the same batch decrypted, for batch
// sizes N = 3, 6 and 8. The key is 0101010101010101 and the plaintexts are
// the eight single-bit vectors 80..00 ... 01..00 of the published
// variable-plaintext known-answer test, so every ciphertext is known.
// For each batch the testbench checks every result, that the batch takes
// exactly 16 + N - 1 cycles from first input to last output (no key set-up
// time, one block per cycle), and reports the throughput in bits per cycle.
module tb_des_workloads;
  localparam longint LATENCY = 16;
  localparam logic [63:0] KEY = 64'h0101010101010101;
  localparam logic [63:0] PT [8] = '{
    64'h8000000000000000, 64'h4000000000000000, 64'h2000000000000000, 64'h1000000000000000,
    64'h0800000000000000, 64'h0400000000000000, 64'h0200000000000000, 64'h0100000000000000};
  localparam logic [63:0] CT [8] = '{
    64'h95F8A5E5DD31D900, 64'hDD7F121CA5015619, 64'h2E8653104F3834EA, 64'h4BD388FF6CD81D4F,
    64'h20B9E767B2FB1456, 64'h55579380D77138EF, 64'h6CC5DEFAAF04512F, 64'h0D9F279BA5D87260};
  localparam int SIZES [3] = '{3, 6, 8};

  logic        clk = 1'b0, rst_n = 1'b1;
  logic        in_valid = 1'b0, in_decrypt = 1'b0;
  logic [63:0] in_key = '0, in_block = '0;
  logic        out_valid, out_decrypt;
  logic [63:0] out_block;
  int checks = 0, failures = 0;
  longint cycle = 0;

  des_pipe16 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send n blocks back to back in one mode and collect the n results.
  task automatic run_batch(input int n, input logic dec);
    longint t_first, t_last;
    int got = 0;
    logic [63:0] exp;
    fork
      begin
        for (int i = 0; i < n; i++) begin
          @(negedge clk);
          in_valid   = 1'b1;
          in_decrypt = dec;
          in_key     = KEY;
          in_block   = dec ? CT[i] : PT[i];
          if (i == 0) t_first = cycle;
        end
        @(negedge clk) in_valid = 1'b0;
      end
      begin
        while (got < n) begin
          @(posedge clk);
          if (out_valid) begin
            exp = dec ? PT[got] : CT[got];
            checks++;
            if (out_block !== exp) begin
              failures++;
              $display("FAIL batch %0d dec=%b block %0d: %h expected %h", n, dec, got, out_block, exp);
            end
            got++;
            t_last = cycle;
          end
        end
      end
    join
    checks++;
    if (t_last - t_first != LATENCY + longint'(n) - 1) begin
      failures++;
      $display("FAIL batch %0d dec=%b took %0d cycles, expected %0d", n, dec, t_last - t_first, LATENCY + longint'(n) - 1);
    end
    $display("batch of %0d blocks, %s: %0d cycles, %0d bits, %0.2f bits/cycle in steady state",
             n, dec ? "decryption" : "encryption", t_last - t_first, 64 * n,
             64.0 * n / real'(t_last - t_first - LATENCY + 1));
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    foreach (SIZES[s]) begin
      run_batch(SIZES[s], 1'b0);
      run_batch(SIZES[s], 1'b1);
      repeat (18) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
