// tb_des_rl: self-checking test of the RL register of a round.
//
// After reset both halves must read zero. Random L, R, f are then applied
// with load high (the register must take L' = R, R' = L xor f one edge
// later) or low (it must keep its value), 200 cycles in all, against a
// model kept in the testbench.
module tb_des_rl;
  logic clk = 1'b0, rst_n = 1'b1, load = 1'b0;
  logic [31:0] l_in = '0, r_in = '0, f_in = '0, l_q, r_q;
  logic [31:0] exp_l, exp_r;
  int checks = 0, failures = 0, holds = 0;

  des_rl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (l_q !== '0 || r_q !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    exp_l = '0;
    exp_r = '0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      load = ($urandom_range(3) != 0);
      l_in = $urandom;
      r_in = $urandom;
      f_in = $urandom;
      if (load) begin
        exp_l = r_in;
        exp_r = l_in ^ f_in;
      end else begin
        holds++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (l_q !== exp_l || r_q !== exp_r) begin
        failures++;
        $display("FAIL cycle %0d load=%b: got %h %h expected %h %h", i, load, l_q, r_q, exp_l, exp_r);
      end
    end
    checks++;
    if (holds == 0) begin failures++; $display("FAIL hold never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
