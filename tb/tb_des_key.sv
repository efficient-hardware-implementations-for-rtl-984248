// tb_des_key: self-checking test of the per-round key step.
//
// Sixteen des_key instances (ROUND = 1..16) are chained exactly as in the
// pipeline, once for encryption and once for decryption. For two keys the
// encryption chain must give K1..K16 and the decryption chain K16..K1,
// where the subkeys (and the PC-1 output C0||D0) come from a separate
// software model of FIPS 46-3; key 133457799BBCDFF1 gives the textbook
// K1 = 1B02EFFC7072 and K16 = CB3D8B0E17F5. The encryption chain must bring
// the key state back to C0||D0 (its rotations add up to 28); the decryption
// chain must leave it rotated left by one place (its rotations add up to 27
// to the right).
module tb_des_key;
  localparam logic [55:0] CD0 [2] = '{56'hF0CCAAF556678F, 56'h14B0BA89F6171E};
  localparam logic [47:0] KS [2][16] = '{
    '{48'h1B02EFFC7072, 48'h79AED9DBC9E5, 48'h55FC8A42CF99, 48'h72ADD6DB351D,
      48'h7CEC07EB53A8, 48'h63A53E507B2F, 48'hEC84B7F618BC, 48'hF78A3AC13BFB,
      48'hE0DBEBEDE781, 48'hB1F347BA464F, 48'h215FD3DED386, 48'h7571F59467E9,
      48'h97C5D1FABA41, 48'h5F43B7F2E73A, 48'hBF918D3D3F0A, 48'hCB3D8B0E17F5},
    '{48'h36146478E1E1, 48'h40BD1176E8FD, 48'h45A473239DDB, 48'hE7C4828FB533,
      48'h7A83826F4F64, 48'h38901B58C9DE, 48'h25005EC5D49D, 48'h264894CB36E9,
      48'h54554179F633, 48'h43C9453F4C2E, 48'h09E1878C79D6, 48'h3105ABA5E2F5,
      48'hF100A1F38EC3, 48'h918A949E871F, 48'h1432961F77C4, 48'h606F044C3AE7}
  };

  logic [55:0] cd0;               // C0||D0 fed to both chains
  logic [55:0] cd_enc_end, cd_dec_end;
  logic [47:0] k_enc [16];
  logic [47:0] k_dec [16];
  int checks = 0, failures = 0;

  // Decryption rotates right by 27 in all, i.e. left by one position.
  function automatic logic [55:0] rotl1(input logic [55:0] cd);
    return {cd[54:28], cd[55], cd[26:0], cd[27]};
  endfunction

  // One generate scope per round, each with its own key-state wires.
  for (genvar i = 1; i <= 16; i++) begin : g_chain
    logic [55:0] e_out, d_out;
    if (i == 1) begin : g_first
      des_key #(.ROUND(i)) u_enc (.decrypt(1'b0), .cd_in(cd0), .cd_out(e_out), .subkey(k_enc[i-1]));
      des_key #(.ROUND(i)) u_dec (.decrypt(1'b1), .cd_in(cd0), .cd_out(d_out), .subkey(k_dec[i-1]));
    end else begin : g_next
      des_key #(.ROUND(i)) u_enc (.decrypt(1'b0), .cd_in(g_chain[i-1].e_out), .cd_out(e_out), .subkey(k_enc[i-1]));
      des_key #(.ROUND(i)) u_dec (.decrypt(1'b1), .cd_in(g_chain[i-1].d_out), .cd_out(d_out), .subkey(k_dec[i-1]));
    end
  end
  assign cd_enc_end = g_chain[16].e_out;
  assign cd_dec_end = g_chain[16].d_out;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2; t++) begin
      cd0 = CD0[t];
      #1;
      for (int i = 0; i < 16; i++) begin
        checks += 2;
        if (k_enc[i] !== KS[t][i]) begin
          failures++;
          $display("FAIL key %0d enc round %0d: %h expected %h", t, i+1, k_enc[i], KS[t][i]);
        end
        if (k_dec[i] !== KS[t][15-i]) begin
          failures++;
          $display("FAIL key %0d dec round %0d: %h expected %h", t, i+1, k_dec[i], KS[t][15-i]);
        end
      end
      checks += 2;
      if (cd_enc_end !== CD0[t]) begin failures++; $display("FAIL enc state after 16 rounds"); end
      if (cd_dec_end !== rotl1(CD0[t])) begin failures++; $display("FAIL dec state after 16 rounds"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
