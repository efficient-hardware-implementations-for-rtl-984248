// tb_des_f: self-checking test of the DES round function f(R, K).
//
// Drives des_f with the textbook first-round values (key 133457799BBCDFF1,
// plaintext 0123456789ABCDEF: R0 = F0AAF0AA, K1 = 1B02EFFC7072,
// f = 234AA9BB) and with twelve random (R, K) pairs whose f values were
// computed by a separate software model of FIPS 46-3. des_f is
// combinational, so each vector is checked after a short settle delay.
module tb_des_f;
  typedef struct packed {
    logic [31:0] r;
    logic [47:0] k;
    logic [31:0] f;
  } vec_t;

  localparam vec_t VECS [13] = '{
    '{32'hF0AAF0AA, 48'h1B02EFFC7072, 32'h234AA9BB},
    '{32'h52E6B438, 48'h269EF2A74DE4, 32'h60C2FECB},
    '{32'h6513270E, 48'h0C5CA6A3A450, 32'hED4A1C9B},
    '{32'h128B2F33, 48'h892FD23F0824, 32'h21FEB651},
    '{32'h1818E811, 48'h95315D9DC9F8, 32'hA279118F},
    '{32'h0ED90475, 48'h81E7E8E25D94, 32'h3D2C7158},
    '{32'h36F675CC, 48'h1600099950D8, 32'h0BB88BAA},
    '{32'h6F03675A, 48'h11E26B0D549B, 32'hF9BDFE75},
    '{32'h3D9C1724, 48'h8D111738F7D9, 32'h2D8086FC},
    '{32'h6CAD4A26, 48'hD3AC0F21DDB6, 32'h27FB2F89},
    '{32'h90C192CF, 48'hF28C1FB17C23, 32'h63885930},
    '{32'h39263059, 48'hA09FA170B338, 32'h8A137C7A},
    '{32'h953F48F1, 48'h0FD6F29D0DA9, 32'hD83F89E7}
  };

  logic [31:0] r, f;
  logic [47:0] k;
  int checks = 0, failures = 0;

  des_f dut (.r(r), .subkey(k), .f(f));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (VECS[i]) begin
      r = VECS[i].r;
      k = VECS[i].k;
      #1;
      checks++;
      if (f !== VECS[i].f) begin
        failures++;
        $display("FAIL vec %0d: r=%h k=%h f=%h expected %h", i, r, k, f, VECS[i].f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
