// tb_maes_add_round_key: AddRoundKey. Checks a fixed pair, the identity
// with a zero key, and random pairs against a byte-by-byte XOR; applying the
// same key twice must give the state back.
module tb_maes_add_round_key;
  import maes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] din, rk, dout, twice;
  logic [7:0]   b [16];

  maes_add_round_key u_dut  (.din(din),  .round_key(rk), .dout(dout));
  maes_add_round_key u_dut2 (.din(dout), .round_key(rk), .dout(twice));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 128'h3243f6a8885a308d313198a2e0370734;
    rk  = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1 check("known pair", dout, 128'h193de3bea0f4e22b9ac68d2ae9f84808);
    rk = '0;
    #1 check("zero key", dout, din);
    for (int n = 0; n < 200; n++) begin
      din = rand128();
      rk  = rand128();
      #1;
      for (int i = 0; i < 16; i++) b[i] = din[127-8*i -: 8] ^ rk[127-8*i -: 8];
      check("random", dout, from_bytes(b));
      check("twice", twice, din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
