// tb_maes_encrypt: the unrolled encryption datapath on its own. Round keys come
// from the reference model's key schedule, so only the rounds are under
// test; results are compared with the reference model's encryption for the
// published AES-128 example block and key and for random blocks and keys.
// The reference encrypts with the same nibble S-box, so expected values are
// not those of standard AES.
module tb_maes_encrypt;
  import maes_ref_pkg::*;
  localparam int unsigned NR = 10;
  int checks = 0, failures = 0;
  logic [127:0]       din, dout, key;
  logic [NR:0][127:0] rks;
  logic [127:0]       exp_rk [$];

  maes_encrypt #(.NR(NR)) u_dut (.din(din), .round_keys(rks), .dout(dout));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic apply(logic [127:0] d, logic [127:0] k);
    din = d;
    key = k;
    ref_key_expand(k, NR, exp_rk);
    for (int r = 0; r <= NR; r++) rks[r] = exp_rk[r];
    #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c);
    check("example", dout, ref_encrypt(din, key, NR));
    for (int n = 0; n < 200; n++) begin
      apply(rand128(), rand128());
      check("random", dout, ref_encrypt(din, key, NR));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
