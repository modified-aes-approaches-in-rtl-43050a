// tb_aes_top: end-to-end test of the combinational modified AES-128 top
// level at its default parameters (NR = 10).
//
// Each vector applies datain and key, waits for the outputs to settle and
// checks that cipher equals the reference model's encryption and that
// decrypted equals datain. The sequence covers the published AES-128 example
// block and key, fixed blocks (all zero, all one), runs where only the key
// changes and runs where only the block changes, and random vectors. It
// counts how often each mechanism of the design was exercised: a ciphertext
// different from its plaintext (encryption), a recovered plaintext
// (decryption), a changed ciphertext after a key-only change (key schedule)
// and after a one-bit plaintext change (diffusion through the rounds); a
// mechanism that never happened is a failure.
module tb_aes_top;
  import maes_ref_pkg::*;
  localparam int unsigned NR = 10;
  int checks = 0, failures = 0;
  int n_encrypt = 0, n_decrypt = 0, n_key_change = 0, n_diffusion = 0;
  logic [127:0] datain, key, cipher, decrypted;

  aes_top u_dut (.datain(datain), .key(key), .cipher(cipher), .decrypted(decrypted));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic apply(logic [127:0] d, logic [127:0] k);
    datain = d;
    key    = k;
    #10;
    check("cipher", cipher, ref_encrypt(d, k, NR));
    check("decrypted", decrypted, d);
    if (cipher != d) n_encrypt++;
    if (decrypted == d) n_decrypt++;
  endtask

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("%s: %0d", what, count);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] c_prev, k, d;
    apply(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c);
    $display("example: datain %h key %h cipher %h", datain, key, cipher);
    apply('0, '0);
    apply('1, '1);
    // key-only changes: one key bit flipped at a time
    d = rand128();
    k = rand128();
    apply(d, k);
    for (int b = 0; b < 128; b += 7) begin
      c_prev = cipher;
      apply(d, k ^ (128'h1 << b));
      if (cipher != c_prev) n_key_change++;
      else begin
        failures++;
        $display("FAIL key bit %0d did not change the ciphertext", b);
      end
    end
    // plaintext-only changes: one bit flipped at a time
    apply(d, k);
    for (int b = 0; b < 128; b += 5) begin
      c_prev = cipher;
      apply(d ^ (128'h1 << b), k);
      // more than one byte of the ciphertext must change
      if ($countones(cipher ^ c_prev) > 8) n_diffusion++;
      else begin
        failures++;
        $display("FAIL plaintext bit %0d changed only %0d ciphertext bits", b, $countones(cipher ^ c_prev));
      end
    end
    for (int n = 0; n < 300; n++) apply(rand128(), rand128());
    need("encryptions", n_encrypt);
    need("decryptions", n_decrypt);
    need("key-only changes seen in ciphertext", n_key_change);
    need("one-bit plaintext changes diffused", n_diffusion);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
