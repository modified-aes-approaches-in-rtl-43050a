// tb_maes_key_expand: the AES-128 key schedule with the nibble S-box.
// All NR + 1 round keys are compared, for fixed and random keys, with the
// reference model's word-by-word expansion. Two fixed keys pin down the
// first expansion step by hand: for the all-zero key, SubWord gives
// 99999999 and Rcon 01 makes every word of round key 1 equal 98999999.
module tb_maes_key_expand;
  import maes_ref_pkg::*;
  localparam int unsigned NR = 10;
  int checks = 0, failures = 0;
  logic [127:0]       key;
  logic [NR:0][127:0] rks;
  logic [127:0]       exp_rk [$];

  maes_key_expand #(.NR(NR)) u_dut (.key(key), .round_keys(rks));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic check_all(string what);
    ref_key_expand(key, NR, exp_rk);
    for (int r = 0; r <= NR; r++) check($sformatf("%s rk[%0d]", what, r), rks[r], exp_rk[r]);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key = '0;
    #1 check("zero key rk[1]", rks[1], {4{32'h98999999}});
    check_all("zero key");
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1 check_all("example key");
    for (int n = 0; n < 50; n++) begin
      key = rand128();
      #1 check_all("random key");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
