// tb_maes_sub_bytes: SubBytes and InvSubBytes over whole 128-bit states.
// Random states and a few fixed ones are compared with the reference model,
// in which each byte is the pair of table lookups of its two nibbles; the
// forward -> inverse chain must give the input back.
module tb_maes_sub_bytes;
  import maes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] din, fwd, back;

  maes_sub_bytes #(.INVERSE(1'b0)) u_fwd (.din(din), .dout(fwd));
  maes_sub_bytes #(.INVERSE(1'b1)) u_inv (.din(fwd), .dout(back));

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
    // all-zero state: every nibble 0 maps to 9
    din = '0;
    #1 check("zero", fwd, {32{4'h9}});
    // nibble ramp 0..f twice
    din = 128'h0123456789abcdef0123456789abcdef;
    #1 check("ramp", fwd, {2{64'h94abd1856203cef7}});
    for (int n = 0; n < 200; n++) begin
      din = rand128();
      #1;
      check("forward", fwd, ref_sub_bytes(din, 0));
      check("round trip", back, din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
