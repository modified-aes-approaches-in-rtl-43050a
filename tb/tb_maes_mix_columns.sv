// tb_maes_mix_columns: MixColumns and InvMixColumns. Known AES column
// vectors (db 13 53 45 -> 8e 4d a1 bc, and round 1 of the published AES-128
// example) fix the matrix and the 0x1B reduction; random states are compared
// with the bit-serial reference and the forward -> inverse chain must give
// the input back.
module tb_maes_mix_columns;
  import maes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] din, fwd, back;

  maes_mix_columns #(.INVERSE(1'b0)) u_fwd (.din(din), .dout(fwd));
  maes_mix_columns #(.INVERSE(1'b1)) u_inv (.din(fwd), .dout(back));

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
    din = 128'hdb135345f20a225c01010101c6c6c6c6;
    #1 check("known columns", fwd, 128'h8e4da1bc9fdc589d01010101c6c6c6c6);
    check("known columns inverse", back, din);
    din = 128'hd4bf5d30e0b452aeb84111f11e2798e5;
    #1 check("AES example round 1", fwd, 128'h046681e5e0cb199a48f8d37a2806264c);
    for (int n = 0; n < 200; n++) begin
      din = rand128();
      #1;
      check("forward", fwd, ref_mix_columns(din, 0));
      check("round trip", back, din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
