// tb_maes_shift_rows: ShiftRows and InvShiftRows. A fixed state from the
// published AES-128 example (round 1, before and after ShiftRows) checks the
// byte order; random states are compared with the reference model and the
// forward -> inverse chain must give the input back.
module tb_maes_shift_rows;
  import maes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] din, fwd, back;

  maes_shift_rows #(.INVERSE(1'b0)) u_fwd (.din(din), .dout(fwd));
  maes_shift_rows #(.INVERSE(1'b1)) u_inv (.din(fwd), .dout(back));

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
    din = 128'hd42711aee0bf98f1b8b45de51e415230;
    #1 check("known vector", fwd, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    check("known vector inverse", back, din);
    din = 128'h000102030405060708090a0b0c0d0e0f;
    #1 check("index pattern", fwd, 128'h00050a0f04090e03080d02070c01060b);
    for (int n = 0; n < 200; n++) begin
      din = rand128();
      #1;
      check("forward", fwd, ref_shift_rows(din, 0));
      check("round trip", back, din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
