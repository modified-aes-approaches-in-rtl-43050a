// tb_maes_sbox4: exhaustive test of the 4-bit S-box in both directions.
// Every nibble goes through the forward instance and is compared with the
// printed table of the reference model; every nibble goes through the
// inverse instance and is compared with the table's inverse; and the chain
// forward -> inverse must return the input.
module tb_maes_sbox4;
  import maes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] x, fwd, back, y, inv_y;

  maes_sbox4 #(.INVERSE(1'b0)) u_fwd  (.din(x),   .dout(fwd));
  maes_sbox4 #(.INVERSE(1'b1)) u_back (.din(fwd), .dout(back));
  maes_sbox4 #(.INVERSE(1'b1)) u_inv  (.din(y),   .dout(inv_y));

  task automatic check(string what, logic [3:0] got, logic [3:0] exp);
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
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      y = 4'(i);
      #1;
      check($sformatf("sbox(%h)", x), fwd, ref_sbox4(x));
      check($sformatf("inv(sbox(%h))", x), back, x);
      check($sformatf("inv_sbox(%h)", y), inv_y, ref_inv_sbox4(y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
