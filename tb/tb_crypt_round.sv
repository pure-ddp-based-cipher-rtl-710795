// tb_crypt_round: checks one round against the reference model for random
// subblocks and round keys with both values of e', and checks that a second
// round instance fed with the decryption arrangement of the same key
// (Q1<->Q3, Q2<->Q4, the other e') undoes the first.
module tb_crypt_round;
  import ddp64_pkg::*;
  import ddp64_ref_pkg::*;
  logic [31:0] l, r, lo, ro, l2, r2;
  round_key_t  rk, rkd;
  int checks = 0, failures = 0;

  crypt_round dut  (.l_in(l),  .r_in(r),  .rk(rk),  .l_out(lo), .r_out(ro));
  crypt_round undo (.l_in(lo), .r_in(ro), .rk(rkd), .l_out(l2), .r_out(r2));

  assign rkd = '{esw: !rk.esw, q1: rk.q3, q2: rk.q4, q3: rk.q1, q4: rk.q2};

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      w32_t el, er;
      l = $urandom; r = $urandom;
      rk = '{esw: 1'(i), q1: $urandom, q2: $urandom, q3: $urandom, q4: $urandom};
      #1;
      r_round(l, r, rk.q1, rk.q2, rk.q3, rk.q4, rk.esw, el, er);
      checks += 3;
      if (lo !== el || ro !== er) begin
        failures++;
        $display("FAIL round l=%h r=%h got=%h/%h exp=%h/%h", l, r, lo, ro, el, er);
      end
      if (l2 !== l) begin failures++; $display("FAIL inverse L"); end
      if (r2 !== r) begin failures++; $display("FAIL inverse R"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
