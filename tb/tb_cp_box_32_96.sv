// tb_cp_box_32_96: checks P32/96 and P^-1 32/96 against the reference (which
// applies the central involution from its cycle list), that P^-1(P(x)) = x,
// and that bit weight is preserved, for random data and controls.
module tb_cp_box_32_96;
  import ddp64_ref_pkg::*;
  logic [31:0] x, y, yi, back;
  logic [95:0] v;
  int checks = 0, failures = 0;

  cp_box_32_96 #(.INVERSE(1'b0)) dut  (.x(x), .v(v), .y(y));
  cp_box_32_96 #(.INVERSE(1'b1)) duti (.x(x), .v(v), .y(yi));
  cp_box_32_96 #(.INVERSE(1'b1)) undo (.x(y), .v(v), .y(back));

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s x=%h v=%h got=%h exp=%h", what, x, v, got, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      x = $urandom;
      v = {$urandom, $urandom, $urandom};
      if (i < 32) begin x = 32'(1) << i; v = '0; end   // bare central involution
      #1;
      chk("P32/96", y, r_p3296(x, v, 0));
      chk("P-1 32/96", yi, r_p3296(x, v, 1));
      chk("inverse", back, x);
      chk("weight", 32'($countones(y)), 32'($countones(x)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
