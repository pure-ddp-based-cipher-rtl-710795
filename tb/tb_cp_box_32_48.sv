// tb_cp_box_32_48: checks P32/48 and P^-1 32/48 against the reference, that
// P^-1(P(x)) = x and that no bit leaves its byte.
module tb_cp_box_32_48;
  import ddp64_ref_pkg::*;
  logic [31:0] x, y, yi, back;
  logic [47:0] v;
  int checks = 0, failures = 0;

  cp_box_32_48 #(.INVERSE(1'b0)) dut  (.x(x), .v(v), .y(y));
  cp_box_32_48 #(.INVERSE(1'b1)) duti (.x(x), .v(v), .y(yi));
  cp_box_32_48 #(.INVERSE(1'b1)) undo (.x(y), .v(v), .y(back));

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
      v = {$urandom, $urandom};
      #1;
      chk("P32/48", y, r_p3248(x, v[15:0], v[31:16], v[47:32], 0));
      chk("P-1 32/48", yi, r_p3248(x, v[15:0], v[31:16], v[47:32], 1));
      chk("inverse", back, x);
      for (int b = 0; b < 4; b++)
        chk("byte weight", 32'($countones(y[8*b +: 8])), 32'($countones(x[8*b +: 8])));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
