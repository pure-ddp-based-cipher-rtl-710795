// tb_cp_box_8_12: checks P8/12 and P^-1 8/12 against the reference for random
// data and all control values, that P^-1(P(x)) = x for the same control,
// and that every input bit can be steered to every output position.
module tb_cp_box_8_12;
  import ddp64_ref_pkg::*;
  logic [7:0]  x, y, yi, back;
  logic [11:0] v;
  int checks = 0, failures = 0;
  bit reach [8][8];

  cp_box_8_12 #(.INVERSE(1'b0)) dut  (.x(x), .v(v), .y(y));
  cp_box_8_12 #(.INVERSE(1'b1)) duti (.x(x), .v(v), .y(yi));
  cp_box_8_12 #(.INVERSE(1'b1)) undo (.x(y), .v(v), .y(back));

  task automatic chk(string what, logic [7:0] got, logic [7:0] exp);
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
    for (int i = 0; i < 4096; i++) begin
      v = 12'(i);
      x = 8'($urandom);
      #1;
      chk("P8/12",   y,  r_p812(x, v[3:0], v[7:4], v[11:8], 0));
      chk("P-1 8/12", yi, r_p812(x, v[3:0], v[7:4], v[11:8], 1));
      chk("inverse", back, x);
      for (int b = 0; b < 8; b++) begin
        x = 8'(1) << b;
        #1;
        for (int o = 0; o < 8; o++) if (y[o]) reach[b][o] = 1'b1;
      end
    end
    for (int b = 0; b < 8; b++)
      for (int o = 0; o < 8; o++) begin
        checks++;
        if (!reach[b][o]) begin
          failures++;
          $display("FAIL input %0d never reaches output %0d", b, o);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
