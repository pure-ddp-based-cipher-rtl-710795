// tb_p2_1: exhaustive check of the P2/1 switch: straight for v=0, swapped
// for v=1, over all eight input combinations.
module tb_p2_1;
  logic [1:0] x, y;
  logic       v;
  int checks = 0, failures = 0;

  p2_1 dut (.x, .v, .y);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic [1:0] exp;
      {v, x} = 3'(i);
      #1;
      exp = v ? {x[0], x[1]} : x;
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL v=%b x=%b y=%b exp=%b", v, x, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
