// tb_key_swap: checks O = (K1,K2,K3,K4) for e=0 and (K3,K4,K1,K2) for e=1.
module tb_key_swap;
  logic [127:0] key, o0, o1;
  int checks = 0, failures = 0;

  key_swap dut0 (.key, .e(1'b0), .o(o0));
  key_swap dut1 (.key, .e(1'b1), .o(o1));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks += 2;
      if (o0 !== key) begin
        failures++;
        $display("FAIL e=0 key=%h o=%h", key, o0);
      end
      if (o1 !== {key[63:32], key[31:0], key[127:96], key[95:64]}) begin
        failures++;
        $display("FAIL e=1 key=%h o=%h", key, o1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
