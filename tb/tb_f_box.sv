// tb_f_box: checks the F-box against the reference model for random Z and Z',
// and checks its defining property: the output always holds the eight bits
// of C, four ones and four zeros, in place of eight data bits, so with Z all
// zeros the output weight is 4 and with Z all ones it is 28.
module tb_f_box;
  import ddp64_ref_pkg::*;
  logic [31:0] z, zc, y;
  int checks = 0, failures = 0;

  f_box dut (.z, .zc, .y);

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s z=%h zc=%h got=%h exp=%h", what, z, zc, got, exp);
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
      z  = $urandom;
      zc = $urandom;
      #1;
      chk("F", y, r_fbox(z, zc));
      z = '0;
      #1;
      chk("weight(Z=0)", 32'($countones(y)), 32'd4);
      z = '1;
      #1;
      chk("weight(Z=1s)", 32'($countones(y)), 32'd28);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
