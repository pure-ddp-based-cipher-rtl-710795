// tb_cp_layer: checks active layers of stride 1, 2 and 4 on 8 bits against
// the reference layer, and that each layer is its own inverse.
module tb_cp_layer;
  import ddp64_ref_pkg::*;
  logic [7:0] x, y1, y2, y4, z1;
  logic [3:0] v;
  int checks = 0, failures = 0;

  cp_layer #(.N(8), .STRIDE(1)) dut1 (.x(x),  .v(v), .y(y1));
  cp_layer #(.N(8), .STRIDE(2)) dut2 (.x(x),  .v(v), .y(y2));
  cp_layer #(.N(8), .STRIDE(4)) dut4 (.x(x),  .v(v), .y(y4));
  cp_layer #(.N(8), .STRIDE(1)) inv1 (.x(y1), .v(v), .y(z1));

  task automatic chk(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s x=%h v=%h got=%h exp=%h", what, x, v, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      {v, x} = 12'(i);
      #1;
      chk("stride1", y1, r_layer8(x, 1, v));
      chk("stride2", y2, r_layer8(x, 2, v));
      chk("stride4", y4, r_layer8(x, 4, v));
      chk("self-inverse", z1, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
