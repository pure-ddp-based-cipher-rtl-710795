// tb_pi_switch: checks Pi(0) against its cycle list, Pi(1) as its inverse,
// and that both commute with rotation by 16.
module tb_pi_switch;
  import ddp64_ref_pkg::*;
  logic [31:0] x, y0, y1, back, xr, yr;
  int checks = 0, failures = 0;

  pi_switch dut0 (.x(x),  .esw(1'b0), .y(y0));
  pi_switch dut1 (.x(x),  .esw(1'b1), .y(y1));
  pi_switch undo (.x(y0), .esw(1'b1), .y(back));
  pi_switch rotd (.x(xr), .esw(1'b0), .y(yr));

  assign xr = {x[15:0], x[31:16]};

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s x=%h got=%h exp=%h", what, x, got, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      x = (i < 32) ? 32'(1) << i : $urandom;
      #1;
      chk("Pi(0)", y0, r_pi(x, 0));
      chk("Pi(1)", y1, r_pi(x, 1));
      chk("Pi(1)Pi(0)", back, x);
      chk("commutes with <<<16", yr, {y0[15:0], y0[31:16]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
