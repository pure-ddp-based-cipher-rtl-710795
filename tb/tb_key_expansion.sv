// tb_key_expansion: loads random keys in both modes and checks every RAM
// write (address, the four subkeys and e' per the schedule table), the
// registered subkeys O1..O4, the 10 write cycles, ready exactly 11 clocks
// after the load pulse, and that a load during busy restarts the sequence.
module tb_key_expansion;
  import ddp64_pkg::*;
  import ddp64_ref_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, e = 0;
  logic [127:0] key;
  logic busy, ready, wr_en;
  logic [127:0] okey;
  logic [3:0] wr_addr;
  round_key_t wr_data;
  int checks = 0, failures = 0, restarts = 0;

  key_expansion dut (.clk, .rst_n, .load, .key, .e, .busy, .ready, .okey, .wr_en, .wr_addr, .wr_data);

  always #5 clk = ~clk;

  task automatic chk(string what, logic [255:0] got, logic [255:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit [127:0] k, bit mode, bit interrupt);
    int writes = 0, cyc = 0;
    @(negedge clk);
    key = k; e = mode; load = 1;
    @(negedge clk);
    load = 0; key = '0;   // key is captured at the load edge
    chk("ready drops", 256'(ready), 0);
    if (interrupt) begin
      @(negedge clk); @(negedge clk);
      key = k; e = mode; load = 1; restarts++;
      @(negedge clk);
      load = 0; key = '0;
    end
    chk("okey", 256'(okey), 256'({r_o(k,mode,4), r_o(k,mode,3), r_o(k,mode,2), r_o(k,mode,1)}));
    cyc = 1;
    while (!ready && cyc < 40) begin
      if (wr_en) begin
        chk("addr", 256'(wr_addr), 256'(writes));
        chk("data", 256'(wr_data), 256'(r_rk(k, mode, writes + 1)));
        writes++;
      end
      @(negedge clk);
      cyc++;
    end
    chk("writes", 256'(writes), 256'(10));
    chk("cycles to ready", 256'(cyc), 256'(11));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) run(rand128(), 1'(i), 1'(i % 5 == 3));
    chk("restart seen", 256'(restarts > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
