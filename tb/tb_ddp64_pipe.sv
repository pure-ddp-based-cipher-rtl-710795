// tb_ddp64_pipe: streams random blocks into the pipelined core, one per clock
// with random gaps, with round keys from the reference schedule, and checks
// every result against the reference cipher, a latency of exactly 10 clocks
// and, for a full-rate burst, one result per clock. Then decrypts a stream.
module tb_ddp64_pipe;
  import ddp64_pkg::*;
  import ddp64_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [63:0] din = 0, dout;
  logic [127:0] okey;
  logic [10*RK_W-1:0] rks;
  int checks = 0, failures = 0, cycle = 0, burst_max = 0, run = 0;
  bit [63:0] exp_q [$];
  int time_q [$];
  bit [127:0] k;
  bit mode;

  ddp64_pipe dut (.clk, .rst_n, .in_valid, .din, .okey, .rks, .out_valid, .dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_key(bit [127:0] kk, bit md);
    for (int j = 1; j <= 10; j++) rks[(j-1)*RK_W +: RK_W] = r_rk(kk, md, j);
    okey = {r_o(kk,md,4), r_o(kk,md,3), r_o(kk,md,2), r_o(kk,md,1)};
  endtask

  // scoreboard
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid) begin
      exp_q.push_back(r_cipher(din, k, mode));
      time_q.push_back(cycle);
    end
    if (rst_n && out_valid) begin
      checks += 2;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        bit [63:0] ex;
        int t0;
        ex = exp_q.pop_front();
        t0 = time_q.pop_front();
        if (dout !== ex) begin failures++; $display("FAIL data %h exp %h", dout, ex); end
        if (cycle - t0 != 10) begin failures++; $display("FAIL latency %0d", cycle - t0); end
      end
      run = run + 1;
      if (run > burst_max) burst_max = run;
    end else run = 0;
  end

  initial begin
    k = rand128(); mode = 0;
    load_key(k, mode);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      in_valid = (i < 40) ? 1'b1 : ($urandom % 3 != 0);
      din = rand64();
    end
    @(negedge clk); in_valid = 0;
    repeat (12) @(negedge clk);
    // decryption with the same key must return plaintexts
    mode = 1; load_key(k, 1);
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      in_valid = 1; din = r_cipher(rand64(), k, 0);
    end
    @(negedge clk); in_valid = 0;
    repeat (12) @(negedge clk);
    checks += 2;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    if (burst_max < 40) begin failures++; $display("FAIL no full-rate burst (%0d)", burst_max); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
