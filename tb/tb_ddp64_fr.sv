// tb_ddp64_fr: runs the full-rolling core with a behavioural round-key store
// filled from the reference schedule. Encrypts and decrypts random blocks,
// compares with the reference cipher, checks that each result arrives 10
// clocks after acceptance, that back-to-back blocks complete every 10
// clocks, and that in_ready is low (a stall) while a block is in progress.
module tb_ddp64_fr;
  import ddp64_pkg::*;
  import ddp64_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic [63:0] din, dout;
  logic [127:0] okey;
  logic [3:0] rk_addr;
  round_key_t rk;
  bit [128:0] rkmem [10];
  int checks = 0, failures = 0, stalls = 0, cycle = 0;

  ddp64_fr dut (.clk, .rst_n, .in_valid, .in_ready, .din, .okey, .rk_addr, .rk, .out_valid, .dout);

  assign rk = round_key_t'(rkmem[rk_addr]);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_key(bit [127:0] k, bit mode);
    for (int j = 1; j <= 10; j++) rkmem[j-1] = r_rk(k, mode, j);
    okey = {r_o(k,mode,4), r_o(k,mode,3), r_o(k,mode,2), r_o(k,mode,1)};
  endtask

  // offer a block, wait for acceptance and the result; returns the result
  task automatic one_block(bit [63:0] m, output bit [63:0] res, output int lat);
    int t0;
    @(negedge clk);
    din = m; in_valid = 1;
    while (!in_ready) begin stalls++; @(negedge clk); end
    t0 = cycle;
    @(negedge clk);
    in_valid = 0; din = '0;
    while (!out_valid) begin
      if (in_ready) begin failures++; $display("FAIL ready while busy"); end
      @(negedge clk);
    end
    lat = cycle - t0;
    res = dout;
  endtask

  initial begin
    bit [127:0] k;
    bit [63:0] m, c, p;
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 30; i++) begin
      k = rand128(); m = rand64();
      if (i == 0) begin k = '0; m = '0; end
      load_key(k, 0);
      one_block(m, c, lat);
      checks += 2;
      if (c !== r_cipher(m, k, 0)) begin failures++; $display("FAIL enc %h -> %h exp %h", m, c, r_cipher(m, k, 0)); end
      if (lat != 10) begin failures++; $display("FAIL latency %0d", lat); end
      load_key(k, 1);
      one_block(c, p, lat);
      checks += 2;
      if (p !== m) begin failures++; $display("FAIL dec %h -> %h exp %h", c, p, m); end
      if (lat != 10) begin failures++; $display("FAIL latency %0d", lat); end
    end
    // back-to-back: in_valid held high, blocks must complete every 10 clocks
    begin
      int t_prev, done;
      bit acc;
      bit [63:0] mm;
      bit [63:0] q [$];
      t_prev = -1; done = 0;
      k = rand128(); load_key(k, 0);
      @(negedge clk);
      in_valid = 1; din = rand64();
      while (done < 8) begin
        acc = in_valid && in_ready;   // decided before the clock edge
        if (acc) q.push_back(din);
        else stalls++;
        @(posedge clk);
        #1;
        if (out_valid) begin
          mm = q.pop_front();
          checks += 2;
          if (dout !== r_cipher(mm, k, 0)) begin failures++; $display("FAIL stream result"); end
          if (t_prev >= 0 && cycle - t_prev != 10) begin failures++; $display("FAIL rate %0d", cycle - t_prev); end
          t_prev = cycle;
          done++;
        end
        @(negedge clk);
        if (acc) din = rand64();
      end
      in_valid = 0;
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall observed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
