// tb_ddp64_throughput: sustained-rate workload for both DDP-64 cores.
//
// Streams 200 random blocks through the full-rolling core (in_valid held
// high) and 2000 through the pipelined core (one per clock) of ddp64_top,
// verifies every ciphertext against the reference model, and measures bits
// per clock from first acceptance to last result. Expected: 6.4 bits/clock
// for full rolling (one 64-bit block per 10 clocks) and close to 64
// bits/clock for the pipeline (only the 10-clock fill is lost). The measured
// rates are converted to Mbps at the published clock rates (85/92 MHz and
// 95/101 MHz) for reference.
module tb_ddp64_throughput;
  import ddp64_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic key_load = 0, e = 0, key_ready, key_busy;
  logic [127:0] key = 0;
  logic fr_in_valid = 0, fr_in_ready, fr_out_valid;
  logic [63:0] fr_din = 0, fr_dout;
  logic p_in_valid = 0, p_in_ready, p_out_valid;
  logic [63:0] p_din = 0, p_dout;
  int checks = 0, failures = 0, cycle = 0;

  localparam int N_FR = 200, N_P = 2000;

  ddp64_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [127:0] k;
    bit [63:0] q [$];
    bit [63:0] mm;
    int t_first, t_last, got;
    bit acc;
    real fr_bpc, p_bpc;
    k = rand128();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    key = k; e = 0; key_load = 1;
    @(negedge clk);
    key_load = 0;
    while (!key_ready) @(negedge clk);

    // full rolling: in_valid always high
    got = 0; t_first = -1;
    fr_in_valid = 1; fr_din = rand64();
    while (got < N_FR) begin
      acc = fr_in_ready;
      if (acc) begin
        q.push_back(fr_din);
        if (t_first < 0) t_first = cycle;
      end
      @(posedge clk); #1;
      if (fr_out_valid) begin
        mm = q.pop_front();
        checks++;
        if (fr_dout !== r_cipher(mm, k, 0)) begin failures++; $display("FAIL FR block %0d", got); end
        got++;
        t_last = cycle;
      end
      @(negedge clk);
      if (acc) fr_din = rand64();
    end
    fr_in_valid = 0;
    fr_bpc = 64.0 * N_FR / (t_last - t_first);

    // pipelined: one block per clock
    q = {}; got = 0; t_first = -1;
    for (int i = 0; got < N_P; i++) begin
      p_in_valid = i < N_P;
      p_din = rand64();
      if (p_in_valid) begin
        q.push_back(p_din);
        if (t_first < 0) t_first = cycle;
      end
      @(posedge clk); #1;
      if (p_out_valid) begin
        mm = q.pop_front();
        checks++;
        if (p_dout !== r_cipher(mm, k, 0)) begin failures++; $display("FAIL P block %0d", got); end
        got++;
        t_last = cycle;
      end
      @(negedge clk);
    end
    p_in_valid = 0;
    p_bpc = 64.0 * N_P / (t_last - t_first);

    $display("full rolling: %0.2f bit/clock -> %0.0f Mbps @85 MHz, %0.0f Mbps @92 MHz",
             fr_bpc, fr_bpc * 85.0, fr_bpc * 92.0);
    $display("pipelined:    %0.2f bit/clock -> %0.2f Gbps @95 MHz, %0.2f Gbps @101 MHz",
             p_bpc, p_bpc * 0.095, p_bpc * 0.101);
    checks += 2;
    if (fr_bpc < 6.39 || fr_bpc > 6.41) begin failures++; $display("FAIL FR rate"); end
    if (p_bpc < 63.5) begin failures++; $display("FAIL P rate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
