// tb_ddp64_top: end-to-end test of the DDP-64 engine at its default size.
//
// For several random keys: expand the key for encryption, encrypt blocks on
// both cores (the pipelined one at full rate), switch the mode by expanding
// the key for decryption, decrypt the ciphertexts on both cores and check the
// plaintexts come back; every output is also compared with the reference
// cipher. Checked timing: key_ready 11 clocks after key_load, 10 clocks per
// block on the full-rolling core, 10 clocks latency and one block per clock
// on the pipeline. Counted mechanisms, each must occur: key expansion,
// encrypt->decrypt mode switch, full-rolling stall (block offered while
// busy), blocks held off while the key unit is busy, pipeline full-rate
// burst.
module tb_ddp64_top;
  import ddp64_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic key_load = 0, e = 0, key_ready, key_busy;
  logic [127:0] key = 0;
  logic fr_in_valid = 0, fr_in_ready, fr_out_valid;
  logic [63:0] fr_din = 0, fr_dout;
  logic p_in_valid = 0, p_in_ready, p_out_valid;
  logic [63:0] p_din = 0, p_dout;
  int checks = 0, failures = 0, cycle = 0;
  int n_expand = 0, n_mode_switch = 0, n_fr_stall = 0, n_key_hold = 0, n_burst = 0;

  ddp64_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  // expand k for mode md; a full-rolling block is offered meanwhile and must
  // be held off until the schedule is ready
  task automatic expand(bit [127:0] k, bit md);
    int t0, lat;
    @(negedge clk);
    key = k; e = md; key_load = 1;
    t0 = cycle;
    @(negedge clk);
    key_load = 0;
    fr_in_valid = 1; fr_din = '0;
    while (!key_ready) begin
      if (fr_in_ready || p_in_ready) begin failures++; $display("FAIL accepted during expansion"); end
      if (key_busy) n_key_hold++;
      @(negedge clk);
    end
    fr_in_valid = 0;
    lat = cycle - t0;
    chk("key latency", 64'(lat), 64'd11);
    n_expand++;
  endtask

  // full-rolling core: offer blocks back to back, collect results
  task automatic fr_run(bit [63:0] ins [$], output bit [63:0] outs [$]);
    int idx = 0, t_prev = -1;
    bit acc;
    outs = {};
    @(negedge clk);
    while (outs.size() < ins.size()) begin
      fr_in_valid = idx < ins.size();
      fr_din = fr_in_valid ? ins[idx] : '0;
      #1;
      acc = fr_in_valid && fr_in_ready;
      if (fr_in_valid && !fr_in_ready) n_fr_stall++;
      @(posedge clk);
      if (acc) idx++;
      #1;
      if (fr_out_valid) begin
        outs.push_back(fr_dout);
        if (t_prev >= 0) chk("FR rate", 64'(cycle - t_prev), 64'd10);
        t_prev = cycle;
      end
      @(negedge clk);
    end
    fr_in_valid = 0;
  endtask

  // pipelined core: one block per clock, results exactly 10 clocks later
  task automatic p_run(bit [63:0] ins [$], output bit [63:0] outs [$]);
    int t_in [$];
    int run = 0;
    outs = {};
    for (int i = 0; i < ins.size() + 12; i++) begin
      @(negedge clk);
      p_in_valid = i < ins.size();
      p_din = p_in_valid ? ins[i] : '0;
      @(posedge clk);
      if (p_in_valid) t_in.push_back(cycle);
      #1;
      if (p_out_valid) begin
        outs.push_back(p_dout);
        chk("P latency", 64'(cycle - t_in.pop_front()), 64'd10);
        run++;
        if (run == ins.size() && run >= 10) n_burst++;
      end else run = 0;
    end
    @(negedge clk);
    p_in_valid = 0;
  endtask

  initial begin
    bit [127:0] k;
    bit [63:0] pt [$], ct_fr [$], ct_p [$], back [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      k = rand128();
      pt = {};
      for (int i = 0; i < 16; i++) pt.push_back(rand64());
      expand(k, 0);
      fr_run(pt, ct_fr);
      p_run(pt, ct_p);
      for (int i = 0; i < 16; i++) begin
        chk("FR encrypt", ct_fr[i], r_cipher(pt[i], k, 0));
        chk("P encrypt",  ct_p[i],  r_cipher(pt[i], k, 0));
      end
      expand(k, 1);
      n_mode_switch++;
      fr_run(ct_p, back);
      for (int i = 0; i < 16; i++) chk("FR decrypt", back[i], pt[i]);
      p_run(ct_fr, back);
      for (int i = 0; i < 16; i++) chk("P decrypt", back[i], pt[i]);
    end
    $display("mechanisms: expand=%0d mode_switch=%0d fr_stall=%0d key_hold=%0d p_burst=%0d",
             n_expand, n_mode_switch, n_fr_stall, n_key_hold, n_burst);
    chk("key expansion seen", 64'(n_expand > 0), 1);
    chk("mode switch seen", 64'(n_mode_switch > 0), 1);
    chk("FR stall seen", 64'(n_fr_stall > 0), 1);
    chk("key hold seen", 64'(n_key_hold > 0), 1);
    chk("pipeline burst seen", 64'(n_burst > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
