// ddp64_top: DDP-64 block-cipher engine, 64-bit blocks, 128-bit key.
//
// A key expansion unit writes the ten round keys for the selected mode
// (e = 0 encrypt, e = 1 decrypt) into a round-key RAM, and two cores share
// that schedule: the full-rolling core (one round per clock, one block per
// 10 clocks, ports fr_*) and the ten-stage pipelined core (one block per
// clock, 10 clocks latency, ports p_*). Switching between encryption and
// decryption is a new key_load with the other e; key_ready rises 11 clocks
// after key_load (key_busy is high while the ten round keys are written) and blocks are only accepted while it is high. Blocks
// offered to the pipeline while key_ready is low are dropped (p_in_ready
// low); the pipeline has no back-pressure. The two architectures are the
// cipher's; placing both behind one key unit is this design's choice.
module ddp64_top
  import ddp64_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // key / mode
  input  logic         key_load,
  input  logic [127:0] key,
  input  logic         e,
  output logic         key_ready,
  output logic         key_busy,
  // full-rolling core
  input  logic         fr_in_valid,
  output logic         fr_in_ready,
  input  logic [63:0]  fr_din,
  output logic         fr_out_valid,
  output logic [63:0]  fr_dout,
  // pipelined core
  input  logic         p_in_valid,
  output logic         p_in_ready,
  input  logic [63:0]  p_din,
  output logic         p_out_valid,
  output logic [63:0]  p_dout
);
  logic                  kx_busy, kx_ready, wr_en;
  logic [3:0]            wr_addr, rk_addr;
  round_key_t            wr_data, rk;
  logic [127:0]          okey;
  logic [RK_W-1:0]       rdata;
  logic [ROUNDS*RK_W-1:0] all_words;
  logic                  fr_core_ready;

  key_expansion u_kx (
    .clk, .rst_n, .load(key_load), .key, .e,
    .busy(kx_busy), .ready(kx_ready), .okey,
    .wr_en, .wr_addr, .wr_data
  );

  round_key_ram #(.DEPTH(ROUNDS), .WIDTH(RK_W)) u_ram (
    .clk, .we(wr_en), .waddr(wr_addr), .wdata(wr_data),
    .raddr(rk_addr), .rdata, .all_words
  );
  assign rk = round_key_t'(rdata);

  ddp64_fr u_fr (
    .clk, .rst_n,
    .in_valid(fr_in_valid && kx_ready), .in_ready(fr_core_ready), .din(fr_din),
    .okey, .rk_addr, .rk,
    .out_valid(fr_out_valid), .dout(fr_dout)
  );
  assign fr_in_ready = fr_core_ready && kx_ready;

  ddp64_pipe u_pipe (
    .clk, .rst_n,
    .in_valid(p_in_valid && kx_ready), .din(p_din),
    .okey, .rks(all_words),
    .out_valid(p_out_valid), .dout(p_dout)
  );
  assign p_in_ready = kx_ready;
  assign key_ready  = kx_ready;
  assign key_busy   = kx_busy;
endmodule
