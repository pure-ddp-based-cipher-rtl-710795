// ddp64_fr: full-rolling (iterative) DDP-64 core.
//
// One round core, a 2x64 input multiplexer and a 64-bit state register. When
// a block is accepted (in_valid && in_ready) the multiplexer feeds the round
// core with the block after the initial transformation (L0 = L xor O2,
// R0 = R xor O1, L = din[31:0]) and round 1 is computed in that clock. In
// each of the next nine clocks the multiplexer feeds back the register and
// one more round is computed; after rounds 1..9 the subblocks are swapped,
// after round 10 they are not. out_valid is a one-clock strobe in the clock
// after round 10, with dout = (L10 xor O4, R10 xor O3) (L in dout[31:0]); a
// new block may be accepted in that same clock, so a block completes every
// 10 clocks. The round key of round j is read from round-key RAM address
// j-1 through rk_addr/rk in the clock that computes round j. Encryption or
// decryption is decided by the schedule in the RAM and okey. The datapath
// and the 10-clock rate are the cipher's; the valid/ready handshake is this
// design's choice.
module ddp64_fr
  import ddp64_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [63:0]  din,
  input  logic [127:0] okey,
  output logic [3:0]   rk_addr,
  input  round_key_t   rk,
  output logic         out_valid,
  output logic [63:0]  dout
);
  logic        busy;
  logic [3:0]  rnd;          // round computed in this clock, 1..10
  logic [31:0] st_l, st_r;   // state register
  logic [31:0] mux_l, mux_r, nx_l, nx_r;
  logic        accept, last;

  assign in_ready = !busy;
  assign accept   = in_valid && !busy;
  assign rk_addr  = busy ? rnd - 4'd1 : 4'd0;
  assign last     = busy && (rnd == 4'(ROUNDS));

  // 2x64 multiplexer: fresh block (initial transformation) or feedback
  always_comb begin
    if (busy) begin
      mux_l = st_l;
      mux_r = st_r;
    end else begin
      mux_l = din[31:0]  ^ okey[63:32];   // L xor O2
      mux_r = din[63:32] ^ okey[31:0];    // R xor O1
    end
  end

  crypt_round u_round (.l_in(mux_l), .r_in(mux_r), .rk(rk), .l_out(nx_l), .r_out(nx_r));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      rnd       <= '0;
      st_l      <= '0;
      st_r      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (accept) begin
        busy <= 1'b1;
        rnd  <= 4'd2;
        st_l <= nx_r;          // swap after round 1
        st_r <= nx_l;
      end else if (busy) begin
        if (last) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
          st_l      <= nx_l;   // no swap after round 10
          st_r      <= nx_r;
        end else begin
          rnd  <= rnd + 4'd1;
          st_l <= nx_r;
          st_r <= nx_l;
        end
      end
    end
  end

  // final transformation: L_C = L10 xor O4, R_C = R10 xor O3
  assign dout = {st_r ^ okey[95:64], st_l ^ okey[127:96]};

  no_result_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> !busy);
endmodule
