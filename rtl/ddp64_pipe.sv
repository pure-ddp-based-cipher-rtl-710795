// ddp64_pipe: pipelined DDP-64 core.
//
// Ten round cores, each followed by a 64-bit register, so ten blocks are in
// flight and one block can enter every clock. The initial transformation
// (L0 = L xor O2, R0 = R xor O1, L = din[31:0]) sits before stage 1, the swap
// of subblocks after stages 1..9 and the final transformation
// (L10 xor O4, R10 xor O3) after stage 10. Stage j uses round key j,
// rks[(j-1)*RK_W +: RK_W], from the precomputed round-key RAM. A valid bit
// travels with each block: out_valid/dout appear exactly ROUNDS clocks after
// in_valid/din. There is no back-pressure, and okey/rks must stay constant
// while blocks are in flight. The ten-stage structure is the cipher's; the
// valid bit and the placement of the XORs around the registers are this
// design's choice.
module ddp64_pipe
  import ddp64_pkg::*;
#(
  parameter int unsigned NROUNDS = ROUNDS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [63:0]             din,
  input  logic [127:0]            okey,
  input  logic [NROUNDS*RK_W-1:0] rks,
  output logic                    out_valid,
  output logic [63:0]             dout
);
  logic [31:0] st_l [NROUNDS+1];   // index 0: after the initial XOR
  logic [31:0] st_r [NROUNDS+1];
  logic        st_v [NROUNDS+1];

  assign st_l[0] = din[31:0]  ^ okey[63:32];
  assign st_r[0] = din[63:32] ^ okey[31:0];
  assign st_v[0] = in_valid;

  for (genvar j = 1; j <= NROUNDS; j++) begin : g_stage
    logic [31:0] nx_l, nx_r;
    round_key_t  rk;
    assign rk = round_key_t'(rks[(j-1)*RK_W +: RK_W]);

    crypt_round u_round (.l_in(st_l[j-1]), .r_in(st_r[j-1]), .rk(rk), .l_out(nx_l), .r_out(nx_r));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st_v[j] <= 1'b0;
        st_l[j] <= '0;
        st_r[j] <= '0;
      end else begin
        st_v[j] <= st_v[j-1];
        if (j < NROUNDS) begin
          st_l[j] <= nx_r;
          st_r[j] <= nx_l;
        end else begin
          st_l[j] <= nx_l;
          st_r[j] <= nx_r;
        end
      end
    end
  end

  assign out_valid = st_v[NROUNDS];
  assign dout      = {st_r[NROUNDS] ^ okey[95:64], st_l[NROUNDS] ^ okey[127:96]};
endmodule
