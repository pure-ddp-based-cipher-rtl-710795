// key_swap: the single-layer box P^(e)_128/1 that turns the secret key into
// the e-dependent subkeys O1..O4.
//
// Two P^(e)_64/1 boxes: 32 P2/1 switches exchange K1 and K3 bit by bit, 32
// more exchange K2 and K4, all controlled by the mode bit e. Hence
// O = (K1,K2,K3,K4) when encrypting (e = 0) and O = (K3,K4,K1,K2) when
// decrypting (e = 1). K1 and O1 occupy bits 31:0. The structure is the
// cipher's. Purely combinational.
module key_swap (
  input  logic [127:0] key,
  input  logic         e,
  output logic [127:0] o
);
  for (genvar i = 0; i < 32; i++) begin : g_bit
    p2_1 u_sw13 (.x({key[64 + i], key[i]}),      .v(e), .y({o[64 + i], o[i]}));
    p2_1 u_sw24 (.x({key[96 + i], key[32 + i]}), .v(e), .y({o[96 + i], o[32 + i]}));
  end
endmodule
