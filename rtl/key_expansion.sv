// key_expansion: the key expansion unit of DDP-64.
//
// A pulse on load captures the 128-bit key and the mode bit e. In that clock
// the key passes the swap box P^(e)_128/1 and the subkeys O1..O4 are
// registered (okey, used by the initial and final transformations). In each
// of the next ten clocks one round key is written to the round-key RAM: for
// round j (address j-1) Q(1..4)_j are the subkeys O_i selected by the
// cipher's schedule table and e'_j comes from the table row of the mode.
// There is no other key processing; the cipher has none. ready rises one
// clock after the last write and stays high until the next load; busy is
// high while writing. A load during busy restarts the expansion. The
// schedule table is the cipher's; writing one key per clock is this design's
// choice. Latency: ready is high 11 clocks after the load pulse.
module key_expansion
  import ddp64_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [127:0]  key,
  input  logic          e,
  output logic          busy,
  output logic          ready,
  output logic [127:0]  okey,
  output logic          wr_en,
  output logic [3:0]    wr_addr,
  output round_key_t    wr_data
);
  logic [127:0] o_sw;
  logic         e_r;
  logic [3:0]   cnt;

  key_swap u_swap (.key(key), .e(e), .o(o_sw));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      okey  <= '0;
      e_r   <= 1'b0;
      cnt   <= '0;
      busy  <= 1'b0;
      ready <= 1'b0;
    end else if (load) begin
      okey  <= o_sw;
      e_r   <= e;
      cnt   <= '0;
      busy  <= 1'b1;
      ready <= 1'b0;
    end else if (busy) begin
      if (cnt == 4'(ROUNDS - 1)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
      cnt <= cnt + 4'd1;
    end
  end

  // O_i, i = 1..4, of the registered subkeys
  function automatic logic [31:0] o_sel(input logic [127:0] ok, input int unsigned i);
    return ok[32*(i-1) +: 32];
  endfunction

  always_comb begin
    wr_en   = busy;
    wr_addr = cnt;
    wr_data = '0;
    for (int j = 0; j < ROUNDS; j++) begin
      if (cnt == 4'(j)) begin
        wr_data.q1  = o_sel(okey, Q1_SEL[j]);
        wr_data.q2  = o_sel(okey, Q2_SEL[j]);
        wr_data.q3  = o_sel(okey, Q3_SEL[j]);
        wr_data.q4  = o_sel(okey, Q4_SEL[j]);
        wr_data.esw = e_r ? ESW_DEC[j] : ESW_ENC[j];
      end
    end
  end

  wr_only_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> (wr_addr < 4'(ROUNDS)));
endmodule
