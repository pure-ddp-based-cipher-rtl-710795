// round_key_ram: storage for the precomputed round keys of DDP-64.
//
// DEPTH words of WIDTH bits written one per clock through a synchronous write
// port. Reads are asynchronous: rdata follows raddr in the same cycle, which
// lets the iterative core fetch the key of the round it computes without a
// wait state, and all_words exposes every word at once for the pipelined
// core, where each of the ten round stages needs its own key every clock.
// Words are not reset; they must be written before use. The cipher calls
// for a round-key RAM filled by the key expansion unit; the port set and
// read timing are this design's choice.
module round_key_ram #(
  parameter int unsigned DEPTH = 10,
  parameter int unsigned WIDTH = 129,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   we,
  input  logic [AW-1:0]          waddr,
  input  logic [WIDTH-1:0]       wdata,
  input  logic [AW-1:0]          raddr,
  output logic [WIDTH-1:0]       rdata,
  output logic [DEPTH*WIDTH-1:0] all_words
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (waddr < AW'(DEPTH)))
      mem[waddr] <= wdata;
  end

  assign rdata = (raddr < AW'(DEPTH)) ? mem[raddr] : '0;

  for (genvar i = 0; i < DEPTH; i++) begin : g_all
    assign all_words[i*WIDTH +: WIDTH] = mem[i];
  end
endmodule
