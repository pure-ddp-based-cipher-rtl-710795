// tb_round_key_ram: writes random words, reads them back through the
// addressed port and the all-words port, checks the write is visible the
// clock after it and that out-of-range addresses read zero.
module tb_round_key_ram;
  localparam int D = 10, W = 129;
  logic clk = 0, we = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata, rdata;
  logic [D*W-1:0] all_words;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  round_key_ram #(.DEPTH(D), .WIDTH(W)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata, .all_words);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; waddr = 4'(i); wdata = {$urandom, $urandom, $urandom, $urandom, $urandom};
      model[i] = wdata;
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = ($urandom % 2) == 1;
      waddr = 4'($urandom % D);
      wdata = {$urandom, $urandom, $urandom, $urandom, $urandom};
      raddr = 4'($urandom % 12);
      #1;
      checks++;
      if (rdata !== ((raddr < D) ? model[raddr] : '0)) begin
        failures++;
        $display("FAIL read addr %0d", raddr);
      end
      for (int i = 0; i < D; i++) begin
        checks++;
        if (all_words[i*W +: W] !== model[i]) begin
          failures++;
          $display("FAIL all_words[%0d]", i);
        end
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
