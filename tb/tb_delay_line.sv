// tb_delay_line: random data through a 9-bit, 5-deep delay line; every output
// must equal the input from exactly five clocks before.
`include "tb/tb_util.svh"
module tb_delay_line;
  logic clk = 0;
  logic [8:0] din, dout;
  logic [8:0] hist [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  delay_line #(.WIDTH(9), .DEPTH(5)) dut (.clk, .din, .dout);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      if (hist.size() >= 5) begin
        `TB_CHECK(dout == hist[hist.size() - 5], $sformatf("dout %0h", dout))
      end
      din = 9'($urandom);
      hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
