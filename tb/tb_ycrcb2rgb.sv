// tb_ycrcb2rgb: random 10-bit YCrCb samples, one per clock. Each output is
// compared, three clocks later, with the studio-range conversion computed in
// real arithmetic (1.164, 1.596, 0.813, 0.392, 2.017), clamped to 0..255;
// two levels of difference are allowed for the fixed-point coefficients.
`include "tb/tb_util.svh"
module tb_ycrcb2rgb;
  logic clk = 0, rst;
  logic [9:0] y, cr, cb;
  logic [7:0] r, g, b;
  int checks = 0, failures = 0;
  int exp_r [$], exp_g [$], exp_b [$];

  always #5 clk = ~clk;

  ycrcb2rgb dut (.clk, .rst, .y, .cr, .cb, .r, .g, .b);

  function automatic int clamp(real v);
    if (v < 0.0) return 0;
    if (v > 255.0) return 255;
    return int'($floor(v));
  endfunction

  function automatic bit close(int a, int e);
    return (a - e <= 2) && (e - a <= 2);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; y = 0; cr = 0; cb = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      real yy, rr, bb;
      @(negedge clk);
      if (exp_r.size() == 3) begin
        int er, eg, eb;
        er = exp_r.pop_front(); eg = exp_g.pop_front(); eb = exp_b.pop_front();
        `TB_CHECK(close(r, er) && close(g, eg) && close(b, eb),
                  $sformatf("rgb %0d %0d %0d expected %0d %0d %0d", r, g, b, er, eg, eb))
      end
      y = 10'($urandom); cr = 10'($urandom); cb = 10'($urandom);
      if (i % 4 == 0) begin cr = 512; cb = 512; end
      yy = 1.164 * (real'(y) - 64.0);
      rr = real'(cr) - 512.0;
      bb = real'(cb) - 512.0;
      exp_r.push_back(clamp((yy + 1.596 * rr) / 4.0));
      exp_g.push_back(clamp((yy - 0.813 * rr - 0.392 * bb) / 4.0));
      exp_b.push_back(clamp((yy + 2.017 * bb) / 4.0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
