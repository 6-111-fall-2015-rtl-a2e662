// tb_debounce: with DELAY = 8, a change that holds must reach the output
// exactly DELAY + 2 clocks after the input changed; glitches shorter than
// DELAY clocks, and bursts of bouncing, must never reach it; reset loads the
// raw input.
`include "tb/tb_util.svh"
module tb_debounce;
  localparam int DELAY = 8;
  logic clk = 0, rst = 1, noisy = 0, clean;
  int checks = 0, failures = 0;

  debounce #(.DELAY(DELAY)) dut (.clk, .rst, .noisy, .clean);

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count clocks from an input change until the output follows (cap 100)
  task automatic settle(logic v, output int lat);
    @(negedge clk) noisy = v;
    lat = 0;
    while (clean != v && lat < 100) begin @(posedge clk); #1; lat++; end
  endtask

  initial begin
    int lat;
    noisy = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    #1 `TB_CHECK(clean == 1, "reset did not load the raw input")
    repeat (20) @(posedge clk);
    for (int k = 0; k < 6; k++) begin
      settle(~clean, lat);
      `TB_CHECK(lat == DELAY + 2, $sformatf("clean edge after %0d clocks, want %0d", lat, DELAY + 2))
      repeat (15) @(posedge clk);
    end
    // glitches of every length below DELAY
    for (int len = 1; len < DELAY; len++) begin
      logic prev_lvl;
      prev_lvl = clean;
      @(negedge clk) noisy = ~prev_lvl;
      repeat (len) @(negedge clk);
      noisy = prev_lvl;
      repeat (2 * DELAY) begin
        @(posedge clk); #1;
        `TB_CHECK(clean == prev_lvl, $sformatf("glitch of %0d clocks passed", len))
      end
    end
    // bouncing: random toggles every 1..DELAY-1 clocks, then settle
    for (int b = 0; b < 5; b++) begin
      logic prev_lvl;
      prev_lvl = clean;
      repeat (10) begin
        @(negedge clk) noisy = ~noisy;
        repeat ($urandom_range(DELAY - 2, 0)) begin
          @(posedge clk); #1;
          `TB_CHECK(clean == prev_lvl, "bounce reached the output")
        end
      end
      @(negedge clk) noisy = ~prev_lvl;
      lat = 0;
      while (clean == prev_lvl && lat < 100) begin @(posedge clk); #1; lat++; end
      `TB_CHECK(lat <= DELAY + 2 && clean == ~prev_lvl, $sformatf("after bouncing the level took %0d clocks", lat))
      repeat (15) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
