// tb_vga_clk_gen: checks the pixel-rate divider at DIV=2 (50 -> 25 MHz) and
// at DIV=4. After reset, pix_en must be high on exactly every DIV-th clk
// cycle and vga_clk must be high for the last DIV/2 cycles of each period;
// both are compared with a count of clk cycles kept by the testbench. A
// second reset in the middle of a period must restart the count.
module tb_vga_clk_gen;
  logic clk = 1'b0;
  logic rst;
  logic vclk2, pe2, vclk4, pe4;
  int   checks = 0, failures = 0;
  int   n;   // clk edges since reset was released

  always #10 clk = ~clk;   // 50 MHz

  vga_clk_gen #(.DIV(2)) dut2 (.clk, .rst, .vga_clk(vclk2), .pix_en(pe2));
  vga_clk_gen #(.DIV(4)) dut4 (.clk, .rst, .vga_clk(vclk4), .pix_en(pe4));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL n=%0d: %s", n, what);
    end
  endtask

  task automatic run(input int cycles);
    repeat (cycles) begin
      @(negedge clk);
      check(pe2   == ((n % 2) == 1),  "pix_en DIV=2");
      check(vclk2 == ((n % 2) == 1),  "vga_clk DIV=2");
      check(pe4   == ((n % 4) == 3),  "pix_en DIV=4");
      check(vclk4 == ((n % 4) >= 2),  "vga_clk DIV=4");
      @(posedge clk);
      n++;
    end
  endtask

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    n = 0;
    run(41);
    #1 rst = 1'b1;     // reset in mid-period
    @(posedge clk);
    #1 rst = 1'b0;
    n = 0;
    run(64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
