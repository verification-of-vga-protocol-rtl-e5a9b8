// tb_vga_top: end-to-end test of the VGA controller at its default
// 640x480 configuration, run by the class-based environment of
// vga_env_pkg. The controller is driven from a 50 MHz clock through the
// vga_if interface; the environment resets it in the middle of a frame,
// then runs it for more than one whole frame, checking every output in
// every clk cycle against its own timing model, measuring the sync and
// blanking intervals, and requiring that every one of the 307200 pixel
// addresses was generated and read.
module tb_vga_top;
  import vga_env_pkg::*;

  logic clk = 1'b0;
  always #10 clk = ~clk;   // 50 MHz

  vga_if vif (.clk);

  vga_top dut (
    .clk        (clk),
    .rst        (vif.rst),
    .vga_clk    (vif.vga_clk),
    .red        (vif.red),
    .green      (vif.green),
    .blue       (vif.blue),
    .h_sync     (vif.h_sync),
    .v_sync     (vif.v_sync),
    .h_blank    (vif.h_blank),
    .v_blank    (vif.v_blank),
    .blank      (vif.blank),
    .h_count    (vif.h_count),
    .v_count    (vif.v_count),
    .addr       (vif.addr),
    .addr_valid (vif.addr_valid),
    .data_out   (vif.data_out)
  );

  vga_test test;

  initial begin
    vif.rst = 1'b1;
    test = new(vif);
    test.run();
    $display("TB_RESULT checks=%0d failures=%0d", test.sb.checks, test.sb.failures);
    $finish;
  end

  // watchdog: 2.2 million clk cycles
  initial begin
    #44_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", test.sb.checks, test.sb.failures + 1);
    $finish;
  end
endmodule
