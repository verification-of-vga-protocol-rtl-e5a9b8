// tb_vga_addr_gen: checks the pixel address generator at 640x480. Random
// positions, inside and outside the visible window, are applied; after a
// clk edge with pix_en high addr must be row*640 + column (0 in blanking)
// and addr_valid must tell the two apart; without pix_en both must hold.
// The corner pixels (0 and 307199) are checked explicitly.
module tb_vga_addr_gen;
  logic        clk = 1'b0;
  logic        rst;
  logic        pix_en;
  logic [9:0]  h_count, v_count;
  logic [18:0] addr;
  logic        addr_valid;
  int          checks = 0, failures = 0;
  int          exp_addr;
  bit          exp_valid;

  always #5 clk = ~clk;

  vga_addr_gen dut (.clk, .rst, .pix_en, .h_count, .v_count, .addr, .addr_valid);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL h=%0d v=%0d addr=%0d exp=%0d: %s",
                                  h_count, v_count, addr, exp_addr, what);
    end
  endtask

  task automatic apply(input int h, input int v, input bit en);
    @(negedge clk);
    h_count = 10'(h); v_count = 10'(v); pix_en = en;
    @(posedge clk);
    #1;
    if (en) begin
      exp_valid = (h < 640) && (v < 480);
      exp_addr  = exp_valid ? v * 640 + h : 0;
    end
    check(addr == 19'(exp_addr), "addr");
    check(addr_valid == exp_valid, "addr_valid");
  endtask

  initial begin
    rst = 1'b1; pix_en = 1'b0; h_count = '0; v_count = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    exp_addr = 0; exp_valid = 1'b0;
    apply(0, 0, 1'b1);
    check(addr == 0 && addr_valid, "top-left pixel");
    apply(639, 479, 1'b1);
    check(addr == 307199, "bottom-right pixel");
    apply(640, 10, 1'b1);
    apply(100, 480, 1'b1);
    apply(495, 211, 1'b1);
    repeat (5000) apply($urandom_range(0, 799), $urandom_range(0, 524), ($urandom_range(0, 3) != 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
