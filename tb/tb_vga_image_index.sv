// tb_vga_image_index: checks the colour table. Every one of the 256 colour
// indices is looked up and R, G, B are compared with the 3-3-2 expansion
// worked out here arithmetically (3-bit red r3 -> r3*32 + r3*4 + r3/2, and so
// on). A second instance loaded from a hex file checks the 24-bit word
// layout R[23:16], G[15:8], B[7:0]. Reads are synchronous.
module tb_vga_image_index;
  logic       clk = 1'b0;
  logic       en;
  logic [7:0] idx;
  logic [7:0] red, green, blue, f_red, f_green, f_blue;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  vga_image_index dut (.clk, .en, .idx, .red, .green, .blue);
  vga_image_index #(.INIT_FILE("tb/tb_palette_ramp.hex"))
    dut_file (.clk, .en, .idx, .red(f_red), .green(f_green), .blue(f_blue));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL idx=%0d rgb=%02h%02h%02h: %s", idx, red, green, blue, what);
    end
  endtask

  initial begin
    int r3, g3, b2;
    en = 1'b0; idx = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      idx = 8'(i); en = 1'b1;
      @(posedge clk); #1;
      r3 = i / 32; g3 = (i / 4) % 8; b2 = i % 4;
      check(red   == 8'(r3 * 32 + r3 * 4 + r3 / 2), "red");
      check(green == 8'(g3 * 32 + g3 * 4 + g3 / 2), "green");
      check(blue  == 8'(b2 * 85), "blue");
      // file word i is {i, 255 - i, i xor 8'h5a}
      check(f_red   == 8'(i),         "file red");
      check(f_green == 8'(255 - i),   "file green");
      check(f_blue  == 8'(i ^ 'h5a),  "file blue");
    end
    @(negedge clk);
    idx = 8'd3; en = 1'b0;
    @(posedge clk); #1;
    check(red == 8'hff && green == 8'hff && blue == 8'hff, "hold without en");
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
