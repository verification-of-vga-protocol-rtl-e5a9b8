// tb_vga_image_data: checks the image memory. At 640x480 with no file
// given, random and corner addresses are read and compared with the test
// picture worked out here from the pixel position (column x = addr mod 640,
// row y = addr / 640). A second, 8x4 instance is loaded from a hex file and
// every word is compared with the file's contents. Reads are synchronous:
// data_out changes only on a clk edge with en high.
module tb_vga_image_data;
  logic        clk = 1'b0;
  logic        en;
  logic [18:0] addr;
  logic [7:0]  data_out;
  logic [4:0]  s_addr;
  logic [7:0]  s_data;
  logic [7:0]  expected;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  vga_image_data dut (.clk, .en, .addr, .data_out);

  vga_image_data #(.H_DISP_P(8), .V_DISP_P(4), .INIT_FILE("tb/tb_image_8x4.hex"))
    dut_file (.clk, .en, .addr(s_addr), .data_out(s_data));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL addr=%0d: %s", addr, what);
    end
  endtask

  // test picture: ((y[6:4] << 5) | x[8:4]) xor ((y[3:0] << 4) | x[3:0])
  function automatic logic [7:0] picture(int a);
    int x, y, hi, lo;
    x  = a % 640;
    y  = a / 640;
    hi = (((y / 16) % 8) * 32) + ((x / 16) % 32);
    lo = ((y % 16) * 16) + (x % 16);
    return 8'(hi ^ lo);
  endfunction

  task automatic read(input int a);
    @(negedge clk);
    addr = 19'(a); en = 1'b1;
    @(posedge clk);
    #1;
    expected = picture(a);
    check(data_out == expected, "data_out");
  endtask

  initial begin
    en = 1'b0; addr = '0; s_addr = '0;
    read(0);
    read(307199);
    read(211 * 640 + 495);
    repeat (3000) read($urandom_range(0, 307199));
    // hold without en
    @(negedge clk);
    addr = 19'd12345; en = 1'b0;
    @(posedge clk); #1;
    check(data_out == expected, "hold without en");
    // file-loaded instance: word k of the file is (k * 7 + 3) mod 256
    for (int k = 0; k < 32; k++) begin
      @(negedge clk);
      s_addr = 5'(k); en = 1'b1;
      @(posedge clk); #1;
      checks++;
      if (s_data != 8'((k * 7 + 3) % 256)) begin
        failures++;
        $display("FAIL file word %0d: %0h", k, s_data);
      end
    end
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
