// vga_if: the signals between the VGA controller and its verification
// environment: the clock and reset the environment drives, and every output
// of the controller, sampled by the monitor. Widths are those of the
// default 640x480 configuration.
interface vga_if (input logic clk);
  logic        rst;
  logic        vga_clk;
  logic [7:0]  red, green, blue;
  logic        h_sync, v_sync, h_blank, v_blank, blank;
  logic [9:0]  h_count, v_count;
  logic [18:0] addr;
  logic        addr_valid;
  logic [7:0]  data_out;
endinterface
