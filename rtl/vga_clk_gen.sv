// vga_clk_gen: pixel-rate clock generator.
//
// Divides the board clock (50 MHz) by DIV (2) to the 25 MHz pixel rate
// needed for 640x480. It produces two things from one counter that runs on
// clk: vga_clk, a divided clock with a duty cycle of floor(DIV/2)/DIV high
// (50 % for DIV=2), meant for an external video DAC or monitor pin, and
// pix_en, a one-clk-wide enable that is high in the last clk cycle of each
// vga_clk period (while vga_clk is high). The rest of the controller runs on clk and
// advances only when pix_en is high, which keeps the design in a single
// clock domain. The 50-to-25 MHz division is the published one; producing an
// enable beside the divided clock is this design's choice.
//
// Timing: rst (synchronous, active high) clears the counter. After reset,
// pix_en is high every DIV-th clk cycle, starting with the DIV-th one. The
// pipeline behind it therefore changes on the clk edge where vga_clk falls,
// and its outputs are stable at the rising edge of vga_clk.
module vga_clk_gen #(
  parameter int unsigned DIV = 2
) (
  input  logic clk,
  input  logic rst,
  output logic vga_clk,
  output logic pix_en
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;
  logic          last;

  assign last   = (cnt == CW'(DIV - 1));
  assign pix_en = last;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      vga_clk <= 1'b0;
    end else begin
      cnt     <= last ? '0 : cnt + 1'b1;
      // high for the last DIV/2 counts of each period
      vga_clk <= last ? 1'b0 : (cnt + 1'b1 >= CW'(DIV - DIV / 2));
    end
  end

  initial assert (DIV >= 2) else $error("vga_clk_gen: DIV must be at least 2");

endmodule
