// vga_image_index: colour table from colour index to 24-bit RGB.
//
// A read-only memory of 2**IDX_W (256) words of 24 bits, addressed by the
// colour index read from the image memory. Each word is laid out
// R[23:16], G[15:8], B[7:0] as in the document, and the module splits it
// into the three 8-bit colour outputs. INIT_FILE names a hex file for
// $readmemh; when it is empty (the default) the table holds
// vga_pkg::palette_rgb(), a 3-3-2 colour table, since no picture and hence
// no colour table comes with the design.
//
// Timing: synchronous read. On a clk edge with en high, red/green/blue take
// the colour of idx; they hold otherwise.
module vga_image_index
  import vga_pkg::*;
#(
  parameter string INIT_FILE = ""
) (
  input  logic             clk,
  input  logic             en,
  input  idx_t             idx,
  output logic [COL_W-1:0] red,
  output logic [COL_W-1:0] green,
  output logic [COL_W-1:0] blue
);

  localparam int unsigned NCOL = 2 ** IDX_W;

  logic [3*COL_W-1:0] table_q [NCOL];
  logic [3*COL_W-1:0] rgb_data;

  initial begin
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, table_q);
    end else begin
      for (int unsigned i = 0; i < NCOL; i++)
        table_q[i] = palette_rgb(idx_t'(i));
    end
  end

  always_ff @(posedge clk) begin
    if (en) rgb_data <= table_q[idx];
  end

  assign red   = rgb_data[3*COL_W-1 -: COL_W];
  assign green = rgb_data[2*COL_W-1 -: COL_W];
  assign blue  = rgb_data[COL_W-1 -: COL_W];

endmodule
