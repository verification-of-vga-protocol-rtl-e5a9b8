// vga_image_data: image memory holding one colour index per pixel.
//
// A read-only memory of DEPTH (640*480 = 307200) words of IDX_W (8) bits,
// addressed by the pixel address, row-major. The document loads it from a
// memory initialisation file made from a bitmap; here INIT_FILE names a hex
// file for $readmemh, and when it is empty (the default) the memory is filled
// with vga_pkg::image_index_at(x, y), a test pattern of the pixel position,
// since no picture comes with the design.
//
// Timing: synchronous read. On a clk edge with en high, data_out takes the
// word at addr; it holds otherwise.
module vga_image_data
  import vga_pkg::*;
#(
  parameter int unsigned H_DISP_P  = H_DISP,
  parameter int unsigned V_DISP_P  = V_DISP,
  parameter string       INIT_FILE = "",
  localparam int unsigned DEPTH = H_DISP_P * V_DISP_P,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output idx_t          data_out
);

  idx_t mem [DEPTH];

  initial begin
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, mem);
    end else begin
      for (int unsigned y = 0; y < V_DISP_P; y++)
        for (int unsigned x = 0; x < H_DISP_P; x++)
          mem[y * H_DISP_P + x] = image_index_at(9'(x), 7'(y));
    end
  end

  always_ff @(posedge clk) begin
    if (en) data_out <= mem[addr];
  end

endmodule
