// vga_addr_gen: pixel address generator.
//
// Turns the pixel position from vga_sync into the linear address of that
// pixel in the image memory, row-major: addr = v_count * H_DISP + h_count,
// 0 at the top-left pixel and H_DISP*V_DISP-1 (307199) at the bottom-right.
// Outside the visible window addr is 0 and addr_valid is low. The document
// names an address generator feeding the image memory; the row-major layout,
// the registered output and the zero address in blanking are this design's
// choices.
//
// Timing: one pixel of latency. On a clk edge with pix_en high, addr and
// addr_valid take the values for the h_count/v_count present before the edge.
module vga_addr_gen
  import vga_pkg::*;
#(
  parameter int unsigned H_DISP_P = H_DISP,
  parameter int unsigned V_DISP_P = V_DISP,
  parameter int unsigned HW = 10,
  parameter int unsigned VW = 10,
  localparam int unsigned AW = $clog2(H_DISP_P * V_DISP_P)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          pix_en,
  input  logic [HW-1:0] h_count,
  input  logic [VW-1:0] v_count,
  output logic [AW-1:0] addr,
  output logic          addr_valid
);

  logic          visible;
  logic [AW-1:0] addr_next;

  assign visible   = (h_count < HW'(H_DISP_P)) && (v_count < VW'(V_DISP_P));
  assign addr_next = AW'(v_count) * AW'(H_DISP_P) + AW'(h_count);

  always_ff @(posedge clk) begin
    if (rst) begin
      addr       <= '0;
      addr_valid <= 1'b0;
    end else if (pix_en) begin
      addr       <= visible ? addr_next : '0;
      addr_valid <= visible;
    end
  end

endmodule
