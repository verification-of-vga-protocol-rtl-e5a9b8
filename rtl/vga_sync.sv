// vga_sync: horizontal and vertical timing generator for 640x480 VGA.
//
// Two counters advance once per pixel (when pix_en is high). h_count runs
// 0..H_TOTAL-1 (799) along a line; at its wrap v_count steps through
// 0..V_TOTAL-1 (524). Both start at the first visible pixel, so in the
// visible window they are the pixel's column and row. Each line is laid out
// as visible (640), front porch (20), sync (95), back porch (45); each frame
// as visible (480 lines), front porch (11), sync (2), back porch (32).
// h_sync and v_sync are low during their sync intervals and high otherwise.
// h_blank/v_blank are high outside the visible columns/rows. The lengths
// 640/20/95/45 and 480/2/32 follow the published timing; the 11-line front
// porch makes the frame 525 lines as published; the counter origin and the
// active-high blank signals are this design's choices.
//
// Timing: all outputs are decoded from the registered counters and change in
// the clk cycle after a pix_en. rst (synchronous, active high) puts both
// counters at 0, the top-left visible pixel.
module vga_sync
  import vga_pkg::*;
#(
  parameter int unsigned H_DISP_P = H_DISP,
  parameter int unsigned H_FP_P   = H_FP,
  parameter int unsigned H_SYNC_P = H_SYNC,
  parameter int unsigned H_BP_P   = H_BP,
  parameter int unsigned V_DISP_P = V_DISP,
  parameter int unsigned V_FP_P   = V_FP,
  parameter int unsigned V_SYNC_P = V_SYNC,
  parameter int unsigned V_BP_P   = V_BP,
  localparam int unsigned H_TOTAL = H_DISP_P + H_FP_P + H_SYNC_P + H_BP_P,
  localparam int unsigned V_TOTAL = V_DISP_P + V_FP_P + V_SYNC_P + V_BP_P,
  localparam int unsigned HW = $clog2(H_TOTAL),
  localparam int unsigned VW = $clog2(V_TOTAL)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          pix_en,
  output logic [HW-1:0] h_count,
  output logic [VW-1:0] v_count,
  output logic          h_sync,
  output logic          v_sync,
  output logic          h_blank,
  output logic          v_blank
);

  localparam int unsigned H_SYNC_START = H_DISP_P + H_FP_P;
  localparam int unsigned H_SYNC_END   = H_SYNC_START + H_SYNC_P;
  localparam int unsigned V_SYNC_START = V_DISP_P + V_FP_P;
  localparam int unsigned V_SYNC_END   = V_SYNC_START + V_SYNC_P;

  logic line_end;

  assign line_end = (h_count == HW'(H_TOTAL - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      h_count <= '0;
      v_count <= '0;
    end else if (pix_en) begin
      if (line_end) begin
        h_count <= '0;
        v_count <= (v_count == VW'(V_TOTAL - 1)) ? '0 : v_count + 1'b1;
      end else begin
        h_count <= h_count + 1'b1;
      end
    end
  end

  always_comb begin
    h_blank = (h_count >= HW'(H_DISP_P));
    v_blank = (v_count >= VW'(V_DISP_P));
    h_sync  = !((h_count >= HW'(H_SYNC_START)) && (h_count < HW'(H_SYNC_END)));
    v_sync  = !((v_count >= VW'(V_SYNC_START)) && (v_count < VW'(V_SYNC_END)));
  end

  // the counters never leave their ranges
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (h_count < HW'(H_TOTAL)) else $error("vga_sync: h_count out of range");
      assert (v_count < VW'(V_TOTAL)) else $error("vga_sync: v_count out of range");
    end
  end

endmodule
