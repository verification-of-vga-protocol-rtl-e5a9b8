// vga_top: 640x480 VGA controller that scans a stored picture out to a
// monitor.
//
// Blocks, in the order a pixel passes through them:
//   vga_clk_gen      50 MHz board clock -> 25 MHz pixel rate (vga_clk, pix_en)
//   vga_sync         h_count/v_count, h_sync/v_sync, h_blank/v_blank
//   vga_addr_gen     pixel address v_count*640 + h_count
//   vga_image_data   image memory: pixel address -> 8-bit colour index
//   vga_image_index  colour table: colour index -> 8-bit R, G, B
// The video DAC and connector that turn R, G, B into analog levels are
// outside this design; the digital colour and sync signals are its ports.
//
// Timing: everything runs on clk and advances once per pix_en (every DIV
// clk cycles). h_count, v_count and addr/addr_valid/data_out are the
// internal pipeline stages; addr is one pixel behind h_count/v_count and
// data_out two. red/green/blue, h_sync, v_sync, h_blank, v_blank and blank
// are aligned with one another and lag h_count/v_count by PIPE (3) pixels,
// so a monitor sees colour and sync in the right relation. R, G and B are
// forced to 0 while blank is high. The block chain follows the document;
// the single clock with a pixel enable, the pipeline alignment and the
// blanking of the colour outputs are this design's choices.
module vga_top
  import vga_pkg::*;
#(
  parameter int unsigned DIV          = 2,
  parameter int unsigned H_DISP_P     = H_DISP,
  parameter int unsigned H_FP_P       = H_FP,
  parameter int unsigned H_SYNC_P     = H_SYNC,
  parameter int unsigned H_BP_P       = H_BP,
  parameter int unsigned V_DISP_P     = V_DISP,
  parameter int unsigned V_FP_P       = V_FP,
  parameter int unsigned V_SYNC_P     = V_SYNC,
  parameter int unsigned V_BP_P       = V_BP,
  parameter string       IMAGE_FILE   = "",
  parameter string       PALETTE_FILE = "",
  localparam int unsigned HW = $clog2(H_DISP_P + H_FP_P + H_SYNC_P + H_BP_P),
  localparam int unsigned VW = $clog2(V_DISP_P + V_FP_P + V_SYNC_P + V_BP_P),
  localparam int unsigned AW = $clog2(H_DISP_P * V_DISP_P)
) (
  input  logic             clk,         // board clock, 50 MHz
  input  logic             rst,         // synchronous, active high
  output logic             vga_clk,     // pixel clock, 25 MHz
  output logic [COL_W-1:0] red,
  output logic [COL_W-1:0] green,
  output logic [COL_W-1:0] blue,
  output logic             h_sync,      // active low
  output logic             v_sync,      // active low
  output logic             h_blank,
  output logic             v_blank,
  output logic             blank,       // h_blank | v_blank
  output logic [HW-1:0]    h_count,
  output logic [VW-1:0]    v_count,
  output logic [AW-1:0]    addr,
  output logic             addr_valid,
  output idx_t             data_out
);

  localparam int unsigned PIPE = 3;

  logic pix_en;
  logic hs0, vs0, hb0, vb0;
  logic [COL_W-1:0] r_q, g_q, b_q;

  // sync and blank of each pixel, delayed to line up with its colour
  typedef struct packed {
    logic hs;
    logic vs;
    logic hb;
    logic vb;
  } ctl_t;
  ctl_t ctl_d [PIPE];

  vga_clk_gen #(.DIV(DIV)) u_clk_gen (
    .clk, .rst, .vga_clk, .pix_en
  );

  vga_sync #(
    .H_DISP_P(H_DISP_P), .H_FP_P(H_FP_P), .H_SYNC_P(H_SYNC_P), .H_BP_P(H_BP_P),
    .V_DISP_P(V_DISP_P), .V_FP_P(V_FP_P), .V_SYNC_P(V_SYNC_P), .V_BP_P(V_BP_P)
  ) u_sync (
    .clk, .rst, .pix_en,
    .h_count, .v_count,
    .h_sync(hs0), .v_sync(vs0), .h_blank(hb0), .v_blank(vb0)
  );

  vga_addr_gen #(
    .H_DISP_P(H_DISP_P), .V_DISP_P(V_DISP_P), .HW(HW), .VW(VW)
  ) u_addr_gen (
    .clk, .rst, .pix_en, .h_count, .v_count, .addr, .addr_valid
  );

  vga_image_data #(
    .H_DISP_P(H_DISP_P), .V_DISP_P(V_DISP_P), .INIT_FILE(IMAGE_FILE)
  ) u_image_data (
    .clk, .en(pix_en), .addr, .data_out
  );

  vga_image_index #(.INIT_FILE(PALETTE_FILE)) u_image_index (
    .clk, .en(pix_en), .idx(data_out), .red(r_q), .green(g_q), .blue(b_q)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      // idle level: syncs inactive (high), blanked
      for (int i = 0; i < PIPE; i++) ctl_d[i] <= '{hs: 1'b1, vs: 1'b1, hb: 1'b1, vb: 1'b1};
    end else if (pix_en) begin
      ctl_d[0] <= '{hs: hs0, vs: vs0, hb: hb0, vb: vb0};
      for (int i = 1; i < PIPE; i++) ctl_d[i] <= ctl_d[i-1];
    end
  end

  always_comb begin
    h_sync  = ctl_d[PIPE-1].hs;
    v_sync  = ctl_d[PIPE-1].vs;
    h_blank = ctl_d[PIPE-1].hb;
    v_blank = ctl_d[PIPE-1].vb;
    blank   = h_blank | v_blank;
    red     = blank ? '0 : r_q;
    green   = blank ? '0 : g_q;
    blue    = blank ? '0 : b_q;
  end

endmodule
