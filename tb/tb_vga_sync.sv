// tb_vga_sync: checks the 640x480 timing generator at its default sizes.
// pix_en is driven high on random cycles. The testbench counts the pixels
// since reset (p) and expects h_count = p mod 800, v_count = (p / 800) mod
// 525, h_sync low for counts 660..754, v_sync low for lines 491..492 and the
// blank signals high outside 640x480. It also measures the sync pulse
// widths and periods in pixels (95 of 800 per line, 2 of 525 lines per
// frame) and runs a little more than one whole frame.
module tb_vga_sync;
  logic       clk = 1'b0;
  logic       rst;
  logic       pix_en;
  logic [9:0] h_count, v_count;
  logic       h_sync, v_sync, h_blank, v_blank;
  int         checks = 0, failures = 0;
  longint     p;                      // pixels since reset
  longint     hs_fall, hs_rise, vs_fall, vs_rise, prev_hs_fall, prev_vs_fall;
  logic       hs_q, vs_q;
  int         h_pulses = 0, v_pulses = 0;

  always #5 clk = ~clk;

  vga_sync dut (.clk, .rst, .pix_en, .h_count, .v_count, .h_sync, .v_sync,
                .h_blank, .v_blank);

  function automatic void check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL p=%0d h=%0d v=%0d: %s", p, h_count, v_count, what);
    end
  endfunction

  function automatic void check_state();
    int eh, ev;
    eh = int'(p % 800);
    ev = int'((p / 800) % 525);
    check(h_count == 10'(eh), "h_count");
    check(v_count == 10'(ev), "v_count");
    check(h_sync  == !(eh >= 660 && eh <= 754), "h_sync");
    check(v_sync  == !(ev >= 491 && ev <= 492), "v_sync");
    check(h_blank == (eh >= 640), "h_blank");
    check(v_blank == (ev >= 480), "v_blank");
  endfunction

  initial begin
    rst = 1'b1; pix_en = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    p = 0; hs_q = 1'b1; vs_q = 1'b1;
    prev_hs_fall = -1; prev_vs_fall = -1;
    while (p < 800 * 525 + 2000) begin
      pix_en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      #1;
      if (pix_en) begin
        p++;
        check_state();
        // pulse widths and periods, in pixels
        if (hs_q && !h_sync) begin
          hs_fall = p;
          if (prev_hs_fall >= 0) check(hs_fall - prev_hs_fall == 800, "h_sync period");
          prev_hs_fall = hs_fall;
        end
        if (!hs_q && h_sync) begin
          hs_rise = p; h_pulses++;
          check(hs_rise - hs_fall == 95, "h_sync width");
        end
        if (vs_q && !v_sync) begin
          vs_fall = p;
          if (prev_vs_fall >= 0) check(vs_fall - prev_vs_fall == 800 * 525, "v_sync period");
          prev_vs_fall = vs_fall;
        end
        if (!vs_q && v_sync) begin
          vs_rise = p; v_pulses++;
          check(vs_rise - vs_fall == 2 * 800, "v_sync width");
        end
        hs_q = h_sync; vs_q = v_sync;
      end else begin
        check_state();   // holds without pix_en
      end
    end
    check(h_pulses == 525 + 2, "number of h_sync pulses");
    check(v_pulses == 1, "number of v_sync pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
