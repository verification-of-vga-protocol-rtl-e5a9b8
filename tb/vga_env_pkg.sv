// vga_env_pkg: class-based verification environment for the VGA controller.
//
//   base_packet  one stimulus item: how many clk cycles to hold reset, then
//                how many to run
//   tx_gen       makes the packets: a short run cut off by a reset in the
//                middle of a frame, then a run of more than a whole frame
//   driver       drives reset through the interface and, from its own
//                model of the 640x480 timing, sends the output it expects
//                in every clk cycle to the scoreboard
//   monitor      samples the controller's outputs in every clk cycle, sends
//                them to the scoreboard, and measures sync pulse widths and
//                periods in clk cycles
//   scoreboard   compares expected with actual outputs cycle by cycle and
//                records which pixel addresses have been seen
//   vga_test     builds the parts, runs them and reports
//
// The expected model: after n clk edges out of reset, p = n / 2 pixels have
// been counted (25 MHz from 50 MHz). h_count = p mod 800 and v_count =
// (p / 800) mod 525. The address stage is one pixel behind (row*640+column,
// 0 in blanking), the colour index two behind, and colour, sync and blank
// three behind, with sync low for columns 660..754 and lines 491..492. The
// picture and colour table are recomputed here arithmetically.
package vga_env_pkg;

  typedef struct packed {
    logic        vga_clk;
    logic [7:0]  red, green, blue;
    logic        h_sync, v_sync, h_blank, v_blank, blank;
    logic [9:0]  h_count, v_count;
    logic [18:0] addr;
    logic        addr_valid;
    logic [7:0]  data_out;
    logic        check_data;   // data_out is defined (expected side only)
  } obs_t;

  localparam int H_TOT = 800, V_TOT = 525, H_VIS = 640, V_VIS = 480;
  localparam int FRAME = H_TOT * V_TOT;
  localparam int NPIX  = H_VIS * V_VIS;

  class base_packet;
    int unsigned reset_cycles;
    int unsigned run_cycles;
    function new(int unsigned r, int unsigned n);
      reset_cycles = r;
      run_cycles   = n;
    endfunction
  endclass

  class tx_gen;
    base_packet q[$];
    function void generate_all();
      base_packet pkt;
      // a run that ends somewhere inside the first frame
      pkt = new($urandom_range(2, 6), $urandom_range(20_000, 600_000));
      q.push_back(pkt);
      // more than one whole frame (2 clk per pixel), so the frame wraps
      pkt = new($urandom_range(2, 6), 2 * FRAME + 2 * 3 * H_TOT + 11);
      q.push_back(pkt);
    endfunction
  endclass

  class scoreboard;
    obs_t exp_q[$];
    obs_t act_q[$];
    int   checks, failures;
    bit   seen[NPIX];
    int   addr_seen;

    function void check(bit cond, string what, int p);
      checks++;
      if (!cond) begin
        failures++;
        if (failures < 20) $display("FAIL pixel %0d: %s", p, what);
      end
    endfunction

    function void compare();
      obs_t e, a;
      while (exp_q.size() > 0 && act_q.size() > 0) begin
        e = exp_q.pop_front();
        a = act_q.pop_front();
        check(a.vga_clk == e.vga_clk, "vga_clk", int'(e.h_count));
        check(a.h_count == e.h_count && a.v_count == e.v_count, "h_count/v_count", int'(e.h_count));
        check(a.addr == e.addr && a.addr_valid == e.addr_valid, "addr", int'(e.addr));
        if (e.check_data) check(a.data_out == e.data_out, "data_out", int'(e.addr));
        check(a.h_sync == e.h_sync && a.v_sync == e.v_sync, "sync", int'(e.h_count));
        check(a.h_blank == e.h_blank && a.v_blank == e.v_blank && a.blank == e.blank,
              "blank", int'(e.h_count));
        check(a.red == e.red && a.green == e.green && a.blue == e.blue, "rgb", int'(e.addr));
        if (a.addr_valid && a.addr == e.addr && !seen[a.addr]) begin
          seen[a.addr] = 1'b1;
          addr_seen++;
        end
      end
    endfunction
  endclass

  class driver;
    virtual vga_if vif;
    scoreboard     sb;
    int            resets_mid_frame;
    longint        n;   // clk edges since reset released

    function new(virtual vga_if v, scoreboard s);
      vif = v;
      sb  = s;
    endfunction

    static function logic [7:0] picture(int x, int y);
      int hi, lo;
      hi = (((y / 16) % 8) * 32) + ((x / 16) % 32);
      lo = ((y % 16) * 16) + (x % 16);
      return 8'(hi ^ lo);
    endfunction

    static function logic [7:0] expand3(int v3);
      return 8'(v3 * 32 + v3 * 4 + v3 / 2);
    endfunction

    function obs_t expected();
      obs_t   e;
      longint p, q;
      int     h, v;
      p = n / 2;
      e = '0;
      e.vga_clk = (n % 2) == 1;
      e.h_count = 10'(p % H_TOT);
      e.v_count = 10'((p / H_TOT) % V_TOT);
      // address stage: pixel p-1
      if (p >= 1) begin
        q = p - 1; h = int'(q % H_TOT); v = int'((q / H_TOT) % V_TOT);
        e.addr_valid = (h < H_VIS) && (v < V_VIS);
        e.addr       = e.addr_valid ? 19'(v * H_VIS + h) : '0;
      end
      // colour index stage: memory word at the address of pixel p-2
      e.check_data = (p >= 1);
      e.data_out   = picture(0, 0);
      if (p >= 2) begin
        q = p - 2; h = int'(q % H_TOT); v = int'((q / H_TOT) % V_TOT);
        if (h < H_VIS && v < V_VIS) e.data_out = picture(h, v);
      end
      // output stage: pixel p-3
      e.h_sync = 1'b1; e.v_sync = 1'b1; e.h_blank = 1'b1; e.v_blank = 1'b1;
      if (p >= 3) begin
        q = p - 3; h = int'(q % H_TOT); v = int'((q / H_TOT) % V_TOT);
        e.h_sync  = !(h >= 660 && h <= 754);
        e.v_sync  = !(v >= 491 && v <= 492);
        e.h_blank = (h >= H_VIS);
        e.v_blank = (v >= V_VIS);
      end
      e.blank = e.h_blank | e.v_blank;
      if (!e.blank) begin
        logic [7:0] i;
        i = picture(h, v);
        e.red   = expand3(int'(i[7:5]));
        e.green = expand3(int'(i[4:2]));
        e.blue  = 8'(int'(i[1:0]) * 85);
      end
      return e;
    endfunction

    task run(tx_gen gen);
      base_packet pkt;
      while (gen.q.size() > 0) begin
        pkt = gen.q.pop_front();
        if (n > 0) resets_mid_frame += ((n / 2) % FRAME != 0) ? 1 : 0;
        repeat (pkt.reset_cycles) begin
          @(negedge vif.clk);
          vif.rst = 1'b1;
        end
        n = 0;
        repeat (pkt.run_cycles) begin
          @(negedge vif.clk);
          vif.rst = 1'b0;
          // state after n edges out of reset
          if (n > 0 || pkt.reset_cycles > 0) begin
            sb.exp_q.push_back(expected());
          end
          @(posedge vif.clk);
          n++;
        end
      end
    endtask
  endclass

  class monitor;
    virtual vga_if vif;
    scoreboard     sb;
    bit            stop;
    int            h_pulses, v_pulses, h_blanks, v_blanks, frame_wraps, lit_pixels;
    longint        cyc, hs_fall, vs_fall, hb_rise, vb_rise, last_hs_fall;
    logic          hs_q, vs_q, hb_q, vb_q;
    logic [9:0]    v_q;

    function new(virtual vga_if v, scoreboard s);
      vif = v;
      sb  = s;
    endfunction

    task run();
      obs_t a;
      hs_q = 1'b1; vs_q = 1'b1; hb_q = 1'b1; vb_q = 1'b1; v_q = '0;
      last_hs_fall = -1;
      while (!stop) begin
        @(negedge vif.clk);
        #0;
        cyc++;
        a = '0;
        a.vga_clk = vif.vga_clk;
        a.red = vif.red; a.green = vif.green; a.blue = vif.blue;
        a.h_sync = vif.h_sync; a.v_sync = vif.v_sync;
        a.h_blank = vif.h_blank; a.v_blank = vif.v_blank; a.blank = vif.blank;
        a.h_count = vif.h_count; a.v_count = vif.v_count;
        a.addr = vif.addr; a.addr_valid = vif.addr_valid; a.data_out = vif.data_out;
        if (vif.rst) begin
          hs_q = 1'b1; vs_q = 1'b1; hb_q = 1'b1; vb_q = 1'b1; v_q = '0;
          last_hs_fall = -1; hb_rise = 0; vb_rise = 0;
          continue;
        end
        sb.act_q.push_back(a);
        // sync pulses: width and period in clk cycles (2 per pixel)
        if (hs_q && !a.h_sync) begin
          if (last_hs_fall >= 0) sb.check(cyc - last_hs_fall == 2 * H_TOT, "h_sync period", 0);
          hs_fall = cyc; last_hs_fall = cyc;
        end
        if (!hs_q && a.h_sync) begin
          h_pulses++;
          sb.check(cyc - hs_fall == 2 * 95, "h_sync width 95 pixels", 0);
        end
        if (vs_q && !a.v_sync) vs_fall = cyc;
        if (!vs_q && a.v_sync) begin
          v_pulses++;
          sb.check(cyc - vs_fall == 2 * 2 * H_TOT, "v_sync width 2 lines", 0);
        end
        if (!hb_q && a.h_blank) hb_rise = cyc;
        if (hb_q && !a.h_blank && hb_rise > 0) begin
          h_blanks++;
          sb.check(cyc - hb_rise == 2 * (H_TOT - H_VIS), "h_blank length 160 pixels", 0);
        end
        if (!vb_q && a.v_blank) vb_rise = cyc;
        if (vb_q && !a.v_blank && vb_rise > 0) begin
          v_blanks++;
          sb.check(cyc - vb_rise == 2 * H_TOT * (V_TOT - V_VIS), "v_blank length 45 lines", 0);
        end
        if (v_q == 10'(V_TOT - 1) && a.v_count == 0) frame_wraps++;
        if (!a.blank && (a.red | a.green | a.blue) != 0) lit_pixels++;
        hs_q = a.h_sync; vs_q = a.v_sync; hb_q = a.h_blank; vb_q = a.v_blank; v_q = a.v_count;
        sb.compare();
      end
    endtask
  endclass

  class vga_test;
    tx_gen     gen;
    driver     drv;
    monitor    mon;
    scoreboard sb;

    function new(virtual vga_if v);
      sb  = new();
      gen = new();
      drv = new(v, sb);
      mon = new(v, sb);
    endfunction

    function void need(int count, string what);
      sb.checks++;
      $display("  %-34s %0d", what, count);
      if (count == 0) begin
        sb.failures++;
        $display("FAIL: %s never happened", what);
      end
    endfunction

    task run();
      gen.generate_all();
      fork
        mon.run();
      join_none
      drv.run(gen);
      mon.stop = 1'b1;
      @(negedge drv.vif.clk);
      sb.compare();
      $display("mechanisms seen:");
      need(mon.h_pulses,         "h_sync pulses");
      need(mon.v_pulses,         "v_sync pulses");
      need(mon.h_blanks,         "horizontal blanking intervals");
      need(mon.v_blanks,         "vertical blanking intervals");
      need(mon.frame_wraps,      "frame wraps (v_count 524 -> 0)");
      need(drv.resets_mid_frame, "resets in mid-frame");
      need(mon.lit_pixels,       "visible pixels with colour");
      sb.check(sb.addr_seen == NPIX, "every pixel address 0..307199 generated", sb.addr_seen);
      $display("  pixel addresses matched: %0d of %0d", sb.addr_seen, NPIX);
      sb.check(sb.exp_q.size() == 0 && sb.act_q.size() == 0, "expected and actual counts equal", 0);
    endtask
  endclass

endpackage
