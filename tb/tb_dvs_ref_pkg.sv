// tb_dvs_ref_pkg: reference model used by the sensor-level testbenches.
//
// dvs_ref holds, for an NC x NR array, the level each pixel memorised at
// its last restart and the event each pixel holds for the coming frame
// (0 none, 1 ON, 2 OFF). It makes random stimulus, evaluates the group
// filter (AL2/AM3 on the event count of a 2x2 group) and the column filter
// (the same rule per polarity), and lists the words the chip bus must show
// for a frame, in scan order, together with the frame length in clocks
// (2 clocks of SAMPLE and first YCLK, then n+3 clocks for a group row with
// n groups left after both filters, and the YEND cycle counted as the end).
package tb_dvs_ref_pkg;
  import dvs_pkg::*;

  typedef struct {
    bit            is_y;
    int            addr;
    group_events_t ev;
  } bus_word_t;

  class dvs_ref #(int NC = 8, int NR = 6);
    localparam int NGX = NC / 2;
    localparam int NGY = NR / 2;
    int ref_lvl [NR][NC];
    int pol [NR][NC];
    filter_cfg_t cfg;
    // statistics of the last expect_frame call
    int n_al2_drop, n_am3_drop, n_cscl_drop, n_row_skip, n_col_skip, n_row_empty;
    int n_events_in, n_events_out;

    function new();
      foreach (ref_lvl[y, x]) begin ref_lvl[y][x] = 128; pol[y][x] = 0; end
      cfg = '0;
    endfunction

    // Random frame: each pixel fires with probability 1/density_div.
    // Groups are sometimes filled completely or left with a single event
    // so that both filters get work.
    function void randomize_frame(int density_div);
      foreach (pol[y, x]) pol[y][x] = 0;
      for (int gy = 0; gy < NGY; gy++)
        for (int gx = 0; gx < NGX; gx++) begin
          int mode;
          mode = int'($urandom % 8);
          for (int p = 0; p < 4; p++) begin
            int y, x, c;
            y = 2 * gy + p / 2; x = 2 * gx + p % 2;
            if (mode == 0) c = (p == 0) ? 1 + int'($urandom % 2) : 0;        // lone event
            else if (mode == 1) c = 1;                                          // full ON group
            else if (mode == 2) c = 1 + int'($urandom % 2);                     // full mixed group
            else c = ($urandom % density_div == 0) ? 1 + int'($urandom % 2) : 0;
            pol[y][x] = c;
          end
        end
      // keep levels inside the 8-bit range
      foreach (pol[y, x]) begin
        if (pol[y][x] == 1 && ref_lvl[y][x] > 200) pol[y][x] = 2;
        if (pol[y][x] == 2 && ref_lvl[y][x] < 50)  pol[y][x] = 1;
      end
    endfunction

    // Level to drive for each pixel so that its event fires.
    function int level(int y, int x);
      return ref_lvl[y][x] + (pol[y][x] == 1 ? 15 : pol[y][x] == 2 ? -15 : 0);
    endfunction

    // After RESTART the pixels that held an event memorise the new level.
    function void restarted();
      foreach (pol[y, x]) if (pol[y][x] != 0) ref_lvl[y][x] = level(y, x);
    endfunction

    function group_events_t raw_group(int gy, int gx);
      group_events_t g;
      g = '0;
      for (int p = 0; p < 4; p++) begin
        int y, x;
        y = 2 * gy + p / 2; x = 2 * gx + p % 2;
        if (pol[y][x] == 1) g.on[p] = 1'b1;
        if (pol[y][x] == 2) g.off[p] = 1'b1;
      end
      return g;
    endfunction

    static function bit rule(int n, bit al2, bit am3);
      return !((al2 && n < 2) || (am3 && n > 3));
    endfunction

    function group_events_t after_gscl(int gy, int gx);
      group_events_t g;
      int n;
      g = raw_group(gy, gx);
      n = $countones(g.on | g.off);
      return rule(n, cfg.gscl_al2, cfg.gscl_am3) ? g : '0;
    endfunction

    function group_events_t after_cscl(int gy, int gx);
      group_events_t g;
      g = after_gscl(gy, gx);
      if (!rule($countones(g.on), cfg.cscl_al2, cfg.cscl_am3)) g.on = '0;
      if (!rule($countones(g.off), cfg.cscl_al2, cfg.cscl_am3)) g.off = '0;
      return g;
    endfunction

    // Expected bus words of one frame and its length in clocks.
    function void expect_frame(ref bus_word_t q[$], output int clocks);
      q.delete();
      clocks = 2;
      n_al2_drop = 0; n_am3_drop = 0; n_cscl_drop = 0;
      n_row_skip = 0; n_col_skip = 0; n_row_empty = 0;
      n_events_in = 0; n_events_out = 0;
      for (int gy = 0; gy < NGY; gy++) begin
        bit row_req;
        int n;
        row_req = 0; n = 0;
        for (int gx = 0; gx < NGX; gx++) begin
          group_events_t r, g;
          int cnt;
          r = raw_group(gy, gx);
          cnt = $countones(r.on | r.off);
          n_events_in += cnt;
          if (cnt > 0 && cfg.gscl_al2 && cnt < 2) n_al2_drop++;
          if (cnt > 0 && cfg.gscl_am3 && cnt > 3) n_am3_drop++;
          g = after_gscl(gy, gx);
          if (g != '0) row_req = 1;
          if (after_cscl(gy, gx) != g) n_cscl_drop++;
        end
        if (!row_req) begin n_row_skip++; continue; end
        q.push_back('{1, gy + 1, '0});
        for (int gx = 0; gx < NGX; gx++) begin
          group_events_t c;
          c = after_cscl(gy, gx);
          if (c != '0) begin
            q.push_back('{0, gx + 1, c});
            n++;
            n_events_out += $countones({c.on, c.off});
          end else n_col_skip++;
        end
        if (n == 0) n_row_empty++;
        q.push_back('{0, NGX + 1, '0});
        clocks += n + 3;
      end
      q.push_back('{1, NGY + 1, '0});
    endfunction
  endclass
endpackage
