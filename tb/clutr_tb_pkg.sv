// clutr_tb_pkg: reference model for the CLUT-R testbenches.
//
// clut_model draws a random integer forward mapping of the kind the off-line
// compression produces and codes it into the two compressed tables:
//   * Y map: for each source row, a random walk along the row starting from an
//     initial target row; at random columns the target steps by -1 or +1 and/or
//     the pixel is flagged double-targeted (DT). The Y table holds, per row,
//     BP_Y words: {dt,0,0,init} at word 0, then {dt,dec,inc,column} for every
//     breakpoint, then dummy words {0,0,0,W}.
//   * X map: for each source column, a random walk down the column with -1/+1
//     steps. The X table holds, per column, BP_X words: {0,0,0,init}, then
//     {0,dec,inc,row} per breakpoint, then dummy words {0,0,0,H}.
// The number of breakpoints is capped at BP-2 per row/column. The expected
// outputs ymap/xmap/dtmap are kept uncompressed, so a testbench checks the
// hardware against the map itself, not against a second decoder.
package clutr_tb_pkg;

  class clut_model;
    int unsigned W, H, BPY, BPX;
    int          ymap[], xmap[], dtmap[];
    int unsigned ytab[], xtab[];
    // coverage of the coding
    int n_y_dec, n_y_inc, n_dt_only, n_dt_step, n_dt_init, n_y_adjacent;
    int n_x_dec, n_x_inc, n_x_adjacent, n_y_full, n_x_full;

    function new(int unsigned w, int unsigned h, int unsigned bpy, int unsigned bpx);
      W = w; H = h; BPY = bpy; BPX = bpx;
      ymap  = new[W*H];
      xmap  = new[W*H];
      dtmap = new[W*H];
      ytab  = new[H*BPY];
      xtab  = new[W*BPX];
    endfunction

    static function int unsigned word(bit dt, bit dec, bit inc, int unsigned loc);
      return (int'(dt) << 17) | (int'(dec) << 16) | (int'(inc) << 15) | (loc & 32'h7fff);
    endfunction

    // p_y, p_x: breakpoint probability per pixel in 1/1000; p_dt: share of Y
    // breakpoints that carry a DT flag, in 1/1000.
    function void generate_maps(int unsigned p_y, int unsigned p_x, int unsigned p_dt);
      for (int unsigned y = 0; y < H; y++) begin
        int v, nb, last_bp;
        bit dt0;
        v  = int'(y) + int'($urandom_range(4)) - 2;
        if (v < 0) v = 0;
        if (v > 1023) v = 1023;
        dt0 = ($urandom_range(999) < p_dt / 2);
        if (dt0) n_dt_init++;
        ytab[y*BPY] = word(dt0, 0, 0, v);
        ymap[y*W]   = v;
        dtmap[y*W]  = dt0;
        nb = 0; last_bp = 0;
        for (int unsigned x = 1; x < W; x++) begin
          bit dt, dec, inc;
          dt = 0; dec = 0; inc = 0;
          if (nb < int'(BPY) - 2 && $urandom_range(999) < p_y) begin
            dt = ($urandom_range(999) < p_dt);
            case ($urandom_range(2))
              0: dec = 1;
              1: inc = 1;
              default: if (!dt) dec = 1;
            endcase
            if (dec && v == 0)    begin dec = 0; inc = 1; end
            if (inc && v == 1023) begin inc = 0; dec = 1; end
            if (dec) begin v--; n_y_dec++; end
            if (inc) begin v++; n_y_inc++; end
            if (dt && (dec || inc)) n_dt_step++;
            if (dt && !(dec || inc)) n_dt_only++;
            if (int'(x) == last_bp + 1) n_y_adjacent++;
            last_bp = x;
            nb++;
            ytab[y*BPY + nb] = word(dt, dec, inc, x);
          end
          ymap[y*W + x]  = v;
          dtmap[y*W + x] = dt;
        end
        if (nb == int'(BPY) - 2) n_y_full++;
        for (int unsigned k = nb + 1; k < BPY; k++) ytab[y*BPY + k] = word(0, 0, 0, W);
      end
      for (int unsigned x = 0; x < W; x++) begin
        int v, nb, last_bp;
        v = int'(x) + int'($urandom_range(4)) - 2;
        if (v < 0) v = 0;
        if (v > 1023) v = 1023;
        xtab[x*BPX] = word(0, 0, 0, v);
        xmap[x]     = v;
        nb = 0; last_bp = 0;
        for (int unsigned y = 1; y < H; y++) begin
          if (nb < int'(BPX) - 2 && $urandom_range(999) < p_x) begin
            bit dec;
            dec = $urandom_range(1);
            if (dec && v == 0)     dec = 0;
            if (!dec && v == 1023) dec = 1;
            if (dec) begin v--; n_x_dec++; end
            else     begin v++; n_x_inc++; end
            if (int'(y) == last_bp + 1) n_x_adjacent++;
            last_bp = y;
            nb++;
            xtab[x*BPX + nb] = word(0, dec, !dec, y);
          end
          xmap[y*W + x] = v;
        end
        if (nb == int'(BPX) - 2) n_x_full++;
        for (int unsigned k = nb + 1; k < BPX; k++) xtab[x*BPX + k] = word(0, 0, 0, H);
      end
    endfunction
  endclass

endpackage
