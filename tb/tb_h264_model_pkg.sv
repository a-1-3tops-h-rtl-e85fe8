// Reference models shared by the testbenches: H.264 luma sample
// interpolation written letter by letter after the standard's definitions
// (G, b, h, j and the quarter-sample averages), and a 4x4 SATD computed as
// the matrix product H * D * H with the 4x4 Hadamard matrix.
package tb_h264_model_pkg;

  function automatic int clip1(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  function automatic int tap(int e, int f, int g, int h, int i, int j);
    return e - 5*f + 20*g + 20*h - 5*i + j;
  endfunction

  // The reference picture, integer samples pic[y][x]; callers keep all taps
  // inside it.
  localparam int PIC = 192;
  int pic  [PIC][PIC];
  int pic1 [PIC][PIC];   // a second reference picture

  function automatic int pix(int sel, int y, int x);
    return (sel == 0) ? pic[y][x] : pic1[y][x];
  endfunction

  // Luma sample at quarter position (qx, qy) of pic (sel = 0) or pic1.
  function automatic int luma_q(input int qx, input int qy, input int sel = 0);
    int xi, yi, xf, yf, G, b, h, j, s, m, bb, hh;
    int b1, h1, j1;
    xi = qx >>> 2; yi = qy >>> 2; xf = qx & 3; yf = qy & 3;
    // integer and half samples around (xi, yi)
    G  = pix(sel, yi, xi);
    b1 = tap(pix(sel, yi, xi-2), pix(sel, yi, xi-1), pix(sel, yi, xi), pix(sel, yi, xi+1), pix(sel, yi, xi+2), pix(sel, yi, xi+3));
    b  = clip1((b1 + 16) >>> 5);
    h1 = tap(pix(sel, yi-2, xi), pix(sel, yi-1, xi), pix(sel, yi, xi), pix(sel, yi+1, xi), pix(sel, yi+2, xi), pix(sel, yi+3, xi));
    h  = clip1((h1 + 16) >>> 5);
    j1 = 0;
    for (int k = -2; k <= 3; k++) begin
      int bk;
      bk = tap(pix(sel, yi+k, xi-2), pix(sel, yi+k, xi-1), pix(sel, yi+k, xi), pix(sel, yi+k, xi+1), pix(sel, yi+k, xi+2), pix(sel, yi+k, xi+3));
      case (k) -2: j1 += bk; -1: j1 += -5*bk; 0: j1 += 20*bk; 1: j1 += 20*bk; 2: j1 += -5*bk; default: j1 += bk; endcase
    end
    j  = clip1((j1 + 512) >>> 10);
    // s: horizontal half one row below; m: vertical half one column right
    s  = clip1((tap(pix(sel, yi+1, xi-2), pix(sel, yi+1, xi-1), pix(sel, yi+1, xi), pix(sel, yi+1, xi+1), pix(sel, yi+1, xi+2), pix(sel, yi+1, xi+3)) + 16) >>> 5);
    m  = clip1((tap(pix(sel, yi-2, xi+1), pix(sel, yi-1, xi+1), pix(sel, yi, xi+1), pix(sel, yi+1, xi+1), pix(sel, yi+2, xi+1), pix(sel, yi+3, xi+1)) + 16) >>> 5);
    bb = pix(sel, yi, xi+1);   // H
    hh = pix(sel, yi+1, xi);   // M
    case ({xf[1:0], yf[1:0]})
      4'b0000: return G;
      4'b1000: return b;
      4'b0010: return h;
      4'b1010: return j;
      4'b0100: return (G + b + 1) >> 1;       // a
      4'b1100: return (b + bb + 1) >> 1;      // c
      4'b0001: return (G + h + 1) >> 1;       // d
      4'b0011: return (h + hh + 1) >> 1;      // n
      4'b1001: return (b + j + 1) >> 1;       // f
      4'b1011: return (j + s + 1) >> 1;       // q
      4'b0110: return (h + j + 1) >> 1;       // i
      4'b1110: return (j + m + 1) >> 1;       // k
      4'b0101: return (b + h + 1) >> 1;       // e
      4'b1101: return (b + m + 1) >> 1;       // g
      4'b0111: return (h + s + 1) >> 1;       // p
      default: return (m + s + 1) >> 1;       // r
    endcase
  endfunction

  function automatic int satd4(int d [4][4]);
    int hm [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
    int t [4][4];
    int s;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      t[i][j] = 0;
      for (int k = 0; k < 4; k++) t[i][j] += hm[i][k] * d[k][j];
    end
    s = 0;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      int c;
      c = 0;
      for (int k = 0; k < 4; k++) c += t[i][k] * hm[j][k];
      s += c < 0 ? -c : c;
    end
    return (s + 1) >> 1;
  endfunction

  // Intra 4x4 prediction of sample (x, y) in the standard's own terms:
  // pt[k] = p[k,-1] (k = 0..7, E..H already substituted when missing),
  // pl[k] = p[-1,k], pm = p[-1,-1]; ta/la = top/left available.
  function automatic int intra4(int mode, int x, int y, int pt [8], int pl [4], int pm, bit ta, bit la);
    int z, s;
    case (mode)
      0: return pt[x];
      1: return pl[y];
      2: begin
        s = 0;
        if (ta && la) begin for (int k = 0; k < 4; k++) s += pt[k] + pl[k]; return (s + 4) >> 3; end
        if (ta) begin for (int k = 0; k < 4; k++) s += pt[k]; return (s + 2) >> 2; end
        if (la) begin for (int k = 0; k < 4; k++) s += pl[k]; return (s + 2) >> 2; end
        return 128;
      end
      3: if (x == 3 && y == 3) return (pt[6] + 3*pt[7] + 2) >> 2;
         else return (pt[x+y] + 2*pt[x+y+1] + pt[x+y+2] + 2) >> 2;
      4: if (x > y) return ((x-y-2 < 0 ? pm : pt[x-y-2]) + 2*(x-y-1 < 0 ? pm : pt[x-y-1]) + pt[x-y] + 2) >> 2;
         else if (x < y) return ((y-x-2 < 0 ? pm : pl[y-x-2]) + 2*(y-x-1 < 0 ? pm : pl[y-x-1]) + pl[y-x] + 2) >> 2;
         else return (pt[0] + 2*pm + pl[0] + 2) >> 2;
      5: begin
        z = 2*x - y;
        if (z >= 0 && z % 2 == 0) return ((x-(y>>1)-1 < 0 ? pm : pt[x-(y>>1)-1]) + pt[x-(y>>1)] + 1) >> 1;
        if (z > 0) return ((x-(y>>1)-2 < 0 ? pm : pt[x-(y>>1)-2]) + 2*(x-(y>>1)-1 < 0 ? pm : pt[x-(y>>1)-1]) + pt[x-(y>>1)] + 2) >> 2;
        if (z == -1) return (pl[0] + 2*pm + pt[0] + 2) >> 2;
        return (pl[y-1] + 2*pl[y-2] + (y-3 < 0 ? pm : pl[y-3]) + 2) >> 2;
      end
      6: begin
        z = 2*y - x;
        if (z >= 0 && z % 2 == 0) return ((y-(x>>1)-1 < 0 ? pm : pl[y-(x>>1)-1]) + pl[y-(x>>1)] + 1) >> 1;
        if (z > 0) return ((y-(x>>1)-2 < 0 ? pm : pl[y-(x>>1)-2]) + 2*(y-(x>>1)-1 < 0 ? pm : pl[y-(x>>1)-1]) + pl[y-(x>>1)] + 2) >> 2;
        if (z == -1) return (pl[0] + 2*pm + pt[0] + 2) >> 2;
        return (pt[x-1] + 2*pt[x-2] + (x-3 < 0 ? pm : pt[x-3]) + 2) >> 2;
      end
      7: if (y % 2 == 0) return (pt[x+(y>>1)] + pt[x+(y>>1)+1] + 1) >> 1;
         else return (pt[x+(y>>1)] + 2*pt[x+(y>>1)+1] + pt[x+(y>>1)+2] + 2) >> 2;
      default: begin
        z = x + 2*y;
        if (z > 5) return pl[3];
        if (z == 5) return (pl[2] + 3*pl[3] + 2) >> 2;
        if (z % 2 == 0) return (pl[y+(x>>1)] + pl[y+(x>>1)+1] + 1) >> 1;
        return (pl[y+(x>>1)] + 2*pl[y+(x>>1)+1] + pl[y+(x>>1)+2] + 2) >> 2;
      end
    endcase
  endfunction

endpackage
