// wimax_ref_pkg -- reference model of the WiMax CTC interleaver used by the
// testbenches. It evaluates the standard's law Pi(j) = (P0*j + K_j) mod Nc
// directly with wide integer arithmetic, from its own copy of the size
// table, so that the checks do not share code with the RTL.
package wimax_ref_pkg;

  localparam int NSIZES = 17;

  // {Nc, P0, P1, P2, P3, M, W}
  localparam int TAB [NSIZES][7] = '{
    '{  24,  5,   0,   0,   0, 1, 24},
    '{  36, 11,  18,   0,  18, 1, 36},
    '{  48, 13,  24,   0,  24, 1, 48},
    '{  72, 11,   6,   0,   6, 1, 36},
    '{  96,  7,  48,  24,  72, 1, 48},
    '{ 108, 11,  54,  56,   2, 1, 36},
    '{ 120, 13,  60,   0,  60, 2, 60},
    '{ 144, 17,  74,  72,   2, 2, 36},
    '{ 180, 11,  90,   0,  90, 2, 45},
    '{ 192, 11,  96,  48, 144, 2, 48},
    '{ 216, 13, 108,   0, 108, 2, 36},
    '{ 240, 13, 120,  60, 180, 2, 40},
    '{ 480, 53,  62,  12,   2, 2, 48},
    '{ 960, 43,  64, 300, 824, 4, 40},
    '{1440, 43, 720, 360, 540, 4, 40},
    '{1920, 31,   8,  24,  16, 4, 40},
    '{2400, 53,  66,  24,   2, 4, 40}
  };

  function automatic int ref_nc(int s); return TAB[s][0]; endfunction
  function automatic int ref_m(int s);  return TAB[s][5]; endfunction
  function automatic int ref_w(int s);  return TAB[s][6]; endfunction

  // Offset K_j of the standard, before reduction.
  function automatic int ref_k(int s, int j);
    int nc;
    nc = TAB[s][0];
    case (j % 4)
      0: return 1;
      1: return 1 + nc / 2 + TAB[s][2];
      2: return 1 + TAB[s][3];
      default: return 1 + nc / 2 + TAB[s][4];
    endcase
  endfunction

  function automatic int ref_pi(int s, int j);
    longint nc, prod;
    nc   = longint'(TAB[s][0]);
    prod = longint'(TAB[s][1]) * longint'(j) + longint'(ref_k(s, j));
    return int'(prod % nc);
  endfunction

  // Extrinsic triplet tag of natural couple p: {l11, l10, l01}; l01 and
  // l10 always differ, so a missing or extra A/B swap is visible.
  function automatic logic [23:0] tag(int p, int gen);
    logic [7:0] a, b, c;
    a = 8'(p + gen * 37);
    b = 8'(p ^ 8'hA5) ^ 8'(gen);
    c = 8'(p >> 4) + 8'(gen * 3);
    return {c, b, a};
  endfunction

  function automatic logic [23:0] swap_ab(logic [23:0] t, bit s);
    return s ? {t[23:16], t[7:0], t[15:8]} : t;
  endfunction

endpackage
