// wimax_ctc_pkg -- constants, types and parameter tables shared by the
// parallel WiMax duo-binary turbo-decoder interleaver.
//
// The WiMax convolutional turbo code interleaves Nc couples (A,B) in two
// steps: couples at odd addresses get A and B swapped, then the couple at
// interleaved position j is taken from natural position
//     Pi(j) = (P0*j + K_j) mod Nc,  K_j = 1, 1+Nc/2+P1, 1+P2, 1+Nc/2+P3
// for j mod 4 = 0, 1, 2, 3. The 17 block sizes and their P0..P3 are the
// standard's; the parallelism M (1, 2 or 4 SISOs, chosen so that Nc/M is a
// multiple of the window count and the interleaver is collision free) and
// the sliding-window length W per size follow the design's own size table.
//
// The tables are written as functions with a case statement so that they
// synthesise to small constant ROMs. The K_j mod Nc terms are not stored as
// literals: kmod_of() derives them from Nc and P1..P3 at elaboration.
package wimax_ctc_pkg;

  localparam int NUM_SIZES = 17;        // block sizes defined by the standard
  localparam int SIZE_W    = 5;         // width of a block-size index 0..16
  localparam int NC_W      = 12;        // Nc <= 2400
  localparam int P0_W      = 6;         // P0 <= 53
  localparam int MMAX      = 4;         // maximum number of SISOs / memories
  localparam int IDX_W     = 2;         // memory / SISO index width
  localparam int LOG2M_W   = 2;         // log2(M) in {0,1,2}
  localparam int ADX_W     = 10;        // in-memory address, Nc/M <= 600
  localparam int MEM_DEPTH = 600;       // words per extrinsic memory (2400/4)
  localparam int LLR_W     = 8;         // bits per log-likelihood ratio
  localparam int W_MAX     = 60;        // largest sliding window (Nc = 120)
  localparam int WIN_W     = 6;         // width of a window length <= 60

  typedef logic [SIZE_W-1:0]  size_idx_t;
  typedef logic [NC_W-1:0]    nc_t;
  typedef logic [P0_W-1:0]    p0_t;
  typedef logic [IDX_W-1:0]   idx_t;
  typedef logic [ADX_W-1:0]   adx_t;
  typedef logic [LLR_W-1:0]   llr_t;
  typedef logic [WIN_W-1:0]   win_t;

  // Extrinsic information of one couple: LLRs of the symbols 01, 10 and 11
  // relative to the reference symbol 00. Swapping A and B exchanges l01 and
  // l10 and leaves l11 in place.
  typedef struct packed {
    llr_t l11;
    llr_t l10;
    llr_t l01;
  } triplet_t;

  localparam int TRIPLET_W = $bits(triplet_t);

  // One LIFO entry: the common address and the memory used by every SISO.
  typedef struct packed {
    adx_t               adx;
    idx_t [MMAX-1:0]    idx;
  } lifo_entry_t;

  // Number of couples Nc of block-size index s.
  function automatic int nc_of(input int s);
    case (s)
      0: return 24;    1: return 36;    2: return 48;    3: return 72;
      4: return 96;    5: return 108;   6: return 120;   7: return 144;
      8: return 180;   9: return 192;  10: return 216;  11: return 240;
     12: return 480;  13: return 960;  14: return 1440; 15: return 1920;
      default: return 2400;
    endcase
  endfunction

  // Interleaver parameters P0..P3 of block-size index s, packed as
  // {P3, P2, P1, P0} in 12-bit fields.
  function automatic logic [47:0] p_row(input int s);
    case (s)
       0: return {12'd0, 12'd0, 12'd0, 12'd5};
       1: return {12'd18, 12'd0, 12'd18, 12'd11};
       2: return {12'd24, 12'd0, 12'd24, 12'd13};
       3: return {12'd6, 12'd0, 12'd6, 12'd11};
       4: return {12'd72, 12'd24, 12'd48, 12'd7};
       5: return {12'd2, 12'd56, 12'd54, 12'd11};
       6: return {12'd60, 12'd0, 12'd60, 12'd13};
       7: return {12'd2, 12'd72, 12'd74, 12'd17};
       8: return {12'd90, 12'd0, 12'd90, 12'd11};
       9: return {12'd144, 12'd48, 12'd96, 12'd11};
      10: return {12'd108, 12'd0, 12'd108, 12'd13};
      11: return {12'd180, 12'd60, 12'd120, 12'd13};
      12: return {12'd2, 12'd12, 12'd62, 12'd53};
      13: return {12'd824, 12'd300, 12'd64, 12'd43};
      14: return {12'd540, 12'd360, 12'd720, 12'd43};
      15: return {12'd16, 12'd24, 12'd8, 12'd31};
      default: return {12'd2, 12'd24, 12'd66, 12'd53};
    endcase
  endfunction

  // Interleaver parameter P_q (q = 0..3) of block-size index s.
  function automatic int p_of(input int s, input int q);
    logic [47:0] r;
    r = p_row(s);
    return int'(r[12*q +: 12]);
  endfunction

  // K_q mod Nc for q = j mod 4.
  function automatic int kmod_of(input int s, input int q);
    int nc;
    int k;
    nc = nc_of(s);
    case (q)
      0: k = 1;
      1: k = 1 + nc / 2 + p_of(s, 1);
      2: k = 1 + p_of(s, 2);
      default: k = 1 + nc / 2 + p_of(s, 3);
    endcase
    return k % nc;
  endfunction

  // log2 of the parallelism: M = 1 for Nc <= 108, 2 for 120..480,
  // 4 for 960..2400.
  function automatic int log2m_of(input int s);
    if (s <= 5)       return 0;
    else if (s <= 12) return 1;
    else              return 2;
  endfunction

  // Sliding-window length W of block-size index s (Nc/(M*W) is an integer).
  function automatic int w_of(input int s);
    case (s)
      0: return 24;   1: return 36;   2: return 48;   3: return 36;
      4: return 48;   5: return 36;   6: return 60;   7: return 36;
      8: return 45;   9: return 48;  10: return 36;  11: return 40;
     12: return 48;
      default: return 40;
    endcase
  endfunction

endpackage
