// ldpc_pkg: types, constants and code tables shared by the EG-LDPC decoder.
//
// The decoder works on quasi-cyclic Euclidean-geometry LDPC codes built from
// EG(3,2^s): the points of the geometry other than the origin are the rows of
// the parity-check matrix, the lines that miss the origin are its columns.
// Multiplying every point by a primitive element of GF(2^3s) maps lines onto
// lines, which splits the columns into cyclic classes of Z = 2^3s - 1 lines;
// each class is one Z x Z circulant sub-matrix ("tile") of column and row
// weight 2^s.  Row r of circulant i has its ones at columns (r + c) mod Z for c
// in COLS[i]; COLS[i] is the negated point-exponent set of the class
// representative that contains point alpha^0.
//
//  * EG_4095: s = 4, GF(2^12) with x^12+x^6+x^4+x+1, 17 circulants of
//    4095 x 4095, weight 16, row weight 272: the (69615, 66897) code, shortened
//    to (68254, 65536) by fixing its first 1361 bits to zero.  This is the code
//    of the design.  The document gives only its dimensions, not the field
//    polynomial, so the tap table below is one member of that code family.
//  * EG_63: s = 2, GF(2^6) with x^6+x+1, 5 circulants of 63 x 63, weight 4.
//    A small code of the same construction, used to simulate quickly.
//
// Fixed-point formats follow the document: a-posteriori LLRs are 7-bit
// sign-magnitude (saturating at +-63), check-to-variable (CTV) messages are
// 5-bit sign-magnitude after the alpha = 1/4 normalisation, and the distance
// between the two smallest magnitudes is kept in 2 bits.
package ldpc_pkg;

  typedef enum logic [0:0] {EG_4095 = 1'b0, EG_63 = 1'b1} code_e;

  localparam int Q      = 7;               // APP word length (sign + 6 magnitude bits)
  localparam int QC     = 5;               // CTV word length (sign + 4 magnitude bits)
  localparam int QD     = 2;               // bits of the second-minimum offset
  localparam int MAGW   = Q - 1;           // APP magnitude bits
  localparam int CMAGW  = QC - 1;          // CTV magnitude bits

  typedef logic [Q-1:0]     app_t;   // {sign, magnitude}
  typedef logic [QC-1:0]    ctv_t;   // {sign, magnitude}
  typedef logic [CMAGW-1:0] cmag_t;
  typedef logic signed [QC:0] delta_t; // CTV difference, -30..30

  localparam int EG4095_NT = 17, EG4095_Z = 4095, EG4095_W = 16;
  localparam int EG63_NT   = 5,  EG63_Z   = 63,   EG63_W   = 4;

  localparam int unsigned EG4095_COLS [EG4095_NT][EG4095_W] = '{
    '{0, 63, 365, 1107, 1214, 1296, 1914, 2014, 2274, 2282, 2599, 2786, 2948, 3804, 4049, 4094},
    '{0, 126, 453, 469, 730, 1103, 1477, 1801, 2214, 2428, 2592, 3513, 3828, 4003, 4028, 4093},
    '{0, 285, 665, 908, 1231, 1316, 1387, 1634, 2006, 2163, 3056, 3063, 3090, 3103, 3204, 4092},
    '{0, 252, 333, 761, 906, 938, 1089, 1460, 2206, 2931, 2954, 3561, 3602, 3911, 3961, 4091},
    '{0, 124, 506, 719, 1352, 1534, 1833, 1930, 2285, 2336, 2572, 2683, 2719, 3446, 3861, 4090},
    '{0, 231, 570, 1330, 1816, 2017, 2031, 2085, 2111, 2313, 2462, 2632, 2774, 3268, 4012, 4089},
    '{0, 344, 375, 682, 928, 987, 1826, 1939, 2333, 2518, 2775, 2874, 3253, 3414, 3595, 4086},
    '{0, 248, 475, 577, 1012, 1049, 1271, 1343, 1438, 2704, 2797, 3068, 3627, 3666, 3860, 4085},
    '{0, 19, 195, 446, 499, 1004, 1216, 1625, 2354, 2831, 3236, 3271, 3315, 3391, 3974, 4084},
    '{0, 75, 127, 462, 531, 829, 1140, 1169, 1453, 2441, 2660, 3632, 3929, 4034, 4062, 4083},
    '{0, 88, 240, 803, 1406, 1626, 1648, 1686, 2038, 2261, 2540, 2646, 3215, 3656, 4025, 4080},
    '{0, 57, 501, 645, 835, 1118, 1196, 1584, 2034, 2054, 2550, 3004, 3208, 3367, 3553, 4078},
    '{0, 571, 688, 750, 941, 1364, 1455, 1653, 1856, 1974, 2411, 2733, 3095, 3652, 3878, 4077},
    '{0, 150, 254, 787, 924, 1062, 1225, 1658, 2280, 2338, 2906, 3169, 3763, 3973, 4029, 4071},
    '{0, 73, 1066, 1209, 1340, 1616, 1735, 1942, 2808, 2923, 3343, 3455, 3539, 3587, 3887, 4052},
    '{0, 146, 1521, 1751, 2132, 2418, 2591, 2680, 2815, 2983, 3079, 3232, 3470, 3679, 3884, 4009},
    '{0, 449, 795, 973, 1243, 1579, 1771, 2077, 2553, 2750, 2971, 3210, 3381, 3631, 3803, 3972}};

  localparam int unsigned EG63_COLS [EG63_NT][EG63_W] = '{
    '{0, 45, 55, 62}, '{0, 27, 47, 61}, '{0, 12, 38, 60}, '{0, 31, 54, 59}, '{0, 13, 24, 57}};

  function automatic int code_nt(code_e c);
    return (c == EG_4095) ? EG4095_NT : EG63_NT;
  endfunction
  function automatic int code_z(code_e c);
    return (c == EG_4095) ? EG4095_Z : EG63_Z;
  endfunction
  function automatic int code_w(code_e c);
    return (c == EG_4095) ? EG4095_W : EG63_W;
  endfunction
  // Column offset of the l-th one in row 0 of circulant t.
  function automatic int code_col(code_e c, int t, int l);
    return (c == EG_4095) ? int'(EG4095_COLS[t][l]) : int'(EG63_COLS[t][l]);
  endfunction

  // Parallel schedule.  With LP lanes and SEG = (Z+1)/LP, lane j processes row
  // (T + SEG*j) mod Z in the cycle whose shift count is T.  The APP shift
  // register rotates one place per cycle, so position x holds column
  // (x + T) mod Z and lane j, edge l always reads position (SEG*j + col) mod Z.
  function automatic int read_pos(code_e c, int lp, int t, int j, int l);
    int z, seg;
    z = code_z(c);
    seg = (z + 1) / lp;
    return (seg * j + code_col(c, t, l)) % z;
  endfunction

  // Column loaded by lane j in load cycle tau (0..SEG-1); -1 means "no column"
  // (the last segment is one register shorter).
  function automatic int load_col(code_e c, int lp, int j, int tau);
    int z, seg;
    z = code_z(c);
    seg = (z + 1) / lp;
    if (j < lp - 1) return seg * j + tau;
    return (tau == 0) ? -1 : seg * j + tau - 1;
  endfunction

  // Sign-magnitude helpers.
  function automatic logic signed [MAGW+1:0] app_to_int(app_t a);
    return a[Q-1] ? -$signed({2'b00, a[MAGW-1:0]}) : $signed({2'b00, a[MAGW-1:0]});
  endfunction
  function automatic logic signed [CMAGW+1:0] ctv_to_int(ctv_t a);
    return a[QC-1] ? -$signed({2'b00, a[CMAGW-1:0]}) : $signed({2'b00, a[CMAGW-1:0]});
  endfunction

  // Two smallest magnitudes of a set and the index of the smallest.
  localparam int IDXW = 9;                 // ceil(log2(272)): index of an edge in a row
  typedef struct packed {
    cmag_t            m1;
    cmag_t            m2;
    logic [IDXW-1:0]  idx;
  } minpair_t;

  // Compressed CTV record of one check node (the part shared by all tiles):
  // index of the smallest magnitude, the smallest magnitude, and the 2-bit
  // saturated distance to the second smallest.
  typedef struct packed {
    logic [IDXW-1:0]  idx;
    cmag_t            m1;
    logic [QD-1:0]    dmin;
  } ctvrec_t;

  // Merge two (min1, min2, idx) pairs into the pair of the union.  On a tie
  // the left operand keeps the minimum.
  function automatic minpair_t min_merge(minpair_t a, minpair_t b);
    minpair_t r;
    if (a.m1 <= b.m1) begin
      r.m1 = a.m1; r.idx = a.idx;
      r.m2 = (a.m2 <= b.m1) ? a.m2 : b.m1;
    end else begin
      r.m1 = b.m1; r.idx = b.idx;
      r.m2 = (b.m2 <= a.m1) ? b.m2 : a.m1;
    end
    return r;
  endfunction

  // Quantise the distance between the two smallest magnitudes to QD bits.
  function automatic logic [QD-1:0] quant_dmin(cmag_t m1, cmag_t m2);
    cmag_t d;
    d = m2 - m1;
    return (d > cmag_t'((1 << QD) - 1)) ? QD'((1 << QD) - 1) : d[QD-1:0];
  endfunction

endpackage
