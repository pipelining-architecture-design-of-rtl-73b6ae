// tnq_fq8: forward 8x8 transform and quantisation, the High Profile
// encoder half of TNQ's 8x8 path (combinational).
//
// The forward transform is the exact product W64 = M X M^T with the integer
// 8x8 matrix M whose rows are
//   8  8  8  8  8  8  8  8 | 12 10  6  3 -3 -6 -10 -12 | 8 4 -4 -8 -8 -4 4 8
//   10 -3 -12 -6 6 12 3 -10 | 8 -8 -8 8 8 -8 -8 8 | 6 -12 3 10 -10 -3 12 -6
//   4 -8 8 -4 -4 8 -8 4 | 3 -6 10 -12 12 -10 6 -3
// (M/8 is the transform whose transpose the decoder's 8x8 inverse applies).
// Quantisation folds the /64 into the shift:
//   Z = sign(W64) (|W64| MF8 + 64 f) >> (22 + QP/6), f = 2^(16+QP/6)/3 (intra)
//   or /6 (inter), MF8 by QP%6 and one of six position classes.
// MF8 satisfies MF8 x V8 ~ 2^24 / (n_i n_j), n the squared row norms of M/8,
// so that the 8x8 inverse rebuilds the input at QP 0.
//
// Interface: 64 residual samples (raster order, 9-bit signed), QP and the
// intra flag in; 64 levels out, combinationally. tnq registers them.
//
// That TNQ does the DCT and Q of a High Profile codec follows the published
// design; the transform is the H.264 standard's; computing it as an exact
// matrix product and the MF8 table (the standard leaves the forward
// quantiser to the encoder; these are the values commonly used) are this
// design's choices.
module tnq_fq8 (
  input  logic               intra,
  input  logic [5:0]         qp,
  input  logic signed [8:0]  res_in [64],
  output logic signed [15:0] lvl_out [64]
);

  function automatic int unsigned pos_class8(int unsigned n);
    int unsigned i, j;
    i = n / 8;
    j = n % 8;
    if (i % 4 == 0 && j % 4 == 0) return 0;
    if (i % 2 == 1 && j % 2 == 1) return 1;
    if (i % 4 == 2 && j % 4 == 2) return 2;
    if ((i % 4 == 0 && j % 2 == 1) || (i % 2 == 1 && j % 4 == 0)) return 3;
    if ((i % 4 == 0 && j % 4 == 2) || (i % 4 == 2 && j % 4 == 0)) return 4;
    return 5;
  endfunction

  function automatic logic [14:0] mf8(logic [2:0] m, int unsigned pc);
    logic [14:0] t [6][6];
    t = '{'{15'd13107, 15'd11428, 15'd20972, 15'd12222, 15'd16777, 15'd15481},
          '{15'd11916, 15'd10826, 15'd19174, 15'd11058, 15'd14980, 15'd14290},
          '{15'd10082, 15'd8943,  15'd15978, 15'd9675,  15'd12710, 15'd11985},
          '{15'd9362,  15'd8228,  15'd14913, 15'd8931,  15'd11984, 15'd11259},
          '{15'd8192,  15'd7346,  15'd13159, 15'd7740,  15'd10486, 15'd9777},
          '{15'd7282,  15'd6428,  15'd11570, 15'd6830,  15'd9118,  15'd8640}};
    return t[m][pc];
  endfunction

  function automatic logic signed [4:0] mcoef(int unsigned r, int unsigned c);
    logic signed [4:0] t [8][8];
    t = '{'{5'sd8,  5'sd8,   5'sd8,   5'sd8,   5'sd8,   5'sd8,   5'sd8,   5'sd8},
          '{5'sd12, 5'sd10,  5'sd6,   5'sd3,  -5'sd3,  -5'sd6,  -5'sd10, -5'sd12},
          '{5'sd8,  5'sd4,  -5'sd4,  -5'sd8,  -5'sd8,  -5'sd4,   5'sd4,   5'sd8},
          '{5'sd10, -5'sd3, -5'sd12, -5'sd6,   5'sd6,   5'sd12,  5'sd3,  -5'sd10},
          '{5'sd8,  -5'sd8, -5'sd8,   5'sd8,   5'sd8,  -5'sd8,  -5'sd8,   5'sd8},
          '{5'sd6,  -5'sd12, 5'sd3,   5'sd10, -5'sd10, -5'sd3,   5'sd12, -5'sd6},
          '{5'sd4,  -5'sd8,  5'sd8,  -5'sd4,  -5'sd4,   5'sd8,  -5'sd8,   5'sd4},
          '{5'sd3,  -5'sd6,  5'sd10, -5'sd12,  5'sd12, -5'sd10,  5'sd6,  -5'sd3}};
    return t[r][c];
  endfunction

  always_comb begin
    logic signed [31:0] t [64];
    logic signed [31:0] w;
    logic [2:0]         qm;
    logic [3:0]         qe;
    logic [5:0]         sh;
    logic [63:0]        mag, fq;
    qm = 3'(qp % 6);
    qe = 4'(qp / 6);
    sh = 6'd22 + 6'(qe);
    fq = intra ? ((64'd1 << (6'd16 + 6'(qe))) / 64'd3) << 6 : ((64'd1 << (6'd16 + 6'(qe))) / 64'd6) << 6;
    // rows: T = X M^T
    for (int r = 0; r < 8; r++)
      for (int k = 0; k < 8; k++) begin
        t[8*r+k] = '0;
        for (int c = 0; c < 8; c++) t[8*r+k] += 32'(res_in[8*r+c]) * 32'(mcoef(k, c));
      end
    // columns: W64 = M T, then quantisation
    for (int i = 0; i < 8; i++)
      for (int k = 0; k < 8; k++) begin
        w = '0;
        for (int r = 0; r < 8; r++) w += 32'(mcoef(i, r)) * t[8*r+k];
        mag = 64'(w < 0 ? 32'(-w) : w) * 64'(mf8(qm, pos_class8(8*i+k)));
        mag = (mag + fq) >> sh;
        lvl_out[8*i+k] = w < 0 ? -16'(mag) : 16'(mag);
      end
  end

endmodule
