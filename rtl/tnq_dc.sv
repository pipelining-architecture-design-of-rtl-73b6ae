// tnq_dc: DC transforms of TNQ (Intra16x16 luma DC and chroma DC).
//
// In an Intra16x16 macroblock the sixteen DC coefficients of the 4x4 luma
// blocks, and in every macroblock the four DC coefficients of each chroma
// component's 4x4 blocks, go through a second transform before
// quantisation. This unit does that transform, its quantisation, the
// inverse transform and the dequantisation, returning the DC values that
// replace the dequantised DC of each 4x4 block before its inverse
// transform:
//   luma    Y = (H W H) >> 1, H = [1 1 1 1; 1 1 -1 -1; 1 -1 -1 1; 1 -1 1 -1]
//           Z = sign(Y) (|Y| MF0 + 2f) >> (16 + QP/6)
//           F = H Z H,   dc = (F V0 << (QP/6) + 2) >> 2
//   chroma  Y = H2 W H2, H2 = [1 1; 1 -1], same quantisation
//           F = H2 Z H2, dc = (F V0 << (QP/6)) >> 1
// with MF0 and V0 the (0,0) entries of the 4x4 tables for QP%6, f the
// intra (1/3) or inter (1/6) offset, and a flat scaling matrix. With
// dec_mode set the levels come in on lvl_in.
//
// Interface: in_valid with 16 DC coefficients in raster order of the 4x4
// block grid (chroma: the first four, raster order of the 2x2 grid), the
// chroma flag, the intra flag and QP (0..51; for chroma the caller passes
// the chroma QP). Levels come out one cycle later, the DC values two
// cycles later, saturated to 16 bits; one set per cycle. Unused chroma
// outputs are zero.
//
// That TNQ's DCT/IDCT/Q/IQ covers these DC transforms follows from the
// published design being an H.264 High Profile codec; the arithmetic is the
// standard's; the two registered stages and the port format are this
// design's choices.
module tnq_dc (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               dec_mode,
  input  logic               chroma,
  input  logic               intra,
  input  logic [5:0]         qp,
  input  logic signed [15:0] coef_in [16],
  input  logic signed [15:0] lvl_in [16],
  output logic               lvl_valid,
  output logic signed [15:0] lvl_out [16],
  output logic               dc_valid,
  output logic signed [15:0] dc_out [16]
);

  function automatic logic [13:0] mf0(logic [2:0] m);
    logic [13:0] t [6];
    t = '{14'd13107, 14'd11916, 14'd10082, 14'd9362, 14'd8192, 14'd7282};
    return t[m];
  endfunction

  function automatic logic [4:0] v0(logic [2:0] m);
    logic [4:0] t [6];
    t = '{5'd10, 5'd11, 5'd13, 5'd14, 5'd16, 5'd18};
    return t[m];
  endfunction

  typedef logic signed [31:0] blk_t [16];

  // 4x4 Hadamard H X H (rows then columns).
  function automatic blk_t had4(blk_t x);
    blk_t t, o;
    for (int r = 0; r < 4; r++) begin
      t[4*r+0] = x[4*r+0] + x[4*r+1] + x[4*r+2] + x[4*r+3];
      t[4*r+1] = x[4*r+0] + x[4*r+1] - x[4*r+2] - x[4*r+3];
      t[4*r+2] = x[4*r+0] - x[4*r+1] - x[4*r+2] + x[4*r+3];
      t[4*r+3] = x[4*r+0] - x[4*r+1] + x[4*r+2] - x[4*r+3];
    end
    for (int c = 0; c < 4; c++) begin
      o[c]    = t[c] + t[4+c] + t[8+c] + t[12+c];
      o[4+c]  = t[c] + t[4+c] - t[8+c] - t[12+c];
      o[8+c]  = t[c] - t[4+c] - t[8+c] + t[12+c];
      o[12+c] = t[c] - t[4+c] + t[8+c] - t[12+c];
    end
    return o;
  endfunction

  // 2x2 Hadamard on entries 0..3; the rest are zero.
  function automatic blk_t had2(blk_t x);
    blk_t o;
    for (int i = 0; i < 16; i++) o[i] = '0;
    o[0] = x[0] + x[1] + x[2] + x[3];
    o[1] = x[0] - x[1] + x[2] - x[3];
    o[2] = x[0] + x[1] - x[2] - x[3];
    o[3] = x[0] - x[1] - x[2] + x[3];
    return o;
  endfunction

  function automatic logic signed [15:0] sat16(logic signed [31:0] x);
    return (x > 32'sd32767) ? 16'sh7fff : (x < -32'sd32768) ? 16'sh8000 : 16'(x);
  endfunction

  // ------------------------------------------------------------ stage 1
  logic signed [15:0] z [16];
  logic [2:0]         qm;
  logic [3:0]         qe;

  always_comb begin
    blk_t       w, y;
    logic [4:0] qbits;
    logic [47:0] mag, fq;
    qm = 3'(qp % 6);
    qe = 4'(qp / 6);
    for (int i = 0; i < 16; i++) w[i] = 32'(coef_in[i]);
    y = chroma ? had2(w) : had4(w);
    if (!chroma)
      for (int i = 0; i < 16; i++) y[i] = y[i] >>> 1;
    qbits = 5'd15 + 5'(qe);
    fq    = intra ? (48'd1 << qbits) / 48'd3 : (48'd1 << qbits) / 48'd6;
    for (int i = 0; i < 16; i++) begin
      mag  = 48'(y[i] < 0 ? 32'(-y[i]) : y[i]) * 48'(mf0(qm));
      mag  = (mag + (fq << 1)) >> (qbits + 5'd1);
      z[i] = (chroma && i > 3) ? 16'sd0 : sat16(y[i] < 0 ? -32'(mag) : 32'(mag));
    end
  end

  logic               v1, ch1;
  logic signed [15:0] lv [16];
  logic [2:0]         qm1;
  logic [3:0]         qe1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1  <= 1'b0;
      ch1 <= 1'b0;
      qm1 <= '0;
      qe1 <= '0;
      for (int i = 0; i < 16; i++) lv[i] <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        ch1 <= chroma;
        qm1 <= qm;
        qe1 <= qe;
        for (int i = 0; i < 16; i++)
          lv[i] <= dec_mode ? ((chroma && i > 3) ? 16'sd0 : lvl_in[i]) : z[i];
      end
    end
  end

  assign lvl_valid = v1;
  assign lvl_out   = lv;

  // ------------------------------------------------------------ stage 2
  logic signed [15:0] dq [16];

  always_comb begin
    blk_t z2, f;
    logic signed [31:0] s;
    for (int i = 0; i < 16; i++) z2[i] = 32'(lv[i]);
    f = ch1 ? had2(z2) : had4(z2);
    for (int i = 0; i < 16; i++) begin
      s = (f[i] * $signed(32'(v0(qm1)))) <<< qe1;
      dq[i] = (ch1 && i > 3) ? 16'sd0 : sat16(ch1 ? (s >>> 1) : ((s + 32'sd2) >>> 2));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dc_valid <= 1'b0;
      for (int i = 0; i < 16; i++) dc_out[i] <= '0;
    end else begin
      dc_valid <= v1;
      if (v1)
        for (int i = 0; i < 16; i++) dc_out[i] <= dq[i];
    end
  end

  a_qp_dc: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> (qp <= 6'd51));

endmodule
