// tnq: transform and quantisation (TNQ): 4x4, 8x8 and DC transforms.
//
// TNQ turns a 4x4 block of prediction residual into quantised coefficient
// levels for the entropy coder and, at the same time, into the residual the
// decoder will see, which RECON adds back to the prediction. It computes the
// H.264 integer path:
//   forward  W = Cf X Cf^T with Cf = [1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1]
//   quant    Z = sign(W) (|W| MF + f) >> (15 + QP/6), f = 2^qbits/3 (intra)
//            or 2^qbits/6 (inter); MF by QP%6 and coefficient position
//   dequant  W' = Z V << (QP/6), V by QP%6 and position
//   inverse  the standard butterfly (with >>1 on the odd inputs) on rows
//            then columns, then (x + 32) >> 6.
// The decoder uses only the dequant and inverse half: with dec_mode set the
// input levels (lvl_in) bypass the forward half. High Profile 8x8 blocks use
// a port of their own (blk8_valid, res8_in / lvl8_in): the tnq_fq8 helper
// transforms and quantises them, the levels are registered here (or taken
// from lvl8_in in decode mode), and the tnq_idct8 helper rebuilds the
// residual. The DC transforms (Intra16x16 luma DC, chroma DC) are done by the tnq_dc
// helper on the dc_* port, sharing dec_mode, intra and qp with the 4x4 port.
//
// Interface: in_valid with 16 residual samples (raster order, 9-bit signed)
// or, in decode mode, 16 levels; QP (0..51) and the intra flag. Two
// registered stages: levels come out one cycle after the input, the
// reconstructed residual two cycles after it, clipped to 10 bits signed.
// One block per cycle. An 8x8 block on blk8_valid (sharing dec_mode, intra
// and qp) gives its levels on lvl8_valid one cycle later and its residual on
// rec8_valid two cycles later. A DC set on dc_in_valid gives levels one
// cycle later and DC values two cycles later.
//
// That TNQ does the transform, inverse transform, quantisation and inverse
// quantisation and is shared by the encoder and decoder paths follows the
// published design; the arithmetic is the H.264 standard's; the two-stage
// pipeline and the port format are this design's choices.
module tnq (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               dec_mode,
  input  logic               intra,
  input  logic [5:0]         qp,
  input  logic signed [8:0]  res_in [16],
  input  logic signed [15:0] lvl_in [16],
  output logic               lvl_valid,
  output logic signed [15:0] lvl_out [16],
  output logic               rec_valid,
  output logic signed [9:0]  rec_out [16],
  // 8x8 path
  input  logic               blk8_valid,
  input  logic signed [8:0]  res8_in [64],
  input  logic signed [15:0] lvl8_in [64],
  output logic               lvl8_valid,
  output logic signed [15:0] lvl8_out [64],
  output logic               rec8_valid,
  output logic signed [9:0]  rec8_out [64],
  // DC transforms
  input  logic               dc_in_valid,
  input  logic               dc_chroma,
  input  logic signed [15:0] dc_coef_in [16],
  input  logic signed [15:0] dc_lvl_in [16],
  output logic               dc_lvl_valid,
  output logic signed [15:0] dc_lvl_out [16],
  output logic               dc_valid,
  output logic signed [15:0] dc_out [16]
);

  // Position class: 0 for (even, even), 1 for (odd, odd), 2 otherwise.
  function automatic int unsigned pos_class(int unsigned i);
    int unsigned r, c;
    r = i / 4;
    c = i % 4;
    if (r % 2 == 0 && c % 2 == 0) return 0;
    if (r % 2 == 1 && c % 2 == 1) return 1;
    return 2;
  endfunction

  function automatic logic [13:0] mf(logic [2:0] m, int unsigned pc);
    logic [13:0] t [3][6];
    t = '{'{14'd13107, 14'd11916, 14'd10082, 14'd9362, 14'd8192, 14'd7282},
          '{14'd5243,  14'd4660,  14'd4194,  14'd3647, 14'd3355, 14'd2893},
          '{14'd8066,  14'd7490,  14'd6554,  14'd5825, 14'd5243, 14'd4559}};
    return t[pc][m];
  endfunction

  function automatic logic [4:0] vscale(logic [2:0] m, int unsigned pc);
    logic [4:0] t [3][6];
    t = '{'{5'd10, 5'd11, 5'd13, 5'd14, 5'd16, 5'd18},
          '{5'd16, 5'd18, 5'd20, 5'd23, 5'd25, 5'd29},
          '{5'd13, 5'd14, 5'd16, 5'd18, 5'd20, 5'd23}};
    return t[pc][m];
  endfunction

  // ------------------------------------------------------------ stage 1
  logic signed [15:0] w [16];
  logic signed [15:0] z [16];
  logic [2:0]         qm;
  logic [3:0]         qe;

  always_comb begin
    logic signed [15:0] t [16];
    logic signed [15:0] a, b, c, d;
    logic [4:0]         qbits;
    logic [35:0]        mag, fq;
    qm = 3'(qp % 6);
    qe = 4'(qp / 6);
    // rows
    for (int r = 0; r < 4; r++) begin
      a = 16'(res_in[4*r+0]) + 16'(res_in[4*r+3]);
      b = 16'(res_in[4*r+1]) + 16'(res_in[4*r+2]);
      c = 16'(res_in[4*r+1]) - 16'(res_in[4*r+2]);
      d = 16'(res_in[4*r+0]) - 16'(res_in[4*r+3]);
      t[4*r+0] = a + b;
      t[4*r+2] = a - b;
      t[4*r+1] = (d <<< 1) + c;
      t[4*r+3] = d - (c <<< 1);
    end
    // columns
    for (int k = 0; k < 4; k++) begin
      a = t[k] + t[12+k];
      b = t[4+k] + t[8+k];
      c = t[4+k] - t[8+k];
      d = t[k] - t[12+k];
      w[k]    = a + b;
      w[8+k]  = a - b;
      w[4+k]  = (d <<< 1) + c;
      w[12+k] = d - (c <<< 1);
    end
    // quantisation
    qbits = 5'd15 + 5'(qe);
    fq    = intra ? (36'd1 << qbits) / 36'd3 : (36'd1 << qbits) / 36'd6;
    for (int i = 0; i < 16; i++) begin
      mag  = 36'(w[i] < 0 ? 16'(-w[i]) : w[i]) * 36'(mf(qm, pos_class(i)));
      mag  = (mag + fq) >> qbits;
      z[i] = w[i] < 0 ? -16'(mag) : 16'(mag);
    end
  end

  logic               v1;
  logic signed [15:0] lv [16];
  logic [2:0]         qm1;
  logic [3:0]         qe1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1  <= 1'b0;
      qm1 <= '0;
      qe1 <= '0;
      for (int i = 0; i < 16; i++) lv[i] <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        qm1 <= qm;
        qe1 <= qe;
        for (int i = 0; i < 16; i++) lv[i] <= dec_mode ? lvl_in[i] : z[i];
      end
    end
  end

  assign lvl_valid = v1;
  assign lvl_out   = lv;

  // ------------------------------------------------------------ stage 2
  logic signed [9:0] rr [16];

  always_comb begin
    logic signed [31:0] d [16];
    logic signed [31:0] t [16];
    logic signed [31:0] e, f, g, h, x;
    for (int i = 0; i < 16; i++)
      d[i] = (32'(lv[i]) * 32'(vscale(qm1, pos_class(i)))) <<< qe1;
    // rows
    for (int r = 0; r < 4; r++) begin
      e = d[4*r+0] + d[4*r+2];
      f = d[4*r+0] - d[4*r+2];
      g = (d[4*r+1] >>> 1) - d[4*r+3];
      h = d[4*r+1] + (d[4*r+3] >>> 1);
      t[4*r+0] = e + h;
      t[4*r+1] = f + g;
      t[4*r+2] = f - g;
      t[4*r+3] = e - h;
    end
    // columns, rounding, clipping to the residual range
    for (int k = 0; k < 4; k++) begin
      e = t[k] + t[8+k];
      f = t[k] - t[8+k];
      g = (t[4+k] >>> 1) - t[12+k];
      h = t[4+k] + (t[12+k] >>> 1);
      for (int j = 0; j < 4; j++) begin
        x = (j == 0) ? e + h : (j == 1) ? f + g : (j == 2) ? f - g : e - h;
        x = (x + 32'sd32) >>> 6;
        rr[4*j+k] = (x > 32'sd511) ? 10'sd511 : (x < -32'sd512) ? -10'sd512 : 10'(x);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec_valid <= 1'b0;
      for (int i = 0; i < 16; i++) rec_out[i] <= '0;
    end else begin
      rec_valid <= v1;
      if (v1)
        for (int i = 0; i < 16; i++) rec_out[i] <= rr[i];
    end
  end

  // ------------------------------------------------------------ 8x8 path
  logic signed [15:0] z8 [64];
  logic signed [15:0] lv8 [64];
  logic               v8;
  logic [5:0]         qp8;

  tnq_fq8 u_fq8 (.intra, .qp, .res_in(res8_in), .lvl_out(z8));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v8  <= 1'b0;
      qp8 <= '0;
      for (int i = 0; i < 64; i++) lv8[i] <= '0;
    end else begin
      v8 <= blk8_valid;
      if (blk8_valid) begin
        qp8 <= qp;
        for (int i = 0; i < 64; i++) lv8[i] <= dec_mode ? lvl8_in[i] : z8[i];
      end
    end
  end

  assign lvl8_valid = v8;
  assign lvl8_out   = lv8;

  tnq_idct8 u_idct8 (
    .clk, .rst_n, .in_valid(v8), .qp(qp8), .lvl_in(lv8),
    .rec_valid(rec8_valid), .rec_out(rec8_out)
  );

  tnq_dc u_dc (
    .clk, .rst_n, .in_valid(dc_in_valid), .dec_mode, .chroma(dc_chroma), .intra, .qp,
    .coef_in(dc_coef_in), .lvl_in(dc_lvl_in), .lvl_valid(dc_lvl_valid), .lvl_out(dc_lvl_out),
    .dc_valid, .dc_out
  );

  a_qp: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> (qp <= 6'd51));

endmodule
