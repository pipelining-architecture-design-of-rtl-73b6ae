// tnq_idct8: 8x8 dequantisation and inverse transform, the High Profile
// decoder path of TNQ.
//
// Takes an 8x8 block of coefficient levels and rebuilds the residual:
//   dequant  W' = (Z V8 << (QP/6) + 2) >> 2, with V8 = 16 x the 8x8 norm
//            table by QP%6 and one of six position classes (flat scaling
//            matrix, so the x16 and the >>6 of the standard fold into >>2)
//   inverse  the standard's 8-point butterfly (even part with >>1, odd part
//            with >>1 and >>2) on rows, then on columns, then (x + 32) >> 6,
//            clipped to 10 bits signed.
//
// Interface: in_valid with 64 levels in raster order and QP (0..51);
// rec_valid and the 64 residual samples follow one cycle later. One block
// per cycle.
//
// That TNQ includes the inverse transform and inverse quantisation of a
// High Profile codec follows the published design; the arithmetic is the
// H.264 standard's; the single registered stage and the port format are
// this design's choices. The encoder's forward half is tnq_fq8.
module tnq_idct8 (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [5:0]         qp,
  input  logic signed [15:0] lvl_in [64],
  output logic               rec_valid,
  output logic signed [9:0]  rec_out [64]
);

  // Position class of coefficient (i, j) in the 8x8 norm table.
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

  function automatic logic [5:0] v8(logic [2:0] m, int unsigned pc);
    logic [5:0] t [6][6];
    t = '{'{6'd20, 6'd18, 6'd32, 6'd19, 6'd25, 6'd24},
          '{6'd22, 6'd19, 6'd35, 6'd21, 6'd28, 6'd26},
          '{6'd26, 6'd23, 6'd42, 6'd24, 6'd33, 6'd31},
          '{6'd28, 6'd25, 6'd45, 6'd26, 6'd35, 6'd33},
          '{6'd32, 6'd28, 6'd51, 6'd30, 6'd40, 6'd38},
          '{6'd36, 6'd32, 6'd58, 6'd34, 6'd46, 6'd43}};
    return t[m][pc];
  endfunction

  typedef logic signed [31:0] vec8_t [8];

  // One 8-point inverse transform.
  function automatic vec8_t inv8(vec8_t d);
    logic signed [31:0] a0, a1, a2, a3, a4, a5, a6, a7;
    logic signed [31:0] b0, b1, b2, b3, b4, b5, b6, b7;
    vec8_t o;
    a0 = d[0] + d[4];
    a4 = d[0] - d[4];
    a2 = (d[2] >>> 1) - d[6];
    a6 = d[2] + (d[6] >>> 1);
    b0 = a0 + a6;
    b2 = a4 + a2;
    b4 = a4 - a2;
    b6 = a0 - a6;
    a1 = -d[3] + d[5] - d[7] - (d[7] >>> 1);
    a3 = d[1] + d[7] - d[3] - (d[3] >>> 1);
    a5 = -d[1] + d[7] + d[5] + (d[5] >>> 1);
    a7 = d[3] + d[5] + d[1] + (d[1] >>> 1);
    b1 = a1 + (a7 >>> 2);
    b7 = a7 - (a1 >>> 2);
    b3 = a3 + (a5 >>> 2);
    b5 = (a3 >>> 2) - a5;
    o[0] = b0 + b7;
    o[1] = b2 + b5;
    o[2] = b4 + b3;
    o[3] = b6 + b1;
    o[4] = b6 - b1;
    o[5] = b4 - b3;
    o[6] = b2 - b5;
    o[7] = b0 - b7;
    return o;
  endfunction

  logic signed [9:0] rr [64];

  always_comb begin
    logic signed [31:0] d [64];
    logic signed [31:0] t [64];
    logic signed [31:0] x;
    logic [2:0]         qm;
    logic [3:0]         qe;
    vec8_t              v, o;
    qm = 3'(qp % 6);
    qe = 4'(qp / 6);
    for (int n = 0; n < 64; n++)
      d[n] = (((32'(lvl_in[n]) * $signed(32'(v8(qm, pos_class8(n))))) <<< qe) + 32'sd2) >>> 2;
    // rows
    for (int r = 0; r < 8; r++) begin
      for (int k = 0; k < 8; k++) v[k] = d[8*r+k];
      o = inv8(v);
      for (int k = 0; k < 8; k++) t[8*r+k] = o[k];
    end
    // columns, rounding, clipping to the residual range
    for (int c = 0; c < 8; c++) begin
      for (int k = 0; k < 8; k++) v[k] = t[8*k+c];
      o = inv8(v);
      for (int k = 0; k < 8; k++) begin
        x = (o[k] + 32'sd32) >>> 6;
        rr[8*k+c] = (x > 32'sd511) ? 10'sd511 : (x < -32'sd512) ? -10'sd512 : 10'(x);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec_valid <= 1'b0;
      for (int n = 0; n < 64; n++) rec_out[n] <= '0;
    end else begin
      rec_valid <= in_valid;
      if (in_valid)
        for (int n = 0; n < 64; n++) rec_out[n] <= rr[n];
    end
  end

  a_qp8: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> (qp <= 6'd51));

endmodule
