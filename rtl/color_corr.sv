// color_corr: colour correction (CC) of the encoder, in the fourth stage.
//
// Motion estimation searches on luma only, so it can pick a reference block
// whose luma matches the current macroblock while its colour does not. CC
// detects that case after ME and compensates by lowering the macroblock QP,
// so that more of the chroma residual survives quantisation. It has the
// three steps of the published flow:
//  1. colour space conversion of the original and the predicted macroblock
//     from YCbCr to RGB (integer BT.601 weights scaled by 256: 359, 88, 183,
//     454), per 4:2:0 sample group: the mean of a 2x2 luma block with its Cb
//     and Cr sample;
//  2. colour difference measure: per group |dR|+|dG|+|dB| - 3|dY|, floored at
//     0. A pure luma difference moves R, G and B equally and cancels, so what
//     remains is the colour error the luma search could not see. The 64
//     groups of a macroblock are summed into color_dist;
//  3. adjustment: if color_dist >= THRESH the QP is lowered by
//     dqp = min(MAX_DQP, 1 + ((color_dist - THRESH) >> STEP_SHIFT)), floored at 0.
//
// Interface: start (one cycle) clears the accumulator and latches mbqp_in;
// then 64 groups arrive with in_valid, each with four original and four
// predicted luma samples and their Cb/Cr. done pulses in the fourth cycle
// after the one carrying the 64th group, with color_dist, dqp and mbqp_out
// valid from then until the next result. Throughput: one group per cycle,
// about 70 cycles per macroblock including start and latency.
//
// The three steps and their order come from the published flow diagram, and
// "by properly modifying MBQP" from its description; the colour space, the
// distance formula, the threshold and the QP step are this design's choices,
// as the document does not give them.
module color_corr #(
  parameter int unsigned THRESH     = 1024,
  parameter int unsigned STEP_SHIFT = 9,
  parameter int unsigned MAX_DQP    = 6,
  parameter int unsigned GROUPS     = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [5:0]  mbqp_in,
  input  logic        in_valid,
  input  logic [7:0]  org_y [4],
  input  logic [7:0]  org_cb,
  input  logic [7:0]  org_cr,
  input  logic [7:0]  prd_y [4],
  input  logic [7:0]  prd_cb,
  input  logic [7:0]  prd_cr,
  output logic        done,
  output logic [19:0] color_dist,
  output logic [2:0]  dqp,
  output logic [5:0]  mbqp_out,
  output logic        corrected
);

  typedef struct packed {
    logic signed [17:0] r;
    logic signed [17:0] g;
    logic signed [17:0] b;
  } rgb_t;  // scaled by 256

  function automatic rgb_t to_rgb(logic [9:0] ysum, logic [7:0] cb, logic [7:0] cr);
    logic signed [17:0] y, u, v;
    rgb_t o;
    y   = 18'(ysum) << 6;                 // mean of four samples, times 256
    u   = 18'(cb) - 18'sd128;
    v   = 18'(cr) - 18'sd128;
    o.r = y + 18'sd359 * v;
    o.g = y - 18'sd88 * u - 18'sd183 * v;
    o.b = y + 18'sd454 * u;
    return o;
  endfunction

  function automatic logic [19:0] absd(logic signed [17:0] a, logic signed [17:0] b);
    logic signed [19:0] d;
    d = signed'({{2{a[17]}}, a}) - signed'({{2{b[17]}}, b});
    return d[19] ? 20'(-d) : 20'(d);
  endfunction

  // Step 1: colour space conversion (registered).
  rgb_t       o_rgb, p_rgb;
  logic [9:0] o_ys, p_ys;
  logic       v1, v2;
  logic [9:0] o_sum, p_sum;
  always_comb begin
    o_sum = 10'(org_y[0]) + 10'(org_y[1]) + 10'(org_y[2]) + 10'(org_y[3]);
    p_sum = 10'(prd_y[0]) + 10'(prd_y[1]) + 10'(prd_y[2]) + 10'(prd_y[3]);
  end

  // Step 2: per-group colour difference (registered), then accumulation.
  logic [17:0] d_grp;
  logic [19:0] acc;
  logic [7:0]  n_acc;
  logic        fin;
  logic [5:0]  qp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_rgb <= '0; p_rgb <= '0; o_ys <= '0; p_ys <= '0;
      v1 <= 1'b0; v2 <= 1'b0; d_grp <= '0;
      acc <= '0; n_acc <= '0; fin <= 1'b0; qp <= '0;
      done <= 1'b0; color_dist <= '0; dqp <= '0; mbqp_out <= '0; corrected <= 1'b0;
    end else begin
      done <= 1'b0;
      fin  <= 1'b0;
      // stage 1
      v1 <= in_valid;
      if (in_valid) begin
        o_rgb <= to_rgb(o_sum, org_cb, org_cr);
        p_rgb <= to_rgb(p_sum, prd_cb, prd_cr);
        o_ys  <= o_sum;
        p_ys  <= p_sum;
      end
      // stage 2
      v2 <= v1;
      if (v1) begin
        logic [19:0] drgb, dy3;
        drgb = absd(o_rgb.r, p_rgb.r) + absd(o_rgb.g, p_rgb.g) + absd(o_rgb.b, p_rgb.b);
        dy3  = absd(signed'({2'b00, o_ys, 6'd0}), signed'({2'b00, p_ys, 6'd0})) * 20'd3;
        // back to 8-bit sample units
        d_grp <= (drgb > dy3) ? 18'((drgb - dy3) >> 8) : '0;
      end
      // accumulation
      if (start) begin
        acc   <= '0;
        n_acc <= '0;
        qp    <= mbqp_in;
      end else if (v2) begin
        acc   <= acc + 20'(d_grp);
        n_acc <= n_acc + 8'd1;
        if (32'(n_acc) + 32'd1 == GROUPS) fin <= 1'b1;
      end
      // Step 3: adjustment.
      if (fin) begin
        logic [19:0] steps;
        logic [2:0]  dq;
        steps = (acc >= 20'(THRESH)) ? ((acc - 20'(THRESH)) >> STEP_SHIFT) + 20'd1 : 20'd0;
        dq    = (steps > 20'(MAX_DQP)) ? 3'(MAX_DQP) : 3'(steps);
        color_dist      <= acc;
        dqp       <= dq;
        mbqp_out  <= (qp > 6'(dq)) ? qp - 6'(dq) : 6'd0;
        corrected <= (dq != 3'd0);
        done      <= 1'b1;
      end
    end
  end

  a_groups: assert property (@(posedge clk) disable iff (!rst_n)
    v2 |-> (32'(n_acc) < GROUPS));

endmodule
