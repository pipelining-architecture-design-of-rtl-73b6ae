// mvp: motion vector predictor (MVP) derivation.
//
// The motion vector of an inter partition is coded as a difference to a
// predictor formed from neighbouring partitions: A (left), B (above),
// C (above right) and D (above left, used when C is not available). The
// predictor is needed by IPME (search centre and vector cost, from the
// intermediate vectors IPME itself produced), by RECON in the encoder and by
// the decoder to rebuild the vectors. The rule set is the standard H.264
// one for a partition of a P/B macroblock:
//   1. if C is unavailable, D takes its place;
//   2. an unavailable neighbour has reference index -1 and a zero vector;
//   3. 16x8 and 8x16 partitions first try one directional neighbour
//      (16x8 upper: B, 16x8 lower: A, 8x16 left: A, 8x16 right: C) and use
//      its vector if it refers to the same reference picture;
//   4. if B and C are both unavailable and A is available, A replaces both;
//   5. if exactly one of A, B, C refers to the same reference picture, its
//      vector is the predictor;
//   6. otherwise each component is the median of A, B and C.
//
// Interface: in_valid with the current partition's shape and reference
// index and, for each neighbour (index 0..3 = A, B, C, D), an availability
// flag, a reference index and a vector (quarter-pel, 14-bit signed, enough
// for the +-2048.75-pixel horizontal range). out_valid and the predictor
// follow one cycle later; a new partition can be taken every cycle.
//
// That MVP derivation is a module of the codec, in the reconstruction
// stage of the encoder, and that IPME feeds it intermediate vectors follows
// the published design; the rules are those of the H.264 standard; the
// single-cycle datapath and the port format are this design's choices.
module mvp #(
  parameter int unsigned MVW = 14
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [2:0]            part,       // 0 16x16/8x8, 1 16x8 upper, 2 16x8 lower, 3 8x16 left, 4 8x16 right
  input  logic [3:0]            cur_ref,
  input  logic [3:0]            nb_avail,   // A, B, C, D
  input  logic [3:0]            nb_ref [4],
  input  logic signed [MVW-1:0] nb_mvx [4],
  input  logic signed [MVW-1:0] nb_mvy [4],
  output logic                  out_valid,
  output logic signed [MVW-1:0] mvp_x,
  output logic signed [MVW-1:0] mvp_y
);

  // part 0 (16x16 or 8x8) uses no directional rule
  localparam logic [2:0] P_16X8_UP = 3'd1, P_16X8_LO = 3'd2, P_8X16_L = 3'd3, P_8X16_R = 3'd4;

  function automatic logic signed [MVW-1:0] median3(logic signed [MVW-1:0] a,
                                                    logic signed [MVW-1:0] b,
                                                    logic signed [MVW-1:0] c);
    logic signed [MVW-1:0] lo, hi;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    return (c < lo) ? lo : ((c > hi) ? hi : c);
  endfunction

  // Effective neighbours A, B, C after rules 1, 2 and 4.
  logic                  av [3];
  logic                  same [3];      // refers to the current reference
  logic signed [MVW-1:0] ex [3], ey [3];
  logic signed [MVW-1:0] px, py;

  always_comb begin
    logic       c_av;
    logic [3:0] c_ref;
    logic signed [MVW-1:0] c_x, c_y;
    // rule 1
    c_av  = nb_avail[2] ? 1'b1 : nb_avail[3];
    c_ref = nb_avail[2] ? nb_ref[2] : nb_ref[3];
    c_x   = nb_avail[2] ? nb_mvx[2] : nb_mvx[3];
    c_y   = nb_avail[2] ? nb_mvy[2] : nb_mvy[3];
    av[0] = nb_avail[0];
    av[1] = nb_avail[1];
    av[2] = c_av;
    // rule 2: unavailable -> zero vector, never the same reference
    same[0] = av[0] && (nb_ref[0] == cur_ref);
    same[1] = av[1] && (nb_ref[1] == cur_ref);
    same[2] = av[2] && (c_ref == cur_ref);
    ex[0] = av[0] ? nb_mvx[0] : '0;
    ey[0] = av[0] ? nb_mvy[0] : '0;
    ex[1] = av[1] ? nb_mvx[1] : '0;
    ey[1] = av[1] ? nb_mvy[1] : '0;
    ex[2] = av[2] ? c_x : '0;
    ey[2] = av[2] ? c_y : '0;

    // rule 3: directional prediction
    if (part == P_16X8_UP && same[1]) begin
      px = ex[1]; py = ey[1];
    end else if ((part == P_16X8_LO || part == P_8X16_L) && same[0]) begin
      px = ex[0]; py = ey[0];
    end else if (part == P_8X16_R && same[2]) begin
      px = ex[2]; py = ey[2];
    end else if (!av[1] && !av[2] && av[0]) begin
      // rule 4: only A exists
      px = ex[0]; py = ey[0];
    end else if (same[0] && !same[1] && !same[2]) begin
      // rule 5
      px = ex[0]; py = ey[0];
    end else if (!same[0] && same[1] && !same[2]) begin
      px = ex[1]; py = ey[1];
    end else if (!same[0] && !same[1] && same[2]) begin
      px = ex[2]; py = ey[2];
    end else begin
      // rule 6
      px = median3(ex[0], ex[1], ex[2]);
      py = median3(ey[0], ey[1], ey[2]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mvp_x     <= '0;
      mvp_y     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        mvp_x <= px;
        mvp_y <= py;
      end
    end
  end

  a_part: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (part <= P_8X16_R));

endmodule
