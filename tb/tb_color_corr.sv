// tb_color_corr: self-checking test of the colour correction unit.
//
// For each test macroblock the testbench streams 64 sample groups (one per
// cycle) and compares color_dist, dqp, mbqp_out and corrected with a
// reference computed here in plain integer arithmetic from the formulas in
// the unit's description. Cases: identical blocks (no correction), a pure
// luma offset (cancels, no correction), a chroma shift the luma search
// cannot see (correction, clipped at MAX_DQP), random blocks, and a QP near
// zero (floored). The latency from the last group to done is checked.
module tb_color_corr;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  logic        start, in_valid, done, corrected;
  logic [5:0]  mbqp_in, mbqp_out;
  logic [7:0]  org_y [4], prd_y [4];
  logic [7:0]  org_cb, org_cr, prd_cb, prd_cr;
  logic [19:0] color_dist;
  logic [2:0]  dqp;

  localparam int THRESH = 1024, STEP_SHIFT = 9, MAX_DQP = 6;

  color_corr dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Test macroblock: 64 groups of (4 luma, cb, cr), original and predicted.
  int oy [64][4], pyv [64][4], ocb [64], ocr [64], pcb [64], pcr [64];

  function automatic int iabs(int x);
    return x < 0 ? -x : x;
  endfunction

  function automatic int ref_group(int g);
    int ys_o, ys_p, ro, go, bo, rp, gp, bp, drgb, dy3;
    ys_o = oy[g][0] + oy[g][1] + oy[g][2] + oy[g][3];
    ys_p = pyv[g][0] + pyv[g][1] + pyv[g][2] + pyv[g][3];
    ro = ys_o * 64 + 359 * (ocr[g] - 128);
    go = ys_o * 64 - 88 * (ocb[g] - 128) - 183 * (ocr[g] - 128);
    bo = ys_o * 64 + 454 * (ocb[g] - 128);
    rp = ys_p * 64 + 359 * (pcr[g] - 128);
    gp = ys_p * 64 - 88 * (pcb[g] - 128) - 183 * (pcr[g] - 128);
    bp = ys_p * 64 + 454 * (pcb[g] - 128);
    drgb = iabs(ro - rp) + iabs(go - gp) + iabs(bo - bp);
    dy3  = 3 * iabs(ys_o * 64 - ys_p * 64);
    return drgb > dy3 ? (drgb - dy3) / 256 : 0;
  endfunction

  int n_corrected = 0;

  task automatic run_mb(int qp, string name);
    int d, steps, dq, q_exp, lat;
    d = 0;
    for (int g = 0; g < 64; g++) d += ref_group(g);
    steps = d >= THRESH ? ((d - THRESH) >> STEP_SHIFT) + 1 : 0;
    dq    = steps > MAX_DQP ? MAX_DQP : steps;
    q_exp = qp > dq ? qp - dq : 0;
    @(negedge clk);
    start = 1'b1; mbqp_in = 6'(qp);
    @(negedge clk);
    start = 1'b0;
    for (int g = 0; g < 64; g++) begin
      in_valid = 1'b1;
      for (int i = 0; i < 4; i++) begin org_y[i] = 8'(oy[g][i]); prd_y[i] = 8'(pyv[g][i]); end
      org_cb = 8'(ocb[g]); org_cr = 8'(ocr[g]); prd_cb = 8'(pcb[g]); prd_cr = 8'(pcr[g]);
      @(negedge clk);
    end
    in_valid = 1'b0;
    lat = 1;
    while (!done && lat < 20) begin @(negedge clk); lat++; end
    check(done, {name, ": done"});
    check(lat == 4, $sformatf("%s: latency %0d cycles after the last group", name, lat));
    check(int'(color_dist) == d, $sformatf("%s: dist %0d expected %0d", name, color_dist, d));
    check(int'(dqp) == dq, $sformatf("%s: dqp %0d expected %0d", name, dqp, dq));
    check(int'(mbqp_out) == q_exp, $sformatf("%s: qp %0d expected %0d", name, mbqp_out, q_exp));
    check(corrected == (dq != 0), {name, ": corrected flag"});
    if (corrected) n_corrected++;
    $display("%s: dist=%0d dqp=%0d qp %0d -> %0d", name, color_dist, dqp, qp, mbqp_out);
  endtask

  task automatic random_orig();
    for (int g = 0; g < 64; g++) begin
      for (int i = 0; i < 4; i++) oy[g][i] = $urandom_range(16, 235);
      ocb[g] = $urandom_range(16, 240);
      ocr[g] = $urandom_range(16, 240);
    end
  endtask

  initial begin
    start = 0; in_valid = 0; mbqp_in = 0; org_cb = 0; org_cr = 0; prd_cb = 0; prd_cr = 0;
    for (int i = 0; i < 4; i++) begin org_y[i] = 0; prd_y[i] = 0; end
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Identical prediction.
    random_orig();
    for (int g = 0; g < 64; g++) begin
      pyv[g] = oy[g]; pcb[g] = ocb[g]; pcr[g] = ocr[g];
    end
    run_mb(30, "identical");
    check(dqp == 0, "identical: no correction");

    // Pure luma offset: cancels out.
    for (int g = 0; g < 64; g++) begin
      for (int i = 0; i < 4; i++) pyv[g][i] = oy[g][i] > 200 ? oy[g][i] - 15 : oy[g][i] + 15;
      pcb[g] = ocb[g]; pcr[g] = ocr[g];
    end
    run_mb(30, "luma offset");
    check(dqp == 0, "luma offset: no correction");

    // Same luma, shifted colour.
    for (int g = 0; g < 64; g++) begin
      pyv[g] = oy[g];
      pcb[g] = ocb[g] > 128 ? ocb[g] - 6 : ocb[g] + 6;
      pcr[g] = ocr[g];
    end
    run_mb(30, "small colour shift");
    for (int g = 0; g < 64; g++) begin
      pcb[g] = ocb[g] > 128 ? ocb[g] - 60 : ocb[g] + 60;
      pcr[g] = ocr[g] > 128 ? ocr[g] - 60 : ocr[g] + 60;
    end
    run_mb(30, "large colour shift");
    check(dqp == 3'(MAX_DQP), "large colour shift: clipped at MAX_DQP");
    run_mb(2, "low qp");
    check(mbqp_out == 0, "QP floored at zero");

    // Random blocks.
    for (int k = 0; k < 20; k++) begin
      random_orig();
      for (int g = 0; g < 64; g++) begin
        for (int i = 0; i < 4; i++) pyv[g][i] = $urandom_range(16, 235);
        pcb[g] = $urandom_range(16, 240);
        pcr[g] = $urandom_range(16, 240);
      end
      run_mb($urandom_range(0, 51), $sformatf("random %0d", k));
    end
    check(n_corrected > 0, "correction applied at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
