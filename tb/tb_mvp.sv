// tb_mvp: self-checking test of the motion vector predictor.
//
// A reference model written in the way the standard states the process
// (substitute D for C, substitute A for B and C when only A exists, count
// matching reference indices, median by sorting) predicts every result.
// Directed cases cover each rule: C replaced by D, only A available, a single
// matching reference, the four directional partition shapes, and no
// neighbour at all; then 3000 random partitions follow, issued back to back
// to check the one-cycle latency and full throughput.
module tb_mvp;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  logic              in_valid, out_valid;
  logic [2:0]        part;
  logic [3:0]        cur_ref, nb_avail;
  logic [3:0]        nb_ref [4];
  logic signed [13:0] nb_mvx [4], nb_mvy [4];
  logic signed [13:0] mvp_x, mvp_y;

  mvp dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  typedef struct { bit av; int r, x, y; } nb_t;

  function automatic int med(int a, int b, int c);
    int v [3];
    int t;
    v = '{a, b, c};
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2 - i; j++)
        if (v[j] > v[j+1]) begin t = v[j]; v[j] = v[j+1]; v[j+1] = t; end
    return v[1];
  endfunction

  function automatic void model(int p, int cr, nb_t n [4], output int ox, output int oy);
    nb_t a, b, c;
    int cnt;
    a = n[0]; b = n[1]; c = n[2].av ? n[2] : n[3];
    if (!a.av) begin a.r = -1; a.x = 0; a.y = 0; end
    if (!b.av) begin b.r = -1; b.x = 0; b.y = 0; end
    if (!c.av) begin c.r = -1; c.x = 0; c.y = 0; end
    if (p == 1 && b.r == cr) begin ox = b.x; oy = b.y; return; end
    if (p == 2 && a.r == cr) begin ox = a.x; oy = a.y; return; end
    if (p == 3 && a.r == cr) begin ox = a.x; oy = a.y; return; end
    if (p == 4 && c.r == cr) begin ox = c.x; oy = c.y; return; end
    if (!b.av && !c.av && a.av) begin b = a; c = a; end
    cnt = int'(a.r == cr) + int'(b.r == cr) + int'(c.r == cr);
    if (cnt == 1) begin
      if (a.r == cr) begin ox = a.x; oy = a.y; end
      else if (b.r == cr) begin ox = b.x; oy = b.y; end
      else begin ox = c.x; oy = c.y; end
      return;
    end
    ox = med(a.x, b.x, c.x);
    oy = med(a.y, b.y, c.y);
  endfunction

  // Expected results travel with the partitions.
  int exp_x [$], exp_y [$];
  string names [$];

  always @(posedge clk)
    if (out_valid) begin
      int ex, ey;
      string nm;
      ex = exp_x.pop_front(); ey = exp_y.pop_front(); nm = names.pop_front();
      check(int'(mvp_x) == ex && int'(mvp_y) == ey,
            $sformatf("%s: got (%0d,%0d) expected (%0d,%0d)", nm, mvp_x, mvp_y, ex, ey));
    end

  nb_t n [4];
  task automatic issue(int p, int cr, string nm);
    int ox, oy;
    model(p, cr, n, ox, oy);
    exp_x.push_back(ox); exp_y.push_back(oy); names.push_back(nm);
    part = 3'(p); cur_ref = 4'(cr); in_valid = 1'b1;
    for (int i = 0; i < 4; i++) begin
      nb_avail[i] = n[i].av; nb_ref[i] = 4'(n[i].r); nb_mvx[i] = 14'(n[i].x); nb_mvy[i] = 14'(n[i].y);
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  function automatic nb_t mk(bit av, int r, int x, int y);
    nb_t t;
    t.av = av; t.r = r; t.x = x; t.y = y;
    return t;
  endfunction

  initial begin
    in_valid = 0; part = 0; cur_ref = 0; nb_avail = 0;
    for (int i = 0; i < 4; i++) begin nb_ref[i] = 0; nb_mvx[i] = 0; nb_mvy[i] = 0; end
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Directed cases with hand-worked answers.
    n = '{mk(1, 0, 10, -4), mk(1, 0, 30, 8), mk(1, 0, 20, 2), mk(1, 0, 99, 99)};
    issue(0, 0, "median");                       // (20, 2)
    n = '{mk(1, 0, 10, -4), mk(1, 0, 30, 8), mk(0, 0, 0, 0), mk(1, 0, -50, 40)};
    issue(0, 0, "C replaced by D");              // median(10,30,-50)=10, median(-4,8,40)=8
    n = '{mk(1, 1, 7, 7), mk(0, 0, 0, 0), mk(0, 0, 0, 0), mk(0, 0, 0, 0)};
    issue(0, 0, "only A available");             // (7, 7)
    n = '{mk(1, 1, 5, 5), mk(1, 0, -300, 12), mk(1, 1, 9, 9), mk(0, 0, 0, 0)};
    issue(0, 0, "single matching reference");    // (-300, 12)
    n = '{mk(1, 0, 1, 1), mk(1, 0, 2, 2), mk(1, 0, 3, 3), mk(0, 0, 0, 0)};
    issue(1, 0, "16x8 upper uses B");            // (2, 2)
    issue(2, 0, "16x8 lower uses A");            // (1, 1)
    issue(3, 0, "8x16 left uses A");             // (1, 1)
    issue(4, 0, "8x16 right uses C");            // (3, 3)
    n = '{mk(0, 0, 0, 0), mk(0, 0, 0, 0), mk(0, 0, 0, 0), mk(0, 0, 0, 0)};
    issue(0, 0, "no neighbours");                // (0, 0)
    @(negedge clk);
    check(exp_x.size() == 0, "directed results all seen");

    // Random partitions, back to back.
    for (int k = 0; k < 3000; k++) begin
      for (int i = 0; i < 4; i++)
        n[i] = mk($urandom_range(0, 3) != 0, $urandom_range(0, 2),
                  int'($urandom_range(0, 16382)) - 8191, int'($urandom_range(0, 454)) - 227);
      issue($urandom_range(0, 4), $urandom_range(0, 1), $sformatf("random %0d", k));
    end
    @(negedge clk);
    check(exp_x.size() == 0, "one result per partition, one cycle later");

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
