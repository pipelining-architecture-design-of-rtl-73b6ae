// tb_sdma: self-checking test of the first-stage reference manager.
//
// SDMA drives a real reference cache-buffer and a bus access port onto an
// AXI memory model (full 1920x1088 geometry). The test runs an encoder P
// slice that starts in the middle of a macroblock row and crosses into the
// next row, a decoder slice near the bottom of the picture and an encoder
// I slice. It checks: the number of preload and prefetch fills against a
// count worked out here; that after each macroblock every reference
// macroblock the next search needs (rows r-4..r+4, all columns, and row r+5
// up to column c) is resident in RCB; the 48 words of the current
// macroblock streamed in encoder mode (none in decoder mode); that I slices
// fetch nothing; and that a steady-state macroblock finishes within the
// 500-cycle budget.
module tb_sdma;
  import codec_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  logic              start, first, done;
  logic [13:0]       mb;
  codec_mode_e       mode;
  logic [1:0]        num_ref;
  logic [31:0]       cur_base;
  logic              fill_valid, fill_ref, fill_ready, fill_done;
  logic [6:0]        fill_row, fill_col;
  logic              s_req_valid, s_req_ready, s_rvalid, s_done;
  bus_req_t          s_req;
  logic [63:0]       s_rdata;
  logic              cur_valid;
  logic [5:0]        cur_word;
  logic [63:0]       cur_data;
  logic [31:0]       preload_fills, prefetch_fills;

  sdma dut (
    .clk, .rst_n, .start, .mb, .first, .mode, .num_ref, .cur_base, .done,
    .fill_valid, .fill_ref, .fill_row, .fill_col, .fill_ready, .fill_done,
    .req_valid(s_req_valid), .req(s_req), .req_ready(s_req_ready), .rdata(s_rdata),
    .rvalid(s_rvalid), .bus_done(s_done),
    .cur_valid, .cur_word, .cur_data, .preload_fills, .prefetch_fills
  );

  // RCB with one read port used for residency checks.
  logic [31:0] ref_base [2];
  logic        c_req_valid, c_req_ready, c_wready, c_rvalid, c_done;
  bus_req_t    c_req;
  logic [63:0] c_wdata, c_rdata;
  logic [0:0]  rd_en, rd_hit;
  logic        rd_ref [1];
  logic [6:0]  rd_row [1], rd_col [1];
  logic [5:0]  rd_word [1];
  logic [63:0] rd_data [1];
  logic [31:0] fills, hits, misses;

  rcb #(.NRD(1)) u_rcb (
    .clk, .rst_n, .flush(1'b0), .ref_base,
    .fill_valid, .fill_ref, .fill_row, .fill_col, .fill_ready, .fill_done,
    .bus_req_valid(c_req_valid), .bus_req(c_req), .bus_req_ready(c_req_ready),
    .bus_wdata(c_wdata), .bus_wready(c_wready), .bus_rdata(c_rdata), .bus_rvalid(c_rvalid),
    .bus_done(c_done), .rd_en, .rd_ref, .rd_row, .rd_col, .rd_word, .rd_data, .rd_hit,
    .fills, .hits, .misses
  );

  logic [1:0]  b_req_valid, b_req_ready, b_wready, b_rvalid, b_done;
  bus_req_t    b_req [2];
  logic [63:0] b_wdata [2];
  logic [63:0] b_rdata;
  logic [31:0] awaddr, araddr, read_beats, write_beats;
  logic [7:0]  awlen, arlen, wstrb;
  logic [2:0]  awsize, arsize;
  logic [1:0]  awburst, arburst, bresp, rresp;
  logic        awvalid, awready, wvalid, wready_m, wlast, bvalid, bready;
  logic        arvalid, arready, rlast, rvalid_m, rready;
  logic [63:0] wdata_m, rdata_m;

  assign b_req_valid = {s_req_valid, c_req_valid};
  assign b_req[0]    = c_req;
  assign b_req[1]    = s_req;
  assign b_wdata[0]  = c_wdata;
  assign b_wdata[1]  = '0;
  assign c_req_ready = b_req_ready[0];
  assign s_req_ready = b_req_ready[1];
  assign c_wready    = b_wready[0];
  assign c_rvalid    = b_rvalid[0];
  assign s_rvalid    = b_rvalid[1];
  assign c_done      = b_done[0];
  assign s_done      = b_done[1];
  assign c_rdata     = b_rdata;
  assign s_rdata     = b_rdata;

  bap u_bap (
    .clk, .rst_n, .req_valid(b_req_valid), .req(b_req), .req_ready(b_req_ready),
    .wdata(b_wdata), .wready(b_wready), .rdata(b_rdata), .rvalid(b_rvalid), .done(b_done),
    .m_axi_awaddr(awaddr), .m_axi_awlen(awlen), .m_axi_awsize(awsize), .m_axi_awburst(awburst),
    .m_axi_awvalid(awvalid), .m_axi_awready(awready),
    .m_axi_wdata(wdata_m), .m_axi_wstrb(wstrb), .m_axi_wlast(wlast), .m_axi_wvalid(wvalid),
    .m_axi_wready(wready_m), .m_axi_bresp(bresp), .m_axi_bvalid(bvalid), .m_axi_bready(bready),
    .m_axi_araddr(araddr), .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_arvalid(arvalid), .m_axi_arready(arready),
    .m_axi_rdata(rdata_m), .m_axi_rresp(rresp), .m_axi_rlast(rlast), .m_axi_rvalid(rvalid_m),
    .m_axi_rready(rready), .read_beats, .write_beats
  );

  axi_mem_model #(.STALL(1'b0)) u_mem (
    .clk, .awaddr, .awlen, .awvalid, .awready, .wdata(wdata_m), .wlast, .wvalid,
    .wready(wready_m), .bresp, .bvalid, .bready, .araddr, .arlen, .arvalid, .arready,
    .rdata(rdata_m), .rresp, .rlast, .rvalid(rvalid_m), .rready
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [63:0] pat(logic [31:0] a);
    return {a ^ 32'hA5A5_0000, a * 32'd3};
  endfunction

  // Current macroblock stream monitor.
  int n_cur = 0;
  logic [31:0] cur_addr;
  always @(posedge clk)
    if (cur_valid) begin
      check(cur_data == pat(cur_addr + 32'(int'(cur_word) * 8)), $sformatf("current MB word %0d", cur_word));
      check(int'(cur_word) == n_cur, "current MB words in order");
      n_cur++;
    end

  task automatic probe(int f, int row, int col, bit want);
    @(negedge clk);
    rd_en = 1'b1; rd_ref[0] = f[0]; rd_row[0] = 7'(row); rd_col[0] = 7'(col); rd_word[0] = 6'(col % 48);
    @(negedge clk);
    rd_en = 1'b0;
    check(rd_hit[0] == want, $sformatf("ref %0d MB (%0d,%0d) resident=%0d", f, row, col, want));
    if (want)
      check(rd_data[0] == pat(ref_base[f] + 32'((row * 120 + col) * 512 + (col % 48) * 8)),
            $sformatf("ref %0d MB (%0d,%0d) data", f, row, col));
  endtask

  int cycles;
  task automatic run_mb(int m, bit is_first, codec_mode_e md, int nr, output int len);
    int r, c;
    r = m / 120; c = m % 120;
    n_cur = 0;
    cur_addr = cur_base + 32'((r * 120 + c) * 512);
    @(negedge clk);
    start = 1'b1; mb = 14'(m); first = is_first; mode = md; num_ref = 2'(nr);
    @(negedge clk);
    start = 1'b0;
    len = 1;
    while (!done) begin @(negedge clk); len++; end
    check(n_cur == ((md == MODE_ENC) ? 48 : 0), $sformatf("current MB words %0d", n_cur));
  endtask

  // Residency after macroblock (r, c): rows r-4..r+4 complete, row r+5 up
  // to column c. Rows outside the picture are skipped.
  task automatic check_window(int r, int c, int nr, bit full);
    for (int f = 0; f < nr; f++)
      for (int row = r - 4; row <= r + 5; row++) begin
        if (row < 0 || row > 67) continue;
        if (full) begin
          for (int col = 0; col < 120; col++)
            if (row < r + 5 || col <= c) probe(f, row, col, 1'b1);
        end else if (row == r + 5) begin
          probe(f, row, c, 1'b1);
        end
      end
  endtask

  function automatic int preload_count(int r, int c, int nr);
    int n = 0;
    for (int row = r - 4; row <= r + 5; row++) begin
      if (row < 0 || row > 67) continue;
      n += (row < r + 5) ? 120 : c + 1;
    end
    return n * nr;
  endfunction

  initial begin
    int len, pre0, pf0, worst;
    start = 0; first = 0; mb = 0; mode = MODE_ENC; num_ref = 0; rd_en = 0;
    rd_ref[0] = 0; rd_row[0] = 0; rd_col[0] = 0; rd_word[0] = 0;
    cur_base    = 32'h0100_0000;
    ref_base[0] = 32'h0200_0000;
    ref_base[1] = 32'h0300_0000;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Encoder P slice from MB (6, 117) across into row 7, two references.
    run_mb(6 * 120 + 117, 1'b1, MODE_ENC, 2, len);
    check(int'(preload_fills) == preload_count(6, 117, 2),
          $sformatf("preload fills %0d expected %0d", preload_fills, preload_count(6, 117, 2)));
    $display("preload of %0d fills took %0d cycles", preload_fills, len);
    check_window(6, 117, 2, 1'b1);
    worst = 0;
    for (int m = 6 * 120 + 118; m < 7 * 120 + 4; m++) begin
      run_mb(m, 1'b0, MODE_ENC, 2, len);
      if (len > worst) worst = len;
      check_window(m / 120, m % 120, 2, 1'b0);
    end
    check(int'(prefetch_fills) == 2 * 6, $sformatf("prefetch fills %0d", prefetch_fills));
    check(worst <= MB_CYCLE_BUDGET, $sformatf("steady-state MB took %0d cycles", worst));
    $display("steady-state stage-1 time %0d cycles", worst);

    // Decoder slice at the bottom of the picture, one reference.
    pre0 = int'(preload_fills); pf0 = int'(prefetch_fills);
    run_mb(65 * 120 + 10, 1'b1, MODE_DEC, 1, len);
    check(int'(preload_fills) - pre0 == preload_count(65, 10, 1), "bottom preload fills");
    check_window(65, 10, 1, 1'b1);
    run_mb(65 * 120 + 11, 1'b0, MODE_DEC, 1, len);
    check(int'(prefetch_fills) == pf0, "no prefetch beyond the last row");

    // Encoder I slice: no references, only the current macroblock.
    pre0 = int'(preload_fills);
    run_mb(100, 1'b1, MODE_ENC, 0, len);
    check(int'(preload_fills) == pre0, "I slice fetches no reference data");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
