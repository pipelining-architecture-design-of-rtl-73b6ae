// tb_rcb: self-checking test of the reference cache-buffer.
//
// RCB fills itself through a bus access port from an AXI memory model whose
// unwritten words read as a function of their address, so every buffered
// word can be predicted. The test fills macroblocks of both reference
// pictures, reads every word of them back on all three read ports and
// compares, checks that non-resident macroblocks miss, that a row that maps
// to the same band slot as a resident one replaces it (WIN_ROWS apart), that
// flush empties the buffer, and that the fill, hit and miss counters agree.
module tb_rcb;
  import codec_pkg::*;

  localparam int NRD = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  logic              flush;
  logic [31:0]       ref_base [2];
  logic              fill_valid, fill_ref, fill_ready, fill_done;
  logic [6:0]        fill_row, fill_col;
  logic              bus_req_valid, bus_req_ready, bus_wready, bus_rvalid, bus_done;
  bus_req_t          bus_req;
  logic [63:0]       bus_wdata, bus_rdata;
  logic [NRD-1:0]    rd_en, rd_hit;
  logic              rd_ref [NRD];
  logic [6:0]        rd_row [NRD], rd_col [NRD];
  logic [5:0]        rd_word [NRD];
  logic [63:0]       rd_data [NRD];
  logic [31:0]       fills, hits, misses;

  rcb dut (.*);

  // BAP with RCB on client 0; client 1 idle.
  logic [1:0]  b_req_valid, b_req_ready, b_wready, b_rvalid, b_done;
  bus_req_t    b_req [2];
  logic [63:0] b_wdata [2];
  logic [31:0] awaddr, araddr, read_beats, write_beats;
  logic [7:0]  awlen, arlen, wstrb;
  logic [2:0]  awsize, arsize;
  logic [1:0]  awburst, arburst, bresp, rresp;
  logic        awvalid, awready, wvalid, wready_m, wlast, bvalid, bready;
  logic        arvalid, arready, rlast, rvalid_m, rready;
  logic [63:0] wdata_m, rdata_m;

  assign b_req_valid   = {1'b0, bus_req_valid};
  assign b_req[0]      = bus_req;
  assign b_req[1]      = '0;
  assign b_wdata[0]    = bus_wdata;
  assign b_wdata[1]    = '0;
  assign bus_req_ready = b_req_ready[0];
  assign bus_wready    = b_wready[0];
  assign bus_rvalid    = b_rvalid[0];
  assign bus_done      = b_done[0];

  bap u_bap (
    .clk, .rst_n, .req_valid(b_req_valid), .req(b_req), .req_ready(b_req_ready),
    .wdata(b_wdata), .wready(b_wready), .rdata(bus_rdata), .rvalid(b_rvalid), .done(b_done),
    .m_axi_awaddr(awaddr), .m_axi_awlen(awlen), .m_axi_awsize(awsize), .m_axi_awburst(awburst),
    .m_axi_awvalid(awvalid), .m_axi_awready(awready),
    .m_axi_wdata(wdata_m), .m_axi_wstrb(wstrb), .m_axi_wlast(wlast), .m_axi_wvalid(wvalid),
    .m_axi_wready(wready_m), .m_axi_bresp(bresp), .m_axi_bvalid(bvalid), .m_axi_bready(bready),
    .m_axi_araddr(araddr), .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_arvalid(arvalid), .m_axi_arready(arready),
    .m_axi_rdata(rdata_m), .m_axi_rresp(rresp), .m_axi_rlast(rlast), .m_axi_rvalid(rvalid_m),
    .m_axi_rready(rready), .read_beats, .write_beats
  );

  axi_mem_model u_mem (
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

  // Expected word: the model's pattern at the macroblock's slot address.
  function automatic logic [63:0] expect_word(int f, int row, int col, int w);
    logic [31:0] a;
    a = ref_base[f] + 32'((row * 120 + col) * 512 + w * 8);
    return {a ^ 32'hA5A5_0000, a * 32'd3};
  endfunction

  task automatic fill(int f, int row, int col);
    @(negedge clk);
    while (!fill_ready) @(negedge clk);
    fill_valid = 1'b1; fill_ref = f[0]; fill_row = 7'(row); fill_col = 7'(col);
    @(negedge clk);
    fill_valid = 1'b0;
    while (!fill_done) @(negedge clk);
  endtask

  int n_hit_exp = 0, n_miss_exp = 0;

  // Read all words of a macroblock on every port (ports staggered by word)
  // and check data when it should be resident, hit flags always.
  task automatic read_mb(int f, int row, int col, bit resident);
    for (int w = 0; w < 48; w++) begin
      @(negedge clk);
      for (int p = 0; p < NRD; p++) begin
        rd_en[p] = 1'b1; rd_ref[p] = f[0]; rd_row[p] = 7'(row); rd_col[p] = 7'(col);
        rd_word[p] = 6'((w + p * 16) % 48);
      end
      @(negedge clk);
      for (int p = 0; p < NRD; p++) begin
        check(rd_hit[p] == resident, $sformatf("hit flag ref %0d row %0d col %0d", f, row, col));
        if (resident)
          check(rd_data[p] == expect_word(f, row, col, (w + p * 16) % 48),
                $sformatf("data ref %0d row %0d col %0d word %0d", f, row, col, (w + p * 16) % 48));
      end
      rd_en = '0;
      if (resident) n_hit_exp += NRD; else n_miss_exp += NRD;
    end
  endtask

  initial begin
    flush = 0; fill_valid = 0; fill_ref = 0; fill_row = 0; fill_col = 0; rd_en = '0;
    for (int p = 0; p < NRD; p++) begin rd_ref[p] = 0; rd_row[p] = 0; rd_col[p] = 0; rd_word[p] = 0; end
    ref_base[0] = 32'h1000_0000;
    ref_base[1] = 32'h2000_0000;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Fill a few macroblocks of both references, including the last column.
    fill(0, 3, 0);
    fill(0, 3, 119);
    fill(1, 3, 0);
    fill(1, 67, 57);
    fill(0, 12, 7);
    read_mb(0, 3, 0, 1);
    read_mb(0, 3, 119, 1);
    read_mb(1, 3, 0, 1);
    read_mb(1, 67, 57, 1);
    read_mb(0, 12, 7, 1);
    read_mb(0, 4, 0, 0);        // never filled
    read_mb(0, 14, 0, 0);       // same slot as row 3, but row 3 is there
    // Row 14 takes the band slot of row 3 (11 rows apart).
    fill(0, 14, 0);
    read_mb(0, 14, 0, 1);
    read_mb(0, 3, 0, 0);
    read_mb(1, 3, 0, 1);        // the other reference is untouched
    // Flush empties everything.
    @(negedge clk); flush = 1'b1; @(negedge clk); flush = 1'b0;
    read_mb(1, 3, 0, 0);
    read_mb(0, 12, 7, 0);

    repeat (3) @(negedge clk);
    check(int'(fills) == 6, $sformatf("fill counter %0d", fills));
    check(int'(hits) == n_hit_exp, $sformatf("hit counter %0d expected %0d", hits, n_hit_exp));
    check(int'(misses) == n_miss_exp, $sformatf("miss counter %0d expected %0d", misses, n_miss_exp));
    check(int'(read_beats) == 6 * 48, "one 48-beat burst per fill");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
