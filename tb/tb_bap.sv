// tb_bap: self-checking test of the bus access port against an AXI memory
// model with random wait states.
//
// Both clients run bursts at the same time: client 0 (RCB side) only reads,
// client 1 (BAM side) writes bursts and reads them back. Every read beat is
// compared with a reference copy of memory kept by the testbench (written
// values, otherwise the model's address pattern). The test also checks the
// beat counters, one done per burst, the AXI burst length and size, and that
// when both clients wait, the one not served last is chosen.
module tb_bap;
  import codec_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  logic [1:0]        req_valid, req_ready, wready, rvalid, done;
  bus_req_t          req [2];
  logic [BUS_DW-1:0] wdata [2];
  logic [BUS_DW-1:0] rdata;
  logic [31:0]       awaddr, araddr;
  logic [7:0]        awlen, arlen, wstrb;
  logic [2:0]        awsize, arsize;
  logic [1:0]        awburst, arburst, bresp, rresp;
  logic              awvalid, awready, wvalid, wready_m, wlast, bvalid, bready;
  logic              arvalid, arready, rlast, rvalid_m, rready;
  logic [63:0]       wdata_m, rdata_m;
  logic [31:0]       read_beats, write_beats;

  bap dut (
    .clk, .rst_n, .req_valid, .req, .req_ready, .wdata, .wready, .rdata, .rvalid, .done,
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

  logic [63:0] shadow [logic [28:0]];
  function automatic logic [63:0] expect_word(logic [31:0] a);
    if (shadow.exists(a[31:3])) return shadow[a[31:3]];
    return {a ^ 32'hA5A5_0000, a * 32'd3};
  endfunction

  // Per-client burst engine.
  int exp_rbeats = 0, exp_wbeats = 0;
  int n_done [2] = '{0, 0};
  int wbeat [2] = '{0, 0};
  logic [31:0] waddr [2];

  always_comb
    for (int c = 0; c < 2; c++)
      wdata[c] = {waddr[c] + 32'(wbeat[c] * 8), 32'hC0DE_0000 | 32'(c)};

  always @(posedge clk)
    for (int c = 0; c < 2; c++) begin
      if (wready[c]) wbeat[c] <= wbeat[c] + 1;
      if (done[c]) n_done[c]++;
    end

  task automatic burst(int c, bit wr, logic [31:0] a, int beats);
    int got, d0;
    d0 = n_done[c];
    @(negedge clk);
    req[c] = '{write: wr, addr: a, len: 8'(beats - 1)};
    req_valid[c] = 1'b1;
    waddr[c] = a;
    wbeat[c] = 0;
    do @(posedge clk); while (!req_ready[c]);
    @(negedge clk);
    req_valid[c] = 1'b0;
    got = 0;
    while (n_done[c] == d0) begin
      @(posedge clk);
      if (rvalid[c]) begin
        check(rdata == expect_word(a + 32'(got * 8)), $sformatf("client %0d read beat %0d", c, got));
        got++;
      end
    end
    if (wr) begin
      for (int i = 0; i < beats; i++)
        shadow[(a >> 3) + 32'(i)] = {a + 32'(i * 8), 32'hC0DE_0000 | 32'(c)};
      exp_wbeats += beats;
      check(wbeat[c] == beats, $sformatf("client %0d wrote %0d beats", c, wbeat[c]));
    end else begin
      exp_rbeats += beats;
      check(got == beats, $sformatf("client %0d read %0d beats of %0d", c, got, beats));
    end
    check(n_done[c] == d0 + 1, "one done per burst");
  endtask

  // AXI sanity on every address handshake.
  always @(posedge clk) begin
    if (arvalid && arready) check(arsize == 3'd3 && arburst == 2'b01, "AR size/burst");
    if (awvalid && awready) check(awsize == 3'd3 && awburst == 2'b01, "AW size/burst");
  end

  // Fairness: when both clients wait, the one not served last wins.
  int both_wait_grants = 0, last_served = -1;
  always @(posedge clk)
    if (req_ready != 0) begin
      if (req_valid == 2'b11) begin
        both_wait_grants++;
        check(last_served < 0 || int'(req_ready[1]) != last_served, "client not served last wins");
      end
      last_served = int'(req_ready[1]);
    end

  initial begin
    req_valid = 0; req[0] = '0; req[1] = '0; waddr[0] = 0; waddr[1] = 0;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      begin
        for (int i = 0; i < 12; i++) burst(0, 1'b0, 32'h0010_0000 + 32'(i * 512), 48);
      end
      begin
        for (int i = 0; i < 6; i++) begin
          burst(1, 1'b1, 32'h0020_0000 + 32'(i * 256), (i % 4) * 8 + 1);
          burst(1, 1'b0, 32'h0020_0000 + 32'(i * 256), (i % 4) * 8 + 1);
        end
      end
    join
    // Both clients ask in the same cycle.
    for (int r = 0; r < 3; r++)
      fork
        burst(0, 1'b0, 32'h0030_0000 + 32'(r * 64), 4);
        burst(1, 1'b0, 32'h0040_0000 + 32'(r * 64), 4);
      join
    repeat (5) @(negedge clk);
    check(int'(read_beats) == exp_rbeats, $sformatf("read beat counter %0d expected %0d", read_beats, exp_rbeats));
    check(int'(write_beats) == exp_wbeats, "write beat counter");
    check(both_wait_grants >= 3, "both clients waited at once");
    $display("both-waiting grants=%0d", both_wait_grants);
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
