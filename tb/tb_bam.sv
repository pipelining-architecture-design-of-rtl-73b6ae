// tb_bam: self-checking test of the bus access multiplexer.
//
// Four clients issue read and write bursts at the same time into their own
// memory regions; BAM feeds them through a bus access port into an AXI
// memory model with wait states. The test checks every read beat against a
// reference copy of memory, that each client receives exactly its own data
// beats and done pulses, that the grant counters match the bursts issued,
// and that each grant goes to the first waiting client after the one served
// last (round-robin).
module tb_bam;
  import codec_pkg::*;

  localparam int NC = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  logic [NC-1:0]     req_valid, req_ready, wready, rvalid, done;
  bus_req_t          req [NC];
  logic [BUS_DW-1:0] wdata [NC];
  logic [BUS_DW-1:0] rdata;
  logic              m_req_valid, m_req_ready, m_wready, m_rvalid, m_done;
  bus_req_t          m_req;
  logic [BUS_DW-1:0] m_wdata, m_rdata;
  logic [31:0]       grants [NC];

  bam #(.NCLI(NC)) dut (.*);

  // Downstream: BAP client 1, then the AXI memory model.
  logic [1:0]        b_req_valid, b_req_ready, b_wready, b_rvalid, b_done;
  bus_req_t          b_req [2];
  logic [BUS_DW-1:0] b_wdata [2];
  logic [31:0]       awaddr, araddr, read_beats, write_beats;
  logic [7:0]        awlen, arlen, wstrb;
  logic [2:0]        awsize, arsize;
  logic [1:0]        awburst, arburst, bresp, rresp;
  logic              awvalid, awready, wvalid, wready_m, wlast, bvalid, bready;
  logic              arvalid, arready, rlast, rvalid_m, rready;
  logic [63:0]       wdata_m, rdata_m;

  assign b_req_valid = {m_req_valid, 1'b0};
  assign b_req[0]    = '0;
  assign b_req[1]    = m_req;
  assign b_wdata[0]  = '0;
  assign b_wdata[1]  = m_wdata;
  assign m_req_ready = b_req_ready[1];
  assign m_wready    = b_wready[1];
  assign m_rvalid    = b_rvalid[1];
  assign m_done      = b_done[1];

  bap u_bap (
    .clk, .rst_n, .req_valid(b_req_valid), .req(b_req), .req_ready(b_req_ready),
    .wdata(b_wdata), .wready(b_wready), .rdata(m_rdata), .rvalid(b_rvalid), .done(b_done),
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

  int n_done [NC];
  int wbeat [NC];
  logic [31:0] waddr [NC];
  int issued [NC];

  always_comb
    for (int c = 0; c < NC; c++)
      wdata[c] = {waddr[c] + 32'(wbeat[c] * 8), 32'hBA00_0000 | 32'(c)};

  always @(posedge clk)
    for (int c = 0; c < NC; c++) begin
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
    issued[c]++;
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
        shadow[(a >> 3) + 32'(i)] = {a + 32'(i * 8), 32'hBA00_0000 | 32'(c)};
      check(wbeat[c] == beats, $sformatf("client %0d wrote %0d beats", c, wbeat[c]));
    end else begin
      check(got == beats, $sformatf("client %0d read %0d of %0d beats", c, got, beats));
    end
    check(n_done[c] == d0 + 1, "one done per burst");
  endtask

  // Round-robin: the grant goes to the first waiting client after the last
  // one served. A grant is visible as the cycle BAM becomes busy.
  int last_served = NC - 1, rr_checks = 0;
  logic [NC-1:0] waiting_q;
  always @(posedge clk) begin
    if (rst_n && !dut.busy && req_valid != 0) begin
      int want;
      want = -1;
      for (int i = 1; i <= NC; i++)
        if (want < 0 && req_valid[(last_served + i) % NC]) want = (last_served + i) % NC;
      #1;
      check(int'(dut.owner) == want, $sformatf("round-robin grant to %0d expected %0d", dut.owner, want));
      if ($countones(req_valid) > 1) rr_checks++;
      last_served = want;
    end
  end

  initial begin
    req_valid = 0;
    for (int c = 0; c < NC; c++) begin
      req[c] = '0; waddr[c] = 0; wbeat[c] = 0; n_done[c] = 0; issued[c] = 0;
    end
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      for (int i = 0; i < 6; i++) burst(0, i % 2 == 1, 32'h0100_0000 + 32'((i / 2) * 512), 16);
      for (int i = 0; i < 6; i++) burst(1, i % 2 == 1, 32'h0200_0000 + 32'((i / 2) * 512), 8);
      for (int i = 0; i < 4; i++) burst(2, 1'b0, 32'h0300_0000 + 32'(i * 512), 48);
      for (int i = 0; i < 6; i++) burst(3, i % 2 == 0, 32'h0400_0000 + 32'((i / 2) * 512), 2);
    join
    repeat (5) @(negedge clk);
    for (int c = 0; c < NC; c++)
      check(int'(grants[c]) == issued[c], $sformatf("grant counter of client %0d", c));
    check(rr_checks > 5, "arbitration among several waiting clients exercised");
    $display("contended grants=%0d", rr_checks);
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
