// tb_h264_video_top: end-to-end test of the video subsystem at full size
// (1920x1088, 120x68 macroblocks, every parameter at its default).
//
// A RISC model programs five slices through the codec register port:
//   S1 encode I  8 MBs  from (63,20)           writes reconstruction REC_A
//   S2 encode P  8 MBs  from (64,116), 2 refs  (REC_A, REF_B), crosses a row
//   S3 decode P  8 MBs  from (65,0),   1 ref   (REC_C, written by S2)
//   S4 encode B 10 MBs  from (60,50),  2 refs  with one slow RECON macroblock
//   S5 decode I  6 MBs  from (67,0)
// S2 and S3 are committed back to back so the RISC stalls on a full register
// bank (and one write made during the stall must be refused); before S4 the
// RISC is late, so the coding side idles.
//
// Behavioural models of the unbuilt coding modules sit on the stage ports:
// IPME/MCR probe the reference cache for the search band of their
// macroblock and compare the data with what external memory holds (the
// memory model's fill pattern, or what an earlier slice's DEBLK wrote),
// and one probe outside the band must miss; in decode, MCR fetches that
// missing macroblock directly through BAM. SPMES probes its own
// macroblock. SPMEM streams 64 colour groups into the colour-correction unit
// (identical colour or a large chroma shift) and checks its verdict.
// DEBLK writes the reconstructed macroblock (48 beats) and ENT writes
// (encode) or reads (decode) bitstream words through BAM. The other stages
// only take time.
//
// Checks: macroblock order per stage, slot counts per slice (N + stages - 1),
// the 500-cycle budget for every slot that holds neither a slice preload nor
// the injected slow macroblock, SDMA fill counts against the band formula,
// current-macroblock data, cache and bus data, colour-correction verdicts.
// Each mechanism of the design is counted and must occur at least once:
// slice-level stall, refused write, coding idle, macroblock stall, budget
// overrun, encode/decode mode switches, preload, prefetch, cache hit, cache
// miss, read-back of written data, BAM and BAP contention, colour correction
// applied and not applied, stage-buffer toggling, MVP predictions (RECON
// asks for the median of three neighbours of each inter macroblock), TNQ
// blocks (RECON sends one flat block per macroblock: when encoding, at QP 0
// the reconstruction must match the input within 1 and only the DC level
// may be non-zero; when decoding, a DC-only level block must give a flat
// residual), TNQ 8x8 blocks (one per macroblock, checked the same way) and
// TNQ DC sets (a flat
// luma DC set when encoding, a chroma DC-only level set when decoding).
module tb_h264_video_top;
  import codec_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  // ------------------------------------------------------------------ DUT
  logic                  reg_we, reg_stall;
  logic [2:0]            reg_addr;
  logic [31:0]           reg_wdata;
  slice_regs_t           slice_regs;
  logic [MAX_STAGES-1:0] ext_stage_start, ext_stage_active, ext_stage_done;
  logic [13:0]           ext_stage_mb [MAX_STAGES];
  logic                  stage_buf_sel;
  logic                  cur_valid;
  logic [5:0]            cur_word;
  logic [63:0]           cur_data;
  logic [2:0]            rcb_rd_en, rcb_rd_hit;
  logic                  rcb_rd_ref [3];
  logic [6:0]            rcb_rd_row [3], rcb_rd_col [3];
  logic [5:0]            rcb_rd_word [3];
  logic [63:0]           rcb_rd_data [3];
  logic [2:0]            mem_req_valid, mem_req_ready, mem_wready, mem_rvalid, mem_done;
  bus_req_t              mem_req [3];
  logic [63:0]           mem_wdata [3];
  logic [63:0]           mem_rdata;
  logic [5:0]            cc_mbqp_in, cc_mbqp_out;
  logic                  cc_in_valid, cc_done, cc_corrected;
  logic [7:0]            cc_org_y [4], cc_prd_y [4];
  logic [7:0]            cc_org_cb, cc_org_cr, cc_prd_cb, cc_prd_cr;
  logic [19:0]           cc_color_dist;
  logic [2:0]            cc_dqp;
  logic                  slice_done, code_busy;
  logic [31:0]           slices_done, parse_stall_cycles, code_idle_cycles, refused_writes;
  logic [15:0]           slot_cycles;
  logic [31:0]           stall_cycles, overrun_slots, slots, preload_fills, prefetch_fills;
  logic [31:0]           rcb_hits, rcb_misses, bus_read_beats, bus_write_beats;
  logic [31:0]           bam_grants [4];
  logic                  mvp_in_valid, mvp_out_valid;
  logic [2:0]            mvp_part;
  logic [3:0]            mvp_cur_ref, mvp_nb_avail;
  logic [3:0]            mvp_nb_ref [4];
  logic signed [13:0]    mvp_nb_mvx [4], mvp_nb_mvy [4];
  logic signed [13:0]    mvp_x, mvp_y;
  logic                  tnq_in_valid, tnq_dec_mode, tnq_intra, tnq_lvl_valid, tnq_rec_valid;
  logic [5:0]            tnq_qp;
  logic signed [8:0]     tnq_res_in [16];
  logic signed [15:0]    tnq_lvl_in [16], tnq_lvl_out [16];
  logic signed [9:0]     tnq_rec_out [16];
  logic                  tnq_blk8_valid, tnq_rec8_valid, tnq_lvl8_valid;
  logic signed [8:0]     tnq_res8_in [64];
  logic signed [15:0]    tnq_lvl8_in [64], tnq_lvl8_out [64];
  logic signed [9:0]     tnq_rec8_out [64];
  logic                  tnq_dc_in_valid, tnq_dc_chroma, tnq_dc_lvl_valid, tnq_dc_valid;
  logic signed [15:0]    tnq_dc_coef_in [16], tnq_dc_lvl_in [16], tnq_dc_lvl_out [16], tnq_dc_out [16];

  logic [31:0] awaddr, araddr;
  logic [7:0]  awlen, arlen, wstrb;
  logic [2:0]  awsize, arsize;
  logic [1:0]  awburst, arburst, bresp, rresp;
  logic        awvalid, awready, wvalid, wready_m, wlast, bvalid, bready;
  logic        arvalid, arready, rlast, rvalid_m, rready;
  logic [63:0] wdata_m, rdata_m;

  h264_video_top dut (
    .clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_stall, .slice_regs,
    .ext_stage_start, .ext_stage_active, .ext_stage_mb, .ext_stage_done, .stage_buf_sel,
    .cur_valid, .cur_word, .cur_data,
    .rcb_rd_en, .rcb_rd_ref, .rcb_rd_row, .rcb_rd_col, .rcb_rd_word, .rcb_rd_data, .rcb_rd_hit,
    .mem_req_valid, .mem_req, .mem_req_ready, .mem_wdata, .mem_wready, .mem_rdata,
    .mem_rvalid, .mem_done,
    .cc_mbqp_in, .cc_in_valid, .cc_org_y, .cc_org_cb, .cc_org_cr, .cc_prd_y, .cc_prd_cb,
    .cc_prd_cr, .cc_done, .cc_color_dist, .cc_dqp, .cc_mbqp_out, .cc_corrected,
    .mvp_in_valid, .mvp_part, .mvp_cur_ref, .mvp_nb_avail, .mvp_nb_ref, .mvp_nb_mvx,
    .mvp_nb_mvy, .mvp_out_valid, .mvp_x, .mvp_y,
    .tnq_in_valid, .tnq_dec_mode, .tnq_intra, .tnq_qp, .tnq_res_in, .tnq_lvl_in,
    .tnq_lvl_valid, .tnq_lvl_out, .tnq_rec_valid, .tnq_rec_out,
    .tnq_blk8_valid, .tnq_res8_in, .tnq_lvl8_in, .tnq_lvl8_valid, .tnq_lvl8_out,
    .tnq_rec8_valid, .tnq_rec8_out,
    .tnq_dc_in_valid, .tnq_dc_chroma, .tnq_dc_coef_in, .tnq_dc_lvl_in, .tnq_dc_lvl_valid,
    .tnq_dc_lvl_out, .tnq_dc_valid, .tnq_dc_out,
    .m_axi_awaddr(awaddr), .m_axi_awlen(awlen), .m_axi_awsize(awsize), .m_axi_awburst(awburst),
    .m_axi_awvalid(awvalid), .m_axi_awready(awready),
    .m_axi_wdata(wdata_m), .m_axi_wstrb(wstrb), .m_axi_wlast(wlast), .m_axi_wvalid(wvalid),
    .m_axi_wready(wready_m), .m_axi_bresp(bresp), .m_axi_bvalid(bvalid), .m_axi_bready(bready),
    .m_axi_araddr(araddr), .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_arvalid(arvalid), .m_axi_arready(arready),
    .m_axi_rdata(rdata_m), .m_axi_rresp(rresp), .m_axi_rlast(rlast), .m_axi_rvalid(rvalid_m),
    .m_axi_rready(rready),
    .slice_done, .code_busy, .slices_done, .parse_stall_cycles, .code_idle_cycles,
    .refused_writes, .slot_cycles, .stall_cycles, .overrun_slots, .slots,
    .preload_fills, .prefetch_fills, .rcb_hits, .rcb_misses, .bus_read_beats,
    .bus_write_beats, .bam_grants
  );

  axi_mem_model #(.STALL(1'b0)) u_mem (
    .clk, .awaddr, .awlen, .awvalid, .awready, .wdata(wdata_m), .wlast, .wvalid,
    .wready(wready_m), .bresp, .bvalid, .bready, .araddr, .arlen, .arvalid, .arready,
    .rdata(rdata_m), .rresp, .rlast, .rvalid(rvalid_m), .rready
  );

  // ------------------------------------------------------------------ checking
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  localparam logic [31:0] CUR   = 32'h0100_0000;
  localparam logic [31:0] REC_A = 32'h0200_0000;
  localparam logic [31:0] REF_B = 32'h0300_0000;
  localparam logic [31:0] REC_C = 32'h0400_0000;
  localparam logic [31:0] REC_D = 32'h0500_0000;
  localparam logic [31:0] BS    = 32'h0800_0000;
  localparam int          NCOL  = 120, NROW = 68;

  // External memory contents as the testbench expects them.
  logic [63:0] written [logic [28:0]];
  function automatic logic [63:0] pat(logic [31:0] a);
    return {a ^ 32'hA5A5_0000, a * 32'd3};
  endfunction
  function automatic logic [63:0] wd(logic [31:0] a);
    return {a ^ 32'h5EC0_0000, ~a};
  endfunction
  function automatic logic [63:0] exp_word(logic [31:0] a);
    if (written.exists(a[31:3])) return written[a[31:3]];
    return pat(a);
  endfunction
  function automatic logic [31:0] mb_byte(logic [31:0] base, int row, int col);
    return base + 32'((row * NCOL + col) * 512);
  endfunction

  // Mechanism counters.
  int n_risc_stall = 0, n_mode_e2d = 0, n_mode_d2e = 0, n_hit = 0, n_miss = 0;
  int n_readback = 0, n_bam_cont = 0, n_bap_cont = 0, n_cc_yes = 0, n_cc_no = 0;
  int n_buf_toggle = 0, n_cur_words = 0, n_mcr_direct = 0, n_mvp = 0, n_tnq = 0, n_tnq8 = 0, n_tnqdc = 0;

  // ------------------------------------------------------------------ slices
  typedef struct {
    codec_mode_e mode;
    slice_type_e st;
    int          qp, nref, first, num;
    logic [31:0] cur, ref0, ref1, rec;
  } slice_t;

  slice_t committed [$];

  // The slice whose macroblocks are in the pipeline: the active bank.
  function automatic slice_t active_slice();
    slice_t s;
    s = '{slice_regs.mode, slice_regs.slice_type, int'(slice_regs.qp), int'(slice_regs.num_ref),
          int'(slice_regs.first_mb), int'(slice_regs.num_mbs), slice_regs.cur_base,
          slice_regs.ref_base0, slice_regs.ref_base1, slice_regs.rec_base};
    return s;
  endfunction

  // RISC register port.
  task automatic risc_write(int a, logic [31:0] d);
    while (reg_stall) begin
      @(negedge clk);
      n_risc_stall++;
    end
    reg_we = 1'b1; reg_addr = 3'(a); reg_wdata = d;
    @(negedge clk);
    reg_we = 1'b0;
  endtask

  task automatic program_slice(slice_t s);
    risc_write(0, {21'd0, 2'(s.nref), 6'(s.qp), 2'(s.st), 1'(s.mode)});
    risc_write(1, 32'(s.first));
    risc_write(2, 32'(s.num));
    risc_write(3, s.cur);
    risc_write(4, s.ref0);
    risc_write(5, s.ref1);
    risc_write(6, s.rec);
    committed.push_back(s);
    risc_write(7, 32'd1);
  endtask

  // Slice completion: slot count per slice, mode switches.
  int slots_prev = 0, slices_checked = 0;
  codec_mode_e prev_mode = MODE_ENC;
  bit have_prev = 1'b0;
  always @(posedge clk) begin
    if (slice_done) begin
      slice_t s;
      int depth;
      s = committed.pop_front();
      depth = (s.mode == MODE_ENC) ? ENC_STAGES : DEC_STAGES;
      check(int'(slots) - slots_prev == s.num + depth - 1,
            $sformatf("slice at MB %0d took %0d slots, expected %0d", s.first,
                      int'(slots) - slots_prev, s.num + depth - 1));
      slots_prev = int'(slots);
      if (have_prev && prev_mode == MODE_ENC && s.mode == MODE_DEC) n_mode_e2d++;
      if (have_prev && prev_mode == MODE_DEC && s.mode == MODE_ENC) n_mode_d2e++;
      prev_mode = s.mode;
      have_prev = 1'b1;
      slices_checked++;
    end
  end

  // Slot budget: a slot must fit in 500 cycles unless it holds a slice
  // preload or the injected slow macroblock.
  bit   slot_preload = 1'b0, slot_slow = 1'b0;
  int   slots_seen = 0, budget_checked = 0, max_slot = 0;
  logic buf_prev = 1'b0;
  always @(posedge clk) begin
    if (int'(slots) != slots_seen) begin
      slots_seen = int'(slots);
      if (!slot_preload && !slot_slow) begin
        budget_checked++;
        if (int'(slot_cycles) > max_slot) max_slot = int'(slot_cycles);
        check(int'(slot_cycles) <= MB_CYCLE_BUDGET,
              $sformatf("steady-state slot took %0d cycles", slot_cycles));
      end
      slot_preload = 1'b0;
      slot_slow    = 1'b0;
    end
    if (stage_buf_sel != buf_prev) n_buf_toggle++;
    buf_prev = stage_buf_sel;
    if ($countones(dut.a_req_valid) > 1) n_bam_cont++;
    if (dut.p_req_valid == 2'b11) n_bap_cont++;
  end

  // Current macroblock stream (encoder stage 1).
  always @(posedge clk)
    if (cur_valid) begin
      int m;
      m = int'(ext_stage_mb[0]);
      check(cur_data == pat(mb_byte(slice_regs.cur_base, m / NCOL, m % NCOL) + 32'(int'(cur_word) * 8)),
            $sformatf("current MB %0d word %0d", m, cur_word));
      n_cur_words++;
    end

  // ------------------------------------------------------------------ BAM clients
  // index 0 MCR, 1 DEBLK, 2 ENT
  int          n_done [3];
  int          wbeat [3];
  logic [31:0] waddr [3];
  always_comb
    for (int i = 0; i < 3; i++) mem_wdata[i] = wd(waddr[i] + 32'(wbeat[i] * 8));
  always @(posedge clk)
    for (int i = 0; i < 3; i++) begin
      if (mem_wready[i]) wbeat[i] <= wbeat[i] + 1;
      if (mem_done[i]) n_done[i]++;
    end

  task automatic mem_burst(int i, bit wr, logic [31:0] a, int beats);
    int got, d0;
    d0 = n_done[i];
    @(negedge clk);
    mem_req[i] = '{write: wr, addr: a, len: 8'(beats - 1)};
    mem_req_valid[i] = 1'b1;
    waddr[i] = a;
    wbeat[i] = 0;
    do @(posedge clk); while (!mem_req_ready[i]);
    @(negedge clk);
    mem_req_valid[i] = 1'b0;
    got = 0;
    while (n_done[i] == d0) begin
      @(posedge clk);
      if (mem_rvalid[i]) begin
        check(mem_rdata == exp_word(a + 32'(got * 8)), $sformatf("client %0d read beat %0d", i, got));
        got++;
      end
    end
    if (wr) begin
      for (int k = 0; k < beats; k++) written[(a >> 3) + 32'(k)] = wd(a + 32'(k * 8));
      check(wbeat[i] == beats, $sformatf("client %0d wrote %0d beats", i, wbeat[i]));
    end else begin
      check(got == beats, $sformatf("client %0d read %0d of %0d beats", i, got, beats));
    end
  endtask

  // ------------------------------------------------------------------ RCB probes
  logic       pr_en [3];
  always_comb rcb_rd_en = {pr_en[2], pr_en[1], pr_en[0]};

  task automatic probe(int p, logic [31:0] base, int f, int row, int col, bit want);
    logic [31:0] a;
    int w;
    w = (row + col) % 48;
    @(negedge clk);
    pr_en[p] = 1'b1; rcb_rd_ref[p] = f[0]; rcb_rd_row[p] = 7'(row); rcb_rd_col[p] = 7'(col);
    rcb_rd_word[p] = 6'(w);
    @(negedge clk);
    pr_en[p] = 1'b0;
    check(rcb_rd_hit[p] == want, $sformatf("port %0d ref %0d MB (%0d,%0d) resident=%0d", p, f, row, col, want));
    if (rcb_rd_hit[p]) begin
      n_hit++;
      a = mb_byte(base, row, col) + 32'(w * 8);
      check(rcb_rd_data[p] == exp_word(a), $sformatf("ref %0d MB (%0d,%0d) data", f, row, col));
      if (written.exists(a[31:3])) n_readback++;
    end else begin
      n_miss++;
    end
  endtask

  // ------------------------------------------------------------------ stage models
  int   stage_count [MAX_STAGES];
  int   next_mb [MAX_STAGES];
  int   slow_mb = -1;
  int   n_start [MAX_STAGES], n_taken [MAX_STAGES], start_mb [MAX_STAGES];
  always @(posedge clk)
    for (int s = 0; s < MAX_STAGES; s++)
      if (ext_stage_start[s]) begin
        n_start[s]++;
        start_mb[s] = int'(ext_stage_mb[s]);
      end
  logic done_b [MAX_STAGES];
  always_comb
    for (int s = 0; s < MAX_STAGES; s++) ext_stage_done[s] = done_b[s];

  function automatic logic [31:0] ref_of(slice_t s, int f);
    return f == 0 ? s.ref0 : s.ref1;
  endfunction

  task automatic search_probes(int p, slice_t s, int m);
    int r, c;
    r = m / NCOL; c = m % NCOL;
    for (int f = 0; f < s.nref; f++) begin
      for (int row = r - 4; row <= r + 4; row += 4) begin
        int rr;
        rr = row < 0 ? 0 : (row > NROW - 1 ? NROW - 1 : row);
        probe(p, ref_of(s, f), f, rr, 0, 1'b1);
        probe(p, ref_of(s, f), f, rr, c, 1'b1);
        probe(p, ref_of(s, f), f, rr, NCOL - 1, 1'b1);
      end
      // A macroblock outside the band is not resident.
      probe(p, ref_of(s, f), f, r - 6, c, 1'b0);
    end
  endtask

  // Rate control (in IPME) is not modelled: every macroblock gets the slice QP,
  // valid before SPMEM starts.
  assign cc_mbqp_in = slice_regs.qp;

  task automatic cc_stream(int m, int qp);
    int o [64][6];
    bit shift;
    int wait_n;
    shift = (m % 2) == 1;
    for (int g = 0; g < 64; g++) begin
      for (int k = 0; k < 4; k++) o[g][k] = $urandom_range(16, 235);
      o[g][4] = $urandom_range(16, 240);
      o[g][5] = $urandom_range(16, 240);
    end
    for (int g = 0; g < 64; g++) begin
      @(negedge clk);
      cc_in_valid = 1'b1;
      for (int k = 0; k < 4; k++) begin
        cc_org_y[k] = 8'(o[g][k]);
        cc_prd_y[k] = 8'(o[g][k]);
      end
      cc_org_cb = 8'(o[g][4]);
      cc_org_cr = 8'(o[g][5]);
      cc_prd_cb = shift ? 8'(o[g][4] > 128 ? o[g][4] - 60 : o[g][4] + 60) : 8'(o[g][4]);
      cc_prd_cr = shift ? 8'(o[g][5] > 128 ? o[g][5] - 60 : o[g][5] + 60) : 8'(o[g][5]);
    end
    @(negedge clk);
    cc_in_valid = 1'b0;
    wait_n = 0;
    while (!cc_done && wait_n < 20) begin @(posedge clk); wait_n++; end
    check(cc_done, "colour correction result");
    @(negedge clk);
    if (shift) begin
      check(cc_dqp == 3'd6 && cc_corrected, $sformatf("MB %0d: colour shift corrected (dqp %0d)", m, cc_dqp));
      check(int'(cc_mbqp_out) == (qp > 6 ? qp - 6 : 0), "corrected QP");
      n_cc_yes++;
    end else begin
      check(cc_dqp == 3'd0 && !cc_corrected, $sformatf("MB %0d: matching colour left alone", m));
      check(int'(cc_mbqp_out) == qp, "uncorrected QP");
      n_cc_no++;
    end
  endtask

  // RECON asks MVP for the predictor of a 16x16 partition whose three
  // neighbours use the same reference: the result is the median.
  task automatic mvp_request(int m);
    int a, b, c;
    a = m % 1000; b = 2 * (m % 1000); c = -(m % 1000);
    @(negedge clk);
    mvp_in_valid = 1'b1; mvp_part = 3'd0; mvp_cur_ref = 4'd0; mvp_nb_avail = 4'b0111;
    mvp_nb_mvx = '{14'(a), 14'(b), 14'(c), 14'sd0};
    mvp_nb_mvy = '{14'sd1, -14'sd1, 14'sd3, 14'sd0};
    @(negedge clk);
    mvp_in_valid = 1'b0;
    check(mvp_out_valid && int'(mvp_x) == a && int'(mvp_y) == 1,
          $sformatf("MB %0d: MVP (%0d,%0d)", m, mvp_x, mvp_y));
    n_mvp++;
  endtask

  // RECON sends one flat 4x4 block through TNQ. Encoding at QP 0: only the
  // DC level is non-zero and the reconstruction is within 1 of the input.
  // Decoding: a DC-only level block L at QP 0 gives a flat residual of
  // (10 L + 32) >> 6.
  task automatic tnq_block(int m, bit dec);
    int v, lv, want;
    v  = (m % 200) - 100;
    lv = (m % 64) + 1;
    @(negedge clk);
    tnq_in_valid = 1'b1; tnq_dec_mode = dec; tnq_intra = 1'b1; tnq_qp = 6'd0;
    for (int i = 0; i < 16; i++) begin
      tnq_res_in[i] = 9'(v);
      tnq_lvl_in[i] = (i == 0) ? 16'(lv) : 16'sd0;
    end
    @(negedge clk);
    tnq_in_valid = 1'b0;
    check(tnq_lvl_valid, $sformatf("MB %0d: TNQ levels one cycle after the block", m));
    for (int i = 1; i < 16; i++)
      check(tnq_lvl_out[i] == 0, $sformatf("MB %0d: TNQ AC level %0d = %0d", m, i, tnq_lvl_out[i]));
    @(negedge clk);
    check(tnq_rec_valid, $sformatf("MB %0d: TNQ residual two cycles after the block", m));
    want = dec ? (10 * lv + 32) >>> 6 : v;
    for (int i = 0; i < 16; i++)
      check(int'(tnq_rec_out[i]) - want <= 1 && want - int'(tnq_rec_out[i]) <= 1,
            $sformatf("MB %0d: TNQ residual %0d = %0d, expected %0d", m, i, tnq_rec_out[i], want));
    n_tnq++;
  endtask

  // RECON also sends one 8x8 block at QP 0. Encoding: a flat block v must
  // give only a DC level and a reconstruction within 1 of v. Decoding: a
  // DC-only level block L gives a dequantised DC of (20 L + 2) >> 2 and a
  // flat residual of that value plus 32, >> 6.
  task automatic tnq_block8(int m, bit dec);
    int v, lv, want;
    v  = (m % 200) - 100;
    lv = (m % 100) + 1;
    @(negedge clk);
    tnq_blk8_valid = 1'b1; tnq_dec_mode = dec; tnq_intra = 1'b1; tnq_qp = 6'd0;
    for (int i = 0; i < 64; i++) begin
      tnq_res8_in[i] = 9'(v);
      tnq_lvl8_in[i] = (i == 0) ? 16'(lv) : 16'sd0;
    end
    @(negedge clk);
    tnq_blk8_valid = 1'b0;
    check(tnq_lvl8_valid, $sformatf("MB %0d: TNQ 8x8 levels one cycle after the block", m));
    for (int i = 1; i < 64; i++)
      check(tnq_lvl8_out[i] == 0, $sformatf("MB %0d: TNQ 8x8 AC level %0d = %0d", m, i, tnq_lvl8_out[i]));
    @(negedge clk);
    check(tnq_rec8_valid, $sformatf("MB %0d: TNQ 8x8 residual two cycles after the block", m));
    want = dec ? (((20 * lv + 2) >>> 2) + 32) >>> 6 : v;
    for (int i = 0; i < 64; i++)
      check(int'(tnq_rec8_out[i]) - want <= 1 && want - int'(tnq_rec8_out[i]) <= 1,
            $sformatf("MB %0d: TNQ 8x8 residual %0d = %0d, expected %0d", m, i, tnq_rec8_out[i], want));
    n_tnq8++;
  endtask

  // DC transforms at QP 0, intra rounding. Encoding: a flat luma DC set w
  // gives the single level (8|w| 13107 + 21844) >> 16 and 16 equal DC values
  // of (10 Z + 2) >> 2. Decoding: a chroma set [L 0 0 0] gives four DC
  // values of 5 L and zeros elsewhere.
  task automatic tnq_dc_set(int m, bit ch);
    int w, z0, want;
    w  = (m % 400) - 200;
    z0 = (8 * (w < 0 ? -w : w) * 13107 + 21844) >>> 16;
    z0 = w < 0 ? -z0 : z0;
    @(negedge clk);
    tnq_dc_in_valid = 1'b1; tnq_dc_chroma = ch; tnq_dec_mode = ch; tnq_intra = 1'b1; tnq_qp = 6'd0;
    for (int i = 0; i < 16; i++) begin
      tnq_dc_coef_in[i] = 16'(w);
      tnq_dc_lvl_in[i]  = (i == 0) ? 16'(w) : 16'sd0;
    end
    @(negedge clk);
    tnq_dc_in_valid = 1'b0;
    check(tnq_dc_lvl_valid, $sformatf("MB %0d: TNQ DC levels one cycle after the set", m));
    for (int i = 1; i < 16; i++)
      check(tnq_dc_lvl_out[i] == 0, $sformatf("MB %0d: TNQ DC level %0d = %0d", m, i, tnq_dc_lvl_out[i]));
    @(negedge clk);
    check(tnq_dc_valid, $sformatf("MB %0d: TNQ DC values two cycles after the set", m));
    want = ch ? 5 * w : (10 * z0 + 2) >>> 2;
    for (int i = 0; i < 16; i++)
      check(int'(tnq_dc_out[i]) == ((ch && i > 3) ? 0 : want),
            $sformatf("MB %0d: TNQ DC value %0d = %0d, expected %0d", m, i, tnq_dc_out[i], want));
    n_tnqdc++;
  endtask

  task automatic stage_model(int s);
    forever begin
      int m, lat;
      slice_t sl;
      while (n_start[s] == n_taken[s]) @(negedge clk);
      n_taken[s]++;
      m  = start_mb[s];
      sl = active_slice();
      if (m == sl.first) next_mb[s] = m;
      check(m == next_mb[s], $sformatf("stage %0d got MB %0d, expected %0d", s, m, next_mb[s]));
      check(m >= sl.first && m < sl.first + sl.num, $sformatf("stage %0d MB %0d outside slice", s, m));
      next_mb[s] = m + 1;
      stage_count[s]++;
      if (s == 0 && m == sl.first && sl.nref > 0) slot_preload = 1'b1;
      lat = $urandom_range(150, 420);
      if (m == slow_mb && ((sl.mode == MODE_ENC && s == 4) || (sl.mode == MODE_DEC && s == 2))) begin
        lat = 700;
        slot_slow = 1'b1;
      end
      if (sl.mode == MODE_ENC) begin
        if (s != 0) begin
          fork
            repeat (lat) @(negedge clk);
            case (s)
              1: search_probes(0, sl, m);
              2: if (sl.nref > 0)
                   probe(1, sl.ref0, 0, m / NCOL, m % NCOL, 1'b1);
              3: if (sl.st != SLICE_I) cc_stream(m, sl.qp);
              4: begin
                   if (sl.st != SLICE_I) mvp_request(m);
                   tnq_block(m, 1'b0);
                   tnq_dc_set(m, 1'b0);
                   tnq_block8(m, 1'b0);
                 end
              5: fork
                   mem_burst(1, 1'b1, mb_byte(sl.rec, m / NCOL, m % NCOL), MB_BEATS);
                   mem_burst(2, 1'b1, BS + 32'(m * 64), 4);
                 join
              default: ;
            endcase
          join
          @(negedge clk) done_b[s] = 1'b1;
          @(negedge clk) done_b[s] = 1'b0;
        end
      end else begin
        fork
          repeat (lat) @(negedge clk);
          case (s)
            0: mem_burst(2, 1'b0, BS + 32'(m * 64), 8);
            1: begin
                 search_probes(0, sl, m);
                 if (sl.nref > 0) begin
                   // the out-of-band block is fetched directly
                   mem_burst(0, 1'b0, mb_byte(sl.ref0, m / NCOL - 6, m % NCOL), MB_BEATS);
                   n_mcr_direct++;
                 end
               end
            2: begin
                 tnq_block(m, 1'b1);
                 tnq_block8(m, 1'b1);
                 tnq_dc_set(m, 1'b1);
               end
            3: mem_burst(1, 1'b1, mb_byte(sl.rec, m / NCOL, m % NCOL), MB_BEATS);
            default: ;
          endcase
        join
        @(negedge clk) done_b[s] = 1'b1;
        @(negedge clk) done_b[s] = 1'b0;
      end
    end
  endtask

  function automatic int preload_count(int r, int c, int nr);
    int n = 0;
    for (int row = r - 4; row <= r + 5; row++) begin
      if (row < 0 || row > NROW - 1) continue;
      n += (row < r + 5) ? NCOL : c + 1;
    end
    return n * nr;
  endfunction

  function automatic int prefetch_count(int first, int num, int nr);
    int n = 0;
    for (int m = first + 1; m < first + num; m++)
      if (m / NCOL + 5 <= NROW - 1) n += nr;
    return n;
  endfunction

  for (genvar g = 0; g < MAX_STAGES; g++) begin : g_model
    initial begin
      repeat (5) @(negedge clk);
      stage_model(g);
    end
  end

  // ------------------------------------------------------------------ main
  initial begin
    slice_t s1, s2, s3, s4, s5;
    int exp_pre, exp_pf, refused0, enc_mbs, dec_mbs;
    reg_we = 0; reg_addr = 0; reg_wdata = 0;
    mem_req_valid = '0; cc_in_valid = 0; mvp_in_valid = 0; mvp_part = 0; mvp_cur_ref = 0;
    mvp_nb_avail = 0;
    tnq_in_valid = 0; tnq_dec_mode = 0; tnq_intra = 0; tnq_qp = 0; tnq_blk8_valid = 0;
    for (int i = 0; i < 64; i++) begin tnq_lvl8_in[i] = 0; tnq_res8_in[i] = 0; end
    tnq_dc_in_valid = 0; tnq_dc_chroma = 0;
    for (int i = 0; i < 16; i++) begin tnq_dc_coef_in[i] = 0; tnq_dc_lvl_in[i] = 0; end
    for (int i = 0; i < 16; i++) begin tnq_res_in[i] = 0; tnq_lvl_in[i] = 0; end
    for (int i = 0; i < 4; i++) begin mvp_nb_ref[i] = 0; mvp_nb_mvx[i] = 0; mvp_nb_mvy[i] = 0; end
    cc_org_cb = 0; cc_org_cr = 0; cc_prd_cb = 0; cc_prd_cr = 0;
    for (int i = 0; i < 3; i++) begin
      mem_req[i] = '0; waddr[i] = 0; wbeat[i] = 0; n_done[i] = 0;
      pr_en[i] = 0; rcb_rd_ref[i] = 0; rcb_rd_row[i] = 0; rcb_rd_col[i] = 0; rcb_rd_word[i] = 0;
    end
    for (int k = 0; k < 4; k++) begin cc_org_y[k] = 0; cc_prd_y[k] = 0; end
    for (int s = 0; s < MAX_STAGES; s++) begin
      done_b[s] = 0; stage_count[s] = 0; next_mb[s] = 0; n_start[s] = 0; n_taken[s] = 0;
    end
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    s1 = '{MODE_ENC, SLICE_I, 28, 0, 63 * NCOL + 20,  8, CUR, 32'd0, 32'd0, REC_A};
    s2 = '{MODE_ENC, SLICE_P, 30, 2, 64 * NCOL + 116, 8, CUR, REC_A, REF_B, REC_C};
    s3 = '{MODE_DEC, SLICE_P, 30, 1, 65 * NCOL,       8, CUR, REC_C, 32'd0, REC_D};
    s4 = '{MODE_ENC, SLICE_B, 32, 2, 60 * NCOL + 50, 10, CUR, REC_D, REC_A, REC_C + 32'h0080_0000};
    s5 = '{MODE_DEC, SLICE_I, 26, 0, 67 * NCOL,       6, CUR, 32'd0, 32'd0, REC_D + 32'h0080_0000};
    slow_mb = 60 * NCOL + 55;

    program_slice(s1);
    program_slice(s2);
    // The bank is now full until S1 ends: a write is refused.
    check(reg_stall, "register bank full while S1 codes");
    refused0 = int'(refused_writes);
    reg_we = 1'b1; reg_addr = 3'd0; reg_wdata = 32'h0000_0001;
    @(negedge clk);
    reg_we = 1'b0;
    check(int'(refused_writes) == refused0 + 1, "write during stall refused");
    program_slice(s3);
    // The RISC is late with S4: the coding side idles.
    while (int'(slices_done) < 3) @(negedge clk);
    repeat (300) @(negedge clk);
    program_slice(s4);
    program_slice(s5);
    while (int'(slices_done) < 5) @(negedge clk);
    repeat (20) @(negedge clk);

    // Totals.
    check(slices_checked == 5, $sformatf("%0d slices completed", slices_checked));
    enc_mbs = s1.num + s2.num + s4.num;
    dec_mbs = s3.num + s5.num;
    for (int s = 0; s < MAX_STAGES; s++)
      check(stage_count[s] == enc_mbs + (s < DEC_STAGES ? dec_mbs : 0),
            $sformatf("stage %0d handled %0d MBs", s, stage_count[s]));
    exp_pre = preload_count(64, 116, 2) + preload_count(65, 0, 1) + preload_count(60, 50, 2);
    exp_pf  = prefetch_count(s2.first, s2.num, 2) + prefetch_count(s3.first, s3.num, 1) +
              prefetch_count(s4.first, s4.num, 2);
    check(int'(preload_fills) == exp_pre, $sformatf("preload fills %0d expected %0d", preload_fills, exp_pre));
    check(int'(prefetch_fills) == exp_pf, $sformatf("prefetch fills %0d expected %0d", prefetch_fills, exp_pf));
    check(n_cur_words == enc_mbs * MB_BEATS, $sformatf("current MB words %0d", n_cur_words));
    check(int'(rcb_hits) == n_hit && int'(rcb_misses) == n_miss, "cache hit/miss counters");
    check(int'(overrun_slots) >= 4, $sformatf("overrun slots %0d", overrun_slots));

    $display("slots=%0d budget-checked=%0d longest steady slot=%0d overruns=%0d",
             slots, budget_checked, max_slot, overrun_slots);
    $display("fills: preload=%0d prefetch=%0d  bus beats: read=%0d write=%0d",
             preload_fills, prefetch_fills, bus_read_beats, bus_write_beats);
    $display("grants: SDMA=%0d MCR=%0d DEBLK=%0d ENT=%0d",
             bam_grants[0], bam_grants[1], bam_grants[2], bam_grants[3]);

    // Every mechanism must have happened.
    begin
      string nm [22];
      int    cnt [22];
      nm = '{"slice-level stall", "refused register write", "coding idle", "macroblock stall",
             "budget overrun", "encode->decode switch", "decode->encode switch", "RCB preload",
             "RCB prefetch", "RCB hit", "RCB miss", "read-back of written picture",
             "BAM contention", "BAP contention", "colour correction applied",
             "colour correction not needed", "stage buffer toggle", "MCR direct fetch", "MVP prediction", "TNQ block", "TNQ 8x8 block", "TNQ DC set"};
      cnt = '{int'(parse_stall_cycles), int'(refused_writes) - refused0,
              int'(code_idle_cycles), int'(stall_cycles), int'(overrun_slots), n_mode_e2d,
              n_mode_d2e, int'(preload_fills), int'(prefetch_fills), n_hit, n_miss, n_readback,
              n_bam_cont, n_bap_cont, n_cc_yes, n_cc_no, n_buf_toggle, n_mcr_direct, n_mvp, n_tnq, n_tnq8, n_tnqdc};
      for (int i = 0; i < 22; i++) begin
        $display("mechanism %-30s %0d", nm[i], cnt[i]);
        check(cnt[i] > 0, {"mechanism never happened: ", nm[i]});
      end
      check(n_risc_stall > 0, "RISC waited on the stall");
    end

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
