// h264_video_top: video subsystem of the H.264/AVC HP@L4.2 codec.
//
// One set of hardware encodes and decodes 1920x1088 video at up to 60
// frames/s within 500 clock cycles per macroblock. The RISC parses slice
// headers and loads codec registers while the hardwired codec codes the
// previous slice (slice-level pipeline); inside a slice the coding modules
// form a macroblock pipeline of six stages when encoding and four when
// decoding:
//
//   encode: 1 SDMA | 2 IPME | 3 SPMES | 4 SPMEM (with CC) | 5 RECON | 6 DEBLK+ENT
//   decode: 1 SDMA+ENT | 2 MCR | 3 RECON | 4 DEBLK
//
// This module contains the system blocks of that architecture and wires
// them together:
//   * top_ctrl  - codec registers, slice and macroblock pipeline control;
//   * sdma      - stage 1: reference pre-buffering and current-MB load;
//   * rcb       - on-chip reference band, filled for SDMA, read by ME/MC;
//   * bam / bap - arbitration of all external-memory traffic onto the
//                 64-bit AXI multimedia bus;
//   * color_corr- the colour correction step of the fourth encoder stage;
//   * mvp       - motion vector predictor, used by the reconstruction stage
//                 (encode) and by IPME with its intermediate vectors;
//   * tnq       - transform and quantisation, used by RECON: 4x4 blocks
//                 (residual in, levels and reconstructed residual out; in
//                 decode mode levels in), the same for 8x8 blocks, and
//                 the luma/chroma DC transforms.
// The motion estimation, reconstruction, deblocking and entropy modules
// (IPME, SPMES, SPMEM, MCR, RECON, DEBLK, ENT) attach through the ports
// below: each stage's start/active/macroblock/done signals, three RCB read
// ports, three BAM client ports (MCR, DEBLK, ENT), the current macroblock
// stream that SDMA loads, the colour correction sample stream, the
// predictor request port of MVP and the block port of TNQ.
//
// Stage completion: stage 1 is done when SDMA is done and, when decoding,
// when ENT (ext_stage_done[0]) is done too; stage 4 of an encoder P/B slice
// also waits for the colour correction result; every other stage is done
// on its ext_stage_done. The RCB is flushed at the first macroblock of every
// slice, which then preloads its reference band.
//
// The stage assignment, the module set and the bus structure follow the
// published architecture; the port-level wiring, the per-slice flush and
// the completion rules above are this design's choices.
module h264_video_top
  import codec_pkg::*;
#(
  parameter int unsigned COLS     = MB_COLS,
  parameter int unsigned ROWS     = MB_ROWS,
  parameter int unsigned WIN_ROWS = 11,
  parameter int unsigned BUDGET   = MB_CYCLE_BUDGET
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // RISC register port
  input  logic                  reg_we,
  input  logic [2:0]            reg_addr,
  input  logic [31:0]           reg_wdata,
  output logic                  reg_stall,
  output slice_regs_t           slice_regs,
  // pipeline stages (modules outside this block)
  output logic [MAX_STAGES-1:0] ext_stage_start,
  output logic [MAX_STAGES-1:0] ext_stage_active,
  output logic [13:0]           ext_stage_mb [MAX_STAGES],
  input  logic [MAX_STAGES-1:0] ext_stage_done,
  output logic                  stage_buf_sel,
  // current macroblock loaded by SDMA (encoder stage 1 -> IPME)
  output logic                  cur_valid,
  output logic [5:0]            cur_word,
  output logic [BUS_DW-1:0]     cur_data,
  // RCB read ports (IPME, SPMES, SPMEM / MCR)
  input  logic [2:0]            rcb_rd_en,
  input  logic                  rcb_rd_ref  [3],
  input  logic [6:0]            rcb_rd_row  [3],
  input  logic [6:0]            rcb_rd_col  [3],
  input  logic [5:0]            rcb_rd_word [3],
  output logic [BUS_DW-1:0]     rcb_rd_data [3],
  output logic [2:0]            rcb_rd_hit,
  // BAM client ports (MCR, DEBLK, ENT)
  input  logic [2:0]            mem_req_valid,
  input  bus_req_t              mem_req [3],
  output logic [2:0]            mem_req_ready,
  input  logic [BUS_DW-1:0]     mem_wdata [3],
  output logic [2:0]            mem_wready,
  output logic [BUS_DW-1:0]     mem_rdata,
  output logic [2:0]            mem_rvalid,
  output logic [2:0]            mem_done,
  // colour correction stream (from SPMEM) and result
  input  logic [5:0]            cc_mbqp_in,
  input  logic                  cc_in_valid,
  input  logic [7:0]            cc_org_y [4],
  input  logic [7:0]            cc_org_cb,
  input  logic [7:0]            cc_org_cr,
  input  logic [7:0]            cc_prd_y [4],
  input  logic [7:0]            cc_prd_cb,
  input  logic [7:0]            cc_prd_cr,
  output logic                  cc_done,
  output logic [19:0]           cc_color_dist,
  output logic [2:0]            cc_dqp,
  output logic [5:0]            cc_mbqp_out,
  output logic                  cc_corrected,
  // motion vector predictor requests (RECON / IPME)
  input  logic                  mvp_in_valid,
  input  logic [2:0]            mvp_part,
  input  logic [3:0]            mvp_cur_ref,
  input  logic [3:0]            mvp_nb_avail,
  input  logic [3:0]            mvp_nb_ref [4],
  input  logic signed [13:0]    mvp_nb_mvx [4],
  input  logic signed [13:0]    mvp_nb_mvy [4],
  output logic                  mvp_out_valid,
  output logic signed [13:0]    mvp_x,
  output logic signed [13:0]    mvp_y,
  // TNQ block port (RECON)
  input  logic                  tnq_in_valid,
  input  logic                  tnq_dec_mode,
  input  logic                  tnq_intra,
  input  logic [5:0]            tnq_qp,
  input  logic signed [8:0]     tnq_res_in [16],
  input  logic signed [15:0]    tnq_lvl_in [16],
  output logic                  tnq_lvl_valid,
  output logic signed [15:0]    tnq_lvl_out [16],
  output logic                  tnq_rec_valid,
  output logic signed [9:0]     tnq_rec_out [16],
  input  logic                  tnq_blk8_valid,
  input  logic signed [8:0]     tnq_res8_in [64],
  input  logic signed [15:0]    tnq_lvl8_in [64],
  output logic                  tnq_lvl8_valid,
  output logic signed [15:0]    tnq_lvl8_out [64],
  output logic                  tnq_rec8_valid,
  output logic signed [9:0]     tnq_rec8_out [64],
  input  logic                  tnq_dc_in_valid,
  input  logic                  tnq_dc_chroma,
  input  logic signed [15:0]    tnq_dc_coef_in [16],
  input  logic signed [15:0]    tnq_dc_lvl_in [16],
  output logic                  tnq_dc_lvl_valid,
  output logic signed [15:0]    tnq_dc_lvl_out [16],
  output logic                  tnq_dc_valid,
  output logic signed [15:0]    tnq_dc_out [16],
  // AXI4 master on the multimedia bus
  output logic [BUS_AW-1:0]     m_axi_awaddr,
  output logic [7:0]            m_axi_awlen,
  output logic [2:0]            m_axi_awsize,
  output logic [1:0]            m_axi_awburst,
  output logic                  m_axi_awvalid,
  input  logic                  m_axi_awready,
  output logic [BUS_DW-1:0]     m_axi_wdata,
  output logic [7:0]            m_axi_wstrb,
  output logic                  m_axi_wlast,
  output logic                  m_axi_wvalid,
  input  logic                  m_axi_wready,
  input  logic [1:0]            m_axi_bresp,
  input  logic                  m_axi_bvalid,
  output logic                  m_axi_bready,
  output logic [BUS_AW-1:0]     m_axi_araddr,
  output logic [7:0]            m_axi_arlen,
  output logic [2:0]            m_axi_arsize,
  output logic [1:0]            m_axi_arburst,
  output logic                  m_axi_arvalid,
  input  logic                  m_axi_arready,
  input  logic [BUS_DW-1:0]     m_axi_rdata,
  input  logic [1:0]            m_axi_rresp,
  input  logic                  m_axi_rlast,
  input  logic                  m_axi_rvalid,
  output logic                  m_axi_rready,
  // status and statistics
  output logic                  slice_done,
  output logic                  code_busy,
  output logic [31:0]           slices_done,
  output logic [31:0]           parse_stall_cycles,
  output logic [31:0]           code_idle_cycles,
  output logic [31:0]           refused_writes,
  output logic [15:0]           slot_cycles,
  output logic [31:0]           stall_cycles,
  output logic [31:0]           overrun_slots,
  output logic [31:0]           slots,
  output logic [31:0]           preload_fills,
  output logic [31:0]           prefetch_fills,
  output logic [31:0]           rcb_hits,
  output logic [31:0]           rcb_misses,
  output logic [31:0]           bus_read_beats,
  output logic [31:0]           bus_write_beats,
  output logic [31:0]           bam_grants [4]
);

  // ------------------------------------------------------------------ TOP
  logic [MAX_STAGES-1:0] stage_start, stage_active, stage_done;
  logic [13:0]           stage_mb [MAX_STAGES];
  logic                  pipe_busy;

  top_ctrl #(.BUDGET(BUDGET)) u_top (
    .clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_stall,
    .active(slice_regs), .slice_done, .code_busy, .pipe_busy,
    .stage_start, .stage_active, .stage_mb, .stage_done,
    .buf_sel(stage_buf_sel),
    .parse_stall_cycles, .code_idle_cycles, .refused_writes, .slices_done,
    .slot_cycles, .stall_cycles, .overrun_slots, .slots
  );

  assign ext_stage_start  = stage_start;
  assign ext_stage_active = stage_active;
  assign ext_stage_mb     = stage_mb;

  // ------------------------------------------------------------------ SDMA
  logic        sdma_first, sdma_done;
  logic        fill_valid, fill_ref, fill_ready, fill_done;
  logic [6:0]  fill_row, fill_col;
  logic        s_req_valid, s_req_ready, s_rvalid, s_done;
  bus_req_t    s_req;

  assign sdma_first = (stage_mb[0] == slice_regs.first_mb);

  sdma #(.COLS(COLS), .ROWS(ROWS)) u_sdma (
    .clk, .rst_n,
    .start(stage_start[0]), .mb(stage_mb[0]), .first(sdma_first),
    .mode(slice_regs.mode), .num_ref(slice_regs.num_ref), .cur_base(slice_regs.cur_base),
    .done(sdma_done),
    .fill_valid, .fill_ref, .fill_row, .fill_col, .fill_ready, .fill_done,
    .req_valid(s_req_valid), .req(s_req), .req_ready(s_req_ready),
    .rdata(mem_rdata), .rvalid(s_rvalid), .bus_done(s_done),
    .cur_valid, .cur_word, .cur_data,
    .preload_fills, .prefetch_fills
  );

  // ------------------------------------------------------------------ RCB
  logic [BUS_AW-1:0] ref_base [NUM_REF];
  logic              c_req_valid, c_req_ready, c_wready, c_rvalid, c_done;
  bus_req_t          c_req;
  logic [BUS_DW-1:0] c_wdata, bap_rdata;
  logic [31:0]       rcb_fills;

  assign ref_base[0] = slice_regs.ref_base0;
  assign ref_base[1] = slice_regs.ref_base1;

  rcb #(.COLS(COLS), .WIN_ROWS(WIN_ROWS), .NREF(NUM_REF), .NRD(3)) u_rcb (
    .clk, .rst_n,
    .flush(stage_start[0] && sdma_first),
    .ref_base,
    .fill_valid, .fill_ref, .fill_row, .fill_col, .fill_ready, .fill_done,
    .bus_req_valid(c_req_valid), .bus_req(c_req), .bus_req_ready(c_req_ready),
    .bus_wdata(c_wdata), .bus_wready(c_wready), .bus_rdata(bap_rdata),
    .bus_rvalid(c_rvalid), .bus_done(c_done),
    .rd_en(rcb_rd_en), .rd_ref(rcb_rd_ref), .rd_row(rcb_rd_row), .rd_col(rcb_rd_col),
    .rd_word(rcb_rd_word), .rd_data(rcb_rd_data), .rd_hit(rcb_rd_hit),
    .fills(rcb_fills), .hits(rcb_hits), .misses(rcb_misses)
  );

  // ------------------------------------------------------------------ BAM
  logic [3:0]        a_req_valid, a_req_ready, a_wready, a_rvalid, a_done;
  bus_req_t          a_req [4];
  logic [BUS_DW-1:0] a_wdata [4];
  logic              m_req_valid, m_req_ready, m_wready, m_rvalid, m_done;
  bus_req_t          m_req;
  logic [BUS_DW-1:0] m_wdata;

  assign a_req_valid = {mem_req_valid, s_req_valid};
  assign a_req[0]    = s_req;
  assign a_wdata[0]  = '0;      // SDMA only reads
  for (genvar i = 0; i < 3; i++) begin : g_cli
    assign a_req[i+1]   = mem_req[i];
    assign a_wdata[i+1] = mem_wdata[i];
  end
  assign s_req_ready   = a_req_ready[0];
  assign s_rvalid      = a_rvalid[0];
  assign s_done        = a_done[0];
  assign mem_req_ready = a_req_ready[3:1];
  assign mem_wready    = a_wready[3:1];
  assign mem_rvalid    = a_rvalid[3:1];
  assign mem_done      = a_done[3:1];

  bam #(.NCLI(4)) u_bam (
    .clk, .rst_n,
    .req_valid(a_req_valid), .req(a_req), .req_ready(a_req_ready),
    .wdata(a_wdata), .wready(a_wready), .rdata(mem_rdata), .rvalid(a_rvalid), .done(a_done),
    .m_req_valid, .m_req, .m_req_ready, .m_wdata, .m_wready,
    .m_rdata(bap_rdata), .m_rvalid, .m_done,
    .grants(bam_grants)
  );

  // ------------------------------------------------------------------ BAP
  logic [1:0]        p_req_valid, p_req_ready, p_wready, p_rvalid, p_done;
  bus_req_t          p_req [2];
  logic [BUS_DW-1:0] p_wdata [2];

  assign p_req_valid = {m_req_valid, c_req_valid};
  assign p_req[0]    = c_req;
  assign p_req[1]    = m_req;
  assign p_wdata[0]  = c_wdata;
  assign p_wdata[1]  = m_wdata;
  assign c_req_ready = p_req_ready[0];
  assign c_wready    = p_wready[0];
  assign c_rvalid    = p_rvalid[0];
  assign c_done      = p_done[0];
  assign m_req_ready = p_req_ready[1];
  assign m_wready    = p_wready[1];
  assign m_rvalid    = p_rvalid[1];
  assign m_done      = p_done[1];

  bap u_bap (
    .clk, .rst_n,
    .req_valid(p_req_valid), .req(p_req), .req_ready(p_req_ready),
    .wdata(p_wdata), .wready(p_wready), .rdata(bap_rdata), .rvalid(p_rvalid), .done(p_done),
    .m_axi_awaddr, .m_axi_awlen, .m_axi_awsize, .m_axi_awburst, .m_axi_awvalid, .m_axi_awready,
    .m_axi_wdata, .m_axi_wstrb, .m_axi_wlast, .m_axi_wvalid, .m_axi_wready,
    .m_axi_bresp, .m_axi_bvalid, .m_axi_bready,
    .m_axi_araddr, .m_axi_arlen, .m_axi_arsize, .m_axi_arburst, .m_axi_arvalid, .m_axi_arready,
    .m_axi_rdata, .m_axi_rresp, .m_axi_rlast, .m_axi_rvalid, .m_axi_rready,
    .read_beats(bus_read_beats), .write_beats(bus_write_beats)
  );

  // ------------------------------------------------------------------ CC
  logic cc_needed;
  assign cc_needed = (slice_regs.mode == MODE_ENC) && (slice_regs.slice_type != SLICE_I);

  color_corr u_cc (
    .clk, .rst_n,
    .start(stage_start[3] && cc_needed), .mbqp_in(cc_mbqp_in),
    .in_valid(cc_in_valid),
    .org_y(cc_org_y), .org_cb(cc_org_cb), .org_cr(cc_org_cr),
    .prd_y(cc_prd_y), .prd_cb(cc_prd_cb), .prd_cr(cc_prd_cr),
    .done(cc_done), .color_dist(cc_color_dist), .dqp(cc_dqp),
    .mbqp_out(cc_mbqp_out), .corrected(cc_corrected)
  );

  // ------------------------------------------------------------------ MVP
  mvp #(.MVW(14)) u_mvp (
    .clk, .rst_n, .in_valid(mvp_in_valid), .part(mvp_part), .cur_ref(mvp_cur_ref),
    .nb_avail(mvp_nb_avail), .nb_ref(mvp_nb_ref), .nb_mvx(mvp_nb_mvx), .nb_mvy(mvp_nb_mvy),
    .out_valid(mvp_out_valid), .mvp_x, .mvp_y
  );

  // ------------------------------------------------------------------ TNQ
  tnq u_tnq (
    .clk, .rst_n, .in_valid(tnq_in_valid), .dec_mode(tnq_dec_mode), .intra(tnq_intra),
    .qp(tnq_qp), .res_in(tnq_res_in), .lvl_in(tnq_lvl_in), .lvl_valid(tnq_lvl_valid),
    .lvl_out(tnq_lvl_out), .rec_valid(tnq_rec_valid), .rec_out(tnq_rec_out),
    .blk8_valid(tnq_blk8_valid), .res8_in(tnq_res8_in), .lvl8_in(tnq_lvl8_in),
    .lvl8_valid(tnq_lvl8_valid), .lvl8_out(tnq_lvl8_out), .rec8_valid(tnq_rec8_valid),
    .rec8_out(tnq_rec8_out), .dc_in_valid(tnq_dc_in_valid), .dc_chroma(tnq_dc_chroma),
    .dc_coef_in(tnq_dc_coef_in), .dc_lvl_in(tnq_dc_lvl_in), .dc_lvl_valid(tnq_dc_lvl_valid),
    .dc_lvl_out(tnq_dc_lvl_out), .dc_valid(tnq_dc_valid), .dc_out(tnq_dc_out)
  );

  // ------------------------------------------------------------------ stage completion
  // Parts of a stage that finish at different times are remembered until
  // the whole stage reports done.
  logic sdma_fin, ent_fin, cc_fin, spmem_fin;
  logic s0_sdma, s0_ent, s3_cc, s3_ext;

  assign s0_sdma = sdma_done || sdma_fin;
  assign s0_ent  = (slice_regs.mode == MODE_ENC) || ext_stage_done[0] || ent_fin;
  assign s3_cc   = !cc_needed || cc_done || cc_fin;
  assign s3_ext  = ext_stage_done[3] || spmem_fin;

  always_comb begin
    stage_done    = ext_stage_done & stage_active;
    stage_done[0] = stage_active[0] && s0_sdma && s0_ent;
    stage_done[3] = stage_active[3] && s3_cc && s3_ext;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sdma_fin  <= 1'b0;
      ent_fin   <= 1'b0;
      cc_fin    <= 1'b0;
      spmem_fin <= 1'b0;
    end else begin
      if (stage_done[0]) begin
        sdma_fin <= 1'b0;
        ent_fin  <= 1'b0;
      end else begin
        if (sdma_done) sdma_fin <= 1'b1;
        if (ext_stage_done[0] && stage_active[0]) ent_fin <= 1'b1;
      end
      if (stage_done[3]) begin
        cc_fin    <= 1'b0;
        spmem_fin <= 1'b0;
      end else begin
        if (cc_done && stage_active[3]) cc_fin <= 1'b1;
        if (ext_stage_done[3] && stage_active[3]) spmem_fin <= 1'b1;
      end
    end
  end

  // Fill count equals the sum of SDMA's preload and prefetch requests.
  a_fill_count: assert property (@(posedge clk) disable iff (!rst_n)
    !pipe_busy |-> (rcb_fills == preload_fills + prefetch_fills));

endmodule
