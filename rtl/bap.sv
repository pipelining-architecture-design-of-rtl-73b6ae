// bap: bus access port of the video subsystem onto the 64-bit AXI
// multimedia bus.
//
// BAP has two client ports: client 0 is the reference cache-buffer (RCB),
// which fills itself with pre-buffered reference data, and client 1 is the
// bus access multiplexer (BAM), which carries the requests of the coding
// modules. It serves one burst at a time, alternating between the two
// clients when both wait, and turns each request into an AXI4 INCR burst of
// 64-bit beats: AR then R beats for a read, AW then W beats then B for a
// write. Read beats go straight to the client (RREADY is high for the whole
// data phase, so the client must take a beat in the cycle it arrives);
// write beats are taken from the client while WREADY is high.
//
// Client port protocol (same as BAM's): req_valid/req held until req_ready;
// wdata presented continuously during a write, taken when wready; rvalid
// marks read beats on rdata; done pulses once at the end of the burst (last
// R beat, or the B response). Requests must not cross a 4 KB boundary (the
// picture layout in codec_pkg keeps every macroblock burst inside one
// 512-byte slot).
//
// The two requesters (BAM and RCB) and the 64-bit AXI bus follow the
// published block diagrams; the single outstanding burst, the alternating
// priority and the signal subset (no IDs, no protection or cache
// attributes, response codes ignored) are this design's choices.
module bap
  import codec_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // clients: 0 = RCB, 1 = BAM
  input  logic [1:0]        req_valid,
  input  bus_req_t          req [2],
  output logic [1:0]        req_ready,
  input  logic [BUS_DW-1:0] wdata [2],
  output logic [1:0]        wready,
  output logic [BUS_DW-1:0] rdata,
  output logic [1:0]        rvalid,
  output logic [1:0]        done,
  // AXI4 master
  output logic [BUS_AW-1:0] m_axi_awaddr,
  output logic [7:0]        m_axi_awlen,
  output logic [2:0]        m_axi_awsize,
  output logic [1:0]        m_axi_awburst,
  output logic              m_axi_awvalid,
  input  logic              m_axi_awready,
  output logic [BUS_DW-1:0] m_axi_wdata,
  output logic [7:0]        m_axi_wstrb,
  output logic              m_axi_wlast,
  output logic              m_axi_wvalid,
  input  logic              m_axi_wready,
  input  logic [1:0]        m_axi_bresp,
  input  logic              m_axi_bvalid,
  output logic              m_axi_bready,
  output logic [BUS_AW-1:0] m_axi_araddr,
  output logic [7:0]        m_axi_arlen,
  output logic [2:0]        m_axi_arsize,
  output logic [1:0]        m_axi_arburst,
  output logic              m_axi_arvalid,
  input  logic              m_axi_arready,
  input  logic [BUS_DW-1:0] m_axi_rdata,
  input  logic [1:0]        m_axi_rresp,
  input  logic              m_axi_rlast,
  input  logic              m_axi_rvalid,
  output logic              m_axi_rready,
  // statistics
  output logic [31:0]       read_beats,
  output logic [31:0]       write_beats
);

  typedef enum logic [2:0] {S_IDLE, S_AR, S_R, S_AW, S_W, S_B} state_e;
  state_e     state;
  logic       owner;
  logic       prefer;    // client that wins when both wait
  bus_req_t   cur;
  logic [7:0] beat;

  logic pick;
  assign pick = (req_valid == 2'b11) ? prefer : req_valid[1];

  // AXI address/data channels.
  assign m_axi_araddr  = cur.addr;
  assign m_axi_arlen   = cur.len;
  assign m_axi_arsize  = 3'd3;        // 8 bytes per beat
  assign m_axi_arburst = 2'b01;       // INCR
  assign m_axi_arvalid = (state == S_AR);
  assign m_axi_awaddr  = cur.addr;
  assign m_axi_awlen   = cur.len;
  assign m_axi_awsize  = 3'd3;
  assign m_axi_awburst = 2'b01;
  assign m_axi_awvalid = (state == S_AW);
  assign m_axi_wdata   = wdata[owner];
  assign m_axi_wstrb   = 8'hff;
  assign m_axi_wlast   = (beat == cur.len);
  assign m_axi_wvalid  = (state == S_W);
  assign m_axi_bready  = (state == S_B);
  assign m_axi_rready  = (state == S_R);
  assign rdata         = m_axi_rdata;

  always_comb begin
    req_ready = '0;
    wready    = '0;
    rvalid    = '0;
    done      = '0;
    if (state == S_IDLE && req_valid != '0) req_ready[pick] = 1'b1;
    wready[owner] = m_axi_wvalid && m_axi_wready;
    rvalid[owner] = m_axi_rvalid && m_axi_rready;
    done[owner]   = (m_axi_rvalid && m_axi_rready && m_axi_rlast) ||
                    (m_axi_bvalid && m_axi_bready);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      owner       <= 1'b0;
      prefer      <= 1'b0;
      cur         <= '0;
      beat        <= '0;
      read_beats  <= '0;
      write_beats <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req_valid != '0) begin
          owner  <= pick;
          prefer <= ~pick;
          cur    <= req[pick];
          beat   <= '0;
          state  <= req[pick].write ? S_AW : S_AR;
        end
        S_AR: if (m_axi_arready) state <= S_R;
        S_R: if (m_axi_rvalid) begin
          read_beats <= read_beats + 32'd1;
          beat       <= beat + 8'd1;
          if (m_axi_rlast) state <= S_IDLE;
        end
        S_AW: if (m_axi_awready) state <= S_W;
        S_W: if (m_axi_wready) begin
          write_beats <= write_beats + 32'd1;
          beat        <= beat + 8'd1;
          if (m_axi_wlast) state <= S_B;
        end
        S_B: if (m_axi_bvalid) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // AXI rules: a valid address is held until accepted, and a burst stays
  // within one 4 KB page.
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (m_axi_arvalid && !m_axi_arready) |=> (m_axi_arvalid && $stable(m_axi_araddr)));
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (m_axi_awvalid && !m_axi_awready) |=> (m_axi_awvalid && $stable(m_axi_awaddr)));
  a_4k: assert property (@(posedge clk) disable iff (!rst_n)
    (m_axi_arvalid || m_axi_awvalid) |->
      ((32'(cur.addr[11:0]) + ((32'(cur.len) + 32'd1) << 3)) <= 32'd4096));
  a_rlast_on_time: assert property (@(posedge clk) disable iff (!rst_n)
    (m_axi_rvalid && m_axi_rready) |-> (m_axi_rlast == (beat == cur.len)));

  // Response codes are not acted on; a failed access is not reported.
  logic unused_resp;
  assign unused_resp = ^{m_axi_bresp, m_axi_rresp};

endmodule
