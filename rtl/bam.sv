// bam: bus access multiplexer of the video subsystem.
//
// Every coding module that reads or writes external memory (SDMA, MCR,
// DEBLK, ENT) has a client port here; BAM picks one request at a time and
// passes it, with its data, to the bus access port (BAP). A request is a
// burst (read or write, byte address, beats - 1). Arbitration is round-robin:
// after a transfer, the search for the next request starts at the client
// after the one just served, so no module can starve another. The chosen
// client keeps the downstream port until its transfer reports done.
//
// Client port, per client c: req_valid[c] with req[c] is held until
// req_ready[c] (one cycle) accepts it. For a write, the client puts the next
// beat on wdata[c] at all times during its transfer; a beat is taken in each
// cycle where wready[c] is high. For a read, rvalid[c] marks each returned
// beat on rdata, which the client must take in that cycle. done[c] pulses
// when the transfer is complete. The downstream port has the same signals
// in the opposite direction.
//
// The existence of BAM, that all video-subsystem requests to external memory
// pass through it and that it chooses among them follows the published
// architecture; the round-robin policy and the port protocol are this
// design's choices, as the document does not give its selection rule.
module bam
  import codec_pkg::*;
#(
  parameter int unsigned NCLI = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // clients
  input  logic [NCLI-1:0]   req_valid,
  input  bus_req_t          req [NCLI],
  output logic [NCLI-1:0]   req_ready,
  input  logic [BUS_DW-1:0] wdata [NCLI],
  output logic [NCLI-1:0]   wready,
  output logic [BUS_DW-1:0] rdata,
  output logic [NCLI-1:0]   rvalid,
  output logic [NCLI-1:0]   done,
  // towards BAP
  output logic              m_req_valid,
  output bus_req_t          m_req,
  input  logic              m_req_ready,
  output logic [BUS_DW-1:0] m_wdata,
  input  logic              m_wready,
  input  logic [BUS_DW-1:0] m_rdata,
  input  logic              m_rvalid,
  input  logic              m_done,
  // statistics
  output logic [31:0]       grants [NCLI]
);

  localparam int unsigned CW = (NCLI > 1) ? $clog2(NCLI) : 1;

  logic          busy;     // a client owns the downstream port
  logic          issued;   // its request was accepted downstream
  logic [CW-1:0] owner;
  logic [CW-1:0] last;     // last client served

  // Round-robin choice among valid requests, starting after 'last'.
  logic          pick_ok;
  logic [CW-1:0] pick;
  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    for (int i = 1; i <= NCLI; i++) begin
      int unsigned c;
      c = (int'(last) + i) % NCLI;
      if (!pick_ok && req_valid[c]) begin
        pick_ok = 1'b1;
        pick    = CW'(c);
      end
    end
  end

  assign m_req_valid = busy && !issued;
  assign m_req       = req[owner];
  assign m_wdata     = wdata[owner];
  assign rdata       = m_rdata;

  always_comb begin
    req_ready = '0;
    wready    = '0;
    rvalid    = '0;
    done      = '0;
    if (busy) begin
      req_ready[owner] = m_req_valid && m_req_ready;
      wready[owner]    = m_wready;
      rvalid[owner]    = m_rvalid;
      done[owner]      = m_done;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      issued <= 1'b0;
      owner  <= '0;
      last   <= CW'(NCLI - 1);
      for (int c = 0; c < NCLI; c++) grants[c] <= '0;
    end else begin
      if (!busy) begin
        if (pick_ok) begin
          busy          <= 1'b1;
          issued        <= 1'b0;
          owner         <= pick;
          grants[pick]  <= grants[pick] + 32'd1;
        end
      end else begin
        if (m_req_valid && m_req_ready) issued <= 1'b1;
        if (m_done) begin
          busy <= 1'b0;
          last <= owner;
        end
      end
    end
  end

  // The downstream port only reports activity for an accepted request.
  a_no_stray_data: assert property (@(posedge clk) disable iff (!rst_n)
    (m_rvalid || m_done || m_wready) |-> (busy && issued));

endmodule
