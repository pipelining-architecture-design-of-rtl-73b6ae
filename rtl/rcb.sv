// rcb: reference cache-buffer of the video subsystem.
//
// Inter prediction reads reference pictures far more often than the bus
// could supply them, so reference data is pre-buffered on chip and reused.
// Motion vectors of this codec reach the whole picture width horizontally
// but only +-56.75 pixels vertically, so the buffer holds, for every active
// reference picture, a band of WIN_ROWS complete macroblock rows. Rows are
// stored circularly: picture macroblock row r of reference f lives in band
// slot r mod WIN_ROWS. Each stored macroblock is the 48 64-bit words of a
// 4:2:0 macroblock (256 luma bytes, then 64 Cb and 64 Cr bytes) as laid out
// in external memory.
//
// Filling: SDMA sends fill commands (reference, row, column). For each, RCB
// reads the macroblock through its client port on BAP (one 48-beat burst)
// and writes the beats into the buffer; when the burst is done the entry's
// tag (its picture row) is written and marked valid, and fill_done pulses.
// One fill is in flight at a time; fill_ready is high when a command can be
// taken. flush clears all tags (new reference pictures).
//
// Reading: NRD independent read ports (IPME, SPMES, SPMEM when encoding, MCR
// when decoding). A read (reference, row, column, word 0..47) returns the
// word and a hit flag one cycle later; hit is low when that macroblock is not
// resident, in which case the reader must fetch from external memory (as MCR
// does). Hit and miss counts are kept.
//
// The pre-buffering of reference data, its reuse to save bus bandwidth and
// the vertical search range of +-56.75 pixels follow the published design.
// The band organisation, WIN_ROWS = 11, the tag scheme and the port timing
// are this design's choices. Nine rows (-64..+80 pixels around the current
// macroblock row) cover the search range plus interpolation margin; one
// more row is kept for macroblocks of the previous row still in later
// pipeline stages, and one is being refilled by SDMA.
module rcb
  import codec_pkg::*;
#(
  parameter int unsigned COLS     = MB_COLS,
  parameter int unsigned WIN_ROWS = 11,
  parameter int unsigned NREF     = NUM_REF,
  parameter int unsigned NRD      = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  input  logic [BUS_AW-1:0] ref_base [NREF],
  // fill commands from SDMA
  input  logic              fill_valid,
  input  logic              fill_ref,
  input  logic [6:0]        fill_row,
  input  logic [6:0]        fill_col,
  output logic              fill_ready,
  output logic              fill_done,
  // client port on BAP
  output logic              bus_req_valid,
  output bus_req_t          bus_req,
  input  logic              bus_req_ready,
  output logic [BUS_DW-1:0] bus_wdata,
  input  logic              bus_wready,
  input  logic [BUS_DW-1:0] bus_rdata,
  input  logic              bus_rvalid,
  input  logic              bus_done,
  // read ports
  input  logic [NRD-1:0]    rd_en,
  input  logic              rd_ref  [NRD],
  input  logic [6:0]        rd_row  [NRD],
  input  logic [6:0]        rd_col  [NRD],
  input  logic [5:0]        rd_word [NRD],
  output logic [BUS_DW-1:0] rd_data [NRD],
  output logic [NRD-1:0]    rd_hit,
  // statistics
  output logic [31:0]       fills,
  output logic [31:0]       hits,
  output logic [31:0]       misses
);

  localparam int unsigned ENTRIES = NREF * WIN_ROWS * COLS;
  localparam int unsigned WORDS   = ENTRIES * MB_BEATS;
  localparam int unsigned EW      = $clog2(ENTRIES);
  localparam int unsigned AW      = $clog2(WORDS);

  logic [BUS_DW-1:0] buffer [WORDS];
  logic [6:0]        tag    [ENTRIES];
  logic [ENTRIES-1:0] valid;

  function automatic logic [EW-1:0] entry(logic f, logic [6:0] row, logic [6:0] col);
    int unsigned slot;
    slot = int'(row) % WIN_ROWS;
    return EW'(((int'(f) % NREF) * WIN_ROWS + slot) * COLS + int'(col));
  endfunction

  // ---------------------------------------------------------------- fill
  typedef enum logic [1:0] {F_IDLE, F_REQ, F_DATA} fstate_e;
  fstate_e    fstate;
  logic [EW-1:0] f_entry;
  logic [6:0]    f_row;
  logic [5:0]    f_word;
  logic          f_ref;
  logic [6:0]    f_col;

  assign fill_ready    = (fstate == F_IDLE);
  assign bus_req_valid = (fstate == F_REQ);
  assign bus_req       = '{write: 1'b0,
                           addr:  mb_addr(ref_base[int'(f_ref) % NREF], f_row, f_col),
                           len:   8'(MB_BEATS - 1)};
  assign bus_wdata     = '0;   // RCB only reads

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fstate    <= F_IDLE;
      f_entry   <= '0;
      f_row     <= '0;
      f_col     <= '0;
      f_ref     <= 1'b0;
      f_word    <= '0;
      fill_done <= 1'b0;
      fills     <= '0;
      valid     <= '0;
    end else begin
      fill_done <= 1'b0;
      unique case (fstate)
        F_IDLE: if (fill_valid) begin
          f_entry <= entry(fill_ref, fill_row, fill_col);
          f_row   <= fill_row;
          f_col   <= fill_col;
          f_ref   <= fill_ref;
          f_word  <= '0;
          // The old contents of the slot are no longer valid.
          valid[entry(fill_ref, fill_row, fill_col)] <= 1'b0;
          fstate  <= F_REQ;
        end
        F_REQ: if (bus_req_ready) fstate <= F_DATA;
        F_DATA: begin
          if (bus_rvalid) f_word <= f_word + 6'd1;
          if (bus_done) begin
            valid[f_entry] <= 1'b1;
            fill_done      <= 1'b1;
            fills          <= fills + 32'd1;
            fstate         <= F_IDLE;
          end
        end
        default: fstate <= F_IDLE;
      endcase
      if (flush) valid <= '0;
    end
  end

  // Buffer and tag writes (no reset: only read where valid).
  always_ff @(posedge clk) begin
    if (fstate == F_DATA && bus_rvalid)
      buffer[AW'(int'(f_entry) * MB_BEATS + int'(f_word))] <= bus_rdata;
    if (fstate == F_DATA && bus_done)
      tag[f_entry] <= f_row;
  end

  // ---------------------------------------------------------------- read
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_hit <= '0;
      hits   <= '0;
      misses <= '0;
    end else begin
      int unsigned nh, nm;
      nh = 0;
      nm = 0;
      for (int p = 0; p < NRD; p++) begin
        logic [EW-1:0] e;
        e = entry(rd_ref[p], rd_row[p], rd_col[p]);
        rd_hit[p] <= rd_en[p] && valid[e] && (tag[e] == rd_row[p]);
        if (rd_en[p]) begin
          if (valid[e] && tag[e] == rd_row[p]) nh++;
          else nm++;
        end
      end
      hits   <= hits + nh;
      misses <= misses + nm;
    end
  end

  always_ff @(posedge clk)
    for (int p = 0; p < NRD; p++)
      rd_data[p] <= buffer[AW'(int'(entry(rd_ref[p], rd_row[p], rd_col[p])) * MB_BEATS +
                               int'(rd_word[p]))];

  a_col_range: assert property (@(posedge clk) disable iff (!rst_n)
    (fill_valid && fill_ready) |-> (fill_col < 7'(COLS)));

  // The write data channel of the client port is never used by a read-only
  // client.
  logic unused_wready;
  assign unused_wready = bus_wready;

endmodule
