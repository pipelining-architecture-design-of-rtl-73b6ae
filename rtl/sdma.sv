// sdma: first pipeline stage; reference data management and current
// macroblock load.
//
// For every macroblock (r, c) that enters the first stage SDMA does two jobs
// at the same time:
//  * pre-buffering: it has the reference cache-buffer (RCB) fetch the
//    reference macroblocks that later macroblocks will need, so that
//    IPME/SPMES/SPMEM (encoding) and MCR (decoding) find them on chip. The
//    RCB band must hold rows r-4..r+4 of each active reference for the
//    macroblock being searched. In steady state SDMA fetches macroblock
//    (r+5, c) of each active reference, one macroblock ahead along row r+5,
//    so row r+5 is complete when row r+1 begins. At the first macroblock of a
//    slice it first preloads rows r-4..r+4 completely and row r+5 up to
//    column c (rows outside the picture are skipped). I slices, which have no
//    active references, fetch nothing.
//  * current macroblock (encoding only): it reads the original macroblock
//    from the current picture through BAM (one 48-beat burst) and streams it
//    out on cur_valid/cur_word/cur_data to the stage buffer of IPME.
// done pulses when both jobs are finished.
//
// Interface: start is the stage_start pulse for macroblock mb (raster index)
// with first set when it is the first of its slice; mode, num_ref and
// cur_base come from the codec registers of the slice. Fill commands go to
// RCB with a valid/ready handshake, one outstanding at a time; the BAM
// client port follows BAM's protocol (read only).
//
// That SDMA pre-buffers reference data for the next macroblocks for
// IPME/SPMES/SPMEM/MCR, in the first stage of both pipelines, follows the
// published design; the fetch order, the row band and the current
// macroblock load are this design's choices.
module sdma
  import codec_pkg::*;
#(
  parameter int unsigned COLS = MB_COLS,
  parameter int unsigned ROWS = MB_ROWS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [13:0]       mb,
  input  logic              first,
  input  codec_mode_e       mode,
  input  logic [1:0]        num_ref,
  input  logic [BUS_AW-1:0] cur_base,
  output logic              done,
  // fill commands to RCB
  output logic              fill_valid,
  output logic              fill_ref,
  output logic [6:0]        fill_row,
  output logic [6:0]        fill_col,
  input  logic              fill_ready,
  input  logic              fill_done,
  // BAM client port (read only)
  output logic              req_valid,
  output bus_req_t          req,
  input  logic              req_ready,
  input  logic [BUS_DW-1:0] rdata,
  input  logic              rvalid,
  input  logic              bus_done,
  // current macroblock stream
  output logic              cur_valid,
  output logic [5:0]        cur_word,
  output logic [BUS_DW-1:0] cur_data,
  // statistics
  output logic [31:0]       preload_fills,
  output logic [31:0]       prefetch_fills
);

  // ------------------------------------------------------------ position
  logic [6:0] r, c;         // macroblock being served
  logic [1:0] nref;

  // ------------------------------------------------------------ fills
  typedef enum logic [1:0] {P_IDLE, P_ISSUE, P_WAIT} pstate_e;
  pstate_e    pstate;
  logic       preload;
  logic [7:0] it_row;       // may run past the picture; checked below
  logic [6:0] it_col;
  logic       it_ref;
  logic [7:0] row_end;

  assign fill_valid = (pstate == P_ISSUE);
  assign fill_ref   = it_ref;
  assign fill_row   = it_row[6:0];
  assign fill_col   = it_col;

  // ------------------------------------------------------------ current MB
  typedef enum logic [1:0] {C_IDLE, C_REQ, C_DATA} cstate_e;
  cstate_e cstate;

  assign req_valid = (cstate == C_REQ);
  assign req       = '{write: 1'b0, addr: mb_addr(cur_base, r, c), len: 8'(MB_BEATS - 1)};
  assign cur_valid = (cstate == C_DATA) && rvalid;
  assign cur_data  = rdata;

  logic busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r              <= '0;
      c              <= '0;
      nref           <= '0;
      pstate         <= P_IDLE;
      preload        <= 1'b0;
      it_row         <= '0;
      it_col         <= '0;
      it_ref         <= 1'b0;
      row_end        <= '0;
      cstate         <= C_IDLE;
      cur_word       <= '0;
      busy           <= 1'b0;
      done           <= 1'b0;
      preload_fills  <= '0;
      prefetch_fills <= '0;
    end else begin
      done <= 1'b0;

      if (start) begin
        logic [6:0] rr, cc;
        rr   = 7'(int'(mb) / COLS);
        cc   = 7'(int'(mb) % COLS);
        r    <= rr;
        c    <= cc;
        nref <= num_ref;
        busy <= 1'b1;
        // Fill plan.
        it_ref  <= 1'b0;
        preload <= first;
        row_end <= (8'(rr) + 8'd5 > 8'(ROWS - 1)) ? 8'(ROWS - 1) : 8'(rr) + 8'd5;
        if (first) begin
          it_row <= (rr >= 7'd4) ? 8'(rr) - 8'd4 : 8'd0;
          it_col <= '0;
        end else begin
          it_row <= 8'(rr) + 8'd5;
          it_col <= cc;
        end
        if (num_ref == 2'd0 || (!first && 8'(rr) + 8'd5 > 8'(ROWS - 1)))
          pstate <= P_IDLE;
        else
          pstate <= P_ISSUE;
        cstate   <= (mode == MODE_ENC) ? C_REQ : C_IDLE;
        cur_word <= '0;
      end else begin
        // Pre-buffering sequence.
        unique case (pstate)
          P_IDLE: ;
          P_ISSUE: if (fill_ready) pstate <= P_WAIT;
          P_WAIT: if (fill_done) begin
            if (preload) preload_fills <= preload_fills + 32'd1;
            else         prefetch_fills <= prefetch_fills + 32'd1;
            if (32'(it_ref) + 32'd1 < 32'(nref)) begin
              it_ref <= 1'b1;
              pstate <= P_ISSUE;
            end else begin
              it_ref <= 1'b0;
              if (!preload) begin
                pstate <= P_IDLE;
              end else if (32'(it_col) + 32'd1 < COLS &&
                           !(it_row == 8'(r) + 8'd5 && it_col == c)) begin
                it_col <= it_col + 7'd1;
                pstate <= P_ISSUE;
              end else if (it_row == 8'(r) + 8'd5 || it_row == row_end) begin
                pstate <= P_IDLE;
              end else begin
                it_row <= it_row + 8'd1;
                it_col <= '0;
                pstate <= P_ISSUE;
              end
            end
          end
          default: pstate <= P_IDLE;
        endcase

        // Current macroblock load.
        unique case (cstate)
          C_IDLE: ;
          C_REQ: if (req_ready) cstate <= C_DATA;
          C_DATA: begin
            if (rvalid) cur_word <= cur_word + 6'd1;
            if (bus_done) cstate <= C_IDLE;
          end
          default: cstate <= C_IDLE;
        endcase

        if (busy && pstate == P_IDLE && cstate == C_IDLE) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !busy);

endmodule
