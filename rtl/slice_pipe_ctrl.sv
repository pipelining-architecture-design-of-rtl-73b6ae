// slice_pipe_ctrl: slice-level pipeline between RISC parsing and hardwired
// coding, with the codec register bank.
//
// The codec works as a two-stage pipeline on slices. In the parsing stage the
// RISC processor decodes the slice header and writes the codec registers of
// the next slice; in the coding stage the hardwired codec codes the current
// slice with the registers the RISC set earlier. Both stages run at the same
// time. To allow that the register bank is double-buffered: the RISC writes a
// shadow bank and closes it by writing the COMMIT register; the shadow bank is
// copied to the active bank, and coding starts, as soon as the coding stage is
// free. Each stage stalls when the other is late: the RISC cannot write a new
// shadow bank while a committed one is still waiting (reg_stall, writes are
// refused), and the coding stage waits idle while no committed bank exists.
//
// Register map (reg_addr, 32-bit words):
//   0 CTRL      bit 0 mode (0 encode, 1 decode), bits 2:1 slice type,
//               bits 8:3 QP, bits 10:9 number of reference pictures
//   1 FIRST_MB  first macroblock of the slice (raster index)
//   2 NUM_MBS   macroblocks in the slice
//   3 CUR_BASE  4 REF_BASE0  5 REF_BASE1  6 REC_BASE   picture addresses
//   7 COMMIT    any write hands the shadow bank to the coding stage
//
// Timing: code_start pulses for one cycle with active valid from that cycle
// on; code_done (one cycle) from the macroblock pipeline ends the slice. A
// committed bank waiting when code_done arrives starts the next slice one
// cycle later.
//
// The two-level (slice, macroblock) pipeline, the RISC setting codec
// registers and the stall when a stage is late follow the published
// architecture; the register map and the double-buffered bank are this
// design's choices.
module slice_pipe_ctrl
  import codec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // RISC register port
  input  logic        reg_we,
  input  logic [2:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic        reg_stall,
  // coding stage
  output slice_regs_t active,
  output logic        code_start,
  input  logic        code_done,
  output logic        code_busy,
  // statistics
  output logic [31:0] parse_stall_cycles,
  output logic [31:0] code_idle_cycles,
  output logic [31:0] refused_writes,
  output logic [31:0] slices_done
);

  slice_regs_t shadow;
  logic        shadow_full;
  logic        started;   // at least one slice has been started

  assign reg_stall = shadow_full;

  logic accept;
  assign accept = shadow_full && (!code_busy || code_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shadow             <= '0;
      shadow_full        <= 1'b0;
      active             <= '0;
      code_start         <= 1'b0;
      code_busy          <= 1'b0;
      started            <= 1'b0;
      parse_stall_cycles <= '0;
      code_idle_cycles   <= '0;
      refused_writes     <= '0;
      slices_done        <= '0;
    end else begin
      code_start <= 1'b0;

      // Parsing stage: register writes into the shadow bank.
      if (reg_we) begin
        if (shadow_full) begin
          refused_writes <= refused_writes + 32'd1;
        end else begin
          unique case (reg_addr)
            3'd0: begin
              shadow.mode       <= codec_mode_e'(reg_wdata[0]);
              shadow.slice_type <= slice_type_e'(reg_wdata[2:1]);
              shadow.qp         <= reg_wdata[8:3];
              shadow.num_ref    <= reg_wdata[10:9];
            end
            3'd1: shadow.first_mb  <= reg_wdata[13:0];
            3'd2: shadow.num_mbs   <= reg_wdata[13:0];
            3'd3: shadow.cur_base  <= reg_wdata;
            3'd4: shadow.ref_base0 <= reg_wdata;
            3'd5: shadow.ref_base1 <= reg_wdata;
            3'd6: shadow.rec_base  <= reg_wdata;
            3'd7: shadow_full      <= 1'b1;
            default: ;
          endcase
        end
      end

      // Coding stage.
      if (code_done && code_busy) begin
        code_busy   <= 1'b0;
        slices_done <= slices_done + 32'd1;
      end
      if (accept) begin
        active      <= shadow;
        shadow_full <= 1'b0;
        code_start  <= 1'b1;
        code_busy   <= 1'b1;
        started     <= 1'b1;
      end

      if (shadow_full && !accept) parse_stall_cycles <= parse_stall_cycles + 32'd1;
      if (started && !code_busy && !shadow_full) code_idle_cycles <= code_idle_cycles + 32'd1;
    end
  end

  // code_done is only meaningful while a slice is being coded.
  a_done_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    code_done |-> code_busy);

endmodule
