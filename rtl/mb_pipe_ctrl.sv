// mb_pipe_ctrl: macroblock-level pipeline sequencer of the coding part.
//
// The coding modules of a slice are grouped into pipeline stages: six for
// encoding (SDMA | IPME | SPMES | SPMEM | RECON | DEBLK+ENT) and four for
// decoding (SDMA+ENT | MCR | RECON | DEBLK). All stages advance together in
// macroblock slots: at the start of slot k, stage s is given macroblock
// k - s (if that macroblock belongs to the slice) with a one-cycle
// stage_start pulse. The slot ends when every stage that holds a macroblock
// has reported stage_done; a stage that finishes early waits, so the whole
// pipeline stalls on its slowest stage. A slice of N macroblocks therefore
// takes N + stages - 1 slots to fill and drain.
//
// Stage buffers between neighbouring stages are double-buffered; buf_sel
// toggles every slot and tells a stage which half it writes (the next stage
// reads the other half).
//
// Interface: start (one cycle, with mode, first_mb and num_mbs valid) starts a
// slice; done pulses one cycle after its last slot. stage_done may be a
// one-cycle pulse or a held level; it is counted from the cycle after the
// stage_start pulse onwards. Statistics: slot length
// of the last slot, stall cycles (a stage finished and is waiting for
// another), and slots longer than the 500 clock/MB budget.
//
// The stage grouping, the lock-step advance with stall on a late stage and
// the 500-cycle budget follow the published architecture; the start/done
// handshake, the statistics counters and the double-buffer select are this
// design's choices.
module mb_pipe_ctrl
  import codec_pkg::*;
#(
  parameter int unsigned NSTAGE_MAX = MAX_STAGES,
  parameter int unsigned BUDGET     = MB_CYCLE_BUDGET
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  codec_mode_e            mode,
  input  logic [13:0]            first_mb,
  input  logic [13:0]            num_mbs,
  output logic [NSTAGE_MAX-1:0]  stage_start,
  output logic [NSTAGE_MAX-1:0]  stage_active,
  output logic [13:0]            stage_mb [NSTAGE_MAX],
  input  logic [NSTAGE_MAX-1:0]  stage_done,
  output logic                   buf_sel,
  output logic                   busy,
  output logic                   done,
  output logic [15:0]            slot_cycles,
  output logic [31:0]            stall_cycles,
  output logic [31:0]            overrun_slots,
  output logic [31:0]            slots
);

  typedef enum logic [1:0] {S_IDLE, S_LAUNCH, S_WAIT} state_e;
  state_e state;

  logic [14:0]           slot;       // current slot index k
  logic [14:0]           last_slot;  // N + stages - 2
  logic [13:0]           base_mb;
  logic [13:0]           n_mbs;
  codec_mode_e           cur_mode;
  logic [NSTAGE_MAX-1:0] done_mask;
  logic [15:0]           cyc;

  function automatic int unsigned depth(codec_mode_e m);
    return (m == MODE_ENC) ? ENC_STAGES : DEC_STAGES;
  endfunction

  // Which stages hold a macroblock in the current slot.
  always_comb begin
    for (int s = 0; s < NSTAGE_MAX; s++) begin
      logic [14:0] k_minus_s;
      k_minus_s       = slot - 15'(s);
      stage_active[s] = (state != S_IDLE) && (s < depth(cur_mode)) &&
                        (slot >= 15'(s)) && (k_minus_s < {1'b0, n_mbs});
      stage_mb[s]     = base_mb + k_minus_s[13:0];
    end
  end

  logic [NSTAGE_MAX-1:0] finished;
  logic                  slot_end;
  assign finished = done_mask | stage_done;
  assign slot_end = (state == S_WAIT) && ((finished | ~stage_active) == '1);

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      slot          <= '0;
      last_slot     <= '0;
      base_mb       <= '0;
      n_mbs         <= '0;
      cur_mode      <= MODE_ENC;
      done_mask     <= '0;
      cyc           <= '0;
      stage_start   <= '0;
      buf_sel       <= 1'b0;
      done          <= 1'b0;
      slot_cycles   <= '0;
      stall_cycles  <= '0;
      overrun_slots <= '0;
      slots         <= '0;
    end else begin
      stage_start <= '0;
      done        <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start && num_mbs == 0) begin
            done <= 1'b1;  // an empty slice finishes at once
          end else if (start) begin
            cur_mode  <= mode;
            base_mb   <= first_mb;
            n_mbs     <= num_mbs;
            slot      <= '0;
            last_slot <= 15'(num_mbs) + 15'(depth(mode)) - 15'd2;
            state     <= S_LAUNCH;
          end
        end
        S_LAUNCH: begin
          stage_start <= stage_active;
          done_mask   <= '0;
          cyc         <= 16'd1;
          state       <= S_WAIT;
        end
        S_WAIT: begin
          done_mask <= finished & stage_active;
          cyc       <= cyc + 16'd1;
          if (|(finished & stage_active) && !slot_end)
            stall_cycles <= stall_cycles + 32'd1;
          if (slot_end) begin
            slot_cycles <= cyc + 16'd1;
            slots       <= slots + 32'd1;
            if (32'(cyc) + 32'd1 > BUDGET) overrun_slots <= overrun_slots + 32'd1;
            buf_sel <= ~buf_sel;
            if (slot == last_slot) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              slot  <= slot + 15'd1;
              state <= S_LAUNCH;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A stage only reports completion for a macroblock it was given.
  a_done_only_active: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_WAIT) |-> ((stage_done & ~stage_active) == '0));

endmodule
