// top_ctrl: top control (TOP) of the video subsystem.
//
// It joins the two pipeline levels of the codec. The slice-level pipeline
// (slice_pipe_ctrl) holds the codec registers that the RISC loads for each
// slice and hands a committed register bank to the coding stage; the
// macroblock-level pipeline (mb_pipe_ctrl) then runs the slice through six
// stages when encoding or four when decoding, and its completion frees the
// coding stage for the next slice. The mode of the slice (encode or decode)
// selects the pipeline depth, which is how the same stage hardware is
// arranged for both coding paths. buf_sel is the stage-buffer select that
// alternates every macroblock slot.
//
// Interface: the RISC register port of slice_pipe_ctrl; per stage a
// stage_start pulse, an active flag and the macroblock index, and a
// stage_done input; active holds the registers of the slice being coded.
// Timing: a slice starts two cycles after its COMMIT write when the coding
// stage is free; slice_done pulses when its last macroblock leaves the last
// stage.
//
// What TOP does (register load, coding flow control, stage buffer
// management) follows the published architecture; how the two controllers
// are joined is this design's choice.
module top_ctrl
  import codec_pkg::*;
#(
  parameter int unsigned BUDGET = MB_CYCLE_BUDGET
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  reg_we,
  input  logic [2:0]            reg_addr,
  input  logic [31:0]           reg_wdata,
  output logic                  reg_stall,
  output slice_regs_t           active,
  output logic                  slice_done,
  output logic                  code_busy,
  output logic                  pipe_busy,
  output logic [MAX_STAGES-1:0] stage_start,
  output logic [MAX_STAGES-1:0] stage_active,
  output logic [13:0]           stage_mb [MAX_STAGES],
  input  logic [MAX_STAGES-1:0] stage_done,
  output logic                  buf_sel,
  output logic [31:0]           parse_stall_cycles,
  output logic [31:0]           code_idle_cycles,
  output logic [31:0]           refused_writes,
  output logic [31:0]           slices_done,
  output logic [15:0]           slot_cycles,
  output logic [31:0]           stall_cycles,
  output logic [31:0]           overrun_slots,
  output logic [31:0]           slots
);

  logic code_start;

  slice_pipe_ctrl u_slice (
    .clk, .rst_n,
    .reg_we, .reg_addr, .reg_wdata, .reg_stall,
    .active, .code_start, .code_done(slice_done), .code_busy,
    .parse_stall_cycles, .code_idle_cycles, .refused_writes, .slices_done
  );

  mb_pipe_ctrl #(.NSTAGE_MAX(MAX_STAGES), .BUDGET(BUDGET)) u_mb (
    .clk, .rst_n,
    .start(code_start), .mode(active.mode),
    .first_mb(active.first_mb), .num_mbs(active.num_mbs),
    .stage_start, .stage_active, .stage_mb, .stage_done,
    .buf_sel, .busy(pipe_busy), .done(slice_done),
    .slot_cycles, .stall_cycles, .overrun_slots, .slots
  );

endmodule
