// tb_mb_pipe_ctrl: self-checking test of the macroblock pipeline sequencer.
//
// Each stage is modelled by a responder that answers a stage_start with
// stage_done after a per-slot latency drawn at random (with one stage made
// deliberately slow in some slots and one slot over the 500-cycle budget).
// The test checks, for an encoder slice and a decoder slice: the number of
// slots (N + depth - 1), that every stage sees every macroblock exactly once
// and in order, that the slot length equals the slowest stage's latency plus
// three cycles of sequencing, and that stalls and budget overruns are counted.
module tb_mb_pipe_ctrl;
  import codec_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  logic                  start;
  codec_mode_e           mode;
  logic [13:0]           first_mb, num_mbs;
  logic [MAX_STAGES-1:0] stage_start, stage_active, stage_done;
  logic [13:0]           stage_mb [MAX_STAGES];
  logic                  buf_sel, busy, done;
  logic [15:0]           slot_cycles;
  logic [31:0]           stall_cycles, overrun_slots, slots;

  mb_pipe_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Stage responders: stage s answers lat[s] cycles after seeing stage_start.
  int  lat      [MAX_STAGES];
  int  cnt      [MAX_STAGES];
  bit  pend     [MAX_STAGES];
  int  next_mb  [MAX_STAGES];
  int  seen     [MAX_STAGES];
  int  slot_max, exp_len, slow_stage;
  logic [MAX_STAGES-1:0] resp;

  always_comb
    for (int s = 0; s < MAX_STAGES; s++)
      resp[s] = pend[s] && (cnt[s] == 0);
  assign stage_done = resp;

  always_ff @(posedge clk) begin
    for (int s = 0; s < MAX_STAGES; s++) begin
      if (stage_start[s]) begin
        cnt[s]  <= lat[s];
        pend[s] <= 1'b1;
      end else if (resp[s]) begin
        pend[s] <= 1'b0;
      end else if (pend[s]) begin
        cnt[s] <= cnt[s] - 1;
      end
    end
  end

  // Monitor: order of macroblocks per stage and slot length; new latencies
  // are drawn at the end of each slot.
  always @(posedge clk) begin
    if (stage_start != '0) begin
      slot_max = 0;
      for (int s = 0; s < MAX_STAGES; s++) begin
        if (stage_start[s]) begin
          check(int'(stage_mb[s]) == next_mb[s], $sformatf("stage %0d mb %0d expected %0d", s, stage_mb[s], next_mb[s]));
          next_mb[s]++;
          seen[s]++;
          if (lat[s] > slot_max) slot_max = lat[s];
        end
      end
      exp_len = slot_max + 3;
    end
    if (rst_n && dut.slot_end) begin
      check(int'(dut.cyc) + 1 == exp_len, $sformatf("slot length %0d expected %0d", int'(dut.cyc) + 1, exp_len));
      for (int s = 0; s < MAX_STAGES; s++) lat[s] = $urandom_range(0, 40);
      lat[slow_stage] = ($urandom_range(0, 3) == 0) ? 520 : 60;
    end
  end

  task automatic run_slice(codec_mode_e m, int first, int n, int slow);
    int depth_v;
    int s0, st0, ov0;
    depth_v = (m == MODE_ENC) ? ENC_STAGES : DEC_STAGES;
    for (int s = 0; s < MAX_STAGES; s++) begin
      next_mb[s] = first;
      seen[s]    = 0;
      lat[s]     = 5 + s;
    end
    slow_stage = slow;
    s0 = int'(slots); st0 = int'(stall_cycles); ov0 = int'(overrun_slots);
    @(negedge clk);
    mode = m; first_mb = 14'(first); num_mbs = 14'(n); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(posedge clk);
    check(int'(slots) - s0 == n + depth_v - 1, $sformatf("slots %0d expected %0d", int'(slots) - s0, n + depth_v - 1));
    for (int s = 0; s < MAX_STAGES; s++)
      check(seen[s] == ((s < depth_v) ? n : 0), $sformatf("stage %0d saw %0d mbs", s, seen[s]));
    check(int'(stall_cycles) > st0, "stalls counted");
    $display("mode %0d: slots=%0d stall_cycles=%0d overruns=%0d", m, int'(slots) - s0,
             int'(stall_cycles) - st0, int'(overrun_slots) - ov0);
  endtask

  initial begin
    start = 0; mode = MODE_ENC; first_mb = 0; num_mbs = 0;
    #1 rst_n = 1'b0;
    slow_stage = 0;
    for (int s = 0; s < MAX_STAGES; s++) begin cnt[s] = 0; pend[s] = 0; lat[s] = 3; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_slice(MODE_ENC, 100, 12, 3);
    run_slice(MODE_DEC, 7, 9, 1);
    check(overrun_slots > 0, "budget overrun counted");
    check(!busy, "idle after slices");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
