// tb_top_ctrl: self-checking test of the top control (both pipeline levels).
//
// A RISC model loads and commits three slices (encode, decode, encode, of
// different lengths) as fast as the slice pipeline lets it; stage models
// answer stage_start after random latencies. The test checks that each slice
// runs through the right number of stages (six encoding, four decoding),
// that every stage sees the slice's macroblocks in order, that the total
// number of macroblock slots is sum(N + depth - 1), and that the slice-level
// pipeline overlapped parsing with coding (the RISC was stalled).
module tb_top_ctrl;
  import codec_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  logic                  reg_we;
  logic [2:0]            reg_addr;
  logic [31:0]           reg_wdata;
  logic                  reg_stall;
  slice_regs_t           active;
  logic                  slice_done, code_busy, pipe_busy;
  logic [MAX_STAGES-1:0] stage_start, stage_active, stage_done;
  logic [13:0]           stage_mb [MAX_STAGES];
  logic                  buf_sel;
  logic [31:0]           parse_stall_cycles, code_idle_cycles, refused_writes, slices_done;
  logic [15:0]           slot_cycles;
  logic [31:0]           stall_cycles, overrun_slots, slots;

  top_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam int NSL = 3;
  int sl_mode  [NSL] = '{0, 1, 0};
  int sl_first [NSL] = '{0, 40, 200};
  int sl_n     [NSL] = '{5, 4, 3};

  // Stage models.
  int cnt [MAX_STAGES];
  bit pend [MAX_STAGES];
  always_comb
    for (int s = 0; s < MAX_STAGES; s++) stage_done[s] = pend[s] && cnt[s] == 0;
  always_ff @(posedge clk)
    for (int s = 0; s < MAX_STAGES; s++) begin
      if (stage_start[s]) begin
        pend[s] <= 1'b1;
        cnt[s]  <= $urandom_range(0, 30);
      end else if (stage_done[s]) pend[s] <= 1'b0;
      else if (pend[s]) cnt[s] <= cnt[s] - 1;
    end

  // Expected macroblock stream per stage, over all slices.
  int exp_mb [MAX_STAGES][$];
  int deepest;
  always @(posedge clk)
    for (int s = 0; s < MAX_STAGES; s++)
      if (stage_start[s]) begin
        if (s > deepest) deepest = s;
        check(exp_mb[s].size() > 0, $sformatf("stage %0d started unexpectedly", s));
        if (exp_mb[s].size() > 0)
          check(int'(stage_mb[s]) == exp_mb[s].pop_front(), $sformatf("stage %0d macroblock order", s));
      end

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk);
    reg_we = 1'b1; reg_addr = 3'(a); reg_wdata = d;
    @(negedge clk);
    reg_we = 1'b0;
  endtask

  int exp_slots = 0;
  initial begin
    reg_we = 0; reg_addr = 0; reg_wdata = 0; deepest = -1;
    for (int s = 0; s < MAX_STAGES; s++) begin pend[s] = 0; cnt[s] = 0; end
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NSL; i++) begin
      int depth_v;
      depth_v = (sl_mode[i] == 0) ? ENC_STAGES : DEC_STAGES;
      exp_slots += sl_n[i] + depth_v - 1;
      for (int s = 0; s < depth_v; s++)
        for (int m = 0; m < sl_n[i]; m++) exp_mb[s].push_back(sl_first[i] + m);
      while (reg_stall) @(negedge clk);
      wr(0, 32'(sl_mode[i]) | (32'd28 << 3));
      wr(1, 32'(sl_first[i]));
      wr(2, 32'(sl_n[i]));
      wr(7, 32'd1);
    end
    wait (slices_done == NSL);
    repeat (3) @(negedge clk);
    check(int'(slots) == exp_slots, $sformatf("slots %0d expected %0d", slots, exp_slots));
    for (int s = 0; s < MAX_STAGES; s++)
      check(exp_mb[s].size() == 0, $sformatf("stage %0d got all its macroblocks", s));
    check(deepest == ENC_STAGES - 1, "encoder slices reach the sixth stage");
    check(parse_stall_cycles > 0, "RISC stalled while a slice was coding");
    check(!code_busy && !pipe_busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
