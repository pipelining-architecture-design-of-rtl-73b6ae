// tb_slice_pipe_ctrl: self-checking test of the slice-level pipeline.
//
// A RISC model writes the registers of eight slices, each with its own
// values, taking a random parsing time per slice; a coding model answers
// every code_start with code_done after a random coding time. Some slices
// parse slowly (the coding stage must idle) and some code slowly (the RISC
// must stall). The test checks that every slice reaches the coding stage in
// order with exactly the register values written for it, that a write into
// a full shadow bank is refused, and that both kinds of stall occur.
module tb_slice_pipe_ctrl;
  import codec_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  logic        reg_we;
  logic [2:0]  reg_addr;
  logic [31:0] reg_wdata;
  logic        reg_stall;
  slice_regs_t active;
  logic        code_start, code_done, code_busy;
  logic [31:0] parse_stall_cycles, code_idle_cycles, refused_writes, slices_done;

  slice_pipe_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam int NSLICE = 8;
  slice_regs_t exp_q [$];
  int          n_coded = 0;

  function automatic slice_regs_t make_slice(int i);
    slice_regs_t r;
    r.mode       = codec_mode_e'(i % 2);
    r.slice_type = slice_type_e'(i % 3);
    r.qp         = 6'(20 + i);
    r.num_ref    = 2'(i % 3);
    r.first_mb   = 14'(i * 100);
    r.num_mbs    = 14'(50 + i);
    r.cur_base   = 32'h1000_0000 + 32'(i);
    r.ref_base0  = 32'h2000_0000 + 32'(i);
    r.ref_base1  = 32'h3000_0000 + 32'(i);
    r.rec_base   = 32'h4000_0000 + 32'(i);
    return r;
  endfunction

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk);
    reg_we = 1'b1; reg_addr = 3'(a); reg_wdata = d;
    @(negedge clk);
    reg_we = 1'b0;
  endtask

  // RISC model.
  initial begin : risc
    slice_regs_t r;
    reg_we = 0; reg_addr = 0; reg_wdata = 0;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NSLICE; i++) begin
      r = make_slice(i);
      repeat ((i % 4 == 1) ? 300 : $urandom_range(2, 20)) @(negedge clk);
      while (reg_stall) @(negedge clk);
      wr(0, {21'd0, r.num_ref, r.qp, r.slice_type, r.mode});
      wr(1, 32'(r.first_mb));
      wr(2, 32'(r.num_mbs));
      wr(3, r.cur_base);
      wr(4, r.ref_base0);
      wr(5, r.ref_base1);
      wr(6, r.rec_base);
      wr(7, 32'd1);
      exp_q.push_back(r);
      if (i == 3) begin
        // Attempt to write while the bank is still full.
        check(reg_stall == 1'b1, "bank full while the previous slice codes");
        if (reg_stall) begin
          int n_before;
          n_before = int'(refused_writes);
          wr(2, 32'd999);
          check(int'(refused_writes) == n_before + 1, "write into full shadow bank refused");
        end
      end
    end
  end

  // Coding model.
  int code_len;
  initial begin : coder
    code_done = 1'b0;
    forever begin
      @(posedge clk);
      if (code_start) begin
        slice_regs_t e;
        #1;
        check(exp_q.size() > 0, "slice started with a committed bank");
        if (exp_q.size() > 0) begin
          e = exp_q.pop_front();
          check(active == e, $sformatf("slice %0d registers", n_coded));
        end
        n_coded++;
        code_len = (n_coded % 3 == 0) ? 400 : int'($urandom_range(5, 60));
        repeat (code_len) @(negedge clk);
        code_done = 1'b1;
        @(negedge clk);
        code_done = 1'b0;
      end
    end
  end

  initial begin
    wait (n_coded == NSLICE && !code_busy && rst_n);
    repeat (5) @(negedge clk);
    check(int'(slices_done) == NSLICE, "slices completed");
    check(parse_stall_cycles > 0, "parsing stage stalled on slow coding");
    check(code_idle_cycles > 0, "coding stage waited on slow parsing");
    check(refused_writes == 1, "one refused write");
    $display("parse_stall=%0d code_idle=%0d", parse_stall_cycles, code_idle_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
