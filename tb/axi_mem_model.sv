// axi_mem_model: behavioural model of external DRAM behind a 64-bit AXI4
// slave port, for testbenches only.
//
// Memory is sparse (an associative array of 64-bit words). A word that was
// never written reads as a fixed function of its byte address,
// {addr ^ 32'hA5A5_0000, addr * 3}, so a testbench can predict read data
// without loading the memory. One burst is served at a time; address,
// data and response handshakes are delayed by random wait states when
// STALL is set. Only INCR bursts of 8-byte beats are modelled.
module axi_mem_model #(
  parameter bit STALL = 1'b1
) (
  input  logic        clk,
  input  logic [31:0] awaddr,
  input  logic [7:0]  awlen,
  input  logic        awvalid,
  output logic        awready,
  input  logic [63:0] wdata,
  input  logic        wlast,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready,
  input  logic [31:0] araddr,
  input  logic [7:0]  arlen,
  input  logic        arvalid,
  output logic        arready,
  output logic [63:0] rdata,
  output logic [1:0]  rresp,
  output logic        rlast,
  output logic        rvalid,
  input  logic        rready
);
  logic [63:0] mem [logic [28:0]];
  int unsigned writes = 0, reads = 0;

  function automatic logic [63:0] pattern(logic [31:0] a);
    return {a ^ 32'hA5A5_0000, a * 32'd3};
  endfunction

  function automatic logic [63:0] peek(logic [31:0] a);
    if (mem.exists(a[31:3])) return mem[a[31:3]];
    return pattern({a[31:3], 3'b000});
  endfunction

  function automatic bit ws();
    return STALL && ($urandom_range(0, 3) == 0);
  endfunction

  initial begin
    awready = 0; wready = 0; bvalid = 0; bresp = 0;
    arready = 0; rvalid = 0; rlast = 0; rdata = 0; rresp = 0;
  end

  // Read channel.
  initial begin
    forever begin
      logic [31:0] a;
      int n;
      @(posedge clk);
      if (arvalid) begin
        while (ws()) @(posedge clk);
        arready <= 1'b1;
        a = araddr; n = int'(arlen) + 1;
        @(posedge clk);
        arready <= 1'b0;
        for (int i = 0; i < n; i++) begin
          while (ws()) begin rvalid <= 1'b0; @(posedge clk); end
          rvalid <= 1'b1;
          rdata  <= peek(a + 32'(i * 8));
          rlast  <= (i == n - 1);
          @(posedge clk);
          while (!rready) @(posedge clk);
          reads++;
        end
        rvalid <= 1'b0;
        rlast  <= 1'b0;
      end
    end
  end

  // Write channel.
  initial begin
    forever begin
      logic [31:0] a;
      int n;
      @(posedge clk);
      if (awvalid) begin
        while (ws()) @(posedge clk);
        awready <= 1'b1;
        a = awaddr; n = int'(awlen) + 1;
        @(posedge clk);
        awready <= 1'b0;
        for (int i = 0; i < n; i++) begin
          while (ws()) begin wready <= 1'b0; @(posedge clk); end
          wready <= 1'b1;
          @(posedge clk);
          while (!wvalid) @(posedge clk);
          mem[(a >> 3) + 32'(i)] = wdata;
          writes++;
          if (wlast != (i == n - 1)) $display("axi_mem_model: WLAST on beat %0d of %0d", i, n);
        end
        wready <= 1'b0;
        bvalid <= 1'b1;
        @(posedge clk);
        while (!bready) @(posedge clk);
        bvalid <= 1'b0;
      end
    end
  end
endmodule
