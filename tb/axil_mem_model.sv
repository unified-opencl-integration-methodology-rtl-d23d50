// axil_mem_model -- behavioural AXI4-Lite slave memory for testbenches.
//
// Stands in for memory outside the accelerator (host DRAM or another device's
// memory) on the accelerator's bus master. It holds WORDS 32-bit words from
// byte address BASE upwards (addresses are taken modulo the size) and answers
// every access OKAY. Each ready and valid it drives waits a random 0..MAX_WAIT
// cycles, so the master sees varying latency. mem[] may be read and written by
// the testbench directly. Counts the reads and writes it served.
module axil_mem_model #(
  parameter logic [31:0] BASE     = 32'h8000_0000,
  parameter int unsigned WORDS    = 1024,
  parameter int unsigned MAX_WAIT = 3
) (
  input  logic        clk,
  input  logic [31:0] awaddr,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready,
  input  logic [31:0] araddr,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rvalid,
  input  logic        rready
);

  logic [31:0] mem [WORDS];
  int reads = 0, writes = 0;

  initial begin
    awready = 0; wready = 0; bvalid = 0; arready = 0; rvalid = 0;
    bresp = 2'b00; rresp = 2'b00; rdata = '0;
  end

  function automatic int unsigned widx(input logic [31:0] a);
    return ((a - BASE) >> 2) % WORDS;
  endfunction

  // Every action happens 1 time unit after a rising edge, when the master's
  // outputs have settled; a handshake completes at the following edge.
  task automatic wait_cycles(input int n);
    repeat (n) begin @(posedge clk); #1; end
  endtask

  // write channel: address and data taken together, then the response
  initial forever begin
    logic [31:0] a, d;
    logic [3:0]  s;
    @(posedge clk); #1;
    if (awvalid && wvalid) begin
      wait_cycles($urandom_range(MAX_WAIT));
      awready = 1; wready = 1;
      a = awaddr; d = wdata; s = wstrb;
      wait_cycles(1);
      awready = 0; wready = 0;
      for (int i = 0; i < 4; i++) if (s[i]) mem[widx(a)][8*i +: 8] = d[8*i +: 8];
      writes++;
      wait_cycles($urandom_range(MAX_WAIT));
      bvalid = 1;
      while (!bready) wait_cycles(1);
      wait_cycles(1);
      bvalid = 0;
    end
  end

  // read channel
  initial forever begin
    logic [31:0] a;
    @(posedge clk); #1;
    if (arvalid) begin
      wait_cycles($urandom_range(MAX_WAIT));
      arready = 1;
      a = araddr;
      wait_cycles(1);
      arready = 0;
      reads++;
      wait_cycles($urandom_range(MAX_WAIT));
      rdata = mem[widx(a)]; rvalid = 1;
      while (!rready) wait_cycles(1);
      wait_cycles(1);
      rvalid = 0;
    end
  end

endmodule
