// axil_host_bfm -- behavioural AXI4-Lite master for testbenches.
//
// Plays a host (or any bus initiator) with two tasks, write() and read(),
// each doing one complete 32-bit transaction with all byte strobes set. The
// outputs change on falling clock edges; a task samples the slave's ready one
// time unit later, when the slave's combinational outputs have settled, and
// keeps valid up until the rising edge that completes the handshake. BREADY
// and RREADY are always high. One task call at a time.
module axil_host_bfm (
  input  logic        clk,
  output logic [31:0] awaddr,
  output logic        awvalid,
  input  logic        awready,
  output logic [31:0] wdata,
  output logic [3:0]  wstrb,
  output logic        wvalid,
  input  logic        wready,
  input  logic [1:0]  bresp,
  input  logic        bvalid,
  output logic        bready,
  output logic [31:0] araddr,
  output logic        arvalid,
  input  logic        arready,
  input  logic [31:0] rdata,
  input  logic [1:0]  rresp,
  input  logic        rvalid,
  output logic        rready
);

  initial begin
    awaddr = '0; awvalid = 1'b0; wdata = '0; wstrb = '0; wvalid = 1'b0; bready = 1'b1;
    araddr = '0; arvalid = 1'b0; rready = 1'b1;
  end

  task automatic write(input logic [31:0] addr, input logic [31:0] data);
    @(negedge clk);
    awaddr = addr; wdata = data; wstrb = 4'hF; awvalid = 1'b1; wvalid = 1'b1;
    #1;
    while (!(awready && wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    awvalid = 1'b0; wvalid = 1'b0;
    while (!bvalid) @(negedge clk);
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data);
    @(negedge clk);
    araddr = addr; arvalid = 1'b1;
    #1;
    while (!arready) begin @(negedge clk); #1; end
    @(negedge clk);
    arvalid = 1'b0;
    while (!rvalid) @(negedge clk);
    data = rdata;
  endtask

endmodule
