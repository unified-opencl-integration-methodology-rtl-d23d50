// almaif_dp_ram -- dual-port on-chip RAM backing one AlmaIF memory region.
//
// The configuration memory, the command queue memory and the data memory of
// the wrapper are each one instance of this RAM. Port A faces the slave
// interface (the host or a peer device), port B faces the accelerator side
// (the AlmaIF controller and the kernel). Both ports are synchronous,
// 32 bits wide, with per-byte write enables, and are addressed by a 32-bit
// word index; the index is taken modulo DEPTH_WORDS.
//
// Timing: a read issued with req.en=1, req.we=0 returns its word on rdata in
// the next cycle. rdata keeps its value while the port is not enabled, as a
// block RAM output register does; the controller relies on this to pause
// (freeze) without losing a word in flight. A write and a read of the same
// word on the two ports in one cycle return the old word (read-first).
// Both ports writing the same word in one cycle leave port B's word.
//
// The region sizes are this design's choice; the interface only requires each
// region to report its size and start address in the control registers.
module almaif_dp_ram
  import almaif_pkg::*;
#(
  parameter int unsigned DEPTH_WORDS = 1024
) (
  input  logic              clk,
  input  mem_req_t          a_req,
  output logic [31:0]       a_rdata,
  input  mem_req_t          b_req,
  output logic [31:0]       b_rdata
);

  localparam int unsigned AW = (DEPTH_WORDS > 1) ? $clog2(DEPTH_WORDS) : 1;

  logic [31:0] mem [DEPTH_WORDS];

  logic [AW-1:0] a_idx, b_idx;
  assign a_idx = AW'(a_req.addr % DEPTH_WORDS);
  assign b_idx = AW'(b_req.addr % DEPTH_WORDS);

  always_ff @(posedge clk) begin
    if (a_req.en) begin
      if (a_req.we) begin
        for (int i = 0; i < 4; i++)
          if (a_req.be[i]) mem[a_idx][8*i +: 8] <= a_req.wdata[8*i +: 8];
      end else begin
        a_rdata <= mem[a_idx];
      end
    end
    if (b_req.en) begin
      if (b_req.we) begin
        for (int i = 0; i < 4; i++)
          if (b_req.be[i]) mem[b_idx][8*i +: 8] <= b_req.wdata[8*i +: 8];
      end else begin
        b_rdata <= mem[b_idx];
      end
    end
  end

endmodule
