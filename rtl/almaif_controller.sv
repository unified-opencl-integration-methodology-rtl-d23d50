// almaif_controller -- the AlmaIF controller (command packet processor) of the
// wrapped fixed-function accelerator.
//
// The controller watches the command queue indices. Whenever the write index
// differs from the read index, the packet at slot (read index mod CQ_PACKETS)
// of the command queue memory is copied word by word (16 words, one per
// cycle) into a packet register and its AQL header type is decoded:
//
//  * INVALID: the producer has not finished writing the packet; the slot is
//    fetched again (the controller reports a stall meanwhile).
//  * any other type: the packet is picked. The header is overwritten with
//    INVALID and the read index is advanced by one, then the packet runs:
//  * KERNEL_DISPATCH: kernel_object holds the built-in kernel ID and
//    kernarg_address the argument buffer in data memory, which holds one 8-byte
//    slot per argument (pointer A, pointer B, pointer C; low 32 bits used).
//    grid_size_x is the global size. A supported ID (add_i32, mul_i32) starts
//    the kernel and waits for it; an unsupported ID runs nothing.
//  * BARRIER_AND: each non-zero dep_signal address is read repeatedly until
//    the 32-bit word it points to is zero (the event has completed).
//  * other types are retired without action.
//  Finally, if completion_signal is non-zero, 0 is written to the word it
//  points to, marking the command complete.
//
// All addresses inside packets and argument buffers are device addresses as
// reported by the control registers; the controller turns each into the word
// index (address - DMEM_START) / 4 on its data port. In the top level, an
// index beyond the data memory goes out on the bus master (almaif_mem_router);
// without the master it wraps modulo the memory size. Only the low 32 bits of
// 64-bit addresses are used.
//
// Interfaces: CQ memory port and data memory port with almaif_dp_ram timing;
// while the kernel runs, the kernel's own data memory requests are passed to
// the data memory port. en = 0 (freeze) stops every state change and every
// memory request of the controller and of the kernel it feeds. rst is
// synchronous.
//
// Follows the interface description: the ring indexed by read/write position
// modulo the CQ size, the read index advanced by the component after it picks
// a command, kernel dispatch by built-in ID with arguments in data memory,
// Barrier-AND on signal slots monitored for a change to zero. This design's
// own choices: the packet copy, the argument slot layout, completion by
// writing 0, and the handling of unsupported packets and IDs.
module almaif_controller
  import almaif_pkg::*;
#(
  parameter int unsigned CQ_PACKETS  = 32,
  parameter logic [63:0] DMEM_START  = 64'h0003_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  // queue indices from the control registers
  input  logic [63:0] cq_rd_idx,
  input  logic [63:0] cq_wr_idx,
  output logic        cq_rd_idx_inc,
  output logic        stall,
  // command queue memory
  output mem_req_t    cq_req,
  input  logic [31:0] cq_rdata,
  // data memory
  output mem_req_t    dmem_req,
  input  logic [31:0] dmem_rdata,
  // kernel
  output logic        k_start,
  output logic [15:0] k_id,
  output logic [31:0] k_ptr_a,
  output logic [31:0] k_ptr_b,
  output logic [31:0] k_ptr_c,
  output logic [31:0] k_n,
  input  logic        k_done,
  input  mem_req_t    k_mem_req
);

  initial assert (CQ_PACKETS >= 1 && (CQ_PACKETS & (CQ_PACKETS - 1)) == 0)
    else $error("CQ_PACKETS must be a power of two");

  localparam int unsigned SW = (CQ_PACKETS > 1) ? $clog2(CQ_PACKETS) : 1;

  typedef enum logic [3:0] {
    C_IDLE, C_FETCH, C_DECODE, C_PICK, C_KARG, C_LAUNCH, C_RUN,
    C_BAR_ISSUE, C_BAR_EVAL, C_SIGNAL
  } cstate_e;

  cstate_e     state;
  logic [4:0]  fcnt;
  logic        waiting;
  logic [2:0]  dep;
  logic [31:0] pkt [AQL_PACKET_WORDS];
  logic [31:0] karg [3];
  logic [SW-1:0] slot;

  function automatic logic [31:0] dmem_index(input logic [31:0] addr);
    return (addr - DMEM_START[31:0]) >> 2;
  endfunction

  aql_type_e pkt_type;
  logic [15:0] pkt_kid;
  logic        kid_ok;
  assign pkt_type = aql_type_e'(pkt[AQL_W_HEADER][7:0]);
  assign pkt_kid  = pkt[AQL_W_KOBJ][15:0];
  assign kid_ok   = (pkt[AQL_W_KOBJ] == 32'(BIK_ADD_I32)) || (pkt[AQL_W_KOBJ] == 32'(BIK_MUL_I32));

  logic [31:0] dep_addr;
  assign dep_addr = pkt[AQL_W_DEP0 + 2 * 32'(dep)];

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= C_IDLE;
      fcnt  <= '0;
      dep   <= '0;
      slot  <= '0;
      for (int i = 0; i < AQL_PACKET_WORDS; i++) pkt[i] <= '0;
      for (int i = 0; i < 3; i++) karg[i] <= '0;
    end else if (en) begin
      unique case (state)
        C_IDLE: if (cq_wr_idx != cq_rd_idx) begin
          slot  <= cq_rd_idx[SW-1:0];
          fcnt  <= '0;
          state <= C_FETCH;
        end
        C_FETCH: begin
          if (fcnt != 0) pkt[fcnt - 1] <= cq_rdata;
          fcnt <= fcnt + 1;
          if (fcnt == 5'(AQL_PACKET_WORDS)) state <= C_DECODE;
        end
        C_DECODE: state <= (pkt_type == AQL_INVALID) ? C_IDLE : C_PICK;
        C_PICK: begin
          fcnt <= '0;
          dep  <= '0;
          unique case (pkt_type)
            AQL_KERNEL_DISPATCH: state <= C_KARG;
            AQL_BARRIER_AND:     state <= C_BAR_ISSUE;
            default:             state <= C_SIGNAL;
          endcase
        end
        C_KARG: begin
          if (fcnt != 0) karg[fcnt - 1] <= dmem_rdata;
          fcnt <= fcnt + 1;
          if (fcnt == 5'd3) state <= C_LAUNCH;
        end
        C_LAUNCH: state <= kid_ok ? C_RUN : C_SIGNAL;
        C_RUN: if (k_done) state <= C_SIGNAL;
        C_BAR_ISSUE: begin
          if (dep == 3'(AQL_NUM_DEPS)) state <= C_SIGNAL;
          else if (dep_addr == '0)     dep   <= dep + 1;
          else                         state <= C_BAR_EVAL;
        end
        C_BAR_EVAL: begin
          if (dmem_rdata == '0) dep <= dep + 1;
          state <= C_BAR_ISSUE;
        end
        C_SIGNAL: state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end

  // memory requests and kernel handshake
  always_comb begin
    cq_req        = MEM_REQ_IDLE;
    dmem_req      = MEM_REQ_IDLE;
    cq_rd_idx_inc = 1'b0;
    k_start       = 1'b0;
    if (en && !rst) begin
      unique case (state)
        C_FETCH: if (fcnt < 5'(AQL_PACKET_WORDS)) begin
          cq_req.en   = 1'b1;
          cq_req.addr = 32'(slot) * AQL_PACKET_WORDS + 32'(fcnt);
        end
        C_PICK: begin
          // header <- INVALID, setup half kept
          cq_req.en     = 1'b1;
          cq_req.we     = 1'b1;
          cq_req.be     = 4'b0011;
          cq_req.addr   = 32'(slot) * AQL_PACKET_WORDS + AQL_W_HEADER;
          cq_req.wdata  = 32'(AQL_INVALID);
          cq_rd_idx_inc = 1'b1;
        end
        C_KARG: if (fcnt < 5'd3) begin
          dmem_req.en   = 1'b1;
          dmem_req.addr = dmem_index(pkt[AQL_W_KARG]) + 32'(fcnt) * (KARG_SLOT_BYTES / 4);
        end
        C_LAUNCH: k_start = kid_ok;
        C_RUN: dmem_req = k_mem_req;
        C_BAR_ISSUE: if (dep != 3'(AQL_NUM_DEPS) && dep_addr != '0) begin
          dmem_req.en   = 1'b1;
          dmem_req.addr = dmem_index(dep_addr);
        end
        C_SIGNAL: if (pkt[AQL_W_COMPLETION] != '0) begin
          dmem_req.en    = 1'b1;
          dmem_req.we    = 1'b1;
          dmem_req.be    = 4'hF;
          dmem_req.addr  = dmem_index(pkt[AQL_W_COMPLETION]);
          dmem_req.wdata = '0;
        end
        default: ;
      endcase
    end
  end

  // stall: set while the controller is waiting for a packet header to become
  // valid or for a barrier dependency to complete, between its re-reads too
  always_ff @(posedge clk) begin
    if (rst) waiting <= 1'b0;
    else if (en) begin
      if (state == C_IDLE && cq_wr_idx == cq_rd_idx) waiting <= 1'b0;
      if (state == C_DECODE)   waiting <= (pkt_type == AQL_INVALID);
      if (state == C_BAR_EVAL) waiting <= (dmem_rdata != '0);
    end
  end
  assign stall = waiting;

  assign k_id    = pkt_kid;
  assign k_ptr_a = dmem_index(karg[0]);
  assign k_ptr_b = dmem_index(karg[1]);
  assign k_ptr_c = dmem_index(karg[2]);
  assign k_n     = pkt[AQL_W_GRID_X];

endmodule
