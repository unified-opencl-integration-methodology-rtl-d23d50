// almaif_ctrl_regs -- control register region of the AlmaIF v2 interface.
//
// Implements the register map of the interface: the status word, the 64-bit
// command queue read and write position indices, the command register that
// resets, releases and freezes the accelerator, and the constant registers the
// runtime reads for automatic device discovery (device class and ID,
// interface version 2, core count, size and start address of the
// configuration, command queue and data memory regions, feature flags and the
// list of supported built-in kernel IDs).
//
// Host port: host_req.addr is the 32-bit word index inside the region (byte
// offset / 4), host_req.be selects bytes on writes. Reads return on
// host_rdata one cycle later. 64-bit registers are read as two words, low
// word at the lower offset. The 16-bit built-in kernel count at 0x348 is
// followed by the 16-bit IDs from 0x34A upwards, two per word, little endian.
// Unmapped offsets read 0 and ignore writes.
//
// Device side: cq_rd_idx_inc is a one-cycle pulse from the controller that
// advances the read index by one. The read index is also writable by the host
// (to initialise the queue); a host write in the same cycle as an increment
// wins. The write index is maintained by the host or peers and is only
// written from the slave side.
//
// Command register: writing 1 asserts the accelerator reset, 2 lifts reset
// and freeze, 4 asserts freeze. Other values are ignored. Reading returns the
// last value written. Status: bit 0 stalled (the controller reports a stall,
// or reset or freeze is active), bit 1 freeze, bit 2 reset.
//
// Follows the interface specification: all offsets, widths, command codes and
// status bits. This design's choices: the accelerator comes out of system
// reset held in reset (the host releases it with command 2), the reserved
// word at 0x310 reads 0, and reset/freeze do not clear the queue indices.
module almaif_ctrl_regs
  import almaif_pkg::*;
#(
  parameter logic [31:0] DEV_CLASS    = 32'h0,
  parameter logic [31:0] DEV_ID       = 32'h0,
  parameter logic [31:0] CORE_COUNT   = 32'd1,
  parameter logic [31:0] CONF_BYTES   = 32'd1024,
  parameter logic [63:0] CONF_START   = 64'h0001_0000,
  parameter logic [63:0] CQ_BYTES     = 64'd2048,
  parameter logic [63:0] CQ_START     = 64'h0002_0000,
  parameter logic [63:0] DMEM_BYTES   = 64'd16384,
  parameter logic [63:0] DMEM_START   = 64'h0003_0000,
  parameter logic [63:0] FEATURES     = 64'h0,
  parameter int unsigned NUM_BIK      = 2,
  parameter logic [16*MAX_BUILTINS-1:0] BIK_IDS = {{(16*(MAX_BUILTINS-2)){1'b0}}, BIK_MUL_I32, BIK_ADD_I32}
) (
  input  logic        clk,
  input  logic        rst_n,
  // slave side
  input  mem_req_t    host_req,
  output logic [31:0] host_rdata,
  // accelerator side
  input  logic        cq_rd_idx_inc,
  output logic [63:0] cq_rd_idx,
  output logic [63:0] cq_wr_idx,
  output logic        core_reset,
  output logic        core_freeze,
  input  logic        core_stall
);

  initial assert (NUM_BIK <= MAX_BUILTINS) else $error("at most %0d built-in kernels", MAX_BUILTINS);

  logic [2:0]  command_q;
  logic [11:0] boff;
  assign boff = {host_req.addr[9:0], 2'b00};

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] be);
    logic [31:0] r;
    for (int i = 0; i < 4; i++) r[8*i +: 8] = be[i] ? nw[8*i +: 8] : old[8*i +: 8];
    return r;
  endfunction

  // built-in kernel list: halfword 0 is the count, halfword k+1 is ID k
  function automatic logic [15:0] bik_half(input int unsigned h);
    if (h == 0) return 16'(NUM_BIK);
    if (h - 1 < NUM_BIK) return BIK_IDS[16*(h-1) +: 16];
    return 16'h0;
  endfunction

  logic host_wr, host_rd, in_range;
  assign host_wr  = host_req.en && host_req.we;
  assign host_rd  = host_req.en && !host_req.we;
  assign in_range = (host_req.addr[31:10] == '0);

  // writable registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cq_rd_idx   <= '0;
      cq_wr_idx   <= '0;
      command_q   <= CMD_RESET;
      core_reset  <= 1'b1;
      core_freeze <= 1'b0;
    end else begin
      if (cq_rd_idx_inc) cq_rd_idx <= cq_rd_idx + 64'd1;
      if (host_wr && in_range) begin
        unique case (boff)
          REG_CQ_RD_IDX_LO: cq_rd_idx[31:0]  <= merge(cq_rd_idx[31:0],  host_req.wdata, host_req.be);
          REG_CQ_RD_IDX_HI: cq_rd_idx[63:32] <= merge(cq_rd_idx[63:32], host_req.wdata, host_req.be);
          REG_CQ_WR_IDX_LO: cq_wr_idx[31:0]  <= merge(cq_wr_idx[31:0],  host_req.wdata, host_req.be);
          REG_CQ_WR_IDX_HI: cq_wr_idx[63:32] <= merge(cq_wr_idx[63:32], host_req.wdata, host_req.be);
          REG_COMMAND: if (host_req.be[0]) begin
            command_q <= host_req.wdata[2:0];
            unique case (host_req.wdata[2:0])
              CMD_RESET:    core_reset <= 1'b1;
              CMD_CONTINUE: begin core_reset <= 1'b0; core_freeze <= 1'b0; end
              CMD_FREEZE:   core_freeze <= 1'b1;
              default: ;
            endcase
          end
          default: ;
        endcase
      end
    end
  end

  // read mux
  logic [31:0] rd_word;
  always_comb begin
    rd_word = '0;
    if (in_range) begin
      unique case (boff)
        REG_STATUS: begin
          rd_word[STATUS_STALL]  = core_stall | core_reset | core_freeze;
          rd_word[STATUS_FREEZE] = core_freeze;
          rd_word[STATUS_RESET]  = core_reset;
        end
        REG_CQ_RD_IDX_LO: rd_word = cq_rd_idx[31:0];
        REG_CQ_RD_IDX_HI: rd_word = cq_rd_idx[63:32];
        REG_CQ_WR_IDX_LO: rd_word = cq_wr_idx[31:0];
        REG_CQ_WR_IDX_HI: rd_word = cq_wr_idx[63:32];
        REG_COMMAND:      rd_word = {29'h0, command_q};
        REG_DEV_CLASS:    rd_word = DEV_CLASS;
        REG_DEV_ID:       rd_word = DEV_ID;
        REG_VERSION:      rd_word = 32'(ALMAIF_VERSION);
        REG_CORE_COUNT:   rd_word = CORE_COUNT;
        REG_CONF_SIZE:    rd_word = CONF_BYTES;
        REG_CONF_START:   rd_word = CONF_START[31:0];
        REG_CONF_START+4: rd_word = CONF_START[63:32];
        REG_CQ_SIZE:      rd_word = CQ_BYTES[31:0];
        REG_CQ_SIZE+4:    rd_word = CQ_BYTES[63:32];
        REG_CQ_START:     rd_word = CQ_START[31:0];
        REG_CQ_START+4:   rd_word = CQ_START[63:32];
        REG_DMEM_SIZE:    rd_word = DMEM_BYTES[31:0];
        REG_DMEM_SIZE+4:  rd_word = DMEM_BYTES[63:32];
        REG_DMEM_START:   rd_word = DMEM_START[31:0];
        REG_DMEM_START+4: rd_word = DMEM_START[63:32];
        REG_FEATURES:     rd_word = FEATURES[31:0];
        REG_FEATURES+4:   rd_word = FEATURES[63:32];
        default: begin
          if (boff >= REG_NUM_BIK && boff < REG_NUM_BIK + 12'(2 * (MAX_BUILTINS + 1) + 2)) begin
            rd_word = {bik_half((int'(boff) - int'(REG_NUM_BIK)) / 2 + 1),
                       bik_half((int'(boff) - int'(REG_NUM_BIK)) / 2)};
          end
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (host_rd) host_rdata <= rd_word;
  end

endmodule
