// almaif_pkg -- shared constants and types of the AlmaIF v2 wrapped accelerator.
//
// Holds the control-register offsets (the register map of the interface), the
// command codes, the status bit positions, the HSA AQL packet layout the
// command queue uses, the built-in kernel identifiers, and the simple memory
// port struct every on-chip memory port in the design uses.
//
// The register offsets, command codes, status bits, interface version (2), the
// 64-entry limit of the built-in kernel list and the 0xFFFF "compiler
// supported" ID follow the interface specification. The AQL packet layout
// (64-byte packets, header type codes, field offsets) follows the HSA AQL
// packet format. The built-in kernel numbers 1 (add_i32) and 2 (mul_i32) follow
// the numbering of the open-source OpenCL runtime's built-in kernel registry.
// The address map of the four regions and the memory port struct are this
// design's own choices.
package almaif_pkg;

  // ---------------------------------------------------------------------------
  // Control register offsets (byte offsets inside the control region)
  // ---------------------------------------------------------------------------
  localparam logic [11:0] REG_STATUS       = 12'h000;
  localparam logic [11:0] REG_CQ_RD_IDX_LO = 12'h100;
  localparam logic [11:0] REG_CQ_RD_IDX_HI = 12'h104;
  localparam logic [11:0] REG_CQ_WR_IDX_LO = 12'h108;
  localparam logic [11:0] REG_CQ_WR_IDX_HI = 12'h10C;
  localparam logic [11:0] REG_COMMAND      = 12'h200;
  localparam logic [11:0] REG_DEV_CLASS    = 12'h300;
  localparam logic [11:0] REG_DEV_ID       = 12'h304;
  localparam logic [11:0] REG_VERSION      = 12'h308;
  localparam logic [11:0] REG_CORE_COUNT   = 12'h30C;
  localparam logic [11:0] REG_CONF_SIZE    = 12'h314;
  localparam logic [11:0] REG_CONF_START   = 12'h318;
  localparam logic [11:0] REG_CQ_SIZE      = 12'h320;
  localparam logic [11:0] REG_CQ_START     = 12'h328;
  localparam logic [11:0] REG_DMEM_SIZE    = 12'h330;
  localparam logic [11:0] REG_DMEM_START   = 12'h338;
  localparam logic [11:0] REG_FEATURES     = 12'h340;
  localparam logic [11:0] REG_NUM_BIK      = 12'h348;  // 16-bit count, IDs follow at 0x34A

  localparam int unsigned ALMAIF_VERSION   = 2;
  localparam int unsigned MAX_BUILTINS     = 64;
  localparam logic [15:0] BIK_ID_COMPILER  = 16'hFFFF;

  // Command register codes
  localparam logic [2:0] CMD_RESET    = 3'd1;
  localparam logic [2:0] CMD_CONTINUE = 3'd2;  // lift reset and freeze
  localparam logic [2:0] CMD_FREEZE   = 3'd4;

  // Status register bit positions
  localparam int STATUS_STALL  = 0;
  localparam int STATUS_FREEZE = 1;
  localparam int STATUS_RESET  = 2;

  // ---------------------------------------------------------------------------
  // Region address map (offsets seen on the slave interface; 64 KiB windows)
  // ---------------------------------------------------------------------------
  localparam int unsigned REGION_LSB = 16;
  typedef enum logic [1:0] {
    RGN_CTRL = 2'd0,
    RGN_CONF = 2'd1,
    RGN_CQ   = 2'd2,
    RGN_DMEM = 2'd3
  } region_e;

  // ---------------------------------------------------------------------------
  // HSA AQL packets
  // ---------------------------------------------------------------------------
  localparam int unsigned AQL_PACKET_BYTES = 64;
  localparam int unsigned AQL_PACKET_WORDS = AQL_PACKET_BYTES / 4;

  typedef enum logic [7:0] {
    AQL_VENDOR          = 8'd0,
    AQL_INVALID         = 8'd1,
    AQL_KERNEL_DISPATCH = 8'd2,
    AQL_BARRIER_AND     = 8'd3,
    AQL_AGENT_DISPATCH  = 8'd4,
    AQL_BARRIER_OR      = 8'd5
  } aql_type_e;

  // 32-bit word index of fields inside a packet (low word of 64-bit fields)
  localparam int unsigned AQL_W_HEADER     = 0;   // header[15:0], setup[31:16]
  localparam int unsigned AQL_W_GRID_X     = 3;   // byte 12
  localparam int unsigned AQL_W_KOBJ       = 8;   // byte 32, kernel_object
  localparam int unsigned AQL_W_KARG       = 10;  // byte 40, kernarg_address
  localparam int unsigned AQL_W_DEP0       = 2;   // byte 8, barrier dep_signal[0]
  localparam int unsigned AQL_NUM_DEPS     = 5;
  localparam int unsigned AQL_W_COMPLETION = 14;  // byte 56, completion_signal

  // ---------------------------------------------------------------------------
  // Built-in kernels
  // ---------------------------------------------------------------------------
  localparam logic [15:0] BIK_ADD_I32 = 16'd1;
  localparam logic [15:0] BIK_MUL_I32 = 16'd2;
  localparam int unsigned KARG_SLOT_BYTES = 8;  // one 64-bit slot per argument

  // ---------------------------------------------------------------------------
  // Memory port: one request per cycle, read data one cycle after a read.
  // addr is a 32-bit word index inside the memory.
  // ---------------------------------------------------------------------------
  typedef struct packed {
    logic        en;
    logic        we;
    logic [3:0]  be;
    logic [31:0] addr;
    logic [31:0] wdata;
  } mem_req_t;

  localparam mem_req_t MEM_REQ_IDLE = '{en: 1'b0, we: 1'b0, be: 4'h0, addr: 32'h0, wdata: 32'h0};

endpackage
