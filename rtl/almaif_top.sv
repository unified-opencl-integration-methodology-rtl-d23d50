// almaif_top -- a fixed-function vector accelerator wrapped in the AlmaIF v2
// hardware interface, so that a generic OpenCL driver can discover it, queue
// commands to it and synchronise with it through memory-mapped regions only.
//
// Structure: an AXI4-Lite slave (almaif_axil_slave) decodes the host's
// accesses into four regions: the control registers (almaif_ctrl_regs), the
// configuration memory, the command queue (CQ) memory and the data memory
// (three almaif_dp_ram instances). On the accelerator side the AlmaIF
// controller (almaif_controller) processes HSA AQL packets from the CQ ring
// and launches the built-in kernels (almaif_vec_kernel: add_i32, mul_i32),
// which work on buffers in the data memory. The configuration memory exists
// for software-programmable or reconfigurable components; this fixed-function
// core does not read it, so its accelerator-side port is left idle.
//
// Host view (offsets on the AXI port, added to DEV_BASE in the addresses the
// registers report): 0x0_0000 control registers, 0x1_0000 configuration
// memory, 0x2_0000 CQ memory (CQ_PACKETS packets of 64 bytes), 0x3_0000 data
// memory. The host writes a packet into slot (write index mod CQ_PACKETS),
// then advances the write index register; the controller picks it, advances
// the read index and, when done, writes 0 to the packet's completion signal.
//
// Reset and freeze: rst_n resets everything and leaves the accelerator held in
// its own reset until the host writes 2 to the command register. Command 1
// holds the controller and kernel in reset, command 4 freezes them (clock
// enable low) without losing state.
//
// Follows the interface description: the four regions, the register map, the
// queue protocol and the two evaluated kernels. The sizes of the memories,
// the AXI4-Lite buses and the address map are this design's choices.
//
// Optional bus master (HAS_MASTER = 1, the default; feature flag bit 0 = 1):
// data accesses of the controller and kernel whose address lies outside the
// data memory go out on the AXI4-Lite master port (almaif_mem_router), so
// kernel buffers and barrier signal words may live anywhere in the memory
// space, including in another device. The core is stalled (clock enable low)
// while such an access is outstanding. bresp/rresp of the slave port are
// always OKAY; the master port ignores the responses it receives.
module almaif_top
  import almaif_pkg::*;
#(
  parameter int unsigned CQ_PACKETS = 32,
  parameter int unsigned DMEM_WORDS = 4096,
  parameter int unsigned CONF_WORDS = 256,
  parameter logic [63:0] DEV_BASE   = 64'h0,
  parameter logic [31:0] DEV_CLASS  = 32'h0,
  parameter logic [31:0] DEV_ID     = 32'h0,
  parameter bit          HAS_MASTER = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [31:0] s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  // AXI4-Lite master to the rest of the memory space
  output logic [31:0] m_awaddr,
  output logic        m_awvalid,
  input  logic        m_awready,
  output logic [31:0] m_wdata,
  output logic [3:0]  m_wstrb,
  output logic        m_wvalid,
  input  logic        m_wready,
  input  logic [1:0]  m_bresp,
  input  logic        m_bvalid,
  output logic        m_bready,
  output logic [31:0] m_araddr,
  output logic        m_arvalid,
  input  logic        m_arready,
  input  logic [31:0] m_rdata,
  input  logic [1:0]  m_rresp,
  input  logic        m_rvalid,
  output logic        m_rready
);

  localparam logic [63:0] CONF_START = DEV_BASE + (64'(RGN_CONF) << REGION_LSB);
  localparam logic [63:0] CQ_START   = DEV_BASE + (64'(RGN_CQ)   << REGION_LSB);
  localparam logic [63:0] DMEM_START = DEV_BASE + (64'(RGN_DMEM) << REGION_LSB);

  mem_req_t    rgn_req   [4];
  logic [31:0] rgn_rdata [4];

  logic [63:0] cq_rd_idx, cq_wr_idx;
  logic        cq_rd_idx_inc, core_reset, core_freeze, core_stall;
  logic        core_rst, core_en;

  mem_req_t    cq_b_req, dmem_b_req, core_dmem_req, k_mem_req;
  logic [31:0] cq_b_rdata, dmem_b_rdata, core_dmem_rdata, conf_b_rdata;
  logic        core_hold;

  logic        k_start, k_done, k_busy;
  logic [15:0] k_id;
  logic [31:0] k_ptr_a, k_ptr_b, k_ptr_c, k_n;

  // core_reset is forced high asynchronously while rst_n is low
  assign core_rst = core_reset;
  assign core_en  = !core_freeze && !core_hold;

  almaif_axil_slave u_slave (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .rgn_req, .rgn_rdata
  );

  almaif_ctrl_regs #(
    .DEV_CLASS  (DEV_CLASS),
    .DEV_ID     (DEV_ID),
    .CORE_COUNT (32'd1),
    .CONF_BYTES (32'(CONF_WORDS * 4)),
    .CONF_START (CONF_START),
    .CQ_BYTES   (64'(CQ_PACKETS * AQL_PACKET_BYTES)),
    .CQ_START   (CQ_START),
    .DMEM_BYTES (64'(DMEM_WORDS * 4)),
    .DMEM_START (DMEM_START),
    .FEATURES   (64'(HAS_MASTER)),
    .NUM_BIK    (2),
    .BIK_IDS    ({{(16*(MAX_BUILTINS-2)){1'b0}}, BIK_MUL_I32, BIK_ADD_I32})
  ) u_regs (
    .clk, .rst_n,
    .host_req   (rgn_req[RGN_CTRL]),
    .host_rdata (rgn_rdata[RGN_CTRL]),
    .cq_rd_idx_inc, .cq_rd_idx, .cq_wr_idx,
    .core_reset, .core_freeze, .core_stall
  );

  almaif_dp_ram #(.DEPTH_WORDS(CONF_WORDS)) u_conf_mem (
    .clk,
    .a_req (rgn_req[RGN_CONF]), .a_rdata (rgn_rdata[RGN_CONF]),
    .b_req (MEM_REQ_IDLE),      .b_rdata (conf_b_rdata)
  );

  almaif_dp_ram #(.DEPTH_WORDS(CQ_PACKETS * AQL_PACKET_WORDS)) u_cq_mem (
    .clk,
    .a_req (rgn_req[RGN_CQ]), .a_rdata (rgn_rdata[RGN_CQ]),
    .b_req (cq_b_req),        .b_rdata (cq_b_rdata)
  );

  almaif_dp_ram #(.DEPTH_WORDS(DMEM_WORDS)) u_dmem (
    .clk,
    .a_req (rgn_req[RGN_DMEM]), .a_rdata (rgn_rdata[RGN_DMEM]),
    .b_req (dmem_b_req),        .b_rdata (dmem_b_rdata)
  );

  almaif_controller #(
    .CQ_PACKETS (CQ_PACKETS),
    .DMEM_START (DMEM_START)
  ) u_ctrl (
    .clk, .rst (core_rst), .en (core_en),
    .cq_rd_idx, .cq_wr_idx, .cq_rd_idx_inc, .stall (core_stall),
    .cq_req (cq_b_req), .cq_rdata (cq_b_rdata),
    .dmem_req (core_dmem_req), .dmem_rdata (core_dmem_rdata),
    .k_start, .k_id, .k_ptr_a, .k_ptr_b, .k_ptr_c, .k_n, .k_done, .k_mem_req
  );

  almaif_vec_kernel u_kernel (
    .clk, .rst (core_rst), .en (core_en),
    .start (k_start), .kernel_id (k_id),
    .ptr_a (k_ptr_a), .ptr_b (k_ptr_b), .ptr_c (k_ptr_c), .n (k_n),
    .busy (k_busy), .done (k_done),
    .mem_req (k_mem_req), .mem_rdata (core_dmem_rdata)
  );

  almaif_mem_router #(
    .DMEM_WORDS (DMEM_WORDS),
    .DMEM_START (DMEM_START),
    .HAS_MASTER (HAS_MASTER)
  ) u_router (
    .clk, .rst_n,
    .core_req (core_dmem_req), .core_rdata (core_dmem_rdata), .core_hold,
    .dmem_req (dmem_b_req), .dmem_rdata (dmem_b_rdata),
    .m_awaddr, .m_awvalid, .m_awready, .m_wdata, .m_wstrb, .m_wvalid, .m_wready,
    .m_bresp, .m_bvalid, .m_bready, .m_araddr, .m_arvalid, .m_arready,
    .m_rdata, .m_rresp, .m_rvalid, .m_rready
  );

endmodule
