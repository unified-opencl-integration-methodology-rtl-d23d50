// almaif_mem_router -- routes the accelerator's data accesses either to the
// local data memory or, through an AXI4-Lite master, to the rest of the
// memory space (external buffers, or signal words in other devices).
//
// The controller and the kernel address the data memory by word index,
// index = (address - DMEM_START) / 4 modulo 2^32. An index below DMEM_WORDS is
// local and goes to the data memory's accelerator-side port with its usual
// one-cycle read timing. Any other index is external: the router rebuilds the
// byte address DMEM_START + 4 * index and performs one AXI4-Lite read or
// write of 32 bits.
//
// An external access stalls the core: from the cycle after the request,
// core_hold is high (the top ANDs it into the core's clock enable) until the
// AXI response has arrived. A read's word is kept in a register and, like the
// RAM's held output, stays on core_rdata until the core's next read, which may
// be local again. Writes wait for the write response, so writes are complete
// and ordered before the core goes on. Responses other than OKAY are not
// reported; a failed read returns whatever RDATA carried.
//
// With HAS_MASTER = 0 every index is taken modulo DEPTH by the data memory and
// the master stays idle, as in a device without the optional bus master.
//
// Follows the interface description: an optional master through which the
// device can reach the whole memory space, advertised by feature flag bit 0.
// The AXI4-Lite protocol, the single-beat accesses and the stall-the-core
// scheme are this design's own choices.
module almaif_mem_router
  import almaif_pkg::*;
#(
  parameter int unsigned DMEM_WORDS = 4096,
  parameter logic [63:0] DMEM_START = 64'h0003_0000,
  parameter bit          HAS_MASTER = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  // accelerator side (controller, which also forwards the kernel's requests)
  input  mem_req_t    core_req,
  output logic [31:0] core_rdata,
  output logic        core_hold,
  // local data memory, port B
  output mem_req_t    dmem_req,
  input  logic [31:0] dmem_rdata,
  // AXI4-Lite master
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

  typedef enum logic [2:0] {M_IDLE, M_AR, M_R, M_AW_W, M_B} mstate_e;
  mstate_e     state;
  logic        aw_done, w_done;
  logic [31:0] ext_rdata;
  logic        rsel_ext;      // the last read went out on the master

  logic is_ext;
  assign is_ext = HAS_MASTER && (core_req.addr >= DMEM_WORDS);

  logic [31:0] ext_addr;
  assign ext_addr = DMEM_START[31:0] + {core_req.addr[29:0], 2'b00};

  // local requests pass straight through
  always_comb begin
    dmem_req = core_req;
    if (is_ext) dmem_req.en = 1'b0;
  end

  assign core_rdata = rsel_ext ? ext_rdata : dmem_rdata;
  assign core_hold  = (state != M_IDLE);

  assign m_arvalid = (state == M_AR);
  assign m_rready  = (state == M_R);
  assign m_awvalid = (state == M_AW_W) && !aw_done;
  assign m_wvalid  = (state == M_AW_W) && !w_done;
  assign m_bready  = (state == M_B);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= M_IDLE;
      aw_done   <= 1'b0;
      w_done    <= 1'b0;
      rsel_ext  <= 1'b0;
      ext_rdata <= '0;
      m_awaddr  <= '0;
      m_araddr  <= '0;
      m_wdata   <= '0;
      m_wstrb   <= '0;
    end else begin
      unique case (state)
        M_IDLE: if (core_req.en) begin
          if (!core_req.we) rsel_ext <= is_ext;
          if (is_ext) begin
            if (core_req.we) begin
              m_awaddr <= ext_addr;
              m_wdata  <= core_req.wdata;
              m_wstrb  <= core_req.be;
              aw_done  <= 1'b0;
              w_done   <= 1'b0;
              state    <= M_AW_W;
            end else begin
              m_araddr <= ext_addr;
              state    <= M_AR;
            end
          end
        end
        M_AR: if (m_arready) state <= M_R;
        M_R: if (m_rvalid) begin
          ext_rdata <= m_rdata;
          state     <= M_IDLE;
        end
        M_AW_W: begin
          if (m_awready) aw_done <= 1'b1;
          if (m_wready)  w_done  <= 1'b1;
          if ((aw_done || m_awready) && (w_done || m_wready)) state <= M_B;
        end
        M_B: if (m_bvalid) state <= M_IDLE;
        default: state <= M_IDLE;
      endcase
    end
  end

  // the core must not issue a request while it is held
  a_no_req_while_held: assert property (@(posedge clk) disable iff (!rst_n)
    core_hold |-> !core_req.en);
  // AXI rule: a request stays valid with a stable address until accepted
  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_arvalid && !m_arready |=> m_arvalid && $stable(m_araddr));
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_awvalid && !m_awready |=> m_awvalid && $stable(m_awaddr));

endmodule
