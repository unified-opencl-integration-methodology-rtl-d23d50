// almaif_axil_slave -- slave interface of the AlmaIF v2 wrapper: an AXI4-Lite
// slave that decodes host accesses into the four memory-mapped regions.
//
// Address map (offsets on this port, 64 KiB window per region, selected by
// address bits [17:16]): 0x0_0000 control registers, 0x1_0000 configuration
// memory, 0x2_0000 command queue memory, 0x3_0000 data memory. Bits above 17
// are ignored, so the map repeats. Inside a region, address bits [15:2] give
// the word index that is passed on as mem_req_t.addr.
//
// Protocol: one transaction at a time. A write is accepted when AWVALID and
// WVALID are both high (AWREADY and WREADY rise together in that cycle); the
// region write is issued in the same cycle and BVALID follows in the next.
// A read is accepted with ARREADY; the region read is issued in that cycle
// and RVALID follows in the next, with the word the region returned. Regions
// must return read data one cycle after a read and hold it until the next
// request on their port, as almaif_dp_ram and almaif_ctrl_regs do. When a read
// and a write arrive together, the one that was not served last goes first.
// Responses are always OKAY. Throughput: a write every 2 cycles and a read
// every 2 cycles at most.
//
// The region roles come from the interface description; AXI4-Lite, the data
// width of 32 bits and the address map are this design's choices.
module almaif_axil_slave
  import almaif_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
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
  // region ports
  output mem_req_t    rgn_req [4],
  input  logic [31:0] rgn_rdata [4]
);

  typedef enum logic [1:0] {S_IDLE, S_BRESP, S_RRESP} sstate_e;
  sstate_e state;
  region_e rd_rgn;
  logic    last_was_read;

  logic do_wr, do_rd;
  always_comb begin
    do_wr = 1'b0;
    do_rd = 1'b0;
    if (state == S_IDLE) begin
      if (s_awvalid && s_wvalid && (!s_arvalid || last_was_read)) do_wr = 1'b1;
      else if (s_arvalid)                                         do_rd = 1'b1;
    end
  end

  assign s_awready = do_wr;
  assign s_wready  = do_wr;
  assign s_arready = do_rd;
  assign s_bvalid  = (state == S_BRESP);
  assign s_rvalid  = (state == S_RRESP);
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;
  assign s_rdata   = rgn_rdata[rd_rgn];

  always_comb begin
    for (int r = 0; r < 4; r++) rgn_req[r] = MEM_REQ_IDLE;
    if (do_wr) begin
      rgn_req[s_awaddr[REGION_LSB +: 2]] = '{en: 1'b1, we: 1'b1, be: s_wstrb,
                                             addr: 32'(s_awaddr[REGION_LSB-1:2]),
                                             wdata: s_wdata};
    end else if (do_rd) begin
      rgn_req[s_araddr[REGION_LSB +: 2]] = '{en: 1'b1, we: 1'b0, be: 4'h0,
                                             addr: 32'(s_araddr[REGION_LSB-1:2]),
                                             wdata: 32'h0};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      rd_rgn        <= RGN_CTRL;
      last_was_read <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (do_wr) begin
            state         <= S_BRESP;
            last_was_read <= 1'b0;
          end else if (do_rd) begin
            state         <= S_RRESP;
            rd_rgn        <= region_e'(s_araddr[REGION_LSB +: 2]);
            last_was_read <= 1'b1;
          end
        end
        S_BRESP: if (s_bready) state <= S_IDLE;
        S_RRESP: if (s_rready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // AXI rule: a response stays valid, with stable data, until accepted
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_bvalid && !s_bready |=> s_bvalid);

endmodule
