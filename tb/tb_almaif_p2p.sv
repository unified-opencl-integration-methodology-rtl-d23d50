// tb_almaif_p2p -- two wrapped accelerators synchronising with each other
// without the host, through device A's bus master and device B's slave port.
//
// Device A sits at base 0, device B at base 0x4_0000, so B's data memory is at
// 0x7_0000 in the shared address space. A's bus master is wired to B's slave
// port through a two-way switch that the host sets only while both sides are
// idle; when the switch points at the host, the host reaches B directly. The
// host talks to A through A's own slave port.
//
// The scenario is a two-stage pipeline C = A + B on device A, then D = C * X
// on device B:
//   * B's queue holds a Barrier-AND on signal S (in B's data memory, set to 1)
//     followed by a mul dispatch that reads C and X from B's data memory.
//     B is started first and must stall on the barrier.
//   * A's queue holds an add dispatch whose output C and completion signal S
//     both lie in B's data memory, then a dependency-free Barrier-AND whose
//     completion signal S2 is in A's own memory, so the host knows when A has
//     finished.
// A's master writes C into B and then clears S. B's barrier, polling its own
// memory, sees S turn zero and runs the mul. The host only checks the end
// results. Counted mechanisms: B waiting on the barrier, A's data arriving in
// B, and B released by A's completion signal; each must happen.
module tb_almaif_p2p;
  import almaif_pkg::*;

  localparam int unsigned N       = 48;
  localparam logic [31:0] BASE_B  = 32'h0004_0000;
  localparam logic [31:0] CTRL    = 32'h0000_0000;
  localparam logic [31:0] CQM     = 32'h0002_0000;
  localparam logic [31:0] DMEM    = 32'h0003_0000;

  // data memory layout (word indices), the same in both devices
  localparam int unsigned W_ARGS = 16;
  localparam int unsigned W_SIG  = 64;
  localparam int unsigned W_SIG2 = 65;
  localparam int unsigned W_IN0  = 256;
  localparam int unsigned W_IN1  = 512;
  localparam int unsigned W_OUT  = 768;
  localparam int unsigned W_OUT2 = 1024;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  // AXI4-Lite bundles: host to A, host to B, A's master, B's slave, B's master
  logic [31:0] ha_awaddr, ha_wdata, ha_araddr, ha_rdata;
  logic [3:0]  ha_wstrb;
  logic        ha_awvalid, ha_awready, ha_wvalid, ha_wready, ha_bvalid, ha_bready;
  logic        ha_arvalid, ha_arready, ha_rvalid, ha_rready;
  logic [1:0]  ha_bresp, ha_rresp;

  logic [31:0] hb_awaddr, hb_wdata, hb_araddr, hb_rdata;
  logic [3:0]  hb_wstrb;
  logic        hb_awvalid, hb_awready, hb_wvalid, hb_wready, hb_bvalid, hb_bready;
  logic        hb_arvalid, hb_arready, hb_rvalid, hb_rready;
  logic [1:0]  hb_bresp, hb_rresp;

  logic [31:0] am_awaddr, am_wdata, am_araddr, am_rdata;
  logic [3:0]  am_wstrb;
  logic        am_awvalid, am_awready, am_wvalid, am_wready, am_bvalid, am_bready;
  logic        am_arvalid, am_arready, am_rvalid, am_rready;
  logic [1:0]  am_bresp, am_rresp;

  logic [31:0] bs_awaddr, bs_wdata, bs_araddr, bs_rdata;
  logic [3:0]  bs_wstrb;
  logic        bs_awvalid, bs_awready, bs_wvalid, bs_wready, bs_bvalid, bs_bready;
  logic        bs_arvalid, bs_arready, bs_rvalid, bs_rready;
  logic [1:0]  bs_bresp, bs_rresp;

  logic [31:0] bm_awaddr, bm_wdata, bm_araddr;
  logic [3:0]  bm_wstrb;
  logic        bm_awvalid, bm_wvalid, bm_bready, bm_arvalid, bm_rready;

  axil_host_bfm host_a (
    .clk, .awaddr (ha_awaddr), .awvalid (ha_awvalid), .awready (ha_awready),
    .wdata (ha_wdata), .wstrb (ha_wstrb), .wvalid (ha_wvalid), .wready (ha_wready),
    .bresp (ha_bresp), .bvalid (ha_bvalid), .bready (ha_bready),
    .araddr (ha_araddr), .arvalid (ha_arvalid), .arready (ha_arready),
    .rdata (ha_rdata), .rresp (ha_rresp), .rvalid (ha_rvalid), .rready (ha_rready)
  );

  axil_host_bfm host_b (
    .clk, .awaddr (hb_awaddr), .awvalid (hb_awvalid), .awready (hb_awready),
    .wdata (hb_wdata), .wstrb (hb_wstrb), .wvalid (hb_wvalid), .wready (hb_wready),
    .bresp (hb_bresp), .bvalid (hb_bvalid), .bready (hb_bready),
    .araddr (hb_araddr), .arvalid (hb_arvalid), .arready (hb_arready),
    .rdata (hb_rdata), .rresp (hb_rresp), .rvalid (hb_rvalid), .rready (hb_rready)
  );

  almaif_top dev_a (
    .clk, .rst_n,
    .s_awaddr (ha_awaddr), .s_awvalid (ha_awvalid), .s_awready (ha_awready),
    .s_wdata (ha_wdata), .s_wstrb (ha_wstrb), .s_wvalid (ha_wvalid), .s_wready (ha_wready),
    .s_bresp (ha_bresp), .s_bvalid (ha_bvalid), .s_bready (ha_bready),
    .s_araddr (ha_araddr), .s_arvalid (ha_arvalid), .s_arready (ha_arready),
    .s_rdata (ha_rdata), .s_rresp (ha_rresp), .s_rvalid (ha_rvalid), .s_rready (ha_rready),
    .m_awaddr (am_awaddr), .m_awvalid (am_awvalid), .m_awready (am_awready),
    .m_wdata (am_wdata), .m_wstrb (am_wstrb), .m_wvalid (am_wvalid), .m_wready (am_wready),
    .m_bresp (am_bresp), .m_bvalid (am_bvalid), .m_bready (am_bready),
    .m_araddr (am_araddr), .m_arvalid (am_arvalid), .m_arready (am_arready),
    .m_rdata (am_rdata), .m_rresp (am_rresp), .m_rvalid (am_rvalid), .m_rready (am_rready)
  );

  almaif_top #(.DEV_BASE(64'(BASE_B))) dev_b (
    .clk, .rst_n,
    .s_awaddr (bs_awaddr), .s_awvalid (bs_awvalid), .s_awready (bs_awready),
    .s_wdata (bs_wdata), .s_wstrb (bs_wstrb), .s_wvalid (bs_wvalid), .s_wready (bs_wready),
    .s_bresp (bs_bresp), .s_bvalid (bs_bvalid), .s_bready (bs_bready),
    .s_araddr (bs_araddr), .s_arvalid (bs_arvalid), .s_arready (bs_arready),
    .s_rdata (bs_rdata), .s_rresp (bs_rresp), .s_rvalid (bs_rvalid), .s_rready (bs_rready),
    .m_awaddr (bm_awaddr), .m_awvalid (bm_awvalid), .m_awready (1'b0),
    .m_wdata (bm_wdata), .m_wstrb (bm_wstrb), .m_wvalid (bm_wvalid), .m_wready (1'b0),
    .m_bresp (2'b00), .m_bvalid (1'b0), .m_bready (bm_bready),
    .m_araddr (bm_araddr), .m_arvalid (bm_arvalid), .m_arready (1'b0),
    .m_rdata (32'h0), .m_rresp (2'b00), .m_rvalid (1'b0), .m_rready (bm_rready)
  );

  // switch in front of B's slave port: 1 = A's master, 0 = the host
  bit to_a = 1'b0;
  always_comb begin
    bs_awaddr  = to_a ? am_awaddr  : hb_awaddr;
    bs_awvalid = to_a ? am_awvalid : hb_awvalid;
    bs_wdata   = to_a ? am_wdata   : hb_wdata;
    bs_wstrb   = to_a ? am_wstrb   : hb_wstrb;
    bs_wvalid  = to_a ? am_wvalid  : hb_wvalid;
    bs_bready  = to_a ? am_bready  : hb_bready;
    bs_araddr  = to_a ? am_araddr  : hb_araddr;
    bs_arvalid = to_a ? am_arvalid : hb_arvalid;
    bs_rready  = to_a ? am_rready  : hb_rready;
    am_awready = to_a && bs_awready;
    am_wready  = to_a && bs_wready;
    am_bvalid  = to_a && bs_bvalid;
    am_bresp   = bs_bresp;
    am_arready = to_a && bs_arready;
    am_rvalid  = to_a && bs_rvalid;
    am_rdata   = bs_rdata;
    am_rresp   = bs_rresp;
    hb_awready = !to_a && bs_awready;
    hb_wready  = !to_a && bs_wready;
    hb_bvalid  = !to_a && bs_bvalid;
    hb_bresp   = bs_bresp;
    hb_arready = !to_a && bs_arready;
    hb_rvalid  = !to_a && bs_rvalid;
    hb_rdata   = bs_rdata;
    hb_rresp   = bs_rresp;
  end

  int checks = 0, failures = 0;
  int n_b_waited = 0, n_p2p_data = 0, n_p2p_release = 0, a_writes_into_b = 0;

  // B's slave port accepting a write that came from A's master
  always @(posedge clk) if (to_a && bs_awvalid && bs_awready) a_writes_into_b++;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // device addresses of data memory words
  function automatic logic [31:0] a_addr(input int unsigned w);
    return DMEM + 32'(w * 4);
  endfunction
  function automatic logic [31:0] b_addr(input int unsigned w);
    return BASE_B + DMEM + 32'(w * 4);
  endfunction

  // host accesses; B's port offsets alias, so the base may be left out there
  task automatic wr(input bit dev, input logic [31:0] off, input logic [31:0] d);
    if (dev) host_b.write(off, d); else host_a.write(off, d);
  endtask
  task automatic rd(input bit dev, input logic [31:0] off, output logic [31:0] d);
    if (dev) host_b.read(off, d); else host_a.read(off, d);
  endtask

  task automatic start_device(input bit dev);
    wr(dev, CTRL + 32'(REG_COMMAND), 32'(CMD_RESET));
    wr(dev, CTRL + 32'(REG_CQ_RD_IDX_LO), 0);
    wr(dev, CTRL + 32'(REG_CQ_RD_IDX_HI), 0);
    wr(dev, CTRL + 32'(REG_CQ_WR_IDX_LO), 0);
    wr(dev, CTRL + 32'(REG_CQ_WR_IDX_HI), 0);
    wr(dev, CTRL + 32'(REG_COMMAND), 32'(CMD_CONTINUE));
  endtask

  task automatic put_packet(input bit dev, input int unsigned slot, input logic [31:0] p [16]);
    for (int i = 1; i < 16; i++) wr(dev, CQM + 32'(slot * AQL_PACKET_BYTES + i * 4), p[i]);
    wr(dev, CQM + 32'(slot * AQL_PACKET_BYTES), p[0]);
  endtask

  function automatic void dispatch(output logic [31:0] p [16], input logic [15:0] kid,
                                   input logic [31:0] karg, input logic [31:0] sig);
    for (int i = 0; i < 16; i++) p[i] = '0;
    p[0]  = {16'd1, 16'(AQL_KERNEL_DISPATCH)};
    p[1]  = {16'd1, 16'(N)};
    p[2]  = 32'd1;
    p[3]  = 32'(N);
    p[4]  = 32'd1;
    p[5]  = 32'd1;
    p[8]  = 32'(kid);
    p[10] = karg;
    p[14] = sig;
  endfunction

  function automatic void barrier(output logic [31:0] p [16], input logic [31:0] dep0,
                                  input logic [31:0] sig);
    for (int i = 0; i < 16; i++) p[i] = '0;
    p[0]  = {16'd0, 16'(AQL_BARRIER_AND)};
    p[AQL_W_DEP0] = dep0;
    p[14] = sig;
  endfunction

  task automatic poll_zero(input bit dev, input int unsigned w, input int max_polls, output bit ok);
    logic [31:0] d;
    ok = 0;
    for (int i = 0; i < max_polls; i++) begin
      rd(dev, DMEM + 32'(w * 4), d);
      if (d == 0) begin ok = 1; break; end
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [31:0] va [N], vb [N], vx [N];
    logic [31:0] p [16], d;
    bit ok;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- device B: barrier on S, then D = C * X ----
    for (int i = 0; i < N; i++) begin
      vx[i] = $urandom;
      wr(1, DMEM + 32'((W_IN1 + i) * 4), vx[i]);
      wr(1, DMEM + 32'((W_OUT + i) * 4), 32'hDEAD_BEEF);   // C, filled by A
      wr(1, DMEM + 32'((W_OUT2 + i) * 4), 32'hDEAD_BEEF);
    end
    wr(1, DMEM + 32'((W_ARGS + 0) * 4), b_addr(W_OUT));
    wr(1, DMEM + 32'((W_ARGS + 2) * 4), b_addr(W_IN1));
    wr(1, DMEM + 32'((W_ARGS + 4) * 4), b_addr(W_OUT2));
    wr(1, DMEM + 32'(W_SIG * 4), 32'd1);
    wr(1, DMEM + 32'(W_SIG2 * 4), 32'd1);
    start_device(1);
    barrier(p, b_addr(W_SIG), 32'h0);
    put_packet(1, 0, p);
    dispatch(p, BIK_MUL_I32, b_addr(W_ARGS), b_addr(W_SIG2));
    put_packet(1, 1, p);
    wr(1, CTRL + 32'(REG_CQ_WR_IDX_LO), 32'd2);
    repeat (200) @(negedge clk);
    rd(1, CTRL + 32'(REG_STATUS), d);
    check("B stalled on the barrier", d, 32'h1);
    rd(1, CTRL + 32'(REG_CQ_RD_IDX_LO), d);
    check("B picked only the barrier", d, 32'd1);
    rd(1, DMEM + 32'(W_OUT2 * 4), d);
    check("B has not run the mul", d, 32'hDEAD_BEEF);
    if (d == 32'hDEAD_BEEF) n_b_waited++;

    // ---- device A: C = A + B into B, completion S in B, then S2 locally ----
    for (int i = 0; i < N; i++) begin
      va[i] = $urandom; vb[i] = $urandom;
      wr(0, DMEM + 32'((W_IN0 + i) * 4), va[i]);
      wr(0, DMEM + 32'((W_IN1 + i) * 4), vb[i]);
    end
    wr(0, DMEM + 32'((W_ARGS + 0) * 4), a_addr(W_IN0));
    wr(0, DMEM + 32'((W_ARGS + 2) * 4), a_addr(W_IN1));
    wr(0, DMEM + 32'((W_ARGS + 4) * 4), b_addr(W_OUT));
    wr(0, DMEM + 32'(W_SIG2 * 4), 32'd1);
    start_device(0);
    rd(0, CTRL + 32'(REG_FEATURES), d);
    check("A advertises the bus master", d, 32'h1);
    dispatch(p, BIK_ADD_I32, a_addr(W_ARGS), b_addr(W_SIG));
    put_packet(0, 0, p);
    barrier(p, 32'h0, a_addr(W_SIG2));
    put_packet(0, 1, p);

    // hand B's port to A's master, start A, and wait for A's own signal
    @(negedge clk);
    to_a = 1'b1;
    wr(0, CTRL + 32'(REG_CQ_WR_IDX_LO), 32'd2);
    poll_zero(0, W_SIG2, 2000, ok);
    check("A finished", 32'(ok), 32'd1);
    check("A wrote into B over its master", 32'(a_writes_into_b), 32'(N + 1));
    repeat (4) @(negedge clk);
    to_a = 1'b0;

    // ---- B must have been released by A's completion signal ----
    poll_zero(1, W_SIG2, 2000, ok);
    check("B finished after A", 32'(ok), 32'd1);
    if (ok) n_p2p_release++;
    rd(1, DMEM + 32'(W_SIG * 4), d);
    check("A cleared the signal in B", d, 32'h0);
    begin
      int good = 0;
      for (int i = 0; i < N; i++) begin
        rd(1, DMEM + 32'((W_OUT + i) * 4), d);
        check($sformatf("C[%0d] in B", i), d, va[i] + vb[i]);
        if (d == va[i] + vb[i]) good++;
        rd(1, DMEM + 32'((W_OUT2 + i) * 4), d);
        check($sformatf("D[%0d] in B", i), d, (va[i] + vb[i]) * vx[i]);
      end
      if (good == N) n_p2p_data++;
    end
    rd(1, CTRL + 32'(REG_STATUS), d);
    check("B idle at the end", d, 32'h0);
    rd(1, CTRL + 32'(REG_CQ_RD_IDX_LO), d);
    check("B read index", d, 32'd2);
    check("B master stayed idle", 32'(bm_awvalid || bm_arvalid), 32'd0);

    // every mechanism must have happened
    check("mechanism: B waited on the barrier", 32'(n_b_waited > 0), 1);
    check("mechanism: A's data arrived in B", 32'(n_p2p_data > 0), 1);
    check("mechanism: B released by A's signal", 32'(n_p2p_release > 0), 1);
    $display("mechanisms: b_waited=%0d p2p_data=%0d p2p_release=%0d writes_from_a=%0d",
             n_b_waited, n_p2p_data, n_p2p_release, a_writes_into_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
