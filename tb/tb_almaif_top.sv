// tb_almaif_top -- end-to-end test of the wrapped accelerator through its
// AXI4-Lite slave port, with every parameter of almaif_top at its default.
//
// The testbench plays the host-side driver: it reads the discovery registers
// and checks them against the values the default configuration must report,
// initialises the queue, then writes input vectors, argument buffers and AQL
// packets into the data and command queue memories and advances the write
// index. Results are compared with sums and products the testbench computes
// itself. It exercises, and counts: add and mul launches (one of them a full
// 1024-element vector), several packets queued at once, a Barrier-AND that
// stalls until the host clears its dependency signal, a packet whose header is
// still INVALID when the write index is advanced, an unsupported kernel ID,
// freeze and continue in the middle of a kernel, an accelerator reset in the
// middle of a kernel, wrap-around of the command queue ring, and a kernel
// whose buffers, barrier dependency and completion signal lie outside the
// device (reached through the bus master, with a behavioural AXI memory on
// the master port). A mechanism that never happened counts as a failure.
module tb_almaif_top;
  import almaif_pkg::*;

  localparam int unsigned CQ_PACKETS = 32;     // defaults of almaif_top
  localparam int unsigned DMEM_WORDS = 4096;
  localparam logic [31:0] CTRL = 32'h0000_0000;
  localparam logic [31:0] CQM  = 32'h0002_0000;
  localparam logic [31:0] DMEM = 32'h0003_0000;

  // data memory layout (word indices)
  localparam int unsigned W_ARGS = 16;
  localparam int unsigned W_SIG  = 64;
  localparam int unsigned W_A    = 256;
  localparam int unsigned W_B    = 1536;
  localparam int unsigned W_C    = 2816;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] s_awaddr = '0, s_wdata = '0, s_araddr = '0, s_rdata;
  logic [3:0]  s_wstrb = '0;
  logic        s_awvalid = 1'b0, s_wvalid = 1'b0, s_bready = 1'b1, s_arvalid = 1'b0, s_rready = 1'b1;
  logic        s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0]  s_bresp, s_rresp;
  logic [31:0] m_awaddr, m_wdata, m_araddr, m_rdata;
  logic [3:0]  m_wstrb;
  logic        m_awvalid, m_awready, m_wvalid, m_wready, m_bvalid, m_bready;
  logic        m_arvalid, m_arready, m_rvalid, m_rready;
  logic [1:0]  m_bresp, m_rresp;

  almaif_top dut (.*);

  // memory outside the device, reached through its bus master
  localparam logic [31:0] EXT_BASE = 32'h8000_0000;
  axil_mem_model #(.BASE(EXT_BASE), .WORDS(1024), .MAX_WAIT(2)) ext (
    .clk, .awaddr (m_awaddr), .awvalid (m_awvalid), .awready (m_awready),
    .wdata (m_wdata), .wstrb (m_wstrb), .wvalid (m_wvalid), .wready (m_wready),
    .bresp (m_bresp), .bvalid (m_bvalid), .bready (m_bready),
    .araddr (m_araddr), .arvalid (m_arvalid), .arready (m_arready),
    .rdata (m_rdata), .rresp (m_rresp), .rvalid (m_rvalid), .rready (m_rready)
  );

  int checks = 0, failures = 0;
  int n_add = 0, n_mul = 0, n_full = 0, n_multi = 0, n_barrier_stall = 0, n_invalid_wait = 0;
  int n_unsupported = 0, n_freeze = 0, n_reset = 0, n_wrap = 0, n_external = 0;
  longint unsigned wr_idx = 0;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic axi_write(input logic [31:0] addr, input logic [31:0] data);
    @(negedge clk);
    s_awaddr = addr; s_wdata = data; s_wstrb = 4'hF; s_awvalid = 1'b1; s_wvalid = 1'b1;
    #1;
    while (!s_awready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_awvalid = 1'b0; s_wvalid = 1'b0;
    while (!s_bvalid) @(negedge clk);
  endtask

  task automatic axi_read(input logic [31:0] addr, output logic [31:0] data);
    @(negedge clk);
    s_araddr = addr; s_arvalid = 1'b1;
    #1;
    while (!s_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_arvalid = 1'b0;
    while (!s_rvalid) @(negedge clk);
    data = s_rdata;
  endtask

  task automatic dmem_wr(input int unsigned w, input logic [31:0] d);
    axi_write(DMEM + 32'(w * 4), d);
  endtask
  task automatic dmem_rd(input int unsigned w, output logic [31:0] d);
    axi_read(DMEM + 32'(w * 4), d);
  endtask
  function automatic logic [31:0] dev_addr(input int unsigned w);
    return DMEM + 32'(w * 4);
  endfunction

  task automatic set_wr_idx(input longint unsigned v);
    axi_write(CTRL + 32'(REG_CQ_WR_IDX_LO), v[31:0]);
    axi_write(CTRL + 32'(REG_CQ_WR_IDX_HI), v[63:32]);
  endtask

  task automatic read_rd_idx(output logic [63:0] v);
    logic [31:0] lo, hi;
    axi_read(CTRL + 32'(REG_CQ_RD_IDX_LO), lo);
    axi_read(CTRL + 32'(REG_CQ_RD_IDX_HI), hi);
    v = {hi, lo};
  endtask

  // write a packet into the slot of index idx; the header word last
  task automatic put_packet(input longint unsigned idx, input logic [31:0] words [16],
                            input bit skip_header = 0);
    logic [31:0] base;
    base = CQM + 32'((idx % CQ_PACKETS) * AQL_PACKET_BYTES);
    for (int i = 1; i < 16; i++) axi_write(base + 32'(i * 4), words[i]);
    if (!skip_header) axi_write(base, words[0]);
  endtask

  task automatic dispatch_words(output logic [31:0] p [16], input logic [15:0] kid,
                                input int unsigned n, input int unsigned karg_w,
                                input int unsigned sig_w);
    for (int i = 0; i < 16; i++) p[i] = '0;
    p[0]  = {16'd1, 16'(AQL_KERNEL_DISPATCH)};
    p[1]  = {16'd1, 16'(n)};
    p[2]  = 32'd1;
    p[3]  = 32'(n);
    p[4]  = 32'd1;
    p[5]  = 32'd1;
    p[8]  = 32'(kid);
    p[10] = dev_addr(karg_w);
    p[14] = (sig_w == 0) ? 32'h0 : dev_addr(sig_w);
  endtask

  // arguments: 3 eight-byte slots at karg_w
  task automatic put_args(input int unsigned karg_w, input int unsigned a, input int unsigned b,
                          input int unsigned c);
    dmem_wr(karg_w + 0, dev_addr(a)); dmem_wr(karg_w + 1, 32'h0);
    dmem_wr(karg_w + 2, dev_addr(b)); dmem_wr(karg_w + 3, 32'h0);
    dmem_wr(karg_w + 4, dev_addr(c)); dmem_wr(karg_w + 5, 32'h0);
  endtask

  logic [31:0] va [1280], vb [1280];

  task automatic fill_inputs(input int unsigned n);
    for (int i = 0; i < n; i++) begin
      va[i] = $urandom; vb[i] = $urandom;
      dmem_wr(W_A + i, va[i]);
      dmem_wr(W_B + i, vb[i]);
    end
  endtask

  task automatic clear_out(input int unsigned n);
    for (int i = 0; i < n; i++) dmem_wr(W_C + i, 32'hDEAD_BEEF);
  endtask

  task automatic check_out(input string what, input logic [15:0] kid, input int unsigned n);
    logic [31:0] d;
    for (int i = 0; i < n; i++) begin
      dmem_rd(W_C + i, d);
      check($sformatf("%s C[%0d]", what, i), d, (kid == BIK_MUL_I32) ? va[i] * vb[i] : va[i] + vb[i]);
    end
  endtask

  task automatic wait_signal(input int unsigned sig_w, input int max_polls, output bit ok);
    logic [31:0] d;
    ok = 0;
    for (int i = 0; i < max_polls; i++) begin
      dmem_rd(sig_w, d);
      if (d == 0) begin ok = 1; break; end
    end
  endtask

  // one kernel launch, complete: inputs, args, packet, wait, compare
  task automatic run_kernel(input logic [15:0] kid, input int unsigned n, input string what);
    logic [31:0] p [16];
    bit ok;
    fill_inputs(n);
    clear_out(n);
    put_args(W_ARGS, W_A, W_B, W_C);
    dmem_wr(W_SIG, 32'd1);
    dispatch_words(p, kid, n, W_ARGS, W_SIG);
    put_packet(wr_idx, p);
    wr_idx++;
    set_wr_idx(wr_idx);
    wait_signal(W_SIG, 2000 + 4 * n, ok);
    check({what, " completion"}, 32'(ok), 32'd1);
    check_out(what, kid, n);
    if (kid == BIK_ADD_I32) n_add++; else n_mul++;
    if (wr_idx % CQ_PACKETS == 0) n_wrap++;
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [31:0] d;
    logic [63:0] idx;
    logic [31:0] p [16];
    bit ok;

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- discovery --------------------------------------------------------
    axi_read(CTRL + 32'(REG_STATUS), d);       check("status after reset", d, 32'h5);
    axi_read(CTRL + 32'(REG_VERSION), d);      check("version", d, 32'd2);
    axi_read(CTRL + 32'(REG_CORE_COUNT), d);   check("core count", d, 32'd1);
    axi_read(CTRL + 32'(REG_CONF_SIZE), d);    check("conf size", d, 32'd1024);
    axi_read(CTRL + 32'(REG_CONF_START), d);   check("conf start", d, 32'h1_0000);
    axi_read(CTRL + 32'(REG_CQ_SIZE), d);      check("cq size", d, 32'(CQ_PACKETS * 64));
    axi_read(CTRL + 32'(REG_CQ_SIZE) + 4, d);  check("cq size hi", d, 32'd0);
    axi_read(CTRL + 32'(REG_CQ_START), d);     check("cq start", d, CQM);
    axi_read(CTRL + 32'(REG_DMEM_SIZE), d);    check("dmem size", d, 32'(DMEM_WORDS * 4));
    axi_read(CTRL + 32'(REG_DMEM_START), d);   check("dmem start", d, DMEM);
    axi_read(CTRL + 32'(REG_FEATURES), d);     check("features: bus master", d, 32'd1);
    axi_read(CTRL + 32'(REG_NUM_BIK), d);      check("bik count + id0", d, {BIK_ADD_I32, 16'd2});
    axi_read(CTRL + 32'(REG_NUM_BIK) + 4, d);  check("bik id1", d, {16'd0, BIK_MUL_I32});

    // ---- configuration memory is plain host-accessible storage -----------
    axi_write(32'h0001_0010, 32'hC0FF_EE01);
    axi_read(32'h0001_0010, d);                check("conf mem", d, 32'hC0FF_EE01);

    // ---- queue initialisation (as a driver does) ---------------------------
    axi_write(CTRL + 32'(REG_COMMAND), 32'(CMD_RESET));
    axi_write(CTRL + 32'(REG_CQ_RD_IDX_LO), 0); axi_write(CTRL + 32'(REG_CQ_RD_IDX_HI), 0);
    set_wr_idx(0);
    axi_write(CTRL + 32'(REG_COMMAND), 32'(CMD_CONTINUE));
    axi_read(CTRL + 32'(REG_STATUS), d);       check("status running idle", d, 32'h0);

    // ---- single launches -----------------------------------------------------
    run_kernel(BIK_ADD_I32, 8, "add8");
    run_kernel(BIK_MUL_I32, 8, "mul8");
    read_rd_idx(idx);                          check("rd idx after 2", idx[31:0], 32'd2);
    axi_read(CQM + 32'(1 * 64), d);            check("header invalidated", d[15:0], 16'(AQL_INVALID));

    // ---- full-size operation: the largest vector the default data memory holds
    run_kernel(BIK_ADD_I32, 1024, "add1024");
    n_full++;

    // ---- several packets queued at once ----------------------------------------
    begin
      fill_inputs(4);
      for (int k = 0; k < 3; k++) begin
        put_args(W_ARGS + 8 * k, W_A, W_B, W_C + 16 * k);
        dmem_wr(W_SIG + k, 32'd1);
        dispatch_words(p, (k == 1) ? BIK_MUL_I32 : BIK_ADD_I32, 4, W_ARGS + 8 * k, W_SIG + k);
        put_packet(wr_idx + k, p);
      end
      wr_idx += 3;
      set_wr_idx(wr_idx);
      wait_signal(W_SIG + 2, 500, ok);
      check("multi completion", 32'(ok), 1);
      for (int k = 0; k < 3; k++) begin
        dmem_rd(W_SIG + k, d); check("multi signal", d, 0);
        for (int i = 0; i < 4; i++) begin
          dmem_rd(W_C + 16 * k + i, d);
          check("multi C", d, (k == 1) ? va[i] * vb[i] : va[i] + vb[i]);
        end
      end
      n_multi++;
    end

    // ---- Barrier-AND waits for its dependency, then the next kernel runs -------
    begin
      fill_inputs(4);
      clear_out(4);
      dmem_wr(W_SIG + 10, 32'd1);   // dependency (an event not yet complete)
      dmem_wr(W_SIG + 11, 32'd1);   // barrier completion
      dmem_wr(W_SIG + 12, 32'd1);   // kernel completion
      for (int i = 0; i < 16; i++) p[i] = '0;
      p[0]  = {16'd0, 16'(AQL_BARRIER_AND)};
      p[4]  = dev_addr(W_SIG + 10);  // dep_signal[1]; others are null
      p[14] = dev_addr(W_SIG + 11);
      put_packet(wr_idx, p);
      put_args(W_ARGS, W_A, W_B, W_C);
      dispatch_words(p, BIK_ADD_I32, 4, W_ARGS, W_SIG + 12);
      put_packet(wr_idx + 1, p);
      wr_idx += 2;
      set_wr_idx(wr_idx);
      repeat (200) @(posedge clk);
      axi_read(CTRL + 32'(REG_STATUS), d);
      check("barrier stalled status", d, 32'h1);
      dmem_rd(W_SIG + 11, d);          check("barrier not complete", d, 1);
      dmem_rd(W_SIG + 12, d);          check("kernel held by barrier", d, 1);
      dmem_rd(W_C, d);                 check("kernel did not run", d, 32'hDEAD_BEEF);
      if (d == 32'hDEAD_BEEF) n_barrier_stall++;
      dmem_wr(W_SIG + 10, 32'd0);      // the dependency completes
      wait_signal(W_SIG + 12, 500, ok);
      check("after barrier kernel done", 32'(ok), 1);
      dmem_rd(W_SIG + 11, d);          check("barrier completion", d, 0);
      check_out("after barrier", BIK_ADD_I32, 4);
    end

    // ---- packet published before its header is valid --------------------------
    begin
      fill_inputs(4);
      clear_out(4);
      put_args(W_ARGS, W_A, W_B, W_C);
      dmem_wr(W_SIG, 32'd1);
      dispatch_words(p, BIK_MUL_I32, 4, W_ARGS, W_SIG);
      axi_write(CQM + 32'((wr_idx % CQ_PACKETS) * 64), {16'd1, 16'(AQL_INVALID)});
      put_packet(wr_idx, p, 1);
      set_wr_idx(wr_idx + 1);
      repeat (100) @(posedge clk);
      read_rd_idx(idx);                check("invalid header not picked", idx[31:0], 32'(wr_idx));
      dmem_rd(W_SIG, d);               check("invalid header no completion", d, 1);
      if (idx[31:0] == 32'(wr_idx)) n_invalid_wait++;
      axi_write(CQM + 32'((wr_idx % CQ_PACKETS) * 64), p[0]);
      wr_idx++;
      wait_signal(W_SIG, 500, ok);
      check("after valid header done", 32'(ok), 1);
      check_out("late header", BIK_MUL_I32, 4);
    end

    // ---- unsupported built-in kernel ID: completes, touches nothing ------------
    begin
      clear_out(4);
      dmem_wr(W_SIG, 32'd1);
      put_args(W_ARGS, W_A, W_B, W_C);
      dispatch_words(p, 16'h0042, 4, W_ARGS, W_SIG);
      put_packet(wr_idx, p);
      wr_idx++;
      set_wr_idx(wr_idx);
      wait_signal(W_SIG, 500, ok);
      check("unsupported completes", 32'(ok), 1);
      dmem_rd(W_C, d);                 check("unsupported writes nothing", d, 32'hDEAD_BEEF);
      if (ok && d == 32'hDEAD_BEEF) n_unsupported++;
    end

    // ---- freeze in the middle of a kernel, then continue -----------------------
    begin
      logic [31:0] c_before, c_after;
      fill_inputs(300);
      clear_out(300);
      put_args(W_ARGS, W_A, W_B, W_C);
      dmem_wr(W_SIG, 32'd1);
      dispatch_words(p, BIK_ADD_I32, 300, W_ARGS, W_SIG);
      put_packet(wr_idx, p);
      wr_idx++;
      set_wr_idx(wr_idx);
      repeat (300) @(posedge clk);
      axi_write(CTRL + 32'(REG_COMMAND), 32'(CMD_FREEZE));
      axi_read(CTRL + 32'(REG_STATUS), d);   check("frozen status", d, 32'h3);
      dmem_rd(W_C + 299, c_before);
      repeat (2000) @(posedge clk);
      dmem_rd(W_SIG, d);                     check("frozen: not complete", d, 1);
      dmem_rd(W_C + 299, c_after);           check("frozen: no progress", c_after, c_before);
      if (d == 1 && c_after == 32'hDEAD_BEEF) n_freeze++;
      axi_write(CTRL + 32'(REG_COMMAND), 32'(CMD_CONTINUE));
      wait_signal(W_SIG, 2000, ok);
      check("after freeze complete", 32'(ok), 1);
      check_out("freeze", BIK_ADD_I32, 300);
      n_add++;
    end

    // ---- accelerator reset in the middle of a kernel ----------------------------
    begin
      fill_inputs(300);
      clear_out(300);
      put_args(W_ARGS, W_A, W_B, W_C);
      dmem_wr(W_SIG, 32'd1);
      dispatch_words(p, BIK_MUL_I32, 300, W_ARGS, W_SIG);
      put_packet(wr_idx, p);
      set_wr_idx(wr_idx + 1);
      repeat (300) @(posedge clk);
      axi_write(CTRL + 32'(REG_COMMAND), 32'(CMD_RESET));
      axi_read(CTRL + 32'(REG_STATUS), d);   check("reset status", d, 32'h5);
      repeat (200) @(posedge clk);
      dmem_rd(W_SIG, d);                     check("reset: abandoned", d, 1);
      if (d == 1) n_reset++;
      // driver re-initialises the queue and the same command is resubmitted
      axi_write(CTRL + 32'(REG_CQ_RD_IDX_LO), 32'(wr_idx));
      axi_write(CTRL + 32'(REG_CQ_RD_IDX_HI), 0);
      put_packet(wr_idx, p);
      axi_write(CTRL + 32'(REG_COMMAND), 32'(CMD_CONTINUE));
      wr_idx++;
      wait_signal(W_SIG, 2000, ok);
      check("after reset complete", 32'(ok), 1);
      check_out("after reset", BIK_MUL_I32, 300);
      n_mul++;
    end

    // ---- enough launches to wrap the ring past slot CQ_PACKETS-1 ---------------
    while (n_wrap < 1) run_kernel((wr_idx % 2) ? BIK_MUL_I32 : BIK_ADD_I32, 3, "wrap");
    run_kernel(BIK_ADD_I32, 5, "after wrap");
    read_rd_idx(idx);
    check("rd idx equals wr idx", idx[31:0], 32'(wr_idx));

    // ---- buffers and signals outside the device, via the bus master -----------
    // A is external, B local, C external; the barrier's dependency and the
    // kernel's completion signal are external words too.
    begin
      int unsigned n;
      n = 40;
      fill_inputs(n);
      for (int i = 0; i < n; i++) begin
        ext.mem[i] = va[i];            // A in external memory
        ext.mem[512 + i] = 32'h0BAD_F00D;
      end
      ext.mem[900] = 32'd1;            // external dependency, pending
      ext.mem[901] = 32'd1;            // external completion signal
      dmem_wr(W_SIG + 20, 32'd1);      // barrier completion (local)
      for (int i = 0; i < 16; i++) p[i] = '0;
      p[0]  = {16'd0, 16'(AQL_BARRIER_AND)};
      p[2]  = EXT_BASE + 32'(4 * 900);
      p[14] = dev_addr(W_SIG + 20);
      put_packet(wr_idx, p);
      dmem_wr(W_ARGS + 0, EXT_BASE);                 dmem_wr(W_ARGS + 1, 0);
      dmem_wr(W_ARGS + 2, dev_addr(W_B));            dmem_wr(W_ARGS + 3, 0);
      dmem_wr(W_ARGS + 4, EXT_BASE + 32'(4 * 512));  dmem_wr(W_ARGS + 5, 0);
      dispatch_words(p, BIK_MUL_I32, n, W_ARGS, 0);
      p[14] = EXT_BASE + 32'(4 * 901);
      put_packet(wr_idx + 1, p);
      wr_idx += 2;
      set_wr_idx(wr_idx);
      repeat (300) @(posedge clk);
      dmem_rd(W_SIG + 20, d);         check("external dependency holds barrier", d, 1);
      check("kernel not yet run", ext.mem[512], 32'h0BAD_F00D);
      ext.mem[900] = 32'd0;           // the external event completes
      for (int i = 0; i < 20000 && ext.mem[901] != 0; i++) @(posedge clk);
      check("external completion written", ext.mem[901], 0);
      dmem_rd(W_SIG + 20, d);         check("barrier completed", d, 0);
      for (int i = 0; i < n; i++)
        check($sformatf("external C[%0d]", i), ext.mem[512 + i], va[i] * vb[i]);
      if (ext.mem[901] == 0 && ext.mem[512 + n - 1] == va[n-1] * vb[n-1]) n_external++;
      n_mul++;
    end

    // ---- every mechanism happened ---------------------------------------------
    $display("mechanisms: add=%0d mul=%0d full=%0d multi=%0d barrier_stall=%0d invalid_wait=%0d unsupported=%0d freeze=%0d reset=%0d wrap=%0d external=%0d",
             n_add, n_mul, n_full, n_multi, n_barrier_stall, n_invalid_wait, n_unsupported,
             n_freeze, n_reset, n_wrap, n_external);
    check("add happened", 32'(n_add > 0), 1);
    check("mul happened", 32'(n_mul > 0), 1);
    check("full vector happened", 32'(n_full > 0), 1);
    check("multi happened", 32'(n_multi > 0), 1);
    check("barrier stall happened", 32'(n_barrier_stall > 0), 1);
    check("invalid wait happened", 32'(n_invalid_wait > 0), 1);
    check("unsupported happened", 32'(n_unsupported > 0), 1);
    check("freeze happened", 32'(n_freeze > 0), 1);
    check("reset happened", 32'(n_reset > 0), 1);
    check("wrap happened", 32'(n_wrap > 0), 1);
    check("external access happened", 32'(n_external > 0), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
