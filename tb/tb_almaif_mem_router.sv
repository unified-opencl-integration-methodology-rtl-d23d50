// tb_almaif_mem_router -- self-checking test of the local/external data
// access router and its AXI4-Lite master.
//
// A model core issues random reads and writes, with random byte enables, to
// word indices inside the data memory (a behavioural array here) and outside
// it (an axil_mem_model with random latency on the master port). The model
// core obeys the router's hold: it issues a request only in a cycle where
// hold is low and reads the answer in the next cycle where hold is low.
// Every read is compared with a reference image of both memories. Also
// checks that external byte addresses are rebuilt as DMEM_START + 4*index,
// that the external read word stays on core_rdata until the next read, that
// a local read after an external one returns local data, and that each
// external access holds the core for at least two cycles.
module tb_almaif_mem_router;
  import almaif_pkg::*;

  localparam int unsigned DMEM_WORDS = 256;
  localparam logic [31:0] DSTART     = 32'h0003_0000;
  localparam logic [31:0] EXT_BASE   = 32'h8000_0000;
  localparam int unsigned EXT_WORDS  = 256;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  mem_req_t    core_req = MEM_REQ_IDLE, dmem_req;
  logic [31:0] core_rdata, dmem_rdata;
  logic        core_hold;
  logic [31:0] m_awaddr, m_wdata, m_araddr, m_rdata;
  logic [3:0]  m_wstrb;
  logic        m_awvalid, m_awready, m_wvalid, m_wready, m_bvalid, m_bready;
  logic        m_arvalid, m_arready, m_rvalid, m_rready;
  logic [1:0]  m_bresp, m_rresp;

  almaif_mem_router #(.DMEM_WORDS(DMEM_WORDS), .DMEM_START(64'(DSTART)), .HAS_MASTER(1'b1)) dut (.*);

  axil_mem_model #(.BASE(EXT_BASE), .WORDS(EXT_WORDS), .MAX_WAIT(3)) ext (
    .clk, .awaddr (m_awaddr), .awvalid (m_awvalid), .awready (m_awready),
    .wdata (m_wdata), .wstrb (m_wstrb), .wvalid (m_wvalid), .wready (m_wready),
    .bresp (m_bresp), .bvalid (m_bvalid), .bready (m_bready),
    .araddr (m_araddr), .arvalid (m_arvalid), .arready (m_arready),
    .rdata (m_rdata), .rresp (m_rresp), .rvalid (m_rvalid), .rready (m_rready)
  );

  logic [31:0] lmem [DMEM_WORDS];
  always_ff @(posedge clk) begin
    if (dmem_req.en) begin
      if (dmem_req.we) begin
        for (int i = 0; i < 4; i++) if (dmem_req.be[i]) lmem[dmem_req.addr][8*i +: 8] <= dmem_req.wdata[8*i +: 8];
      end else dmem_rdata <= lmem[dmem_req.addr];
    end
  end

  logic [31:0] ref_l [DMEM_WORDS], ref_e [EXT_WORDS];
  int checks = 0, failures = 0, n_ext_rd = 0, n_ext_wr = 0, short_holds = 0;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // index of external word w as the core sees it
  function automatic logic [31:0] ext_index(input int unsigned w);
    return (EXT_BASE + 32'(4 * w) - DSTART) >> 2;
  endfunction

  // one access; returns the read word (reads) after the hold, counts hold cycles
  task automatic access(input bit we, input bit is_ext, input int unsigned w,
                        input logic [31:0] d, input logic [3:0] be, output logic [31:0] rd);
    int held;
    @(negedge clk);
    while (core_hold) @(negedge clk);
    core_req = '{en: 1'b1, we: we, be: be, addr: is_ext ? ext_index(w) : 32'(w), wdata: d};
    @(negedge clk);
    core_req = MEM_REQ_IDLE;
    held = 0;
    while (core_hold) begin held++; @(negedge clk); end
    if (is_ext && held < 2) short_holds++;
    if (!is_ext && held != 0) short_holds++;
    rd = core_rdata;
  endtask

  function automatic logic [31:0] merge(input logic [31:0] o, input logic [31:0] n, input logic [3:0] be);
    for (int i = 0; i < 4; i++) if (be[i]) o[8*i +: 8] = n[8*i +: 8];
    return o;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [31:0] rd, d, last_rd;
    logic [3:0]  be;
    int unsigned w;
    bit ext_sel;
    for (int i = 0; i < DMEM_WORDS; i++) begin lmem[i] = $urandom; ref_l[i] = lmem[i]; end
    for (int i = 0; i < EXT_WORDS; i++) begin ext.mem[i] = $urandom; ref_e[i] = ext.mem[i]; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    for (int t = 0; t < 600; t++) begin
      ext_sel = ($urandom_range(1) == 1);
      w = ext_sel ? $urandom_range(EXT_WORDS - 1) : $urandom_range(DMEM_WORDS - 1);
      if ($urandom_range(2) == 0) begin
        d = $urandom; be = 4'($urandom);
        access(1'b1, ext_sel, w, d, be, rd);
        if (ext_sel) begin ref_e[w] = merge(ref_e[w], d, be); n_ext_wr++; end
        else         ref_l[w] = merge(ref_l[w], d, be);
      end else begin
        access(1'b0, ext_sel, w, '0, '0, rd);
        check($sformatf("%s read %0d", ext_sel ? "ext" : "local", w), rd, ext_sel ? ref_e[w] : ref_l[w]);
        if (ext_sel) n_ext_rd++;
        last_rd = rd;
        // the read word is held while the core is idle
        @(negedge clk);
        check("read word held", core_rdata, last_rd);
      end
    end
    // external address rebuilt from the index
    access(1'b1, 1'b1, 17, 32'h1234_5678, 4'hF, rd);
    check("external write address", m_awaddr, EXT_BASE + 32'(4 * 17));
    check("external word written", ext.mem[17], 32'h1234_5678);
    ref_e[17] = 32'h1234_5678;
    // final comparison of both memories
    for (int i = 0; i < DMEM_WORDS; i++) check("local image", lmem[i], ref_l[i]);
    for (int i = 0; i < EXT_WORDS; i++) check("external image", ext.mem[i], ref_e[i]);
    check("hold lengths", 32'(short_holds), 0);
    check("external reads happened", 32'(n_ext_rd > 0 && n_ext_wr > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
