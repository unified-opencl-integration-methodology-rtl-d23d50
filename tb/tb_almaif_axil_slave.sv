// tb_almaif_axil_slave -- self-checking test of the AXI4-Lite slave and its
// region decoder.
//
// Four behavioural region memories (one-cycle read, held read word) sit
// behind the slave. A master process issues random reads and writes to random
// regions and word offsets, with random write strobes, random delays between
// AWVALID and WVALID, random RREADY/BREADY back-pressure and reads that
// arrive together with writes. Every read is compared with a reference copy
// of all four regions. Also checks that each write reaches only the region its
// address selects, that address bits above the region window alias, that
// both a read and a write are served when they arrive together, and that the
// responses are OKAY.
module tb_almaif_axil_slave;
  import almaif_pkg::*;

  localparam int unsigned RW = 64;   // words modelled per region

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic [31:0] s_awaddr = '0, s_wdata = '0, s_araddr = '0, s_rdata;
  logic [3:0]  s_wstrb = '0;
  logic        s_awvalid = 0, s_wvalid = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic        s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0]  s_bresp, s_rresp;
  mem_req_t    rgn_req [4];
  logic [31:0] rgn_rdata [4];

  almaif_axil_slave dut (.*);

  logic [31:0] rmem [4][RW];
  logic [31:0] refm [4][RW];

  always_ff @(posedge clk) begin
    for (int r = 0; r < 4; r++) begin
      if (rgn_req[r].en) begin
        if (rgn_req[r].we) begin
          for (int i = 0; i < 4; i++)
            if (rgn_req[r].be[i]) rmem[r][rgn_req[r].addr % RW][8*i +: 8] <= rgn_req[r].wdata[8*i +: 8];
        end else begin
          rgn_rdata[r] <= rmem[r][rgn_req[r].addr % RW];
        end
      end
    end
  end

  int checks = 0, failures = 0, both_at_once = 0;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] mkaddr(input int r, input int w, input bit alias_hi);
    return (alias_hi ? 32'h4000_0000 : 32'h0) | (32'(r) << REGION_LSB) | 32'(4 * w);
  endfunction

  task automatic do_write(input int r, input int w, input logic [31:0] d, input logic [3:0] be);
    int gap;
    gap = $urandom_range(3);
    @(negedge clk);
    s_awaddr = mkaddr(r, w, 1'($urandom_range(1))); s_awvalid = 1;
    s_wdata = d; s_wstrb = be;
    if (gap == 0) s_wvalid = 1;
    repeat (gap) @(negedge clk);
    s_wvalid = 1;
    #1;
    while (!(s_awready && s_wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    s_awvalid = 0; s_wvalid = 0;
    repeat ($urandom_range(3)) @(negedge clk);
    s_bready = 1;
    while (!s_bvalid) @(negedge clk);
    check("bresp", 32'(s_bresp), 0);
    @(negedge clk);
    s_bready = 0;
    for (int i = 0; i < 4; i++) if (be[i]) refm[r][w][8*i +: 8] = d[8*i +: 8];
  endtask

  task automatic do_read(input int r, input int w);
    @(negedge clk);
    s_araddr = mkaddr(r, w, 1'($urandom_range(1))); s_arvalid = 1;
    #1;
    while (!s_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_arvalid = 0;
    repeat ($urandom_range(3)) @(negedge clk);
    s_rready = 1;
    while (!s_rvalid) @(negedge clk);
    check($sformatf("read r%0d w%0d", r, w), s_rdata, refm[r][w]);
    check("rresp", 32'(s_rresp), 0);
    @(negedge clk);
    s_rready = 0;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    for (int r = 0; r < 4; r++)
      for (int w = 0; w < RW; w++) begin
        rmem[r][w] = 32'(r * 1000 + w);
        refm[r][w] = rmem[r][w];
      end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    for (int t = 0; t < 600; t++) begin
      if ($urandom_range(1) == 1) do_write($urandom_range(3), $urandom_range(RW - 1), $urandom, 4'($urandom));
      else                   do_read($urandom_range(3), $urandom_range(RW - 1));
    end

    // a read and a write presented in the same cycle: both are served
    for (int t = 0; t < 20; t++) begin
      int rr, wr_w, rd_w;
      logic [31:0] d, exp_rd;
      bit got_w, got_r;
      rr = $urandom_range(3); wr_w = $urandom_range(RW / 2 - 1); rd_w = RW / 2 + $urandom_range(RW / 2 - 1);
      d = $urandom;
      exp_rd = refm[rr][rd_w];
      @(negedge clk);
      s_awaddr = mkaddr(rr, wr_w, 0); s_wdata = d; s_wstrb = 4'hF; s_awvalid = 1; s_wvalid = 1;
      s_araddr = mkaddr(rr, rd_w, 0); s_arvalid = 1; s_bready = 1; s_rready = 1;
      got_w = 0; got_r = 0;
      for (int c = 0; c < 20 && !(got_w && got_r); c++) begin
        @(posedge clk);
        if (s_awready) got_w = 1;
        if (s_arready) got_r = 1;
        if (s_rvalid) check("simultaneous read", s_rdata, exp_rd);
        @(negedge clk);
        if (got_w) begin s_awvalid = 0; s_wvalid = 0; end
        if (got_r) s_arvalid = 0;
      end
      repeat (3) @(negedge clk);
      s_bready = 0; s_rready = 0;
      refm[rr][wr_w] = d;
      check("both served", 32'(got_w && got_r), 1);
      if (got_w && got_r) both_at_once++;
    end

    // final sweep: every region holds exactly what was written to it
    for (int r = 0; r < 4; r++)
      for (int w = 0; w < RW; w++)
        check($sformatf("sweep r%0d w%0d", r, w), rmem[r][w], refm[r][w]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
