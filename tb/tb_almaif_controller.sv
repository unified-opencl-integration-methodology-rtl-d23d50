// tb_almaif_controller -- self-checking test of the AlmaIF packet processor.
//
// The controller runs with the real vector kernel behind it; the command
// queue memory and the data memory are behavioural arrays here with the
// one-cycle read timing of the region RAMs, and the testbench keeps the queue
// indices itself (the read index advances on cq_rd_idx_inc). It checks kernel
// dispatch (add and mul, results computed here), that each picked packet
// advances the read index exactly once and has its header set to INVALID, the
// completion signal write (and none for a null completion address), a
// Barrier-AND over several dependency slots that holds back the following
// packet and raises stall until every dependency reads zero, a slot whose
// header is INVALID being waited for, an unsupported kernel ID and a vendor
// packet retired without effect, a ring wrap-around, freeze (en low) and reset.
module tb_almaif_controller;
  import almaif_pkg::*;

  localparam int unsigned CQ_PACKETS = 4;
  localparam logic [31:0] DMEM_BASE  = 32'h0003_0000;
  localparam int unsigned DW = 2048;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst = 1'b1, en = 1'b1;
  logic [63:0] cq_rd_idx = '0, cq_wr_idx = '0;
  logic        cq_rd_idx_inc, stall;
  mem_req_t    cq_req, dmem_req, k_mem_req;
  logic [31:0] cq_rdata, dmem_rdata;
  logic        k_start, k_done, k_busy;
  logic [15:0] k_id;
  logic [31:0] k_ptr_a, k_ptr_b, k_ptr_c, k_n;

  almaif_controller #(.CQ_PACKETS(CQ_PACKETS), .DMEM_START(64'(DMEM_BASE))) dut (.*);

  almaif_vec_kernel u_kernel (
    .clk, .rst, .en, .start (k_start), .kernel_id (k_id),
    .ptr_a (k_ptr_a), .ptr_b (k_ptr_b), .ptr_c (k_ptr_c), .n (k_n),
    .busy (k_busy), .done (k_done), .mem_req (k_mem_req), .mem_rdata (dmem_rdata)
  );

  logic [31:0] cq [CQ_PACKETS * 16];
  logic [31:0] dm [DW];
  int inc_count = 0;

  always_ff @(posedge clk) begin
    if (cq_req.en) begin
      if (cq_req.we) begin
        for (int i = 0; i < 4; i++)
          if (cq_req.be[i]) cq[cq_req.addr % (CQ_PACKETS * 16)][8*i +: 8] <= cq_req.wdata[8*i +: 8];
      end else cq_rdata <= cq[cq_req.addr % (CQ_PACKETS * 16)];
    end
    if (dmem_req.en) begin
      if (dmem_req.we) dm[dmem_req.addr % DW] <= dmem_req.wdata;
      else             dmem_rdata <= dm[dmem_req.addr % DW];
    end
    if (cq_rd_idx_inc) begin
      cq_rd_idx <= cq_rd_idx + 1;
      inc_count <= inc_count + 1;
    end
  end

  int checks = 0, failures = 0;
  int stall_cycles = 0;
  always @(posedge clk) if (stall) stall_cycles++;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] da(input int unsigned w);
    return DMEM_BASE + 32'(4 * w);
  endfunction

  // packet helpers: write straight into the queue array
  task automatic put_dispatch(input longint unsigned idx, input logic [15:0] kid,
                              input int unsigned n, input int unsigned karg_w,
                              input int unsigned sig_w, input bit valid_header = 1);
    int b;
    b = int'(idx % CQ_PACKETS) * 16;
    for (int i = 0; i < 16; i++) cq[b + i] = '0;
    cq[b + 0]  = {16'd1, valid_header ? 16'(AQL_KERNEL_DISPATCH) : 16'(AQL_INVALID)};
    cq[b + 3]  = 32'(n);
    cq[b + 8]  = 32'(kid);
    cq[b + 10] = da(karg_w);
    cq[b + 14] = (sig_w == 0) ? 32'h0 : da(sig_w);
  endtask

  task automatic put_args(input int unsigned karg_w, input int unsigned a, input int unsigned b,
                          input int unsigned c);
    dm[karg_w] = da(a); dm[karg_w + 2] = da(b); dm[karg_w + 4] = da(c);
    dm[karg_w + 1] = '0; dm[karg_w + 3] = '0; dm[karg_w + 5] = '0;
  endtask

  task automatic wait_zero(input int unsigned w, input int max_cycles, output bit ok);
    ok = 0;
    for (int i = 0; i < max_cycles; i++) begin
      @(negedge clk);
      if (dm[w] == 0) begin ok = 1; break; end
    end
  endtask

  logic [31:0] a_in [64], b_in [64];

  task automatic vectors(input int unsigned n, input int unsigned a, input int unsigned b,
                         input int unsigned c);
    for (int i = 0; i < n; i++) begin
      a_in[i] = $urandom; b_in[i] = $urandom;
      dm[a + i] = a_in[i]; dm[b + i] = b_in[i]; dm[c + i] = 32'hDEAD_BEEF;
    end
  endtask

  task automatic check_vec(input string what, input logic [15:0] kid, input int unsigned n,
                           input int unsigned c);
    for (int i = 0; i < n; i++)
      check($sformatf("%s[%0d]", what, i), dm[c + i],
            (kid == BIK_MUL_I32) ? a_in[i] * b_in[i] : a_in[i] + b_in[i]);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    bit ok;
    int s0;
    for (int i = 0; i < DW; i++) dm[i] = '0;
    for (int i = 0; i < CQ_PACKETS * 16; i++) cq[i] = {16'd0, 16'(AQL_INVALID)};
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // idle with an empty queue
    repeat (20) @(negedge clk);
    check("no pick on empty queue", 32'(inc_count), 0);

    // add, 16 elements
    vectors(16, 100, 200, 300);
    put_args(10, 100, 200, 300);
    dm[50] = 1;
    put_dispatch(0, BIK_ADD_I32, 16, 10, 50);
    cq_wr_idx = 1;
    wait_zero(50, 500, ok);
    check("add completion", 32'(ok), 1);
    check_vec("add", BIK_ADD_I32, 16, 300);
    check("add picked once", 32'(inc_count), 1);
    check("header invalidated", cq[0][15:0], 16'(AQL_INVALID));
    check("setup kept", cq[0][31:16], 16'd1);

    // mul, with a null completion signal, then add queued behind it
    vectors(8, 100, 200, 300);
    put_args(10, 100, 200, 300);
    put_args(20, 100, 200, 400);
    dm[51] = 1;
    put_dispatch(1, BIK_MUL_I32, 8, 10, 0);
    put_dispatch(2, BIK_ADD_I32, 8, 20, 51);
    for (int i = 0; i < 8; i++) dm[400 + i] = 32'hDEAD_BEEF;
    cq_wr_idx = 3;
    wait_zero(51, 500, ok);
    check("two queued completion", 32'(ok), 1);
    check_vec("mul", BIK_MUL_I32, 8, 300);
    for (int i = 0; i < 8; i++) check("add2", dm[400 + i], a_in[i] + b_in[i]);
    check("three picks", 32'(inc_count), 3);
    check("null completion wrote nothing", dm[0], 0);

    // Barrier-AND over dep slots 0 and 3 holds back the next dispatch
    dm[60] = 1; dm[61] = 1; dm[62] = 1; dm[52] = 1;
    begin
      int b;
      b = 3 * 16;
      for (int i = 0; i < 16; i++) cq[b + i] = '0;
      cq[b + 0]  = {16'd0, 16'(AQL_BARRIER_AND)};
      cq[b + 2]  = da(60);            // dep_signal[0]
      cq[b + 8]  = da(61);            // dep_signal[3]
      cq[b + 14] = da(62);            // completion
    end
    vectors(4, 100, 200, 300);
    put_dispatch(4, BIK_ADD_I32, 4, 10, 52);   // wraps to slot 0
    cq_wr_idx = 5;
    s0 = stall_cycles;
    repeat (100) @(negedge clk);
    check("barrier waits", dm[62], 1);
    check("next held", dm[52], 1);
    check("stall raised", 32'(stall_cycles - s0 > 20), 1);
    check("barrier picked", 32'(inc_count), 4);
    dm[60] = 0;
    repeat (50) @(negedge clk);
    check("barrier waits on second dep", dm[62], 1);
    dm[61] = 0;
    wait_zero(52, 500, ok);
    check("after barrier done", 32'(ok), 1);
    check("barrier completion", dm[62], 0);
    check_vec("wrapped add", BIK_ADD_I32, 4, 300);
    check("wrap picks", 32'(inc_count), 5);

    // slot published with an INVALID header is not picked until valid
    vectors(4, 100, 200, 300);
    dm[53] = 1;
    put_dispatch(5, BIK_MUL_I32, 4, 10, 53, 0);
    cq_wr_idx = 6;
    repeat (100) @(negedge clk);
    check("invalid not picked", 32'(inc_count), 5);
    check("invalid stalls", 32'(stall), 1);
    cq[1 * 16][15:0] = 16'(AQL_KERNEL_DISPATCH);
    wait_zero(53, 500, ok);
    check("late header done", 32'(ok), 1);
    check_vec("late header mul", BIK_MUL_I32, 4, 300);

    // unsupported kernel ID and a vendor-specific packet: retired, no effect
    vectors(4, 100, 200, 300);
    dm[54] = 1; dm[55] = 1;
    put_dispatch(6, 16'h0077, 4, 10, 54);
    put_dispatch(7, BIK_ADD_I32, 4, 10, 55);
    cq[3 * 16][15:0] = 16'(AQL_VENDOR);
    cq_wr_idx = 8;
    wait_zero(55, 500, ok);
    check("unsupported completes", dm[54], 0);
    check("vendor completes", 32'(ok), 1);
    check("no kernel ran", dm[300], 32'hDEAD_BEEF);
    check("eight picks", 32'(inc_count), 8);

    // freeze in the middle of a kernel
    vectors(40, 100, 200, 300);
    dm[56] = 1;
    put_dispatch(8, BIK_ADD_I32, 40, 10, 56);
    cq_wr_idx = 9;
    repeat (40) @(negedge clk);
    en = 1'b0;
    repeat (300) @(negedge clk);
    check("frozen not complete", dm[56], 1);
    check("frozen last untouched", dm[339], 32'hDEAD_BEEF);
    en = 1'b1;
    wait_zero(56, 500, ok);
    check("after freeze", 32'(ok), 1);
    check_vec("freeze add", BIK_ADD_I32, 40, 300);

    // reset in the middle of a kernel abandons it
    vectors(40, 100, 200, 300);
    dm[57] = 1;
    put_dispatch(9, BIK_MUL_I32, 40, 10, 57);
    cq_wr_idx = 10;
    repeat (40) @(negedge clk);
    rst = 1'b1;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (300) @(negedge clk);
    check("reset abandons", dm[57], 1);
    check("reset: queue drained", 32'(cq_rd_idx), 10);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
