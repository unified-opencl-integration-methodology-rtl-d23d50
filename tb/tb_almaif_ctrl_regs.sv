// tb_almaif_ctrl_regs -- self-checking test of the AlmaIF v2 control registers.
//
// Drives the host port directly with word accesses. Checks the reset state
// (accelerator held in reset), every discovery register against the values
// given to the instance, the built-in kernel list layout (count at 0x348, IDs
// from 0x34A, zeros past the count), the 64-bit queue indices with byte
// enables and increments from the accelerator side (including a carry into
// the upper word), the three command codes and the status bits they produce,
// the stall bit, and that unmapped offsets read 0.
module tb_almaif_ctrl_regs;
  import almaif_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  mem_req_t    host_req = MEM_REQ_IDLE;
  logic [31:0] host_rdata;
  logic        cq_rd_idx_inc = 1'b0, core_stall = 1'b0;
  logic [63:0] cq_rd_idx, cq_wr_idx;
  logic        core_reset, core_freeze;

  almaif_ctrl_regs #(
    .DEV_CLASS  (32'h0000_1234),
    .DEV_ID     (32'h0000_00A5),
    .CORE_COUNT (32'd1),
    .CONF_BYTES (32'd512),
    .CONF_START (64'h0000_0001_0001_0000),
    .CQ_BYTES   (64'd1024),
    .CQ_START   (64'h0000_0002_0002_0000),
    .DMEM_BYTES (64'd8192),
    .DMEM_START (64'h0000_0003_0003_0000),
    .FEATURES   (64'h1),
    .NUM_BIK    (3),
    .BIK_IDS    ({{(16*(MAX_BUILTINS-3)){1'b0}}, 16'hFFFF, BIK_MUL_I32, BIK_ADD_I32})
  ) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(input logic [11:0] off, input logic [31:0] d, input logic [3:0] be = 4'hF);
    @(negedge clk);
    host_req = '{en: 1'b1, we: 1'b1, be: be, addr: 32'(off >> 2), wdata: d};
    @(negedge clk);
    host_req = MEM_REQ_IDLE;
  endtask

  task automatic rd(input logic [11:0] off, output logic [31:0] d);
    @(negedge clk);
    host_req = '{en: 1'b1, we: 1'b0, be: 4'h0, addr: 32'(off >> 2), wdata: 32'h0};
    @(negedge clk);
    host_req = MEM_REQ_IDLE;
    d = host_rdata;
  endtask

  task automatic expect_reg(input string what, input logic [11:0] off, input logic [31:0] exp);
    logic [31:0] d;
    rd(off, d);
    check(what, d, exp);
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    expect_reg("status after reset", REG_STATUS, 32'h5);
    check("core_reset out", 32'(core_reset), 1);
    expect_reg("command after reset", REG_COMMAND, 32'd1);
    expect_reg("dev class", REG_DEV_CLASS, 32'h1234);
    expect_reg("dev id", REG_DEV_ID, 32'hA5);
    expect_reg("version", REG_VERSION, 32'd2);
    expect_reg("core count", REG_CORE_COUNT, 32'd1);
    expect_reg("reserved 0x310", 12'h310, 32'd0);
    expect_reg("conf size", REG_CONF_SIZE, 32'd512);
    expect_reg("conf start lo", REG_CONF_START, 32'h0001_0000);
    expect_reg("conf start hi", REG_CONF_START + 12'd4, 32'h1);
    expect_reg("cq size lo", REG_CQ_SIZE, 32'd1024);
    expect_reg("cq size hi", REG_CQ_SIZE + 12'd4, 32'd0);
    expect_reg("cq start lo", REG_CQ_START, 32'h0002_0000);
    expect_reg("cq start hi", REG_CQ_START + 12'd4, 32'h2);
    expect_reg("dmem size", REG_DMEM_SIZE, 32'd8192);
    expect_reg("dmem start lo", REG_DMEM_START, 32'h0003_0000);
    expect_reg("dmem start hi", REG_DMEM_START + 12'd4, 32'h3);
    expect_reg("features lo", REG_FEATURES, 32'h1);
    expect_reg("features hi", REG_FEATURES + 12'd4, 32'h0);
    expect_reg("bik count, id0", REG_NUM_BIK, {16'd1, 16'd3});
    expect_reg("bik id1, id2", REG_NUM_BIK + 12'd4, {16'hFFFF, 16'd2});
    expect_reg("bik past count", REG_NUM_BIK + 12'd8, 32'd0);
    expect_reg("unmapped", 12'h050, 32'd0);

    // queue indices
    wr(REG_CQ_WR_IDX_LO, 32'h1234_5678);
    wr(REG_CQ_WR_IDX_HI, 32'hAABB_CCDD);
    expect_reg("wr idx lo", REG_CQ_WR_IDX_LO, 32'h1234_5678);
    expect_reg("wr idx hi", REG_CQ_WR_IDX_HI, 32'hAABB_CCDD);
    check("wr idx out", cq_wr_idx[31:0], 32'h1234_5678);
    wr(REG_CQ_WR_IDX_LO, 32'h0000_00EE, 4'b0001);
    expect_reg("wr idx byte enable", REG_CQ_WR_IDX_LO, 32'h1234_56EE);
    wr(REG_CQ_RD_IDX_LO, 32'hFFFF_FFFE);
    wr(REG_CQ_RD_IDX_HI, 32'h0);
    @(negedge clk); cq_rd_idx_inc = 1'b1;
    @(negedge clk); @(negedge clk); cq_rd_idx_inc = 1'b0;
    expect_reg("rd idx carry lo", REG_CQ_RD_IDX_LO, 32'h0);
    expect_reg("rd idx carry hi", REG_CQ_RD_IDX_HI, 32'h1);
    check("rd idx out", cq_rd_idx[31:0], 32'h0);
    check("rd idx out hi", cq_rd_idx[63:32], 32'h1);

    // commands
    wr(REG_COMMAND, 32'(CMD_CONTINUE));
    expect_reg("status running", REG_STATUS, 32'h0);
    check("reset released", 32'(core_reset), 0);
    core_stall = 1'b1;
    expect_reg("status stalled", REG_STATUS, 32'h1);
    core_stall = 1'b0;
    wr(REG_COMMAND, 32'(CMD_FREEZE));
    expect_reg("status frozen", REG_STATUS, 32'h3);
    check("freeze out", 32'(core_freeze), 1);
    expect_reg("command readback", REG_COMMAND, 32'd4);
    wr(REG_COMMAND, 32'd3);   // not a command: nothing changes
    expect_reg("status after bad cmd", REG_STATUS, 32'h3);
    wr(REG_COMMAND, 32'(CMD_CONTINUE));
    expect_reg("status continue", REG_STATUS, 32'h0);
    wr(REG_COMMAND, 32'(CMD_RESET));
    expect_reg("status reset", REG_STATUS, 32'h5);
    check("reset out", 32'(core_reset), 1);
    wr(REG_COMMAND, 32'(CMD_FREEZE));
    expect_reg("status reset+freeze", REG_STATUS, 32'h7);
    wr(REG_COMMAND, 32'(CMD_CONTINUE));
    expect_reg("status clear", REG_STATUS, 32'h0);
    // read-only registers ignore writes
    wr(REG_VERSION, 32'd9);
    expect_reg("version read-only", REG_VERSION, 32'd2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
