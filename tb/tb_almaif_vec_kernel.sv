// tb_almaif_vec_kernel -- self-checking test of the built-in vector kernels.
//
// A behavioural word memory (a plain array, with the same one-cycle read
// timing as the data memory) serves the kernel's port. The test launches
// add_i32 and mul_i32 over random vectors of several lengths (including 0 and
// 1), compares every output word with the sum or product computed here, checks
// that nothing outside the output vector is written, checks the launch
// latency of 3*n + 1 cycles from start to done, and checks that a freeze
// (en = 0) in the middle of a launch only delays it.
module tb_almaif_vec_kernel;
  import almaif_pkg::*;

  localparam int unsigned MEM_WORDS = 1024;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst = 1'b1, en = 1'b1, start = 1'b0;
  logic [15:0] kernel_id = '0;
  logic [31:0] ptr_a = '0, ptr_b = '0, ptr_c = '0, n = '0;
  logic        busy, done;
  mem_req_t    mem_req;
  logic [31:0] mem_rdata;

  almaif_vec_kernel dut (.*);

  logic [31:0] mem [MEM_WORDS];
  logic [31:0] shadow [MEM_WORDS];
  int writes_outside = 0;

  always_ff @(posedge clk) begin
    if (mem_req.en) begin
      if (mem_req.we) begin
        mem[mem_req.addr % MEM_WORDS] <= mem_req.wdata;
      end else begin
        mem_rdata <= mem[mem_req.addr % MEM_WORDS];
      end
    end
  end

  int checks = 0, failures = 0;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic launch(input logic [15:0] id, input int unsigned len, input bit do_freeze);
    int cycles, frozen;
    for (int i = 0; i < MEM_WORDS; i++) begin
      mem[i] = $urandom;
      shadow[i] = mem[i];
    end
    @(negedge clk);
    kernel_id = id; ptr_a = 32'd16; ptr_b = 32'd320; ptr_c = 32'd640; n = 32'(len);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1; frozen = 0;
    while (!done) begin
      if (do_freeze && cycles == 5 && frozen == 0) begin
        en = 1'b0;
        repeat (20) @(negedge clk);
        frozen = 20;
        en = 1'b1;
      end
      @(negedge clk);
      cycles++;
    end
    check($sformatf("latency id=%0d n=%0d", id, len), 32'(cycles), 32'(3 * len + 1));
    for (int i = 0; i < MEM_WORDS; i++) begin
      if (i >= 640 && i < 640 + len) begin
        check($sformatf("C[%0d]", i - 640), mem[i],
              (id == BIK_MUL_I32) ? shadow[16 + i - 640] * shadow[320 + i - 640]
                                  : shadow[16 + i - 640] + shadow[320 + i - 640]);
      end else if (mem[i] !== shadow[i]) begin
        writes_outside++;
      end
    end
    check("no stray writes", 32'(writes_outside), 0);
    @(negedge clk);
    check("idle after done", 32'(busy), 0);
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    repeat (2) @(negedge clk);
    rst = 1'b0;
    launch(BIK_ADD_I32, 1, 0);
    launch(BIK_MUL_I32, 1, 0);
    launch(BIK_ADD_I32, 0, 0);
    launch(BIK_ADD_I32, 37, 0);
    launch(BIK_MUL_I32, 64, 0);
    launch(BIK_MUL_I32, 200, 1);
    launch(BIK_ADD_I32, 50, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
