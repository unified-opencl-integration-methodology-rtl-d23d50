// tb_almaif_dp_ram -- self-checking test of the dual-port region RAM.
//
// Writes random words through both ports, with random byte enables, and
// compares every read with a reference array kept by the testbench. Also
// checks the one-cycle read latency, that the read word is held while a port
// is idle, read-first behaviour when one port writes the word the other reads,
// and that addresses wrap modulo the depth.
module tb_almaif_dp_ram;
  import almaif_pkg::*;

  localparam int unsigned DEPTH = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  mem_req_t    a_req = MEM_REQ_IDLE, b_req = MEM_REQ_IDLE;
  logic [31:0] a_rdata, b_rdata;

  almaif_dp_ram #(.DEPTH_WORDS(DEPTH)) dut (.*);

  logic [31:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] merge(input logic [31:0] o, input logic [31:0] w, input logic [3:0] be);
    for (int i = 0; i < 4; i++) if (be[i]) o[8*i +: 8] = w[8*i +: 8];
    return o;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int ia, ib;
    logic [31:0] wa, wb;
    logic [3:0]  bea, beb;
    // initialise through both ports
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      ref_mem[i] = $urandom;
      if (i % 2 == 0) a_req = '{en: 1, we: 1, be: 4'hF, addr: 32'(i), wdata: ref_mem[i]};
      else            b_req = '{en: 1, we: 1, be: 4'hF, addr: 32'(i), wdata: ref_mem[i]};
      @(negedge clk);
      a_req = MEM_REQ_IDLE; b_req = MEM_REQ_IDLE;
    end
    // random traffic: port A writes with random byte enables, port B reads
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      ia = $urandom_range(DEPTH - 1); ib = $urandom_range(DEPTH - 1);
      wa = $urandom; bea = 4'($urandom);
      a_req = '{en: 1, we: 1, be: bea, addr: 32'(ia), wdata: wa};
      b_req = '{en: 1, we: 0, be: 0, addr: 32'(ib + DEPTH * (t % 3)), wdata: 0};
      wb = ref_mem[ib];   // read-first
      ref_mem[ia] = merge(ref_mem[ia], wa, bea);
      @(negedge clk);
      a_req = MEM_REQ_IDLE; b_req = MEM_REQ_IDLE;
      check("port B read", b_rdata, wb);
      @(negedge clk);
      check("port B hold", b_rdata, wb);
      // port B writes, port A reads
      ia = $urandom_range(DEPTH - 1); ib = $urandom_range(DEPTH - 1);
      wb = $urandom; beb = 4'($urandom);
      b_req = '{en: 1, we: 1, be: beb, addr: 32'(ib), wdata: wb};
      a_req = '{en: 1, we: 0, be: 0, addr: 32'(ia), wdata: 0};
      wa = ref_mem[ia];
      ref_mem[ib] = merge(ref_mem[ib], wb, beb);
      @(negedge clk);
      a_req = MEM_REQ_IDLE; b_req = MEM_REQ_IDLE;
      check("port A read", a_rdata, wa);
    end
    // final sweep through port A
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_req = '{en: 1, we: 0, be: 0, addr: 32'(i), wdata: 0};
      @(negedge clk);
      a_req = MEM_REQ_IDLE;
      check("sweep", a_rdata, ref_mem[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
