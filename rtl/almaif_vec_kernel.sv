// almaif_vec_kernel -- the built-in kernels of the wrapped fixed-function
// accelerator: 32-bit integer element-wise vector addition and multiplication.
//
// For a one-dimensional launch of global size n the kernel computes, for every
// work-item i in 0..n-1, C[i] = A[i] + B[i] (built-in kernel add_i32) or
// C[i] = A[i] * B[i] (mul_i32, low 32 bits of the product), wrapping modulo
// 2^32. A, B and C are buffers in the data memory; the controller passes them
// as word indices into that memory.
//
// Work-items run one after the other through a single data memory port: read
// A[i], read B[i], write C[i], so one element takes 3 active cycles and a
// launch takes 3*n + 1 cycles from start to done. A launch with n = 0 finishes
// in one cycle. en = 0 (freeze) pauses the kernel: no state changes and no
// memory request is issued, so the data memory's held read word survives the
// pause. rst is a synchronous reset (the accelerator reset of the command
// register, or the system reset).
//
// Interface: start is a one-cycle pulse that latches kernel_id, the three
// buffer word indices and n; busy is high until done, a one-cycle pulse after
// the last write. The data memory port follows almaif_dp_ram's timing.
//
// The two kernels and 32-bit element type follow the evaluated accelerator;
// the serial one-port schedule is this design's own (the simplest that does
// the function).
module almaif_vec_kernel
  import almaif_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        start,
  input  logic [15:0] kernel_id,
  input  logic [31:0] ptr_a,
  input  logic [31:0] ptr_b,
  input  logic [31:0] ptr_c,
  input  logic [31:0] n,
  output logic        busy,
  output logic        done,
  output mem_req_t    mem_req,
  input  logic [31:0] mem_rdata
);

  typedef enum logic [1:0] {K_IDLE, K_RD_A, K_RD_B, K_WR} kstate_e;
  kstate_e     state;
  logic        is_mul;
  logic [31:0] pa, pb, pc, cnt, a_val;

  assign busy = (state != K_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= K_IDLE;
      done   <= 1'b0;
      is_mul <= 1'b0;
      pa <= '0; pb <= '0; pc <= '0; cnt <= '0; a_val <= '0;
    end else if (en) begin
      done <= 1'b0;
      unique case (state)
        K_IDLE: if (start) begin
          is_mul <= (kernel_id == BIK_MUL_I32);
          pa <= ptr_a; pb <= ptr_b; pc <= ptr_c; cnt <= n;
          if (n == 0) done  <= 1'b1;
          else        state <= K_RD_A;
        end
        K_RD_A: state <= K_RD_B;
        K_RD_B: begin
          a_val <= mem_rdata;
          state <= K_WR;
        end
        K_WR: begin
          pa <= pa + 1; pb <= pb + 1; pc <= pc + 1;
          cnt <= cnt - 1;
          if (cnt == 1) begin
            state <= K_IDLE;
            done  <= 1'b1;
          end else begin
            state <= K_RD_A;
          end
        end
        default: state <= K_IDLE;
      endcase
    end
  end

  always_comb begin
    mem_req = MEM_REQ_IDLE;
    if (en && !rst) begin
      unique case (state)
        K_RD_A: begin mem_req.en = 1'b1; mem_req.addr = pa; end
        K_RD_B: begin mem_req.en = 1'b1; mem_req.addr = pb; end
        K_WR: begin
          mem_req.en    = 1'b1;
          mem_req.we    = 1'b1;
          mem_req.be    = 4'hF;
          mem_req.addr  = pc;
          mem_req.wdata = is_mul ? a_val * mem_rdata : a_val + mem_rdata;
        end
        default: ;
      endcase
    end
  end

endmodule
