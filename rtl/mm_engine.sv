// mm_engine -- sequential complex matrix-matrix product C = A * B.
//
// The compute core of the Type-3 kernel's pairwise multiplication tree. A, B
// and C are N x N complex-double matrices, N = 2**NQ. One complex
// multiply-accumulate per clock: element C[i][j] is accumulated over N cycles
// as acc = 0 + A[i][0]*B[0][j], acc += A[i][1]*B[1][j], ... and written on the
// cycle that adds the last term. Elements are produced row by row; a full
// product takes exactly N*N*N cycles, the O(N^3) cost of a matrix-matrix
// product.
//
// Memories stay outside: the engine drives the addresses of A[i][k] and
// B[k][j] and expects both elements back in the same cycle (asynchronous
// read); addresses are {row, column}. start is a one-cycle pulse while idle;
// busy is high for the N*N*N compute cycles; done pulses on the cycle after
// the last write.
module mm_engine
  import fp64_pkg::*;
#(
  parameter int unsigned NQ = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [2*NQ-1:0]   a_addr,
  output logic [2*NQ-1:0]   b_addr,
  input  cplx_t             a_elem,
  input  cplx_t             b_elem,
  output logic              wr_en,
  output logic [2*NQ-1:0]   wr_addr,
  output cplx_t             wr_data
);
  localparam logic [NQ-1:0] LAST = '1;

  logic [NQ-1:0] i, j, k;
  cplx_t acc, acc_in, sum;

  assign a_addr = {i, k};
  assign b_addr = {k, j};
  assign acc_in = (k == '0) ? CPLX_ZERO : acc;

  cplx_mac u_mac (.acc(acc_in), .a(a_elem), .b(b_elem), .y(sum));

  assign wr_en   = busy && (k == LAST);
  assign wr_addr = {i, j};
  assign wr_data = sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      i    <= '0;
      j    <= '0;
      k    <= '0;
      acc  <= CPLX_ZERO;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          i    <= '0;
          j    <= '0;
          k    <= '0;
        end
      end else begin
        acc <= sum;
        k   <= k + 1'b1;
        if (k == LAST) begin
          j <= j + 1'b1;
          if (j == LAST) begin
            i <= i + 1'b1;
            if (i == LAST) begin
              busy <= 1'b0;
              done <= 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
