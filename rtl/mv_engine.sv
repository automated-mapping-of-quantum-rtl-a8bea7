// mv_engine -- sequential complex matrix-vector product y = M * x.
//
// The compute core shared by the Type-1 and Type-2 kernels and by the
// matrix-vector stage of the Type-3 design. M is N x N, x and y have N
// entries, N = 2**NQ for an NQ-qubit register; every element is a complex
// double (fp64_pkg::cplx_t).
//
// One complex multiply-accumulate (cplx_mac) per clock: row i is formed over
// N cycles as acc = 0 + M[i][0]*x[0], acc += M[i][1]*x[1], ..., and y[i] is
// written on the cycle that adds the last term. A full product therefore
// takes exactly N*N cycles, the O(N^2) compute time of one layer.
//
// Memories stay in the kernel: the engine drives a read address (row, col)
// and expects M[row][col] and x[col] back in the same cycle (asynchronous
// read), and issues one write (wr_en, wr_addr, wr_data) per finished row.
// start is a one-cycle pulse while idle; busy is high for the N*N compute
// cycles; done pulses once on the cycle after the last write.
module mv_engine
  import fp64_pkg::*;
#(
  parameter int unsigned NQ = 7
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic            done,
  output logic [NQ-1:0]   row,
  output logic [NQ-1:0]   col,
  input  cplx_t           mat_elem,
  input  cplx_t           vec_elem,
  output logic            wr_en,
  output logic [NQ-1:0]   wr_addr,
  output cplx_t           wr_data
);
  localparam logic [NQ-1:0] LAST = '1;

  cplx_t acc, acc_in, sum;

  assign acc_in = (col == '0) ? CPLX_ZERO : acc;

  cplx_mac u_mac (.acc(acc_in), .a(mat_elem), .b(vec_elem), .y(sum));

  assign wr_en   = busy && (col == LAST);
  assign wr_addr = row;
  assign wr_data = sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      row  <= '0;
      col  <= '0;
      acc  <= CPLX_ZERO;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          row  <= '0;
          col  <= '0;
        end
      end else begin
        acc <= sum;
        col <= col + 1'b1;
        if (col == LAST) begin
          row <= row + 1'b1;
          if (row == LAST) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end
endmodule
