// tb_mm_tree_kernel -- self-checking test of the Type-3 matrix-tree kernel.
//
// A 2-qubit kernel (N = 4) with K = 4 input slots, so two tree levels:
//   run 1: four random matrices, no stalls; M_Total must equal
//          (M0*M1)*(M2*M3), and edges from the one that samples start to the
//          one that raises done, both counted, must be
//          2*N*N + 2*(N^3 + 2) + 2;
//   run 2: chain mode with input gaps and output back-pressure: slot 3 is not
//          loaded and the previous M_Total stands in for it;
//   run 3: a fresh batch without chain, with stalls.
// The expected matrices are computed with the simulator's doubles in the
// kernel's tree shape and accumulation order and compared bit for bit (+0 and
// -0 treated as equal).
module tb_mm_tree_kernel;
  import fp64_pkg::*;
  localparam int NQ = 2;
  localparam int N  = 1 << NQ;
  localparam int K  = 4;

  logic clk = 0, rst_n = 0;
  logic start = 0, chain = 0, busy, done;
  logic  m_valid [K];
  logic  m_ready [K];
  cplx_t m_data  [K];
  logic o_valid, o_ready = 0;
  cplx_t o_data;

  int checks = 0, failures = 0;
  real mr [K][N*N], mi [K][N*N];
  real tr [N*N], ti [N*N];             // expected / previous M_Total
  cplx_t got [N*N];

  mm_tree_kernel #(.NQ(NQ), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rnd_r();
    return (real'($urandom % 2000001) - 1000000.0) / 2097152.0;
  endfunction

  function automatic logic same(fp64_t g, real e);
    return (g === $realtobits(e)) || ($bitstoreal(g) == 0.0 && e == 0.0);
  endfunction

  task automatic send_matrix(int s, bit gaps);
    for (int k = 0; k < N*N; ) begin
      if (gaps && ($urandom % 3 == 0)) begin
        m_valid[s] = 0;
      end else begin
        m_valid[s] = 1;
        m_data[s]  = '{re: $realtobits(mr[s][k]), im: $realtobits(mi[s][k])};
        if (m_ready[s]) k++;
      end
      @(negedge clk);
    end
    m_valid[s] = 0;
  endtask

  task automatic collect(bit stall);
    for (int k = 0; k < N*N; ) begin
      o_ready = stall ? 1'($urandom % 2) : 1'b1;
      if (o_valid && o_ready) begin
        got[k] = o_data;
        k++;
      end
      @(negedge clk);
    end
    o_ready = 0;
  endtask

  task automatic matmul(input real ar [N*N], input real ai [N*N],
                        input real br [N*N], input real bi [N*N],
                        output real cr [N*N], output real ci [N*N]);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        real sr, si;
        sr = 0.0; si = 0.0;
        for (int k = 0; k < N; k++) begin
          sr = sr + (ar[i*N+k] * br[k*N+j] - ai[i*N+k] * bi[k*N+j]);
          si = si + (ar[i*N+k] * bi[k*N+j] + ai[i*N+k] * br[k*N+j]);
        end
        cr[i*N+j] = sr; ci[i*N+j] = si;
      end
  endtask

  task automatic run(bit ch, bit stress, output int cycles);
    int c;
    real p0r [N*N], p0i [N*N], p1r [N*N], p1i [N*N], l3r [N*N], l3i [N*N];
    for (int l = 0; l < K; l++)
      for (int k = 0; k < N*N; k++) begin mr[l][k] = rnd_r(); mi[l][k] = rnd_r(); end
    start = 1; chain = ch;
    c = 0;
    fork
      begin @(negedge clk) start = 0; end
      begin
        for (int l = 0; l < K - (ch ? 1 : 0); l++)
          fork
            automatic int ll = l;
            send_matrix(ll, stress);
          join_none
        wait fork;
      end
      collect(stress);
      do begin @(posedge clk); c++; #1; end while (!done);
    join
    cycles = c;
    // reference tree: (M0*M1) * (M2*M3'), M3' = previous M_Total in chain mode
    if (ch) begin l3r = tr; l3i = ti; end
    else begin l3r = mr[3]; l3i = mi[3]; end
    matmul(mr[0], mi[0], mr[1], mi[1], p0r, p0i);
    matmul(mr[2], mi[2], l3r, l3i, p1r, p1i);
    matmul(p0r, p0i, p1r, p1i, tr, ti);
    for (int i = 0; i < N*N; i++) begin
      checks += 2;
      if (!same(got[i].re, tr[i]) || !same(got[i].im, ti[i])) begin
        failures++;
        if (failures < 10)
          $display("M_Total[%0d] got %h %h exp %h %h", i, got[i].re, got[i].im,
                   $realtobits(tr[i]), $realtobits(ti[i]));
      end
    end
  endtask

  initial begin
    int cyc;
    for (int s = 0; s < K; s++) begin m_valid[s] = 0; m_data[s] = CPLX_ZERO; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(1'b0, 1'b0, cyc);
    checks++;
    if (cyc != 2*N*N + 2*(N*N*N + 2) + 2) begin
      failures++;
      $display("run 1 took %0d cycles, expected %0d", cyc, 2*N*N + 2*(N*N*N + 2) + 2);
    end
    run(1'b1, 1'b1, cyc);
    run(1'b0, 1'b1, cyc);
    run(1'b1, 1'b0, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
