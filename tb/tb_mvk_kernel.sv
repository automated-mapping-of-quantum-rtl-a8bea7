// tb_mvk_kernel -- self-checking test of the Type-2 multi-stream kernel.
//
// A 3-qubit kernel (N = 8) with K = 4 matrix streams:
//   run 1: four random layer matrices and a random initial state, no stalls;
//          edges from the one that samples start to the one that raises done,
//          both counted, must be N*N + 4*(N*N + 2) + N + 2;
//   run 2: a partial batch of two layers continuing from run 1's state
//          (load_state = 0), with random input gaps and output back-pressure;
//   run 3: three layers with a freshly loaded state, stalls again.
// The expected state is the layers applied one by one in slot order, computed
// with the simulator's doubles in the kernel's accumulation order and
// compared bit for bit (+0 and -0 treated as equal).
module tb_mvk_kernel;
  import fp64_pkg::*;
  localparam int NQ = 3;
  localparam int N  = 1 << NQ;
  localparam int K  = 4;
  localparam int LW = $clog2(K) + 1;

  logic clk = 0, rst_n = 0;
  logic start = 0, load_state = 0, busy, done;
  logic [LW-1:0] n_layers = '0;
  logic  m_valid [K];
  logic  m_ready [K];
  cplx_t m_data  [K];
  logic s_valid = 0, s_ready, o_valid, o_ready = 0;
  cplx_t s_data, o_data;

  int checks = 0, failures = 0;
  real mr [K][N*N], mi [K][N*N], sr [N], si [N];
  cplx_t got [N];

  mvk_kernel #(.NQ(NQ), .K(K)) dut (.*);

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

  task automatic send_state(bit gaps);
    for (int k = 0; k < N; ) begin
      if (gaps && ($urandom % 3 == 0)) begin
        s_valid = 0;
      end else begin
        s_valid = 1;
        s_data  = '{re: $realtobits(sr[k]), im: $realtobits(si[k])};
        if (s_ready) k++;
      end
      @(negedge clk);
    end
    s_valid = 0;
  endtask

  task automatic collect(bit stall);
    for (int k = 0; k < N; ) begin
      o_ready = stall ? 1'($urandom % 2) : 1'b1;
      if (o_valid && o_ready) begin
        got[k] = o_data;
        k++;
      end
      @(negedge clk);
    end
    o_ready = 0;
  endtask

  task automatic apply_layer(int l);
    real nr [N], ni [N];
    for (int i = 0; i < N; i++) begin
      nr[i] = 0.0; ni[i] = 0.0;
      for (int j = 0; j < N; j++) begin
        nr[i] = nr[i] + (mr[l][i*N+j] * sr[j] - mi[l][i*N+j] * si[j]);
        ni[i] = ni[i] + (mr[l][i*N+j] * si[j] + mi[l][i*N+j] * sr[j]);
      end
    end
    sr = nr; si = ni;
  endtask

  task automatic run(int nl, bit ld, bit stress, output int cycles);
    int c;
    for (int l = 0; l < K; l++)
      for (int k = 0; k < N*N; k++) begin mr[l][k] = rnd_r(); mi[l][k] = rnd_r(); end
    if (ld) for (int k = 0; k < N; k++) begin sr[k] = rnd_r(); si[k] = rnd_r(); end
    start = 1; load_state = ld; n_layers = LW'(nl);
    c = 0;
    fork
      begin @(negedge clk) start = 0; end
      begin
        for (int l = 0; l < nl; l++)
          fork
            automatic int ll = l;
            send_matrix(ll, stress);
          join_none
        wait fork;
      end
      if (ld) send_state(stress);
      collect(stress);
      do begin @(posedge clk); c++; #1; end while (!done);
    join
    cycles = c;
    for (int l = 0; l < nl; l++) apply_layer(l);
    for (int i = 0; i < N; i++) begin
      checks += 2;
      if (!same(got[i].re, sr[i]) || !same(got[i].im, si[i])) begin
        failures++;
        if (failures < 10)
          $display("state[%0d] got %h %h exp %h %h", i, got[i].re, got[i].im,
                   $realtobits(sr[i]), $realtobits(si[i]));
      end
    end
  endtask

  initial begin
    int cyc;
    for (int s = 0; s < K; s++) begin m_valid[s] = 0; m_data[s] = CPLX_ZERO; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(4, 1'b1, 1'b0, cyc);
    checks++;
    if (cyc != N*N + 4*(N*N + 2) + N + 2) begin
      failures++;
      $display("run 1 took %0d cycles, expected %0d", cyc, N*N + 4*(N*N + 2) + N + 2);
    end
    run(2, 1'b0, 1'b1, cyc);
    run(3, 1'b1, 1'b1, cyc);
    run(1, 1'b0, 1'b0, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
