// tb_mv_kernel -- self-checking test of the Type-1 matrix-vector kernel.
//
// Three runs on a 3-qubit kernel (N = 8):
//   run 1: random matrix and initial state loaded, streams never stall; the
//          clock edges from the one that samples start to the one that
//          raises done, both counted, must be 2*N*N + N + 4;
//   run 2: new matrix, load_state = 0, so the kernel must reuse the result of
//          run 1 (feedback); random gaps on the input and random back-pressure
//          on the output;
//   run 3: as run 2 once more, with the state loaded again from outside.
// Expected vectors are computed with the simulator's doubles in the kernel's
// accumulation order and compared bit for bit (+0 and -0 treated as equal).
module tb_mv_kernel;
  import fp64_pkg::*;
  localparam int NQ = 3;
  localparam int N  = 1 << NQ;

  logic clk = 0, rst_n = 0;
  logic start = 0, load_state = 0, busy, done;
  logic m_valid = 0, m_ready, s_valid = 0, s_ready, o_valid, o_ready = 0;
  cplx_t m_data, s_data, o_data;

  int checks = 0, failures = 0;
  real mr [N*N], mi [N*N], sr [N], si [N], er [N], ei [N];
  cplx_t got [N];

  mv_kernel #(.NQ(NQ)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rnd_r();
    return (real'($urandom % 2000001) - 1000000.0) / 1048576.0;
  endfunction

  function automatic logic same(fp64_t g, real e);
    return (g === $realtobits(e)) || ($bitstoreal(g) == 0.0 && e == 0.0);
  endfunction

  task automatic send_matrix(bit gaps);
    for (int k = 0; k < N*N; ) begin
      if (gaps && ($urandom % 3 == 0)) begin
        m_valid = 0;
      end else begin
        m_valid = 1;
        m_data  = '{re: $realtobits(mr[k]), im: $realtobits(mi[k])};
        if (m_ready) k++;
      end
      @(negedge clk);
    end
    m_valid = 0;
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

  // reference product, same order as the kernel; result becomes next state
  task automatic reference();
    for (int i = 0; i < N; i++) begin
      real ar, ai;
      ar = 0.0; ai = 0.0;
      for (int j = 0; j < N; j++) begin
        ar = ar + (mr[i*N+j] * sr[j] - mi[i*N+j] * si[j]);
        ai = ai + (mr[i*N+j] * si[j] + mi[i*N+j] * sr[j]);
      end
      er[i] = ar; ei[i] = ai;
    end
  endtask

  task automatic run(bit ld, bit stress, output int cycles);
    int c;
    for (int k = 0; k < N*N; k++) begin mr[k] = rnd_r(); mi[k] = rnd_r(); end
    if (ld) for (int k = 0; k < N; k++) begin sr[k] = rnd_r(); si[k] = rnd_r(); end
    reference();
    @(negedge clk);
    start = 1; load_state = ld;
    c = 0;
    fork
      begin @(negedge clk) start = 0; end
      send_matrix(stress);
      if (ld) send_state(stress);
      collect(stress);
      begin
        do begin @(posedge clk); c++; #1; end while (!done);
      end
    join
    cycles = c;
    for (int i = 0; i < N; i++) begin
      checks += 2;
      if (!same(got[i].re, er[i]) || !same(got[i].im, ei[i])) begin
        failures++;
        if (failures < 10)
          $display("state[%0d] got %h %h exp %h %h", i, got[i].re, got[i].im,
                   $realtobits(er[i]), $realtobits(ei[i]));
      end
      sr[i] = er[i]; si[i] = ei[i];
    end
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1'b1, 1'b0, cyc);
    checks++;
    if (cyc != 2*N*N + N + 4) begin
      failures++;
      $display("run 1 took %0d cycles, expected %0d", cyc, 2*N*N + N + 4);
    end
    run(1'b0, 1'b1, cyc);
    run(1'b1, 1'b1, cyc);
    run(1'b0, 1'b0, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
