// t1_circuit_runner -- drives one Type-1 kernel (mv_kernel) of NQ qubits
// through a layered circuit and checks every intermediate state.
//
// Used by tb_qubit_sizes to run the same circuit on kernels of different
// register sizes. The circuit is the ten-layer example on qubits 0..3 also
// used by tb_qemu_top; gates on qubits the register does not have are left
// out. The runner plays the host: it builds each layer matrix (Kronecker
// product of 2x2 gates, qubit 0 the most significant index bit, or the CNOT
// permutation), streams it in, loads the initial state on the first layer
// only and lets the kernel feed the state back for the others. Each output
// state is compared with a gate-by-gate reference (tolerance 1e-9). The
// cycles of every layer run are measured and must equal 2*N*N + N + 4 edges,
// counting the edge that samples start and the one that raises done.
// finished rises when all layers have been checked.
module t1_circuit_runner
  import fp64_pkg::*;
#(
  parameter int NQ = 3
) (
  output logic finished,
  output int   checks,
  output int   failures,
  output int   cycles_per_layer
);
  localparam int N  = 1 << NQ;
  localparam int NL = 10;
  localparam real RS2 = 0.7071067811865476;

  logic clk = 0, rst_n = 0;
  logic start = 0, load_state = 0, busy, done;
  logic m_valid = 0, m_ready, s_valid = 0, s_ready, o_valid, o_ready = 0;
  cplx_t m_data, s_data, o_data;

  mv_kernel #(.NQ(NQ)) dut (.*);

  always #5 clk = ~clk;

  int gate [NL][4];
  int ctl [NL], tgt [NL];
  real sr [N], si [N];
  cplx_t mat [N*N];
  cplx_t got [N];

  function automatic real g2(int g, int r, int c);
    case (g)
      1:       return (r == 1 && c == 1) ? -RS2 : RS2;
      2:       return (r != c) ? 1.0 : 0.0;
      default: return (r == c) ? 1.0 : 0.0;
    endcase
  endfunction

  function automatic int qbit(int idx, int q);
    return (idx >> (NQ - 1 - q)) & 1;
  endfunction

  task automatic define_circuit();
    for (int l = 0; l < NL; l++) begin
      ctl[l] = -1; tgt[l] = -1;
      for (int q = 0; q < 4; q++) gate[l][q] = 0;
    end
    for (int q = 0; q < 4; q++) gate[0][q] = 1;
    gate[1][0] = 2; gate[1][1] = 1; gate[1][3] = 1;
    ctl[2] = 0; tgt[2] = 1;
    ctl[3] = 2; tgt[3] = 3;
    gate[4][0] = 2; gate[4][1] = 1; gate[4][3] = 1;
    for (int q = 0; q < 4; q++) gate[5][q] = 1;
    for (int q = 0; q < 4; q++) gate[6][q] = 2;
    gate[7][1] = 1; gate[7][3] = 1;
    ctl[8] = 2; tgt[8] = 3;
    ctl[9] = 0; tgt[9] = 1;
  endtask

  function automatic logic has_cnot(int l);
    return ctl[l] >= 0 && ctl[l] < NQ && tgt[l] < NQ;
  endfunction

  task automatic build_matrix(int l);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        real v;
        if (ctl[l] >= 0) begin
          int f;
          f = c;
          if (has_cnot(l) && qbit(c, ctl[l]) == 1) f = c ^ (1 << (NQ - 1 - tgt[l]));
          v = (r == f) ? 1.0 : 0.0;
        end else begin
          v = 1.0;
          for (int q = 0; q < NQ; q++)
            v = v * g2((q < 4) ? gate[l][q] : 0, qbit(r, q), qbit(c, q));
        end
        mat[r*N+c] = '{re: $realtobits(v), im: FP_ZERO};
      end
  endtask

  task automatic apply_layer(int l);
    if (ctl[l] >= 0) begin
      if (has_cnot(l)) begin
        int bc, bt;
        bc = 1 << (NQ - 1 - ctl[l]);
        bt = 1 << (NQ - 1 - tgt[l]);
        for (int k = 0; k < N; k++)
          if ((k & bc) != 0 && (k & bt) == 0) begin
            real tr, ti;
            tr = sr[k]; ti = si[k];
            sr[k] = sr[k | bt]; si[k] = si[k | bt];
            sr[k | bt] = tr; si[k | bt] = ti;
          end
      end
    end else begin
      for (int q = 0; q < 4 && q < NQ; q++) begin
        int b;
        b = 1 << (NQ - 1 - q);
        for (int k = 0; k < N; k++)
          if ((k & b) == 0) begin
            real xr, xi, yr, yi;
            xr = sr[k]; xi = si[k]; yr = sr[k | b]; yi = si[k | b];
            if (gate[l][q] == 1) begin
              sr[k] = RS2 * (xr + yr); si[k] = RS2 * (xi + yi);
              sr[k | b] = RS2 * (xr - yr); si[k | b] = RS2 * (xi - yi);
            end else if (gate[l][q] == 2) begin
              sr[k] = yr; si[k] = yi; sr[k | b] = xr; si[k | b] = xi;
            end
          end
      end
    end
  endtask

  task automatic send_m();
    for (int k = 0; k < N*N; ) begin
      m_valid = 1; m_data = mat[k];
      if (m_ready) k++;
      @(negedge clk);
    end
    m_valid = 0;
  endtask

  task automatic send_s();
    for (int k = 0; k < N; ) begin
      s_valid = 1;
      s_data = '{re: $realtobits(sr[k]), im: $realtobits(si[k])};
      if (s_ready) k++;
      @(negedge clk);
    end
    s_valid = 0;
  endtask

  task automatic collect();
    for (int k = 0; k < N; ) begin
      o_ready = 1;
      if (o_valid) begin got[k] = o_data; k++; end
      @(negedge clk);
    end
    o_ready = 0;
  endtask

  initial begin
    finished = 0; checks = 0; failures = 0; cycles_per_layer = 0;
    define_circuit();
    for (int k = 0; k < N; k++) begin
      sr[k] = (real'($urandom % 2001) - 1000.0) / 1024.0;
      si[k] = (real'($urandom % 2001) - 1000.0) / 1024.0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int l = 0; l < NL; l++) begin
      int c;
      build_matrix(l);
      start = 1; load_state = (l == 0);
      c = 0;
      fork
        begin @(negedge clk) start = 0; end
        send_m();
        if (l == 0) send_s();
        collect();
        do begin @(posedge clk); c++; #1; end while (!done);
      join
      apply_layer(l);
      cycles_per_layer = c;
      checks++;
      if (c != 2*N*N + N + 4) failures++;
      for (int k = 0; k < N; k++) begin
        real dr, di;
        dr = $bitstoreal(got[k].re) - sr[k];
        di = $bitstoreal(got[k].im) - si[k];
        checks++;
        if (dr > 1e-9 || dr < -1e-9 || di > 1e-9 || di < -1e-9) failures++;
      end
    end
    finished = 1;
  end
endmodule
