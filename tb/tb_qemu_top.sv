// tb_qemu_top -- end-to-end test of all three kernel architectures.
//
// The top runs at its default size (7 qubits, N = 128, K2 = K3 = 8). The
// workload is a ten-layer, four-qubit circuit on qubits 0..3 (qubits 4..6
// idle) starting from a random complex state:
//   L1 h q0..q3          L2 x q0, h q1, h q3    L3 cx q0,q1   L4 cx q2,q3
//   L5 x q0, h q1, h q3  L6 h q0..q3            L7 x q0..q3   L8 h q1, h q3
//   L9 cx q2,q3          L10 cx q0,q1
// The testbench plays the host: it builds each layer matrix as the Kronecker
// product of the 2x2 gate matrices (qubit 0 is the most significant index
// bit) or as the CNOT permutation (row = column with the target bit flipped
// where the control bit is set), and streams it to the kernels.
//   Type-1: ten runs, the first loading the state, the rest using feedback;
//           every intermediate state is checked.
//   Type-2: a full batch of eight layers with the state loaded, then a
//           partial batch of two layers continuing from the kept state.
//   Type-3: slots hold L8..L1 (slot 0 = L8), M_Total goes through the host to
//           the matrix-vector kernel with the initial state; then a chained
//           batch with L10, L9 in slots 5 and 6, identity matrices in slots
//           0..4 and the previous M_Total in slot 7.
// The expected states come from applying the gates directly to the amplitude
// array (pairwise updates, not matrices) and are compared with a tolerance of
// 1e-9. Also checked: the no-stall cycle counts of the first Type-1 run and
// the first Type-3 batch. Random input gaps and output back-pressure are used
// on part of the runs, and every mechanism is counted and must occur.
module tb_qemu_top;
  import fp64_pkg::*;
  localparam int NQ = 7;
  localparam int N  = 1 << NQ;
  localparam int K  = 8;
  localparam int LW = $clog2(K) + 1;
  localparam int NL = 10;              // circuit layers
  localparam int ID = NL;              // index of the identity matrix
  localparam int MT = NL + 1;          // index of the received M_Total
  localparam real RS2 = 0.7071067811865476;

  logic clk = 0, rst_n = 0;

  logic t1_start = 0, t1_load_state = 0, t1_busy, t1_done;
  logic t1_m_valid = 0, t1_m_ready, t1_s_valid = 0, t1_s_ready, t1_o_valid, t1_o_ready = 0;
  cplx_t t1_m_data, t1_s_data, t1_o_data;

  logic t2_start = 0, t2_load_state = 0, t2_busy, t2_done;
  logic [LW-1:0] t2_n_layers = '0;
  logic  t2_m_valid [K];
  logic  t2_m_ready [K];
  cplx_t t2_m_data  [K];
  logic t2_s_valid = 0, t2_s_ready, t2_o_valid, t2_o_ready = 0;
  cplx_t t2_s_data, t2_o_data;

  logic t3mm_start = 0, t3mm_chain = 0, t3mm_busy, t3mm_done;
  logic  t3mm_m_valid [K];
  logic  t3mm_m_ready [K];
  cplx_t t3mm_m_data  [K];
  logic t3mm_o_valid, t3mm_o_ready = 0;
  cplx_t t3mm_o_data;

  logic t3mv_start = 0, t3mv_load_state = 0, t3mv_busy, t3mv_done;
  logic t3mv_m_valid = 0, t3mv_m_ready, t3mv_s_valid = 0, t3mv_s_ready, t3mv_o_valid, t3mv_o_ready = 0;
  cplx_t t3mv_m_data, t3mv_s_data, t3mv_o_data;

  qemu_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_state_load = 0, n_feedback = 0, n_full_batch = 0, n_partial_batch = 0;
  int n_tree = 0, n_chain = 0, n_identity_pad = 0, n_out_stall = 0, n_in_gap = 0;

  cplx_t mats [NL+2][N*N];
  real   init_r [N], init_i [N];
  real   ref_r [NL+1][N], ref_i [NL+1][N];   // state after 0..NL layers
  cplx_t got [N];

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if ((t1_o_valid && !t1_o_ready) || (t2_o_valid && !t2_o_ready) ||
        (t3mm_o_valid && !t3mm_o_ready) || (t3mv_o_valid && !t3mv_o_ready))
      n_out_stall++;
    if ((t1_m_ready && !t1_m_valid) || (t2_m_ready[0] && !t2_m_valid[0]) ||
        (t3mm_m_ready[0] && !t3mm_m_valid[0]))
      n_in_gap++;
  end

  // ---------------------------------------------------------------- circuit
  // gate codes: 0 = I, 1 = H, 2 = X; a CNOT layer has ctl >= 0
  int gate [NL][4];
  int ctl [NL], tgt [NL];

  task automatic define_circuit();
    for (int l = 0; l < NL; l++) begin
      ctl[l] = -1; tgt[l] = -1;
      for (int q = 0; q < 4; q++) gate[l][q] = 0;
    end
    for (int q = 0; q < 4; q++) gate[0][q] = 1;                 // L1
    gate[1][0] = 2; gate[1][1] = 1; gate[1][3] = 1;             // L2
    ctl[2] = 0; tgt[2] = 1;                                     // L3
    ctl[3] = 2; tgt[3] = 3;                                     // L4
    gate[4][0] = 2; gate[4][1] = 1; gate[4][3] = 1;             // L5
    for (int q = 0; q < 4; q++) gate[5][q] = 1;                 // L6
    for (int q = 0; q < 4; q++) gate[6][q] = 2;                 // L7
    gate[7][1] = 1; gate[7][3] = 1;                             // L8
    ctl[8] = 2; tgt[8] = 3;                                     // L9
    ctl[9] = 0; tgt[9] = 1;                                     // L10
  endtask

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

  task automatic build_matrices();
    for (int l = 0; l < NL; l++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          real v;
          if (ctl[l] >= 0) begin
            int f;
            f = c;
            if (qbit(c, ctl[l]) == 1) f = c ^ (1 << (NQ - 1 - tgt[l]));
            v = (r == f) ? 1.0 : 0.0;
          end else begin
            v = 1.0;
            for (int q = 0; q < NQ; q++)
              v = v * g2((q < 4) ? gate[l][q] : 0, qbit(r, q), qbit(c, q));
          end
          mats[l][r*N+c] = '{re: $realtobits(v), im: FP_ZERO};
        end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        mats[ID][r*N+c] = '{re: (r == c) ? FP_ONE : FP_ZERO, im: FP_ZERO};
  endtask

  // gate-by-gate reference, independent of the matrices
  task automatic reference();
    real ar [N], ai [N];
    for (int k = 0; k < N; k++) begin
      init_r[k] = (real'($urandom % 2001) - 1000.0) / 1024.0;
      init_i[k] = (real'($urandom % 2001) - 1000.0) / 1024.0;
      ar[k] = init_r[k]; ai[k] = init_i[k];
      ref_r[0][k] = ar[k]; ref_i[0][k] = ai[k];
    end
    for (int l = 0; l < NL; l++) begin
      if (ctl[l] >= 0) begin
        int bc, bt;
        bc = 1 << (NQ - 1 - ctl[l]);
        bt = 1 << (NQ - 1 - tgt[l]);
        for (int k = 0; k < N; k++)
          if ((k & bc) != 0 && (k & bt) == 0) begin
            real tr, ti;
            tr = ar[k]; ti = ai[k];
            ar[k] = ar[k | bt]; ai[k] = ai[k | bt];
            ar[k | bt] = tr; ai[k | bt] = ti;
          end
      end else begin
        for (int q = 0; q < 4; q++) begin
          int b;
          b = 1 << (NQ - 1 - q);
          for (int k = 0; k < N; k++)
            if ((k & b) == 0) begin
              real xr, xi, yr, yi;
              xr = ar[k]; xi = ai[k]; yr = ar[k | b]; yi = ai[k | b];
              if (gate[l][q] == 1) begin
                ar[k] = RS2 * (xr + yr); ai[k] = RS2 * (xi + yi);
                ar[k | b] = RS2 * (xr - yr); ai[k | b] = RS2 * (xi - yi);
              end else if (gate[l][q] == 2) begin
                ar[k] = yr; ai[k] = yi; ar[k | b] = xr; ai[k | b] = xi;
              end
            end
        end
      end
      for (int k = 0; k < N; k++) begin ref_r[l+1][k] = ar[k]; ref_i[l+1][k] = ai[k]; end
    end
  endtask

  task automatic compare(string what, int after);
    int bad;
    bad = 0;
    for (int k = 0; k < N; k++) begin
      real dr, di;
      dr = $bitstoreal(got[k].re) - ref_r[after][k];
      di = $bitstoreal(got[k].im) - ref_i[after][k];
      checks++;
      if (dr > 1e-9 || dr < -1e-9 || di > 1e-9 || di < -1e-9) begin
        failures++;
        bad++;
        if (bad < 4)
          $display("%s after L%0d: amp[%0d] got (%f,%f) exp (%f,%f)", what, after, k,
                   $bitstoreal(got[k].re), $bitstoreal(got[k].im),
                   ref_r[after][k], ref_i[after][k]);
      end
    end
  endtask

  // ---------------------------------------------------------------- streams
  // Each driver sets valid/data after a falling edge; a word counts as taken
  // when ready was high, since ready only changes on rising edges.
  function automatic cplx_t init_elem(int k);
    return '{re: $realtobits(init_r[k]), im: $realtobits(init_i[k])};
  endfunction

  task automatic t1_send_m(int id, bit gaps);
    for (int k = 0; k < N*N; ) begin
      if (gaps && $urandom % 4 == 0) t1_m_valid = 0;
      else begin t1_m_valid = 1; t1_m_data = mats[id][k]; if (t1_m_ready) k++; end
      @(negedge clk);
    end
    t1_m_valid = 0;
  endtask
  task automatic t1_send_s(bit gaps);
    for (int k = 0; k < N; ) begin
      if (gaps && $urandom % 4 == 0) t1_s_valid = 0;
      else begin t1_s_valid = 1; t1_s_data = init_elem(k); if (t1_s_ready) k++; end
      @(negedge clk);
    end
    t1_s_valid = 0;
  endtask
  task automatic t1_collect(bit stall);
    for (int k = 0; k < N; ) begin
      t1_o_ready = stall ? 1'($urandom % 2) : 1'b1;
      if (t1_o_valid && t1_o_ready) begin got[k] = t1_o_data; k++; end
      @(negedge clk);
    end
    t1_o_ready = 0;
  endtask

  task automatic t2_send_m(int s, int id, bit gaps);
    for (int k = 0; k < N*N; ) begin
      if (gaps && $urandom % 4 == 0) t2_m_valid[s] = 0;
      else begin t2_m_valid[s] = 1; t2_m_data[s] = mats[id][k]; if (t2_m_ready[s]) k++; end
      @(negedge clk);
    end
    t2_m_valid[s] = 0;
  endtask
  task automatic t2_send_s(bit gaps);
    for (int k = 0; k < N; ) begin
      if (gaps && $urandom % 4 == 0) t2_s_valid = 0;
      else begin t2_s_valid = 1; t2_s_data = init_elem(k); if (t2_s_ready) k++; end
      @(negedge clk);
    end
    t2_s_valid = 0;
  endtask
  task automatic t2_collect(bit stall);
    for (int k = 0; k < N; ) begin
      t2_o_ready = stall ? 1'($urandom % 2) : 1'b1;
      if (t2_o_valid && t2_o_ready) begin got[k] = t2_o_data; k++; end
      @(negedge clk);
    end
    t2_o_ready = 0;
  endtask

  task automatic t3mm_send_m(int s, int id, bit gaps);
    for (int k = 0; k < N*N; ) begin
      if (gaps && $urandom % 4 == 0) t3mm_m_valid[s] = 0;
      else begin t3mm_m_valid[s] = 1; t3mm_m_data[s] = mats[id][k]; if (t3mm_m_ready[s]) k++; end
      @(negedge clk);
    end
    t3mm_m_valid[s] = 0;
  endtask
  task automatic t3mm_collect(bit stall);
    for (int k = 0; k < N*N; ) begin
      t3mm_o_ready = stall ? 1'($urandom % 2) : 1'b1;
      if (t3mm_o_valid && t3mm_o_ready) begin mats[MT][k] = t3mm_o_data; k++; end
      @(negedge clk);
    end
    t3mm_o_ready = 0;
  endtask

  task automatic t3mv_send_m(bit gaps);
    for (int k = 0; k < N*N; ) begin
      if (gaps && $urandom % 4 == 0) t3mv_m_valid = 0;
      else begin t3mv_m_valid = 1; t3mv_m_data = mats[MT][k]; if (t3mv_m_ready) k++; end
      @(negedge clk);
    end
    t3mv_m_valid = 0;
  endtask
  task automatic t3mv_send_s(bit gaps);
    for (int k = 0; k < N; ) begin
      if (gaps && $urandom % 4 == 0) t3mv_s_valid = 0;
      else begin t3mv_s_valid = 1; t3mv_s_data = init_elem(k); if (t3mv_s_ready) k++; end
      @(negedge clk);
    end
    t3mv_s_valid = 0;
  endtask
  task automatic t3mv_collect(bit stall);
    for (int k = 0; k < N; ) begin
      t3mv_o_ready = stall ? 1'($urandom % 2) : 1'b1;
      if (t3mv_o_valid && t3mv_o_ready) begin got[k] = t3mv_o_data; k++; end
      @(negedge clk);
    end
    t3mv_o_ready = 0;
  endtask

  // ---------------------------------------------------------------- flows
  task automatic type1_flow();
    for (int l = 0; l < NL; l++) begin
      int c;
      bit ld, stress;
      ld = (l == 0);
      stress = (l % 3 == 2);
      t1_start = 1; t1_load_state = ld;
      c = 0;
      fork
        begin @(negedge clk) t1_start = 0; end
        t1_send_m(l, stress);
        if (ld) t1_send_s(stress);
        t1_collect(stress);
        do begin @(posedge clk); c++; #1; end while (!t1_done);
      join
      if (ld) n_state_load++; else n_feedback++;
      compare("Type-1", l + 1);
      if (l == 0) begin
        checks++;
        if (c != 2*N*N + N + 4) begin
          failures++;
          $display("Type-1 run took %0d cycles, expected %0d", c, 2*N*N + N + 4);
        end
      end
    end
  endtask

  task automatic type2_batch(int first, int nl, bit ld, bit stress);
    t2_start = 1; t2_load_state = ld; t2_n_layers = LW'(nl);
    fork
      begin @(negedge clk) t2_start = 0; end
      begin
        for (int s = 0; s < nl; s++)
          fork
            automatic int ss = s;
            t2_send_m(ss, first + ss, stress);
          join_none
        wait fork;
      end
      if (ld) t2_send_s(stress);
      t2_collect(stress);
      do begin @(posedge clk); #1; end while (!t2_done);
    join
    if (nl == K) n_full_batch++; else n_partial_batch++;
    if (ld) n_state_load++; else n_feedback++;
    compare("Type-2", first + nl);
  endtask

  // slot_id[s]: matrix index for slot s; chained batches skip slot K-1
  task automatic type3_batch(int slot_id [K], bit ch, bit stress, int after);
    int c;
    t3mm_start = 1; t3mm_chain = ch;
    c = 0;
    fork
      begin @(negedge clk) t3mm_start = 0; end
      begin
        for (int s = 0; s < K - (ch ? 1 : 0); s++)
          fork
            automatic int ss = s;
            t3mm_send_m(ss, slot_id[ss], stress);
          join_none
        wait fork;
      end
      t3mm_collect(stress);
      do begin @(posedge clk); c++; #1; end while (!t3mm_done);
    join
    n_tree++;
    if (ch) n_chain++;
    for (int s = 0; s < K - (ch ? 1 : 0); s++) if (slot_id[s] == ID) n_identity_pad++;
    if (!ch && !stress) begin
      checks++;
      if (c != 2*N*N + 3*(N*N*N + 2) + 2) begin
        failures++;
        $display("Type-3 batch took %0d cycles, expected %0d", c, 2*N*N + 3*(N*N*N + 2) + 2);
      end
    end
    // the host passes M_Total and the initial state to the matrix-vector kernel
    t3mv_start = 1; t3mv_load_state = 1;
    fork
      begin @(negedge clk) t3mv_start = 0; end
      t3mv_send_m(stress);
      t3mv_send_s(stress);
      t3mv_collect(stress);
      do begin @(posedge clk); #1; end while (!t3mv_done);
    join
    compare("Type-3", after);
  endtask

  initial begin
    int slots [K];
    for (int s = 0; s < K; s++) begin
      t2_m_valid[s] = 0; t2_m_data[s] = CPLX_ZERO;
      t3mm_m_valid[s] = 0; t3mm_m_data[s] = CPLX_ZERO;
    end
    define_circuit();
    build_matrices();
    reference();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    type1_flow();

    type2_batch(0, 8, 1'b1, 1'b0);
    type2_batch(8, 2, 1'b0, 1'b1);

    for (int s = 0; s < K; s++) slots[s] = K - 1 - s;            // L8 .. L1
    type3_batch(slots, 1'b0, 1'b0, 8);
    for (int s = 0; s < K; s++) slots[s] = ID;
    slots[5] = 9;                                                 // L10
    slots[6] = 8;                                                 // L9
    type3_batch(slots, 1'b1, 1'b1, 10);

    $display("mechanisms: state_load=%0d feedback=%0d full_batch=%0d partial_batch=%0d tree=%0d chain=%0d identity_pad=%0d out_stall=%0d in_gap=%0d",
             n_state_load, n_feedback, n_full_batch, n_partial_batch, n_tree, n_chain,
             n_identity_pad, n_out_stall, n_in_gap);
    if (n_state_load == 0)    begin failures++; $display("no state load"); end
    if (n_feedback == 0)      begin failures++; $display("no feedback run"); end
    if (n_full_batch == 0)    begin failures++; $display("no full batch"); end
    if (n_partial_batch == 0) begin failures++; $display("no partial batch"); end
    if (n_tree == 0)          begin failures++; $display("no tree batch"); end
    if (n_chain == 0)         begin failures++; $display("no chained batch"); end
    if (n_identity_pad == 0)  begin failures++; $display("no identity padding"); end
    if (n_out_stall == 0)     begin failures++; $display("no output stall"); end
    if (n_in_gap == 0)        begin failures++; $display("no input gap"); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
