// tb_qubit_sizes -- the Type-1 kernel at the three register sizes of the
// published measurements: 3, 5 and 7 qubits (N = 8, 32, 128).
//
// Each size runs the same ten-layer circuit through its own kernel (see
// t1_circuit_runner), checks every intermediate state against a gate-by-gate
// reference and the per-layer cycle count 2*N*N + N + 4 (edges from start
// sampled to done raised), and prints the cycles per layer.
module tb_qubit_sizes;
  logic fin3, fin5, fin7;
  int   c3, c5, c7, f3, f5, f7, y3, y5, y7;

  t1_circuit_runner #(.NQ(3)) u_q3 (.finished(fin3), .checks(c3), .failures(f3), .cycles_per_layer(y3));
  t1_circuit_runner #(.NQ(5)) u_q5 (.finished(fin5), .checks(c5), .failures(f5), .cycles_per_layer(y5));
  t1_circuit_runner #(.NQ(7)) u_q7 (.finished(fin7), .checks(c7), .failures(f7), .cycles_per_layer(y7));

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c3 + c5 + c7, f3 + f5 + f7 + 1);
    $finish;
  end

  initial begin
    wait (fin3 && fin5 && fin7);
    $display("cycles per layer: 3 qubits %0d, 5 qubits %0d, 7 qubits %0d", y3, y5, y7);
    $display("TB_RESULT checks=%0d failures=%0d", c3 + c5 + c7, f3 + f5 + f7);
    $finish;
  end
endmodule
