// qemu_top -- the three quantum-circuit emulation kernel architectures.
//
// A quantum circuit of NQ qubits is emulated by multiplying its 2**NQ-entry
// complex state vector by one 2**NQ x 2**NQ matrix per circuit layer. The
// host cuts the circuit into layers, builds each layer's matrix and moves
// matrices and vectors to and from the FPGA; the kernels do the arithmetic
// in double-precision complex numbers. Three kernel architectures trade
// memory for speed, and all three are here side by side, each with its own
// host-facing ports (the host itself is outside this design):
//
//   t1_*  Type-1: mv_kernel. One layer matrix per run, state fed back inside
//         the kernel, D runs for a circuit of depth D.
//   t2_*  Type-2: mvk_kernel. K2 layer matrices per run on K2 concurrent
//         streams, applied one after another inside the kernel.
//   t3_*  Type-3: mm_tree_kernel multiplies K3 layer matrices into M_Total
//         (t3mm_*), which the host passes with the initial state to a
//         matrix-vector kernel (t3mv_*) for the final state vector.
//
// All streams are valid/ready, one complex element (two doubles, real part in
// the upper 64 bits) per transfer, matrices row-major. Each kernel has its own
// start/busy/done. The interfaces and timing of each kernel are described in
// its own file. NQ = 7 is the largest register the architectures were
// evaluated with; K2 = K3 = 8 are this design's defaults.
module qemu_top
  import fp64_pkg::*;
#(
  parameter int unsigned NQ = 7,
  parameter int unsigned K2 = 8,
  parameter int unsigned K3 = 8,
  localparam int unsigned LW2 = $clog2(K2) + 1
) (
  input  logic           clk,
  input  logic           rst_n,

  // Type-1
  input  logic           t1_start,
  input  logic           t1_load_state,
  output logic           t1_busy,
  output logic           t1_done,
  input  logic           t1_m_valid,
  output logic           t1_m_ready,
  input  cplx_t          t1_m_data,
  input  logic           t1_s_valid,
  output logic           t1_s_ready,
  input  cplx_t          t1_s_data,
  output logic           t1_o_valid,
  input  logic           t1_o_ready,
  output cplx_t          t1_o_data,

  // Type-2
  input  logic           t2_start,
  input  logic           t2_load_state,
  input  logic [LW2-1:0] t2_n_layers,
  output logic           t2_busy,
  output logic           t2_done,
  input  logic           t2_m_valid [K2],
  output logic           t2_m_ready [K2],
  input  cplx_t          t2_m_data  [K2],
  input  logic           t2_s_valid,
  output logic           t2_s_ready,
  input  cplx_t          t2_s_data,
  output logic           t2_o_valid,
  input  logic           t2_o_ready,
  output cplx_t          t2_o_data,

  // Type-3, matrix-matrix part
  input  logic           t3mm_start,
  input  logic           t3mm_chain,
  output logic           t3mm_busy,
  output logic           t3mm_done,
  input  logic           t3mm_m_valid [K3],
  output logic           t3mm_m_ready [K3],
  input  cplx_t          t3mm_m_data  [K3],
  output logic           t3mm_o_valid,
  input  logic           t3mm_o_ready,
  output cplx_t          t3mm_o_data,

  // Type-3, matrix-vector part
  input  logic           t3mv_start,
  input  logic           t3mv_load_state,
  output logic           t3mv_busy,
  output logic           t3mv_done,
  input  logic           t3mv_m_valid,
  output logic           t3mv_m_ready,
  input  cplx_t          t3mv_m_data,
  input  logic           t3mv_s_valid,
  output logic           t3mv_s_ready,
  input  cplx_t          t3mv_s_data,
  output logic           t3mv_o_valid,
  input  logic           t3mv_o_ready,
  output cplx_t          t3mv_o_data
);

  mv_kernel #(.NQ(NQ)) u_type1 (
    .clk, .rst_n,
    .start(t1_start), .load_state(t1_load_state), .busy(t1_busy), .done(t1_done),
    .m_valid(t1_m_valid), .m_ready(t1_m_ready), .m_data(t1_m_data),
    .s_valid(t1_s_valid), .s_ready(t1_s_ready), .s_data(t1_s_data),
    .o_valid(t1_o_valid), .o_ready(t1_o_ready), .o_data(t1_o_data)
  );

  mvk_kernel #(.NQ(NQ), .K(K2)) u_type2 (
    .clk, .rst_n,
    .start(t2_start), .load_state(t2_load_state), .n_layers(t2_n_layers),
    .busy(t2_busy), .done(t2_done),
    .m_valid(t2_m_valid), .m_ready(t2_m_ready), .m_data(t2_m_data),
    .s_valid(t2_s_valid), .s_ready(t2_s_ready), .s_data(t2_s_data),
    .o_valid(t2_o_valid), .o_ready(t2_o_ready), .o_data(t2_o_data)
  );

  mm_tree_kernel #(.NQ(NQ), .K(K3)) u_type3_mm (
    .clk, .rst_n,
    .start(t3mm_start), .chain(t3mm_chain), .busy(t3mm_busy), .done(t3mm_done),
    .m_valid(t3mm_m_valid), .m_ready(t3mm_m_ready), .m_data(t3mm_m_data),
    .o_valid(t3mm_o_valid), .o_ready(t3mm_o_ready), .o_data(t3mm_o_data)
  );

  mv_kernel #(.NQ(NQ)) u_type3_mv (
    .clk, .rst_n,
    .start(t3mv_start), .load_state(t3mv_load_state), .busy(t3mv_busy),
    .done(t3mv_done),
    .m_valid(t3mv_m_valid), .m_ready(t3mv_m_ready), .m_data(t3mv_m_data),
    .s_valid(t3mv_s_valid), .s_ready(t3mv_s_ready), .s_data(t3mv_s_data),
    .o_valid(t3mv_o_valid), .o_ready(t3mv_o_ready), .o_data(t3mv_o_data)
  );
endmodule
