// mvk_kernel -- Type-2 emulation kernel: K layer matrices per transfer.
//
// A parallel version of the Type-1 kernel (mv_kernel). Instead of one layer
// matrix per run, the host sends up to K layer matrices at once on K
// concurrent input streams, each into a buffer of its own, so one transfer
// covers K circuit layers. The kernel then applies them to the state vector
// in slot order, S = M_(n-1) * ... * M_1 * M_0 * S_in, one matrix-vector
// product (N*N cycles on a single complex MAC) after another, feeding each
// result back as the next input, and streams out only the final state.
//   1. LOAD    streams m_*[0 .. n_layers-1] (N*N elements each, row-major) fill
//              the matrix buffers concurrently; the initial state arrives on
//              s_* when load_state was set with start.
//   2. COMPUTE n_layers products, n_layers*N*N cycles.
//   3. OUTPUT  the final state on o_* (N elements, index 0 first).
// As in Type-1 the last result stays in the kernel, so a run started with
// load_state = 0 continues from it. Storage is K matrices and two vectors.
//
// Interface: start, load_state and n_layers (1..K; other values are treated
// as K) are sampled while idle; done pulses once after the last output word.
// Slots at or above n_layers are not read and their streams are not accepted.
// Streams use valid/ready; o_valid and o_data hold until o_ready. With
// streams that never stall, done rises N*N + n_layers*(N*N + 2) + N + 1 clock
// cycles after the edge that samples start.
//
// From the architecture description: K concurrent matrix input streams,
// sequential matrix-vector products with the state fed back, storage of K
// matrices and two vectors. This design's own choices: the handshake, the
// n_layers count for a last, partly filled batch, K = 8 by default, and a
// single serial MAC shared by all layers.
module mvk_kernel
  import fp64_pkg::*;
#(
  parameter int unsigned NQ = 7,
  parameter int unsigned K  = 8,
  localparam int unsigned LW = $clog2(K) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // command
  input  logic          start,
  input  logic          load_state,
  input  logic [LW-1:0] n_layers,
  output logic          busy,
  output logic          done,
  // K layer matrices in (M_Ln .. M_Ln+K-1), row-major
  input  logic          m_valid [K],
  output logic          m_ready [K],
  input  cplx_t         m_data  [K],
  // initial state vector in (S_i/p)
  input  logic          s_valid,
  output logic          s_ready,
  input  cplx_t         s_data,
  // final state vector out (S_o/p)
  output logic          o_valid,
  input  logic          o_ready,
  output cplx_t         o_data
);
  localparam int unsigned N  = 1 << NQ;
  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1;

  typedef enum logic [1:0] {IDLE, LOAD, COMPUTE, OUTPUT} state_e;
  state_e state;

  logic  cur;                       // state buffer cur holds the input state
  cplx_t v_rd [2];                  // read data of the two state buffers
  cplx_t m_rd [K];                  // read data of the matrix buffers

  logic [2*NQ:0] m_cnt [K];
  logic [NQ:0]   s_cnt;
  logic [NQ:0]   o_cnt;
  logic [LW-1:0] n_lay;              // layers in this batch
  logic [LW-1:0] layer;              // layer being computed
  logic          need_state;
  logic          all_m_done, s_done;
  logic          slot_full [K];

  logic          eng_start, eng_done, eng_wr;
  logic [NQ-1:0] eng_row, eng_col, eng_waddr;
  cplx_t         eng_m, eng_v, eng_wdata;

  always_comb begin
    all_m_done = 1'b1;
    for (int s = 0; s < int'(K); s++) begin
      slot_full[s] = (m_cnt[s] == (2*NQ+1)'(N*N)) || (s >= int'(n_lay));
      m_ready[s]   = (state == LOAD) && !slot_full[s];
      if (!slot_full[s]) all_m_done = 1'b0;
    end
  end

  assign s_done  = (s_cnt == (NQ+1)'(N)) || !need_state;
  assign s_ready = (state == LOAD) && need_state && !(s_cnt == (NQ+1)'(N));
  assign o_valid = (state == OUTPUT);
  assign o_data  = v_rd[cur];
  assign busy    = (state != IDLE);

  assign eng_m = m_rd[layer[SW-1:0]];
  assign eng_v = v_rd[cur];

  mv_engine #(.NQ(NQ)) u_engine (
    .clk, .rst_n,
    .start(eng_start), .busy(), .done(eng_done),
    .row(eng_row), .col(eng_col),
    .mat_elem(eng_m), .vec_elem(eng_v),
    .wr_en(eng_wr), .wr_addr(eng_waddr), .wr_data(eng_wdata)
  );

  // one buffer per matrix slot: written by its stream, read by the engine
  for (genvar sl = 0; sl < int'(K); sl++) begin : g_mbuf
    cplx_ram #(.AW(2*NQ)) u_ram (
      .clk, .we(m_valid[sl] && m_ready[sl]), .wr_addr(m_cnt[sl][2*NQ-1:0]),
      .wr_data(m_data[sl]), .rd_addr({eng_row, eng_col}), .rd_data(m_rd[sl])
    );
  end

  // state buffers, as in mv_kernel
  for (genvar b = 0; b < 2; b++) begin : g_vbuf
    logic          we;
    logic [NQ-1:0] wa, ra;
    cplx_t         wd;
    always_comb begin
      if (cur == 1'(b)) begin
        we = s_valid && s_ready;
        wa = s_cnt[NQ-1:0];
        wd = s_data;
      end else begin
        we = eng_wr;
        wa = eng_waddr;
        wd = eng_wdata;
      end
      ra = (state == OUTPUT) ? o_cnt[NQ-1:0] : eng_col;
    end
    cplx_ram #(.AW(NQ)) u_ram (
      .clk, .we, .wr_addr(wa), .wr_data(wd), .rd_addr(ra), .rd_data(v_rd[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      cur        <= 1'b0;
      for (int s = 0; s < int'(K); s++) m_cnt[s] <= '0;
      s_cnt      <= '0;
      o_cnt      <= '0;
      n_lay      <= LW'(K);
      layer      <= '0;
      need_state <= 1'b0;
      eng_start  <= 1'b0;
      done       <= 1'b0;
    end else begin
      eng_start <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          state      <= LOAD;
          need_state <= load_state;
          n_lay      <= (n_layers == '0 || n_layers > LW'(K)) ? LW'(K) : n_layers;
          for (int s = 0; s < int'(K); s++) m_cnt[s] <= '0;
          s_cnt      <= '0;
        end
        LOAD: begin
          for (int s = 0; s < int'(K); s++)
            if (m_valid[s] && m_ready[s]) m_cnt[s] <= m_cnt[s] + 1'b1;
          if (s_valid && s_ready) s_cnt <= s_cnt + 1'b1;
          if (all_m_done && s_done) begin
            state     <= COMPUTE;
            layer     <= '0;
            eng_start <= 1'b1;
          end
        end
        COMPUTE: if (eng_done) begin
          cur <= ~cur;                // result is the next layer's input
          if (layer == n_lay - 1'b1) begin
            o_cnt <= '0;
            state <= OUTPUT;
          end else begin
            layer     <= layer + 1'b1;
            eng_start <= 1'b1;
          end
        end
        OUTPUT: if (o_ready) begin
          o_cnt <= o_cnt + 1'b1;
          if (o_cnt == (NQ+1)'(N - 1)) begin
            state <= IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    o_valid && !o_ready |=> o_valid && $stable(o_data));
endmodule
