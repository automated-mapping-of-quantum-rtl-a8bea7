// mv_kernel -- Type-1 emulation kernel: one layer matrix times the state vector.
//
// A quantum circuit is cut into layers; the host turns every layer into a
// 2**NQ x 2**NQ complex matrix M_Ln. Emulating the circuit means applying the
// layer matrices to the state vector one after another. This kernel does one
// such step per run:
//   1. LOAD    the layer matrix arrives on the m_* stream (N*N elements,
//              row-major) and is written into the on-chip matrix buffer. If
//              load_state was set with start, the initial state vector arrives
//              on the s_* stream (N elements) at the same time.
//   2. COMPUTE mv_engine forms S_out = M_Ln * S_in, one complex MAC per clock,
//              N*N cycles.
//   3. OUTPUT  S_out leaves on the o_* stream (N elements, index 0 first).
// The kernel keeps two state buffers and swaps their roles after every
// product, so S_out of one run is S_in of the next: a run started with
// load_state = 0 continues from the previous result (the feedback path of the
// architecture). Storage is one matrix and two state vectors.
//
// Interface: start is sampled only while idle (busy low); done pulses for one
// cycle after the last output element has been taken. Streams use a
// valid/ready handshake: a word moves on a clock edge where both are high, and
// the kernel holds o_valid and o_data steady until o_ready. With streams that
// never stall, done rises N*N (load) + N*N (compute) + N (output) + 3 clock
// cycles after the edge that samples start.
//
// From the architecture description: the single matrix-vector kernel, its two
// inputs (layer matrix and state vector), the state fed back from output to
// input, double-precision complex arithmetic and buffering of one matrix and
// two vectors. This design's own choices: the stream handshake, row-major
// element order, a single serial MAC, and asynchronous-read buffers
// (cplx_ram, one per buffer).
module mv_kernel
  import fp64_pkg::*;
#(
  parameter int unsigned NQ = 7
) (
  input  logic   clk,
  input  logic   rst_n,
  // command
  input  logic   start,
  input  logic   load_state,
  output logic   busy,
  output logic   done,
  // layer matrix in (M_Ln), row-major
  input  logic   m_valid,
  output logic   m_ready,
  input  cplx_t  m_data,
  // initial state vector in (S_i/p)
  input  logic   s_valid,
  output logic   s_ready,
  input  cplx_t  s_data,
  // state vector out (S_o/p)
  output logic   o_valid,
  input  logic   o_ready,
  output cplx_t  o_data
);
  localparam int unsigned N = 1 << NQ;

  typedef enum logic [1:0] {IDLE, LOAD, COMPUTE, OUTPUT} state_e;
  state_e state;

  logic  cur;                       // state buffer cur holds the input state
  cplx_t v_rd [2];                  // read data of the two state buffers

  logic [2*NQ:0] m_cnt;             // matrix elements received
  logic [NQ:0]   s_cnt;             // state elements received
  logic [NQ:0]   o_cnt;             // state elements sent
  logic          need_state;
  logic          m_done, s_done;

  // engine
  logic          eng_start, eng_done, eng_wr;
  logic [NQ-1:0] eng_row, eng_col, eng_waddr;
  cplx_t         eng_m, eng_v, eng_wdata;

  assign m_done  = (m_cnt == (2*NQ+1)'(N*N));
  assign s_done  = (s_cnt == (NQ+1)'(N)) || !need_state;
  assign m_ready = (state == LOAD) && !(m_cnt == (2*NQ+1)'(N*N));
  assign s_ready = (state == LOAD) && need_state && !(s_cnt == (NQ+1)'(N));
  assign o_valid = (state == OUTPUT);
  assign o_data  = v_rd[cur];
  assign busy    = (state != IDLE);

  assign eng_v = v_rd[cur];

  mv_engine #(.NQ(NQ)) u_engine (
    .clk, .rst_n,
    .start(eng_start), .busy(), .done(eng_done),
    .row(eng_row), .col(eng_col),
    .mat_elem(eng_m), .vec_elem(eng_v),
    .wr_en(eng_wr), .wr_addr(eng_waddr), .wr_data(eng_wdata)
  );

  // matrix buffer: written by the m_ stream, read by the engine
  cplx_ram #(.AW(2*NQ)) u_mbuf (
    .clk, .we(m_valid && m_ready), .wr_addr(m_cnt[2*NQ-1:0]), .wr_data(m_data),
    .rd_addr({eng_row, eng_col}), .rd_data(eng_m)
  );

  // state buffers: the input buffer (cur) is written by the s_ stream and
  // read by the engine, then by the output stream once the roles have
  // swapped; the other one takes the engine's results
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
      m_cnt      <= '0;
      s_cnt      <= '0;
      o_cnt      <= '0;
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
          m_cnt      <= '0;
          s_cnt      <= '0;
        end
        LOAD: begin
          if (m_valid && m_ready) m_cnt <= m_cnt + 1'b1;
          if (s_valid && s_ready) s_cnt <= s_cnt + 1'b1;
          if (m_done && s_done) begin
            state     <= COMPUTE;
            eng_start <= 1'b1;
          end
        end
        COMPUTE: if (eng_done) begin
          cur   <= ~cur;              // output becomes next input (feedback)
          o_cnt <= '0;
          state <= OUTPUT;
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

  // a stalled output word must stay put
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    o_valid && !o_ready |=> o_valid && $stable(o_data));
endmodule
