// mm_tree_kernel -- Type-3 emulation kernel: combine K layer matrices into one.
//
// Applying K layers one after another costs K matrix-vector products, and
// every layer matrix has to be moved to the FPGA anyway. This kernel first
// multiplies the K layer matrices of a batch together into a single matrix
// M_Total, which one matrix-vector product (a separate mv_kernel) then applies
// to the state vector. The product is formed as a binary tree: the K input
// matrices are multiplied in pairs, each pair's result is kept in a buffer of
// its own, those results are multiplied in pairs again, and so on, log2(K)
// levels in all. All products of one level run at the same time on K/2
// mm_engine instances, so a batch takes log2(K) * N^3 compute cycles.
//
// Buffers are numbered as a heap: node 1 is the root (M_Total), nodes 2..K-1
// are the intermediate pair results, nodes K..2K-1 hold input slots 0..K-1.
// Node v = node(2v) * node(2v+1), so
//   M_Total = M_slot0 * M_slot1 * ... * M_slot(K-1).
// Applied to a state vector, slot K-1 therefore acts first: the host places
// the earliest layer of the batch in the highest slot.
//
// Feedback: when chain is set with start, slot K-1 is not loaded; the
// previous M_Total (still in the root buffer) takes its place, so
// M_Total(new) = M_slot0 * ... * M_slot(K-2) * M_Total(old) and a long circuit
// is folded into one matrix batch by batch. The root is written only on the
// last level, after the level that reads it.
//
//   1. LOAD    m_*[s] (N*N elements each, row-major) fill the input slots
//              concurrently; slots the command does not need are not accepted.
//   2. COMPUTE log2(K) tree levels; level l uses engines 0 .. K/2^(l+1)-1.
//   3. OUTPUT  M_Total on o_* (N*N elements, row-major).
// Storage is 2K-1 matrices. start and chain are sampled while idle; done
// pulses once after the last output word; o_valid/o_data hold until o_ready.
// With streams that never stall, done rises N*N + log2(K)*(N^3 + 2) + N*N + 1
// clock cycles after the edge that samples start.
//
// From the architecture description: K matrices into buffers, pairwise
// products kept in dedicated buffers and multiplied again to form M_Total,
// M_Total sent out and fed back to the kernel's last input, the O(N^3) product
// time and log2(K) levels. This design's own choices: the heap numbering
// (all node buffers in one array, nbuf[node][element]), the slot order, the
// handshake, one serial MAC per engine, and 2K-1 buffers
// (enough for one batch at a time) rather than the larger buffering the
// description budgets for full parallelism.
module mm_tree_kernel
  import fp64_pkg::*;
#(
  parameter int unsigned NQ = 7,
  parameter int unsigned K  = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  // command
  input  logic   start,
  input  logic   chain,
  output logic   busy,
  output logic   done,
  // K layer matrices in, slot s on stream s, row-major
  input  logic   m_valid [K],
  output logic   m_ready [K],
  input  cplx_t  m_data  [K],
  // combined matrix out (M_Total), row-major
  output logic   o_valid,
  input  logic   o_ready,
  output cplx_t  o_data
);
  localparam int unsigned N  = 1 << NQ;
  localparam int unsigned LV = $clog2(K);         // tree levels
  localparam int unsigned E  = K / 2;             // engines
  localparam int unsigned LVW = (LV > 1) ? $clog2(LV) + 1 : 1;
  localparam int unsigned VW  = $clog2(2*K);      // node index width

  typedef enum logic [1:0] {IDLE, LOAD, COMPUTE, OUTPUT} state_e;
  state_e state;

  cplx_t nbuf [2*K][N*N];

  logic [2*NQ:0] m_cnt [K];
  logic [2*NQ:0] o_cnt;
  logic          chain_q;
  logic          all_m_done;
  logic          slot_full [K];
  logic [LVW-1:0] level;

  logic          eng_start;
  logic          eng_done  [E];
  logic [2*NQ-1:0] eng_aa  [E];
  logic [2*NQ-1:0] eng_ba  [E];
  cplx_t         eng_a     [E];
  cplx_t         eng_b     [E];
  logic          eng_wr    [E];
  logic [2*NQ-1:0] eng_wa  [E];
  cplx_t         eng_wd    [E];
  logic [VW-1:0] eng_node  [E];    // node engine e produces at this level
  logic          eng_act   [E];    // engine e has work at this level

  // which node each engine works on at the current level
  always_comb begin
    for (int e = 0; e < int'(E); e++) begin
      eng_act[e]  = (e < int'(K >> (level + 1)));
      eng_node[e] = VW'(int'(K >> (level + 1)) + e);
    end
  end

  // operand selection: node 2v is the left factor, node 2v+1 the right one;
  // in chain mode the last leaf is replaced by the root
  always_comb begin
    for (int e = 0; e < int'(E); e++) begin
      logic [VW-1:0] na, nb;
      na = VW'(2 * int'(eng_node[e]));
      nb = VW'(2 * int'(eng_node[e]) + 1);
      if (chain_q && nb == VW'(2*K - 1)) nb = VW'(1);
      eng_a[e] = nbuf[na][eng_aa[e]];
      eng_b[e] = nbuf[nb][eng_ba[e]];
    end
  end


  for (genvar e = 0; e < int'(E); e++) begin : g_eng
    mm_engine #(.NQ(NQ)) u_engine (
      .clk, .rst_n,
      .start(eng_start && eng_act[e]), .busy(), .done(eng_done[e]),
      .a_addr(eng_aa[e]), .b_addr(eng_ba[e]),
      .a_elem(eng_a[e]), .b_elem(eng_b[e]),
      .wr_en(eng_wr[e]), .wr_addr(eng_wa[e]), .wr_data(eng_wd[e])
    );
  end

  always_comb begin
    all_m_done = 1'b1;
    for (int s = 0; s < int'(K); s++) begin
      slot_full[s] = (m_cnt[s] == (2*NQ+1)'(N*N)) || (chain_q && s == int'(K) - 1);
      m_ready[s]   = (state == LOAD) && !slot_full[s];
      if (!slot_full[s]) all_m_done = 1'b0;
    end
  end

  assign o_valid = (state == OUTPUT);
  assign o_data  = nbuf[1][o_cnt[2*NQ-1:0]];
  assign busy    = (state != IDLE);

  always_ff @(posedge clk) begin
    for (int s = 0; s < int'(K); s++)
      if (m_valid[s] && m_ready[s]) nbuf[int'(K) + s][m_cnt[s][2*NQ-1:0]] <= m_data[s];
    for (int e = 0; e < int'(E); e++)
      if (eng_wr[e] && eng_act[e]) nbuf[eng_node[e]][eng_wa[e]] <= eng_wd[e];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      for (int s = 0; s < int'(K); s++) m_cnt[s] <= '0;
      o_cnt     <= '0;
      chain_q   <= 1'b0;
      level     <= '0;
      eng_start <= 1'b0;
      done      <= 1'b0;
    end else begin
      eng_start <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          state   <= LOAD;
          chain_q <= chain;
          for (int s = 0; s < int'(K); s++) m_cnt[s] <= '0;
        end
        LOAD: begin
          for (int s = 0; s < int'(K); s++)
            if (m_valid[s] && m_ready[s]) m_cnt[s] <= m_cnt[s] + 1'b1;
          if (all_m_done) begin
            state     <= COMPUTE;
            level     <= '0;
            eng_start <= 1'b1;
          end
        end
        // all active engines start together and take the same time, so
        // engine 0 finishing marks the end of a level
        COMPUTE: if (eng_done[0]) begin
          if (level == LVW'(LV - 1)) begin
            o_cnt <= '0;
            state <= OUTPUT;
          end else begin
            level     <= level + 1'b1;
            eng_start <= 1'b1;
          end
        end
        OUTPUT: if (o_ready) begin
          o_cnt <= o_cnt + 1'b1;
          if (o_cnt == (2*NQ+1)'(N*N - 1)) begin
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
  // all engines of a level finish on the same cycle
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    state == COMPUTE && eng_done[0] |-> eng_done[E-1] || !eng_act[E-1]);
endmodule
