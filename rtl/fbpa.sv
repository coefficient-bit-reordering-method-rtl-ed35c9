// fbpa: folded bit-plane array, the datapath of the configurable FIR filter.
//
// K rows (fu_row, folding sets S_0 .. S_(K-1)) are connected in a ring: row s
// reads the registered state of row s-1, and S_0 reads S_(K-1). An output word
// is computed by a chain of L = K*n_eff operations (one per coefficient bit,
// coefficient c_(kC-1) first, each coefficient LSB first) that runs around
// the ring one row per clock. A new chain starts in S_0 every n_eff clocks
// (chain_start), so K chains are in flight at any time, one in each row, and
// each row receives from the coefficient store the bit of the chain it
// currently holds. A chain ends in S_(K-1) at folding order n_eff-1; in the
// next clock the output adder turns its carry-save sum into y while S_0
// starts the next chain.
//
// Input words: x_in is taken in the chain_start clock and held for the rest
// of the sample period; every row that begins a new coefficient uses the
// word of the current sample period. This yields
//   y = sum_i c_i * x_(n-i)
// when each coefficient of a chain begins in the sample period after the
// one before it (true for kC*mC = K*n_eff with mC >= n_eff and
// (mC - n_eff)*(kC - 1) < n_eff, which includes kC = 2, mC = 6 on K = 3,
// N = 4). Other splits follow the same schedule but mix input samples.
//
// Timing: y_valid pulses once per n_eff clocks in run mode; y appears
// K*n_eff + 1 clocks after the start of its chain. clear (loading) zeroes all
// partial sums and operands so that run mode starts from an all-zero history.
//
// Follows the document: ring of rows, one clock per row, shift by one
// position per row, new word in S_0 every N clocks, result from S_(K-1)
// after L clocks, adder below the rows. Register-level details are this
// design's own.
module fbpa #(
  parameter int K  = 3,
  parameter int N  = 4,
  parameter int XW = 5,
  parameter int YW = XW + K*N,
  parameter int TW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          chain_start,
  input  logic          out_take,
  input  logic [TW-1:0] m_c,
  input  logic [XW-1:0] x_in,
  input  logic [K-1:0]  cbit,
  output logic [YW-1:0] y,
  output logic          y_valid
);
  logic [YW-1:0] s_q [K];
  logic [YW-1:0] c_q [K];
  logic [YW-1:0] x_q [K];
  logic [TW-1:0] j_q [K];
  logic [XW-1:0] x_hold, x_cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           x_hold <= '0;
    else if (clear)       x_hold <= '0;
    else if (chain_start) x_hold <= x_in;
  end

  always_comb x_cur = clear ? '0 : (chain_start ? x_in : x_hold);

  for (genvar s = 0; s < K; s++) begin : g_row
    localparam int P = (s == 0) ? K - 1 : s - 1;
    fu_row #(.XW(XW), .YW(YW), .TW(TW)) u_row (
      .clk   (clk),
      .rst_n (rst_n),
      .clear (clear),
      .start ((s == 0) ? chain_start : 1'b0),
      .m_c   (m_c),
      .x_in  (x_cur),
      .cbit  (cbit[s]),
      .s_prev(s_q[P]),
      .c_prev(c_q[P]),
      .x_prev(x_q[P]),
      .j_prev(j_q[P]),
      .s_q   (s_q[s]),
      .c_q   (c_q[s]),
      .x_q   (x_q[s]),
      .j_q   (j_q[s])
    );
  end

  out_adder #(.YW(YW)) u_add (
    .clk    (clk),
    .rst_n  (rst_n),
    .take   (out_take),
    .s_vec  (s_q[K-1]),
    .c_vec  (c_q[K-1]),
    .y      (y),
    .y_valid(y_valid)
  );

endmodule
