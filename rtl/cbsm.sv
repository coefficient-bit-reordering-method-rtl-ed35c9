// cbsm: coefficient bit supply module, the coefficient bit reordering store
// of the folded FIR filter.
//
// A K x N array of one-bit cells, named [row, column], row 0 at the bottom,
// column 0 at the right. Row K-1-s feeds functional unit S_s from its leftmost
// cell [K-1-s, N-1], so cbit[s] is the bit S_s needs in the current clock.
//
// Initialization mode (init high): the serial coefficient bits enter at the
// first active cell of row 0, least significant bit first, starting with
// coefficient c_(kC-1). Every clock each bit moves one row up and one column
// to the left, both wrapping around (cell [a, b] takes from cell
// [a-1 mod K, b-1 mod n_eff]). After K*n_eff clocks the bit of operation p
// (p = 1 for c_(kC-1)^0, bits in the order they entered) sits in row
// K-1-((p-1) mod K), column N-1-((p-1) mod n_eff), which is exactly where the
// run mode needs it. This relies on gcd(K, n_eff) = 1, so that the diagonal
// path passes through every active cell once.
//
// Run mode (run high): each row rotates right to left (cell [a, b] takes
// from [a, b-1], the rightmost active cell from the leftmost one), so in the
// r-th run clock after loading row K-1-s presents the bit of the operation
// that S_s performs at folding order r. With neither mode the cells hold.
//
// Changeable length: n_eff (1..N) is the folding factor in use. Only the
// n_eff leftmost columns N-n_eff .. N-1 are active; the cell in column
// N-n_eff takes the row's feedback instead of its right neighbour, in both
// modes. n_eff must be stable while loading and running.
//
// Follows the document: the array shape, the diagonal loading path, the
// serial order, the rotation and the shortened rows. Flip-flops instead of
// latches, the choice of the leftmost columns as the active ones when the
// rows are shortened, and the reset to zero are this design's choices.
module cbsm #(
  parameter int K = 3,  // folding sets (rows)
  parameter int N = 4   // folding factor (columns)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,       // initialization mode
  input  logic                 run,        // run mode
  input  logic [$clog2(N+1)-1:0] n_eff,    // active row length, 1..N
  input  logic                 serial_in,  // serial coefficient bit
  output logic [K-1:0]         cbit        // cbit[s] feeds S_s
);
  typedef logic [$clog2(N+1)-1:0] col_t;

  logic [N-1:0] bit_q [K];  // bit_q[a][b] is cell [a, b]
  logic [N-1:0] bit_d [K];
  col_t         fc;  // first (rightmost) active column

  always_comb begin
    fc = col_t'(N) - n_eff;
    for (int a = 0; a < K; a++) begin
      for (int b = 0; b < N; b++) begin
        int pc;   // column feeding column b inside the active ring
        int pr;   // row feeding row a on the diagonal path
        pc = (col_t'(b) == fc) ? N - 1 : b - 1;
        pr = (a == 0) ? K - 1 : a - 1;
        bit_d[a][b] = bit_q[a][b];
        if (col_t'(b) >= fc && pc >= 0) begin
          if (init) begin
            if (a == 0 && col_t'(b) == fc) bit_d[a][b] = serial_in;
            else                           bit_d[a][b] = bit_q[pr][pc];
          end else if (run) begin
            bit_d[a][b] = bit_q[a][pc];
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < K; a++) bit_q[a] <= '0;
    end else begin
      for (int a = 0; a < K; a++) bit_q[a] <= bit_d[a];
    end
  end

  always_comb begin
    for (int s = 0; s < K; s++) cbit[s] = bit_q[K-1-s][N-1];
  end

endmodule
