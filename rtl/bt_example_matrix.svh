// bt_example_matrix: constant function that builds a pseudo-random Boolean
// matrix of M rows by N columns, ordered the way the BT search prefers.
//
// Included inside a module that declares the parameters N and M. Each bit is
// drawn from a 32-bit xorshift generator (x ^= x<<13; x ^= x>>17; x ^= x<<5)
// and is 1 when the low 10 bits of the state are below THRESH (so the density
// of ones is THRESH/1024). A row that comes out all zero is drawn again, since
// a zero row admits no testor at all. The rows are then stably sorted by
// ascending number of ones (rows with more zeros on top) and the columns are
// permuted so the column with the most ones is leftmost (bit N-1) and the one
// with the fewest is rightmost (bit 0), ties keeping the leftmost original
// column first. Evaluated at elaboration only.
function automatic logic [M-1:0][N-1:0] bt_example_matrix(input logic [31:0] seed,
                                                         input int unsigned thresh);
  logic [M-1:0][N-1:0] r;
  logic [M-1:0][N-1:0] q;
  logic [31:0]         x;
  logic [N-1:0]        row;
  int unsigned         cnt [N];
  int                  perm [N];
  bit                  used [N];
  int                  best;
  int                  j;
  x = seed;
  for (int i = 0; i < M; i++) begin
    row = '0;
    while (row == '0) begin
      for (int b = 0; b < N; b++) begin
        x = x ^ (x << 13);
        x = x ^ (x >> 17);
        x = x ^ (x << 5);
        row[b] = ((x & 32'd1023) < thresh);
      end
    end
    r[i] = row;
  end
  // Stable insertion sort of rows by ascending popcount.
  for (int i = 1; i < M; i++) begin
    row = r[i];
    j   = i - 1;
    while (j >= 0 && $countones(r[j]) > $countones(row)) begin
      r[j+1] = r[j];
      j      = j - 1;
    end
    r[j+1] = row;
  end
  // Column permutation: destination bit p takes source column perm[p].
  for (int b = 0; b < N; b++) begin
    cnt[b]  = 0;
    used[b] = 1'b0;
    for (int i = 0; i < M; i++) cnt[b] += r[i][b];
  end
  for (int p = N - 1; p >= 0; p--) begin
    best = -1;
    for (int b = N - 1; b >= 0; b--)
      if (!used[b] && (best < 0 || cnt[b] > cnt[best])) best = b;
    used[best] = 1'b1;
    perm[p]    = best;
  end
  for (int i = 0; i < M; i++)
    for (int p = 0; p < N; p++) q[i][p] = r[i][perm[p]];
  return q;
endfunction
